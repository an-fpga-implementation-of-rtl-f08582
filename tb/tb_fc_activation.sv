// tb_fc_activation: drives distances around and away from the radius and
// checks the h bus {d < R, V, d} one cycle later, at one distance per cycle.
module tb_fc_activation;
  localparam int unsigned B = 8;
  localparam logic [B-1:0] R = 8'd100;
  localparam logic [B-1:0] V = 8'h5A;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [B-1:0] d = '0;
  logic out_valid;
  logic [2*B:0] h;
  int checks = 0, failures = 0, cycle = 0;

  typedef struct { logic [2*B:0] h; int cyc; } exp_t;
  exp_t q[$];

  fc_activation #(.B(B), .R(R), .V(V)) dut (.clk, .rst_n, .in_valid, .d, .out_valid, .h);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // Compare on the falling edge, then drive the next input.
  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      e = q.pop_front();
      if (h !== e.h || cycle - e.cyc != 1) begin
        failures++;
        $display("FAIL h=%h expected %h latency %0d", h, e.h, cycle - e.cyc);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      if (t < 5) d = R - 2 + B'(t);        // R-2 .. R+2
      else if (t == 5) d = '0;
      else if (t == 6) d = '1;
      else d = B'($urandom);
      if (in_valid) q.push_back('{{(d < R), V, d}, cycle});
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
