// tb_fc_hidden_neuron: one neuron with a fixed exemplar, radius and output
// weight. Random inputs, some placed inside the radius, are streamed in;
// the h bus is checked against {distance < R, V, distance} computed here,
// and the latency against 3 + ceil(log2 N) = 5 cycles.
module tb_fc_hidden_neuron;
  localparam int unsigned B = 8, N = 4;
  localparam logic [N-1:0][B-1:0] W = {8'd10, 8'd50, 8'd33, 8'd60};
  localparam logic [B-1:0] R = 8'd12;
  localparam logic [B-1:0] V = 8'hC3;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [N-1:0][B-1:0] x = '0;
  logic out_valid;
  logic [2*B:0] h;
  int checks = 0, failures = 0, cycle = 0, fired = 0, not_fired = 0;

  typedef struct { logic [2*B:0] h; int cyc; } exp_t;
  exp_t q[$];

  fc_hidden_neuron #(.N(N), .B(B), .W(W), .R(R), .V(V)) dut (.clk, .rst_n, .in_valid, .x, .out_valid, .h);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e; checks++;
    e = q.pop_front();
    if (h !== e.h || cycle - e.cyc != 5) begin
      failures++; $display("FAIL h=%h expected %h latency %0d", h, e.h, cycle - e.cyc);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 800; t++) begin
      int s;
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      for (int j = 0; j < N; j++)
        if (t % 2 == 0) x[j] = B'(int'(W[j]) + int'($urandom % 7) - 3);   // near the exemplar
        else            x[j] = B'($urandom % 100);
      s = 0;
      for (int j = 0; j < N; j++) s += (x[j] > W[j]) ? int'(x[j]) - int'(W[j]) : int'(W[j]) - int'(x[j]);
      if (s > 255) s = 255;
      if (in_valid) begin
        q.push_back('{{(s < int'(R)), V, B'(s)}, cycle});
        if (s < int'(R)) fired++; else not_fired++;
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    checks++;
    if (fired == 0 || not_fired == 0) begin failures++; $display("FAIL fired %0d not fired %0d", fired, not_fired); end
    $display("inside radius %0d, outside %0d", fired, not_fired);
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
