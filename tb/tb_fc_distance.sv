// tb_fc_distance: two distance units, one at the default size (N = 4) and
// one with N = 5 (adder tree padded to 8 leaves), fed a random input vector
// every cycle or with gaps. Each output is compared with a saturating
// city-block distance computed here, and its latency with 2 + ceil(log2 N).
// Inputs span the full 8-bit range, so saturation happens and is counted.
module tb_fc_distance;
  localparam int unsigned B = 8;
  localparam int unsigned N0 = 4, N1 = 5;
  localparam logic [N0-1:0][B-1:0] W0 = {8'd200, 8'd3, 8'd128, 8'd77};
  localparam logic [N1-1:0][B-1:0] W1 = {8'd0, 8'd255, 8'd19, 8'd64, 8'd140};

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [N1-1:0][B-1:0] x = '0;
  logic v0, v1;
  logic [B-1:0] d0, d1;
  int checks = 0, failures = 0, cycle = 0, saturated = 0;

  typedef struct { int d0; int d1; int cyc; } exp_t;
  exp_t q0[$], q1[$];

  fc_distance #(.N(N0), .B(B), .W(W0)) u0 (.clk, .rst_n, .in_valid, .x(x[N0-1:0]), .out_valid(v0), .d(d0));
  fc_distance #(.N(N1), .B(B), .W(W1)) u1 (.clk, .rst_n, .in_valid, .x(x),         .out_valid(v1), .d(d1));

  function automatic int ref_dist(input logic [N1-1:0][B-1:0] xv, input logic [N1-1:0][B-1:0] wv, input int n);
    int s = 0;
    for (int j = 0; j < n; j++) s += (xv[j] > wv[j]) ? int'(xv[j]) - int'(wv[j]) : int'(wv[j]) - int'(xv[j]);
    return s;
  endfunction

  // The tree saturates per adder: with non-negative terms this equals
  // saturating the total.
  function automatic int sat(input int s);
    return (s > 255) ? 255 : s;
  endfunction

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always @(negedge clk) if (rst_n) begin
    if (v0) begin
      exp_t e; checks++;
      e = q0.pop_front();
      if (int'(d0) != e.d0 || cycle - e.cyc != 4) begin
        failures++; $display("FAIL N=4 d=%0d expected %0d latency %0d", d0, e.d0, cycle - e.cyc);
      end
    end
    if (v1) begin
      exp_t e; checks++;
      e = q1.pop_front();
      if (int'(d1) != e.d1 || cycle - e.cyc != 5) begin
        failures++; $display("FAIL N=5 d=%0d expected %0d latency %0d", d1, e.d1, cycle - e.cyc);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      exp_t e;
      @(negedge clk);
      in_valid = (t < 300) || ($urandom % 3 != 0);
      for (int j = 0; j < N1; j++) x[j] = (t % 2 == 1) ? B'($urandom) : B'($urandom % 40);
      if (t == 10) x = W1;                 // distance 0
      if (in_valid) begin
        int r0, r1;
        r0 = ref_dist(x, {8'd0, W0}, N0);
        r1 = ref_dist(x, W1, N1);
        if (r0 > 255 || r1 > 255) saturated++;
        e = '{sat(r0), sat(r1), cycle};
        q0.push_back(e); q1.push_back(e);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (q0.size() != 0 || q1.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    checks++;
    if (saturated == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("saturated distances: %0d", saturated);
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
