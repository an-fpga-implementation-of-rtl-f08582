// tb_fc_output_neuron: random sets of four ranked buses, a quarter of them
// with the nearest bus's fired flag set, one set per cycle or with gaps.
// Expected output, in 8-fraction-bit fixed point:
//   kNN: (24*v0 + 4*v1 + 2*v2 + 2*v3) / 32 * 256 = 8*(24*v0 + 4*v1 + 2*v2 + 2*v3)
//   1NN: 256*v0
// with the v's signed 8-bit. The latency must be 6 cycles. Extreme weights
// (all -128, all +127) are included.
module tb_fc_output_neuron;
  localparam int unsigned B = 8, K = 4;
  localparam int unsigned W = 2 * B + 1;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [K-1:0][W-1:0] mu = '0;
  logic out_valid, fired;
  logic signed [2*B-1:0] y;
  int checks = 0, failures = 0, cycle = 0, n_1nn = 0, n_knn = 0;

  typedef struct { int y; bit f; int cyc; } exp_t;
  exp_t q[$];

  fc_output_neuron #(.B(B)) dut (.clk, .rst_n, .in_valid, .mu, .out_valid, .y, .fired);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e; checks++;
    e = q.pop_front();
    if (int'(y) != e.y || fired != e.f || cycle - e.cyc != 6) begin
      failures++; $display("FAIL y=%0d fired=%0d expected %0d/%0d latency %0d", y, fired, e.y, e.f, cycle - e.cyc);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      int v [K];
      exp_t e;
      @(negedge clk);
      in_valid = (t < 300) || ($urandom % 3 != 0);
      for (int r = 0; r < K; r++) begin
        mu[r] = W'($urandom);
        if (t == 5) mu[r][2*B-1:B] = 8'h80;
        if (t == 6) mu[r][2*B-1:B] = 8'h7F;
        mu[r][2*B] = (r == 0) ? (($urandom % 4) == 0) : 1'($urandom);
        v[r] = int'($signed(mu[r][2*B-1:B]));
      end
      e.f = mu[0][2*B];
      e.y = e.f ? 256 * v[0] : 8 * (24 * v[0] + 4 * v[1] + 2 * v[2] + 2 * v[3]);
      e.cyc = cycle;
      if (in_valid) begin
        q.push_back(e);
        if (e.f) n_1nn++; else n_knn++;
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    checks++;
    if (n_1nn == 0 || n_knn == 0) begin failures++; $display("FAIL a rule never used"); end
    $display("1NN outputs %0d, kNN outputs %0d", n_1nn, n_knn);
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
