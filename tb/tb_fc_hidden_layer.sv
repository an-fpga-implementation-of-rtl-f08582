// tb_fc_hidden_layer: a layer of 8 neurons with the default training set.
// Here the radii are worked out from the exemplars (half the distance to
// the nearest other exemplar) and every one of the 8 h buses is checked
// against distance, output weight and radius test, at 5 cycles latency.
module tb_fc_hidden_layer;
  localparam int unsigned B = 8, N = 4, M = 8;
  localparam logic [M-1:0][N-1:0][B-1:0] W = (M*N*B)'(fc_pkg::default_train_x(M, N, B));
  localparam logic [M-1:0][B-1:0] V = (M*B)'(fc_pkg::default_train_v(M, B));

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [N-1:0][B-1:0] x = '0;
  logic out_valid;
  logic [M-1:0][2*B:0] h;
  int checks = 0, failures = 0, cycle = 0, fired = 0;
  int radius [M];

  typedef struct { logic [M-1:0][2*B:0] h; int cyc; } exp_t;
  exp_t q[$];

  fc_hidden_layer #(.M(M), .N(N), .B(B)) dut (.clk, .rst_n, .in_valid, .x, .out_valid, .h);

  function automatic int cb_dist(input logic [N-1:0][B-1:0] a, input logic [N-1:0][B-1:0] c);
    int s = 0;
    for (int j = 0; j < N; j++) s += (a[j] > c[j]) ? int'(a[j]) - int'(c[j]) : int'(c[j]) - int'(a[j]);
    return (s > 255) ? 255 : s;
  endfunction

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
    for (int i = 0; i < M; i++) begin
      int dm;
      dm = 255;
      for (int c = 0; c < M; c++) if (c != i && cb_dist(W[i], W[c]) < dm) dm = cb_dist(W[i], W[c]);
      radius[i] = dm / 2;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      exp_t e;
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      if (t % 3 == 0) x = W[$urandom % M];
      else for (int j = 0; j < N; j++) x[j] = B'($urandom % 64);
      if (t % 3 == 1) x[0] = x[0] ^ 8'h01;
      for (int i = 0; i < M; i++) begin
        int d;
        d = cb_dist(x, W[i]);
        e.h[i] = {(d < radius[i]), V[i], B'(d)};
        if (in_valid && d < radius[i]) fired++;
      end
      e.cyc = cycle;
      if (in_valid) q.push_back(e);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    checks++;
    if (fired == 0) begin failures++; $display("FAIL no neuron fired"); end
    $display("neuron firings %0d", fired);
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
