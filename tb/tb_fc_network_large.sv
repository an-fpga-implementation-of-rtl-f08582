// tb_fc_network_large: the end-to-end test of tb_fc_network at a larger
// size: N = 6 inputs of 10 bits, M = 32 hidden neurons, K = 4, with the
// package's default training set for that size; the output is then 20 bits
// with 10 fraction bits, and the latency (3 + 3) + 15 + 6 = 27 cycles. A reference model here computes, for every input vector,
// the saturating city-block distances to all exemplars, the radii (half the
// nearest-other-exemplar distance), the four nearest neighbours, and the
// 1NN or kNN output; the network's output must match it LAT cycles later.
//
// Inputs mix three kinds: an exemplar plus small noise (mostly inside its
// radius: 1NN), small random vectors (between exemplars: kNN) and
// full-range vectors (distances saturate). Inputs whose nearest neighbours
// tie in a way that changes the result are counted and not compared, since
// the network's order among equal distances is not specified. The test
// counts how often each mechanism happened and fails if one never did:
// 1NN selection, kNN fuzzy output, distance saturation, and a long run of
// back-to-back inputs answered at one result per cycle.
module tb_fc_network_large;
  localparam int unsigned N = 6, M = 32, B = 10, K = 4, LAT = 27;
  localparam int TOP = (1 << B) - 1;          // saturated distance
  localparam int SMALL = ((1 << B) - 1) / N;  // range of the exemplars
  localparam logic [M-1:0][N-1:0][B-1:0] TX = (M*N*B)'(fc_pkg::default_train_x(M, N, B));
  localparam logic [M-1:0][B-1:0]        TV = (M*B)'(fc_pkg::default_train_v(M, B));

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [N-1:0][B-1:0] x = '0;
  logic out_valid, fired;
  logic signed [2*B-1:0] y;

  int checks = 0, failures = 0, cycle = 0;
  int n_1nn = 0, n_knn = 0, n_sat = 0, n_skip = 0, run = 0, best_run = 0;
  int radius [M];

  typedef struct { int y; bit f; bit skip; int cyc; } exp_t;
  exp_t q[$];

  fc_network #(.N(N), .M(M), .B(B)) dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y, .fired);

  function automatic int raw_dist(input logic [N-1:0][B-1:0] a, input logic [N-1:0][B-1:0] c);
    int s = 0;
    for (int j = 0; j < N; j++) s += (a[j] > c[j]) ? int'(a[j]) - int'(c[j]) : int'(c[j]) - int'(a[j]);
    return s;
  endfunction

  function automatic int sat_dist(input logic [N-1:0][B-1:0] a, input logic [N-1:0][B-1:0] c);
    int s = raw_dist(a, c);
    return (s > TOP) ? TOP : s;
  endfunction

  function automatic exp_t model(input logic [N-1:0][B-1:0] xv);
    exp_t e;
    int d [M], idx [M], v [M];
    bit f [M];
    for (int i = 0; i < M; i++) begin
      d[i] = sat_dist(xv, TX[i]);
      f[i] = d[i] < radius[i];
      v[i] = int'($signed(TV[i]));
      idx[i] = i;
    end
    for (int i = 0; i < M; i++)
      for (int j = i + 1; j < M; j++)
        if (d[idx[j]] < d[idx[i]]) begin int t; t = idx[i]; idx[i] = idx[j]; idx[j] = t; end
    e.skip = 1'b0;
    for (int r = 0; r < K; r++)
      if (r != 2 && d[idx[r]] == d[idx[r+1]] &&
          (v[idx[r]] != v[idx[r+1]] || f[idx[r]] != f[idx[r+1]]))
        e.skip = 1'b1;
    e.f = f[idx[0]];
    e.y = e.f ? (1 << B) * v[idx[0]]
              : (1 << (B - 5)) * (24 * v[idx[0]] + 4 * v[idx[1]] + 2 * v[idx[2]] + 2 * v[idx[3]]);
    return e;
  endfunction

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      exp_t e;
      run++;
      if (run > best_run) best_run = run;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = q.pop_front();
        if (cycle - e.cyc != LAT) begin
          failures++; $display("FAIL latency %0d, expected %0d", cycle - e.cyc, LAT);
        end else if (e.skip) begin
          n_skip++;
        end else if (int'(y) != e.y || fired != e.f) begin
          failures++; $display("FAIL y=%0d fired=%0d expected %0d/%0d", y, fired, e.y, e.f);
        end else if (e.f) n_1nn++;
        else n_knn++;
      end
    end else run = 0;
  end

  initial begin
    for (int i = 0; i < M; i++) begin
      int dm;
      dm = TOP;
      for (int c = 0; c < M; c++) if (c != i && sat_dist(TX[i], TX[c]) < dm) dm = sat_dist(TX[i], TX[c]);
      radius[i] = dm / 2;
      if (i < 4) $display("exemplar %0d: %h radius %0d weight %0d", i, TX[i], radius[i], $signed(TV[i]));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      exp_t e;
      int kind;
      @(negedge clk);
      in_valid = (t < 500) || ($urandom % 3 != 0);
      kind = int'($urandom % 3);
      for (int j = 0; j < N; j++)
        case (kind)
          0: x[j] = B'(int'(TX[$urandom % M][j]) + int'($urandom % 5) - 2);
          1: x[j] = B'($urandom % SMALL);
          default: x[j] = B'($urandom);
        endcase
      if (kind == 0) begin
        int i;
        i = int'($urandom % M);
        for (int j = 0; j < N; j++) x[j] = B'(int'(TX[i][j]) + int'($urandom % 5) - 2);
      end
      if (in_valid) begin
        for (int i = 0; i < M; i++) if (raw_dist(x, TX[i]) > TOP) begin n_sat++; break; end
        e = model(x);
        e.cyc = cycle;
        q.push_back(e);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q.size()); end
    checks++; if (n_1nn == 0)  begin failures++; $display("FAIL 1NN selection never happened"); end
    checks++; if (n_knn == 0)  begin failures++; $display("FAIL kNN output never happened"); end
    checks++; if (n_sat == 0)  begin failures++; $display("FAIL distance saturation never happened"); end
    checks++; if (best_run < 400) begin failures++; $display("FAIL longest back-to-back run %0d", best_run); end
    $display("1NN %0d, kNN %0d, saturating inputs %0d, tie-ambiguous %0d, longest back-to-back run %0d",
             n_1nn, n_knn, n_sat, n_skip, best_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
