// tb_fc_bitonic_merge_select: merge-select networks for (M, K) = (8, 4),
// (16, 4) and (16, 2) are fed random bitonic sequences (a rising run then a
// falling run, of random split, distances all different). Outputs must be
// the K buses with the smallest distances, in rising order, after log2(M)
// cycles.
module tb_fc_bitonic_merge_select;
  localparam int unsigned B = 8;
  localparam int unsigned W = 2 * B + 1;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [15:0][W-1:0] in_bus = '0;
  logic va, vb, vc;
  logic [3:0][W-1:0] oa, ob;
  logic [1:0][W-1:0] oc;
  int checks = 0, failures = 0, cycle = 0;

  typedef struct { logic [15:0][W-1:0] bus; int cyc; int m; } exp_t;
  exp_t qa[$], qb[$], qc[$];

  fc_bitonic_merge_select #(.M(8),  .B(B), .K(4)) ua (.clk, .rst_n, .in_valid, .in_bus(in_bus[7:0]), .out_valid(va), .out_bus(oa));
  fc_bitonic_merge_select #(.M(16), .B(B), .K(4)) ub (.clk, .rst_n, .in_valid, .in_bus(in_bus),      .out_valid(vb), .out_bus(ob));
  fc_bitonic_merge_select #(.M(16), .B(B), .K(2)) uc (.clk, .rst_n, .in_valid, .in_bus(in_bus),      .out_valid(vc), .out_bus(oc));

  // The k-th smallest bus of the first m (distances are distinct).
  function automatic logic [W-1:0] kth(input logic [15:0][W-1:0] src, input int m, input int k);
    for (int i = 0; i < m; i++) begin
      int below = 0;
      for (int j = 0; j < m; j++) if (src[j][B-1:0] < src[i][B-1:0]) below++;
      if (below == k) return src[i];
    end
    return '0;
  endfunction

  // Bitonic input of m distinct distances: rising to a peak at p, then
  // falling.
  task automatic make_bitonic(input int m);
    int vals [16];
    int p;
    for (int i = 0; i < m; i++) vals[i] = i * 15 + int'($urandom % 15);
    for (int i = m - 1; i > 0; i--) begin
      int j, tmp;
      j = int'($urandom % (i + 1)); tmp = vals[i]; vals[i] = vals[j]; vals[j] = tmp;
    end
    p = int'($urandom % m);
    // Sort vals[0..p] rising and vals[p+1..m-1] falling.
    for (int i = 0; i < m; i++)
      for (int j = i + 1; j < m; j++) begin
        bit sw;
        if (i <= p && j <= p) sw = vals[i] > vals[j];
        else if (i > p && j > p) sw = vals[i] < vals[j];
        else sw = 1'b0;
        if (sw) begin int tmp; tmp = vals[i]; vals[i] = vals[j]; vals[j] = tmp; end
      end
    in_bus = '0;
    for (int i = 0; i < m; i++) in_bus[i] = {(W-B)'($urandom), B'(vals[i])};
  endtask

  task automatic check(input logic [15:0][W-1:0] src, input int m, input int k,
                       input logic [3:0][W-1:0] got, input int lat, input int want_lat, input string name);
    checks++;
    for (int r = 0; r < k; r++)
      if (got[r] !== kth(src, m, r)) begin
        failures++; $display("FAIL %s rank %0d got %h expected %h", name, r, got[r], kth(src, m, r));
        return;
      end
    if (lat != want_lat) begin failures++; $display("FAIL %s latency %0d", name, lat); end
  endtask

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always @(negedge clk) if (rst_n) begin
    exp_t e;
    // Each input is bitonic over 8 or over 16 lanes; only the network of
    // that size is checked on it.
    if (va) begin e = qa.pop_front(); if (e.m == 8)  check(e.bus, 8,  4, oa, cycle - e.cyc, 3, "M=8 K=4"); end
    if (vb) begin e = qb.pop_front(); if (e.m == 16) check(e.bus, 16, 4, ob, cycle - e.cyc, 4, "M=16 K=4"); end
    if (vc) begin e = qc.pop_front(); if (e.m == 16) check(e.bus, 16, 2, {34'h0, oc}, cycle - e.cyc, 4, "M=16 K=2"); end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 900; t++) begin
      @(negedge clk);
      in_valid = (t < 200) || ($urandom % 3 != 0);
      make_bitonic((t % 2 == 1) ? 8 : 16);
      if (in_valid) begin
        exp_t e;
        e.bus = in_bus; e.cyc = cycle; e.m = (t % 2 == 1) ? 8 : 16;
        qa.push_back(e); qb.push_back(e); qc.push_back(e);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (qa.size() != 0 || qb.size() != 0 || qc.size() != 0) begin failures++; $display("FAIL outputs missing"); end
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
