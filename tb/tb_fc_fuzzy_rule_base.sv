// tb_fc_fuzzy_rule_base: rule bases for M = 8 (the default) and M = 16,
// K = 4, fed random unsorted buses every cycle. With distinct distances the
// four outputs must be exactly the buses of the four smallest distances in
// rising order; with repeated distances (every fourth input) the output
// distances must equal the four smallest and each output must be an input
// bus. Latency log2(M)(log2(M)+1)/2: 6 and 10 cycles.
module tb_fc_fuzzy_rule_base;
  localparam int unsigned B = 8, K = 4;
  localparam int unsigned W = 2 * B + 1;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [15:0][W-1:0] h = '0;
  logic v8, v16;
  logic [K-1:0][W-1:0] mu8, mu16;
  int checks = 0, failures = 0, cycle = 0;

  typedef struct { logic [15:0][W-1:0] bus; int cyc; bit ties; } exp_t;
  exp_t q8[$], q16[$];

  fc_fuzzy_rule_base #(.M(8),  .B(B), .K(K)) u8  (.clk, .rst_n, .in_valid, .h(h[7:0]), .out_valid(v8),  .mu(mu8));
  fc_fuzzy_rule_base #(.M(16), .B(B), .K(K)) u16 (.clk, .rst_n, .in_valid, .h(h),      .out_valid(v16), .mu(mu16));

  // Reference: selection sort of the first m buses by distance.
  task automatic check(input exp_t e, input int m, input logic [K-1:0][W-1:0] got, input int lat, input int want_lat);
    logic [15:0][W-1:0] s;
    bit ok = 1'b1;
    s = e.bus;
    for (int i = 0; i < m; i++)
      for (int j = i + 1; j < m; j++)
        if (s[j][B-1:0] < s[i][B-1:0]) begin logic [W-1:0] t; t = s[i]; s[i] = s[j]; s[j] = t; end
    for (int r = 0; r < K; r++) begin
      if (!e.ties) ok &= (got[r] == s[r]);
      else begin
        bit present = 1'b0;
        for (int i = 0; i < m; i++) present |= (e.bus[i] == got[r]);
        ok &= present && (got[r][B-1:0] == s[r][B-1:0]);
      end
    end
    checks++;
    if (!ok || lat != want_lat) begin
      failures++; $display("FAIL M=%0d got %h expected %h latency %0d", m, got, s[K-1:0], lat);
    end
  endtask

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always @(negedge clk) if (rst_n) begin
    exp_t e;
    if (v8)  begin e = q8.pop_front();  check(e, 8,  mu8,  cycle - e.cyc, 6);  end
    if (v16) begin e = q16.pop_front(); check(e, 16, mu16, cycle - e.cyc, 10); end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      int perm [256];
      exp_t e;
      @(negedge clk);
      in_valid = (t < 300) || ($urandom % 3 != 0);
      for (int i = 0; i < 256; i++) perm[i] = i;
      for (int i = 255; i > 0; i--) begin
        int j, x;
        j = int'($urandom % (i + 1)); x = perm[i]; perm[i] = perm[j]; perm[j] = x;
      end
      for (int i = 0; i < 16; i++) begin
        h[i] = {(W-B)'($urandom), B'(perm[i])};
        if (t % 4 == 0) h[i][B-1:0] = B'($urandom % 6);
      end
      e.bus = h; e.cyc = cycle; e.ties = (t % 4 == 0);
      if (in_valid) begin q8.push_back(e); q16.push_back(e); end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (15) @(negedge clk);
    checks++;
    if (q8.size() != 0 || q16.size() != 0) begin failures++; $display("FAIL outputs missing"); end
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
