// tb_fc_bitonic_converter: converters for M = 8 and M = 16 are fed random
// buses every cycle. Each output must be a permutation of its input (whole
// buses, payload included) whose first half rises and second half falls in
// distance, after log2(M)(log2(M)-1)/2 cycles (3 and 6).
module tb_fc_bitonic_converter;
  localparam int unsigned B = 8;
  localparam int unsigned W = 2 * B + 1;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [15:0][W-1:0] in_bus = '0;
  logic v8, v16;
  logic [7:0][W-1:0]  o8;
  logic [15:0][W-1:0] o16;
  int checks = 0, failures = 0, cycle = 0;

  typedef struct { logic [15:0][W-1:0] bus; int cyc; } exp_t;
  exp_t q8[$], q16[$];

  fc_bitonic_converter #(.M(8),  .B(B)) u8  (.clk, .rst_n, .in_valid, .in_bus(in_bus[7:0]), .out_valid(v8),  .out_bus(o8));
  fc_bitonic_converter #(.M(16), .B(B)) u16 (.clk, .rst_n, .in_valid, .in_bus(in_bus),      .out_valid(v16), .out_bus(o16));

  // Is "got" (m buses) a permutation of "src" that is ascending then
  // descending around the middle?
  function automatic bit good(input logic [15:0][W-1:0] src, input logic [15:0][W-1:0] got, input int m);
    bit used [16];
    for (int i = 0; i < 16; i++) used[i] = 1'b0;
    for (int i = 0; i < m; i++) begin
      bit found = 1'b0;
      for (int k = 0; k < m; k++)
        if (!found && !used[k] && got[i] == src[k]) begin used[k] = 1'b1; found = 1'b1; end
      if (!found) return 1'b0;
    end
    for (int i = 0; i + 1 < m / 2; i++) if (got[i][B-1:0] > got[i+1][B-1:0]) return 1'b0;
    for (int i = m / 2; i + 1 < m; i++) if (got[i][B-1:0] < got[i+1][B-1:0]) return 1'b0;
    return 1'b1;
  endfunction

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always @(negedge clk) if (rst_n) begin
    if (v8) begin
      exp_t e; checks++;
      e = q8.pop_front();
      if (!good(e.bus, {136'h0, o8}, 8) || cycle - e.cyc != 3) begin
        failures++; $display("FAIL M=8 out=%h in=%h latency %0d", o8, e.bus[7:0], cycle - e.cyc);
      end
    end
    if (v16) begin
      exp_t e; checks++;
      e = q16.pop_front();
      if (!good(e.bus, o16, 16) || cycle - e.cyc != 6) begin
        failures++; $display("FAIL M=16 latency %0d", cycle - e.cyc);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      in_valid = (t < 200) || ($urandom % 3 != 0);
      for (int i = 0; i < 16; i++) begin
        in_bus[i] = W'($urandom);
        if (t % 4 == 0) in_bus[i][B-1:0] = B'($urandom % 4);   // many ties
      end
      if (in_valid) begin q8.push_back('{in_bus, cycle}); q16.push_back('{in_bus, cycle}); end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (10) @(negedge clk);
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
