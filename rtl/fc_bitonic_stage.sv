// fc_bitonic_stage: one registered column of a bitonic network over M lanes.
//
// Lane i (with bit STRIDE of i clear) is compared with lane i + STRIDE by an
// fc_cas unit. Within merge phase PHASE (blocks of 2**PHASE lanes) the
// block's direction comes from bit PHASE of the lane index: 0 sorts
// ascending (+BM[2]), 1 descending (-BM[2]); in the last phase every lane
// index is below 2**PHASE, so the whole column sorts ascending. Pairs whose
// lower lane is at or above ACTIVE are not compared and pass unchanged:
// the selection network uses this to leave out the comparators that cannot
// reach its first outputs. A register bank of M (2B+1)-bit buses follows
// the column: latency 1 cycle, one set of buses per cycle. A register bank
// after every column follows the published pipelining; the factoring into a
// reusable column module is this design's own.
module fc_bitonic_stage #(
  parameter int unsigned M = 8,
  parameter int unsigned B = 8,
  parameter int unsigned PHASE = 1,
  parameter int unsigned STRIDE = 1,
  parameter int unsigned ACTIVE = M
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [M-1:0][2*B:0]   in_bus,
  output logic                  out_valid,
  output logic [M-1:0][2*B:0]   out_bus
);

  logic [M-1:0][2*B:0] nxt;

  for (genvar i = 0; i < M; i++) begin : g_lane
    if ((i & STRIDE) == 0 && i + STRIDE < M) begin : g_pair
      if (i < ACTIVE) begin : g_cmp
        fc_cas #(.B(B), .DESCEND(((i >> PHASE) & 1) == 1)) u_cas (
          .a(in_bus[i]), .b(in_bus[i+STRIDE]), .lo(nxt[i]), .hi(nxt[i+STRIDE])
        );
      end else begin : g_pass
        assign nxt[i]        = in_bus[i];
        assign nxt[i+STRIDE] = in_bus[i+STRIDE];
      end
    end
  end

  always_ff @(posedge clk)
    out_bus <= nxt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;

endmodule
