// fc_bitonic_merge_select: final merge of the bitonic network, cut down to a
// selection network that delivers only the K smallest distances.
//
// The input is one bitonic sequence of M h buses. The merge runs log2(M)
// ascending (+BM) comparator columns with strides M/2, M/4, ..., 1. After
// the column of stride s the smallest 2s values fill lanes 0 .. 2s-1, so a
// column of stride s only needs comparators in lanes below max(2s, K); the
// others, which could only order the larger values, are left out. Outputs
// are lanes 0 .. K-1, sorted by increasing distance. Every column is
// followed by a register bank: latency log2(M) cycles, one set of buses per
// cycle. M must be a power of two and K at most M. Leaving out the unused
// corner of the last merge follows the published selection network; the
// general max(2s, K) rule is this design's statement of it.
module fc_bitonic_merge_select #(
  parameter int unsigned M = 8,
  parameter int unsigned B = 8,
  parameter int unsigned K = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [M-1:0][2*B:0]   in_bus,
  output logic                  out_valid,
  output logic [K-1:0][2*B:0]   out_bus
);

  localparam int unsigned L = $clog2(M);

  logic [M-1:0][2*B:0] bus [L+1];
  logic                vld [L+1];

  assign bus[0] = in_bus;
  assign vld[0] = in_valid;

  for (genvar q = 0; q < L; q++) begin : g_col
    localparam int unsigned S   = 1 << (L - 1 - q);
    localparam int unsigned ACT = (2 * S > K) ? 2 * S : K;
    fc_bitonic_stage #(
      .M(M), .B(B), .PHASE(L), .STRIDE(S), .ACTIVE(ACT)
    ) u_stage (
      .clk, .rst_n,
      .in_valid(vld[q]), .in_bus(bus[q]),
      .out_valid(vld[q+1]), .out_bus(bus[q+1])
    );
  end

  assign out_bus   = bus[L][K-1:0];
  assign out_valid = vld[L];

  initial assert (M >= 2 && (1 << L) == M && K >= 1 && K <= M)
    else $error("fc_bitonic_merge_select: M must be a power of two and K <= M");

endmodule
