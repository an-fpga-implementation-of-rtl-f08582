// fc_bitonic_converter: turns M unsorted h buses into one bitonic sequence
// of length M, ordered by distance.
//
// The unsorted input is read as M/2 bitonic sequences of two. Merge phase p
// (p = 1 .. log2(M) - 1) merges neighbouring blocks of 2**(p-1) lanes into
// blocks of 2**p lanes, alternately ascending (+BM) and descending (-BM), so
// after the last phase the first half of the lanes rises and the second
// half falls. Phase p takes p columns of comparators with strides
// 2**(p-1), ..., 2, 1, and each column is followed by a register bank
// (fc_bitonic_stage). Latency: log2(M) * (log2(M) - 1) / 2 cycles (zero for
// M = 2, where the input is already bitonic); one set of buses per cycle.
// M must be a power of two. The phase structure follows the published
// converter; the lane-index rule for the block directions is the standard
// bitonic sorter layout, chosen here.
module fc_bitonic_converter #(
  parameter int unsigned M = 8,
  parameter int unsigned B = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [M-1:0][2*B:0]   in_bus,
  output logic                  out_valid,
  output logic [M-1:0][2*B:0]   out_bus
);

  localparam int unsigned L      = $clog2(M);
  localparam int unsigned NSTAGE = L * (L - 1) / 2;

  logic [M-1:0][2*B:0] bus [NSTAGE+1];
  logic                vld [NSTAGE+1];

  assign bus[0] = in_bus;
  assign vld[0] = in_valid;

  for (genvar p = 1; p < L; p++) begin : g_phase
    for (genvar q = 0; q < p; q++) begin : g_col
      localparam int unsigned IDX = p * (p - 1) / 2 + q;
      fc_bitonic_stage #(
        .M(M), .B(B), .PHASE(p), .STRIDE(1 << (p - 1 - q)), .ACTIVE(M)
      ) u_stage (
        .clk, .rst_n,
        .in_valid(vld[IDX]), .in_bus(bus[IDX]),
        .out_valid(vld[IDX+1]), .out_bus(bus[IDX+1])
      );
    end
  end

  assign out_bus   = bus[NSTAGE];
  assign out_valid = vld[NSTAGE];

  initial assert (M >= 2 && (1 << L) == M)
    else $error("fc_bitonic_converter: M must be a power of two, at least 2");

endmodule
