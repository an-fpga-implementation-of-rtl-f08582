// fc_fuzzy_rule_base: the FC network's fuzzy rule base, reduced to a
// k-nearest-neighbour selector. It takes the M h buses of the hidden layer
// and returns the K buses with the smallest distances, in increasing order
// of distance, each bus unchanged (fired flag, output weight, distance).
//
// The 1NN rule (a neuron has fired) is not handled here: the neuron that
// fired always has the smallest distance, so it arrives as nearest
// neighbour 0 with its fired flag set and the output neuron picks it. The
// rule base thus has no control logic and a constant rate.
//
// Structure: fc_bitonic_converter (unsorted -> bitonic) followed by
// fc_bitonic_merge_select (bitonic -> K smallest, sorted). Latency:
// log2(M) * (log2(M) + 1) / 2 cycles, one set of buses per cycle.
// The bitonic selection and the folding of 1NN into kNN follow the published
// design; the order among equal distances is left unspecified here.
module fc_fuzzy_rule_base #(
  parameter int unsigned M = 8,
  parameter int unsigned B = 8,
  parameter int unsigned K = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [M-1:0][2*B:0]   h,
  output logic                  out_valid,
  output logic [K-1:0][2*B:0]   mu
);

  logic                bit_valid;
  logic [M-1:0][2*B:0] bitonic;

  fc_bitonic_converter #(.M(M), .B(B)) u_converter (
    .clk, .rst_n, .in_valid, .in_bus(h),
    .out_valid(bit_valid), .out_bus(bitonic)
  );

  fc_bitonic_merge_select #(.M(M), .B(B), .K(K)) u_select (
    .clk, .rst_n, .in_valid(bit_valid), .in_bus(bitonic),
    .out_valid, .out_bus(mu)
  );

endmodule
