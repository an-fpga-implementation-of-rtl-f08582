// fc_network: a Kak Fast Classification (FC) neural network with its
// training folded into the circuit.
//
// Data flow, one input vector per clock cycle:
//   x -> fc_hidden_layer   M neurons, each the city-block distance to one
//                          stored exemplar plus a radius test; M h buses
//     -> fc_fuzzy_rule_base  bitonic selection of the K = 4 nearest buses
//     -> fc_output_neuron    fixed fuzzy grades by rank, or the nearest
//                            exemplar's output alone if x lies inside its
//                            radius of generalization
//     -> y                   signed fixed point, 2B bits, B fraction bits
//
// Training is prescriptive and done at elaboration: TRAIN_X (M exemplars of
// N elements of B bits, exemplar i element j at TRAIN_X[i][j]) become the
// hidden neurons' constant weights, TRAIN_V (M signed B-bit targets) their
// output weights, and each radius is half the distance from an exemplar to
// its nearest other exemplar (fc_pkg::prescribe_radii). Retraining means
// re-elaborating with new parameters.
//
// Latency from in_valid to out_valid:
//   (3 + ceil(log2 N)) + log2(M)(log2(M)+1)/2 + 6
// which is 17 cycles at the defaults (N = 4, M = 8, B = 8). `fired` tells
// that the 1NN output was chosen. M must be a power of two, at least 4.
//
// The structure, the h bus layout, the pipeline depths and the fuzzy grades
// follow the published FC network hardware; the valid bit and its reset,
// and the default training set, are this design's own.
module fc_network #(
  parameter int unsigned N = 4,
  parameter int unsigned M = 8,
  parameter int unsigned B = 8,
  parameter logic [M-1:0][N-1:0][B-1:0] TRAIN_X =
    (M*N*B)'(fc_pkg::default_train_x(M, N, B)),
  parameter logic [M-1:0][B-1:0] TRAIN_V =
    (M*B)'(fc_pkg::default_train_v(M, B))
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [N-1:0][B-1:0]   x,
  output logic                  out_valid,
  output logic signed [2*B-1:0] y,
  output logic                  fired
);

  localparam int unsigned K = fc_pkg::K_NN;

  // Second training pass: radii of generalization.
  localparam logic [M-1:0][B-1:0] RADII =
    (M*B)'(fc_pkg::prescribe_radii(fc_pkg::train_vec_t'(TRAIN_X), M, N, B));

  logic                h_valid;
  logic [M-1:0][2*B:0] h;
  logic                mu_valid;
  logic [K-1:0][2*B:0] mu;

  fc_hidden_layer #(
    .M(M), .N(N), .B(B), .W(TRAIN_X), .R(RADII), .V(TRAIN_V)
  ) u_hidden (
    .clk, .rst_n, .in_valid, .x, .out_valid(h_valid), .h
  );

  fc_fuzzy_rule_base #(.M(M), .B(B), .K(K)) u_rule_base (
    .clk, .rst_n, .in_valid(h_valid), .h, .out_valid(mu_valid), .mu
  );

  fc_output_neuron #(.B(B)) u_output (
    .clk, .rst_n, .in_valid(mu_valid), .mu, .out_valid, .y, .fired
  );

  initial assert (M >= K && (1 << $clog2(M)) == M && M * N * B <= fc_pkg::MAX_TRAIN_BITS)
    else $error("fc_network: M must be a power of two >= 4 and the training set must fit MAX_TRAIN_BITS");

endmodule
