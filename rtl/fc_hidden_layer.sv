// fc_hidden_layer: the hidden layer of the FC network, one fc_hidden_neuron
// per training exemplar. All M neurons see the same input vector x at the
// same time and produce their h buses together after 3 + ceil(log2 N)
// cycles; a new vector can enter every cycle.
//
// W holds the M exemplars (exemplar i, element j at W[i][j]), R the M radii
// of generalization and V the M output weights. The defaults are the
// package's default training set with the radii it prescribes.
// One neuron per exemplar follows the FC network's definition; the valid
// bit is this design's addition.
module fc_hidden_layer #(
  parameter int unsigned M = 8,
  parameter int unsigned N = 4,
  parameter int unsigned B = 8,
  parameter logic [M-1:0][N-1:0][B-1:0] W =
    (M*N*B)'(fc_pkg::default_train_x(M, N, B)),
  parameter logic [M-1:0][B-1:0] R =
    (M*B)'(fc_pkg::prescribe_radii(fc_pkg::default_train_x(M, N, B), M, N, B)),
  parameter logic [M-1:0][B-1:0] V =
    (M*B)'(fc_pkg::default_train_v(M, B))
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [N-1:0][B-1:0]   x,
  output logic                  out_valid,
  output logic [M-1:0][2*B:0]   h
);

  logic [M-1:0] vld;

  for (genvar i = 0; i < M; i++) begin : g_neuron
    fc_hidden_neuron #(.N(N), .B(B), .W(W[i]), .R(R[i]), .V(V[i])) u_neuron (
      .clk, .rst_n, .in_valid, .x, .out_valid(vld[i]), .h(h[i])
    );
  end

  // All neurons share one schedule, so their valid bits agree.
  assign out_valid = &vld;

endmodule
