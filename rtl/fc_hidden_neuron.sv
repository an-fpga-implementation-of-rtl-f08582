// fc_hidden_neuron: one hidden neuron of the FC network. It stores one
// training exemplar as its constant weight vector W, computes the
// city-block distance from the input x (fc_distance) and turns it into the
// 2b+1 bit h bus (fc_activation): fired flag, output weight V, distance.
//
// Latency 3 + ceil(log2 N) cycles from in_valid to out_valid, one vector
// per cycle. W, R and V are compile-time constants set by training.
// The structure and the depth follow the published hidden neuron.
module fc_hidden_neuron #(
  parameter int unsigned N = 4,
  parameter int unsigned B = 8,
  parameter logic [N-1:0][B-1:0] W = '0,
  parameter logic [B-1:0] R = '0,
  parameter logic [B-1:0] V = '0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [N-1:0][B-1:0]   x,
  output logic                  out_valid,
  output logic [2*B:0]          h
);

  logic         d_valid;
  logic [B-1:0] d;

  fc_distance #(.N(N), .B(B), .W(W)) u_distance (
    .clk, .rst_n, .in_valid, .x, .out_valid(d_valid), .d
  );

  fc_activation #(.B(B), .R(R), .V(V)) u_activation (
    .clk, .rst_n, .in_valid(d_valid), .d, .out_valid, .h
  );

endmodule
