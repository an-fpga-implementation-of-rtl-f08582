// fc_activation: activation circuit of one hidden neuron. It compares the
// distance d with the neuron's constant radius of generalization R and packs
// the result into the neuron's h bus:
//
//   h[2B]       fired: set when d < R (the exemplar's region contains x)
//   h[2B-1:B]   the neuron's constant output weight V
//   h[B-1:0]    the distance d
//
// R and V are parameters fixed by training; the comparison therefore is a
// subtractor with a constant subtrahend whose sign bit is the fired flag.
// Carrying V on the bus, instead of the neuron's index, lets the output
// neuron use a neighbour's weight without tracking which neuron it was.
// One register bank holds the whole bus: latency 1 cycle, one distance
// accepted every cycle. The strict "d < R" follows the hardware
// description; only the valid bit is reset.
module fc_activation #(
  parameter int unsigned B = 8,
  parameter logic [B-1:0] R = '0,
  parameter logic [B-1:0] V = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [B-1:0]    d,
  output logic            out_valid,
  output logic [2*B:0]    h
);

  // Constant comparator: sign of d - R.
  logic [B:0] cmp;
  assign cmp = {1'b0, d} - {1'b0, R};

  always_ff @(posedge clk)
    h <= {cmp[B], V, d};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;

endmodule
