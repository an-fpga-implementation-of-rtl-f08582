// fc_distance: pipelined city-block distance between the input vector x and
// one hidden neuron's constant weight vector W.
//
//   d = sum_j |x_j - W_j|
//
// The weight vector is a parameter, so each subtractor has a constant
// subtrahend and synthesis reduces it to the half-adder chain a constant
// subtraction needs. Three kinds of register bank follow one another:
//   1. after the n constant subtractors (b+1 bit signed differences),
//   2. after the n absolute-value units (b bits),
//   3. after each level of the ceil(log2 n) level adder tree.
// The latency from in_valid to out_valid is therefore 2 + ceil(log2 n)
// cycles; the activation stage adds the third register of the neuron's
// 3 + ceil(log2 n) depth. A new vector can enter every cycle.
//
// The distance is carried in b bits, as the h bus has room for. Each adder
// of the tree saturates at 2**b - 1 rather than wrapping, so a far exemplar
// still ranks as far; this saturation and the zero padding of the tree to a
// power of two are this design's choices. Inputs are unsigned b-bit values.
// Only the valid pipeline is reset; data registers are not.
module fc_distance #(
  parameter int unsigned N = 4,
  parameter int unsigned B = 8,
  parameter logic [N-1:0][B-1:0] W = '0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [N-1:0][B-1:0]   x,
  output logic                  out_valid,
  output logic [B-1:0]          d
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned LEAVES = 1 << LEVELS;
  localparam int unsigned LAT    = 2 + LEVELS;

  // Stage 1: constant subtractors.
  logic signed [B:0] diff_q [N];
  always_ff @(posedge clk)
    for (int j = 0; j < N; j++)
      diff_q[j] <= $signed({1'b0, x[j]}) - $signed({1'b0, W[j]});

  // Stage 2: absolute values, padded with zeros up to a power of two.
  logic [B-1:0] lvl [LEVELS+1][LEAVES];
  always_ff @(posedge clk)
    for (int j = 0; j < LEAVES; j++)
      if (j < N) lvl[0][j] <= diff_q[j][B] ? B'(-diff_q[j]) : diff_q[j][B-1:0];
      else       lvl[0][j] <= '0;

  // Stages 3..: saturating adder tree, one register bank per level.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned CNT = LEAVES >> (l + 1);
    always_ff @(posedge clk)
      for (int k = 0; k < LEAVES; k++)
        if (k < CNT) begin
          logic [B:0] s;
          s = {1'b0, lvl[l][2*k]} + {1'b0, lvl[l][2*k+1]};
          lvl[l+1][k] <= s[B] ? {B{1'b1}} : s[B-1:0];
        end else begin
          lvl[l+1][k] <= '0;
        end
  end

  assign d = lvl[LEVELS][0];

  logic [LAT-1:0] vld_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vld_q <= '0;
    else        vld_q <= LAT'({vld_q, in_valid});
  assign out_valid = vld_q[LAT-1];

endmodule
