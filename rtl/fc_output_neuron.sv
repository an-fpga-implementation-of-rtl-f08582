// fc_output_neuron: output neuron of the FC network for k = 4 nearest
// neighbours. It reads the four buses from the fuzzy rule base, nearest
// first, and computes
//
//   kNN output  y = 24/32*v0 + 4/32*v1 + 2/32*v2 + 2/32*v3
//   1NN output  y = v0
//
// choosing the 1NN output when the nearest bus's fired flag is set (the
// input lies inside that exemplar's radius of generalization). The fuzzy
// grades are fixed by rank, sum to 1 and fall with rank; each is a sum of
// right shifts (24/32 = 1/2 + 1/4, 4/32 = 1/8, 2/32 = 1/16), so there are no
// multipliers or dividers.
//
// Number format: an output weight v is a signed B-bit integer; y is a
// signed 2B-bit fixed-point number with B fraction bits (for B = 8, 16 bits:
// sign, 7 integer bits, 8 fraction bits). The shifts lose no bits for
// B >= 4, and since the grades sum to 1 the sum cannot overflow.
//
// Pipeline, 6 register banks (latency 6 cycles, one result per cycle):
//   1 input buses, 2 parallel right shifts, 3-5 the three levels of the
//   adder tree over the five shifted terms, 6 the 1NN/kNN selection.
// The exact placement of the banks is this design's choice.
module fc_output_neuron #(
  parameter int unsigned B = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [fc_pkg::K_NN-1:0][2*B:0] mu,
  output logic                          out_valid,
  output logic signed [2*B-1:0]         y,
  output logic                          fired
);

  localparam int unsigned K   = fc_pkg::K_NN;
  localparam int unsigned LAT = 6;
  typedef logic signed [2*B-1:0] fix_t;

  // Stage 1: output weights to fixed point, fired flag of the nearest.
  fix_t s1_v [K];
  logic s1_f;
  always_ff @(posedge clk) begin
    for (int i = 0; i < K; i++) s1_v[i] <= {mu[i][2*B-1:B], {B{1'b0}}};
    s1_f <= mu[0][2*B];
  end

  // Stage 2: parallel right shifts (the fuzzy grades).
  fix_t s2_t [5];
  fix_t s2_nn;
  logic s2_f;
  always_ff @(posedge clk) begin
    s2_t[0] <= s1_v[0] >>> 1;
    s2_t[1] <= s1_v[0] >>> 2;
    s2_t[2] <= s1_v[1] >>> 3;
    s2_t[3] <= s1_v[2] >>> 4;
    s2_t[4] <= s1_v[3] >>> 4;
    s2_nn   <= s1_v[0];
    s2_f    <= s1_f;
  end

  // Stages 3-5: adder tree.
  fix_t s3_a [3];
  fix_t s3_nn;
  logic s3_f;
  always_ff @(posedge clk) begin
    s3_a[0] <= s2_t[0] + s2_t[1];
    s3_a[1] <= s2_t[2] + s2_t[3];
    s3_a[2] <= s2_t[4];
    s3_nn   <= s2_nn;
    s3_f    <= s2_f;
  end

  fix_t s4_a [2];
  fix_t s4_nn;
  logic s4_f;
  always_ff @(posedge clk) begin
    s4_a[0] <= s3_a[0] + s3_a[1];
    s4_a[1] <= s3_a[2];
    s4_nn   <= s3_nn;
    s4_f    <= s3_f;
  end

  fix_t s5_sum;
  fix_t s5_nn;
  logic s5_f;
  always_ff @(posedge clk) begin
    s5_sum <= s4_a[0] + s4_a[1];
    s5_nn  <= s4_nn;
    s5_f   <= s4_f;
  end

  // Stage 6: 1NN or kNN.
  always_ff @(posedge clk) begin
    y     <= s5_f ? s5_nn : s5_sum;
    fired <= s5_f;
  end

  logic [LAT-1:0] vld_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[LAT-2:0], in_valid};
  assign out_valid = vld_q[LAT-1];

  // Distance bits of the buses are not needed here; the grades depend only
  // on rank.
  logic unused_dist;
  always_comb begin
    unused_dist = 1'b0;
    for (int i = 0; i < K; i++) unused_dist ^= ^mu[i][B-1:0];
    for (int i = 1; i < K; i++) unused_dist ^= mu[i][2*B];
  end

  initial assert (B >= 4) else $error("fc_output_neuron: B must be at least 4");

endmodule
