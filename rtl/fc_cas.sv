// fc_cas: two-input comparator-and-swap unit of the bitonic network.
// It orders two h buses by their distance field, bits [B-1:0]; the rest of
// each bus (output weight and fired flag) travels with its distance.
//
//   +BM[2] (DESCEND = 0): lo = min(a, b), hi = max(a, b)
//   -BM[2] (DESCEND = 1): lo = max(a, b), hi = min(a, b)
//
// "lo" is the output on the lower lane index. Purely combinational; on equal
// distances the inputs pass straight through (this design's choice).
module fc_cas #(
  parameter int unsigned B = 8,
  parameter bit DESCEND = 1'b0
) (
  input  logic [2*B:0] a,
  input  logic [2*B:0] b,
  output logic [2*B:0] lo,
  output logic [2*B:0] hi
);

  logic swap;
  always_comb begin
    if (DESCEND) swap = a[B-1:0] < b[B-1:0];
    else         swap = a[B-1:0] > b[B-1:0];
    lo = swap ? b : a;
    hi = swap ? a : b;
  end

endmodule
