// census_cost: Hamming distance between two census vectors.
//
// The two vectors are XORed and the ones of the result are counted; the count
// is the matching cost C(p,d) used by the SGM aggregation.  For an 11x11 window
// the cost lies in 0..121 and needs 7 bits.  Purely combinational.
module census_cost #(
  parameter int unsigned N      = stereo_pkg::SGM_WIN * stereo_pkg::SGM_WIN,
  parameter int unsigned COST_W = $clog2(N + 1)
) (
  input  logic [N-1:0]      a,
  input  logic [N-1:0]      b,
  output logic [COST_W-1:0] cost
);

  logic [N-1:0] diff;

  always_comb begin
    diff = a ^ b;
    cost = '0;
    for (int i = 0; i < N; i++)
      cost = cost + COST_W'(diff[i]);
  end

endmodule
