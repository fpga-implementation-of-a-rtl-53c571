// sgm_path_cost: aggregated cost of one SGM path at one disparity.
//
// Implements the path recursion of semi-global matching:
//   L(p,d) = C(p,d) + min( L(p-r,d), L(p-r,d-1)+P1, L(p-r,d+1)+P1,
//                          min_i L(p-r,i) + P2 ) - min_k L(p-r,k)
// `prev_0`, `prev_m1`, `prev_p1` are the neighbour's aggregated costs at d,
// d-1 and d+1; `has_m1`/`has_p1` are low at the ends of the search range where
// those terms do not exist.  `prev_min` is the stored minimum of the
// neighbour's whole cost array.  A neighbour outside the image is given as all
// costs at the maximum value (2**COST_W-1); the result is then simply C(p,d),
// so the path is ignored.  The intermediate sums use two extra bits; the
// result stays below C_max + P2, which must fit in COST_W bits (checked by an
// assertion).  Purely combinational.
module sgm_path_cost #(
  parameter int unsigned C_W    = 7,
  parameter int unsigned COST_W = stereo_pkg::COST_W,
  parameter int unsigned P1     = stereo_pkg::SGM_P1,
  parameter int unsigned P2     = stereo_pkg::SGM_P2
) (
  input  logic [C_W-1:0]    c,
  input  logic [COST_W-1:0] prev_0,
  input  logic [COST_W-1:0] prev_m1,
  input  logic [COST_W-1:0] prev_p1,
  input  logic              has_m1,
  input  logic              has_p1,
  input  logic [COST_W-1:0] prev_min,
  output logic [COST_W-1:0] l
);

  localparam int unsigned W = COST_W + 2;

  logic [W-1:0] t_m1, t_p1, t_jump, best, sum;

  always_comb begin
    t_m1   = has_m1 ? W'(prev_m1) + W'(P1) : '1;
    t_p1   = has_p1 ? W'(prev_p1) + W'(P1) : '1;
    t_jump = W'(prev_min) + W'(P2);
    best   = W'(prev_0);
    if (t_m1   < best) best = t_m1;
    if (t_p1   < best) best = t_p1;
    if (t_jump < best) best = t_jump;
    sum = W'(c) + best - W'(prev_min);
    l   = COST_W'(sum);
  end

  initial assert ((2 ** C_W - 1) + P2 < 2 ** COST_W - 1)
    else $error("sgm_path_cost: COST_W too small for C_W and P2");

endmodule
