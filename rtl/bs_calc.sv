// bs_calc: boundary strength (bS) of one edge segment.
//
// Boundary strength picks how hard an edge is filtered: 0 none, 1 weak
// (luma only), 2 strong (luma and chroma). The rule is the one of the HEVC
// standard for an edge on the 8x8 grid, with one motion vector per block:
//   bS = 2  if the P or the Q block is intra coded;
//   bS = 1  else if the edge is a transform edge and P or Q has nonzero
//           coefficients, or P and Q use different reference pictures, or
//           their motion vectors differ by 4 or more quarter samples in x or y;
//   bS = 0  otherwise.
// The three values and their use follow the architecture; the tests
// themselves are taken from the standard. Purely combinational.
module bs_calc
  import dbf_pkg::*;
(
  input  pred_info_t pred,
  output bs_t        bs
);

  logic signed [MV_W:0] dmvx, dmvy;
  logic                 mv_far;

  always_comb begin
    dmvx   = (MV_W+1)'(pred.p_mvx) - (MV_W+1)'(pred.q_mvx);
    dmvy   = (MV_W+1)'(pred.p_mvy) - (MV_W+1)'(pred.q_mvy);
    mv_far = (dmvx >= 4) || (dmvx <= -4) || (dmvy >= 4) || (dmvy <= -4);
    if (pred.p_intra || pred.q_intra)
      bs = 2'd2;
    else if ((pred.tu_edge && (pred.p_cbf || pred.q_cbf)) ||
             (pred.p_ref != pred.q_ref) || mv_far)
      bs = 2'd1;
    else
      bs = 2'd0;
  end

endmodule
