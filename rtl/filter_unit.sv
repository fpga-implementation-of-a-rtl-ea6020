// filter_unit: the three filters for one sample line across an edge.
//
// Computes, for one line p3..p0 | q0..q3 and threshold tc, all three
// candidate results at once; the output multiplexers later keep one.
//   Strong luma (p0..p2 and q0..q2 change):
//     p0' = p0 + Clip3(+-2tc, (p2 + 2p1 - 6p0 + 2q0 + q1 + 4) >> 3)
//     p1' = p1 + Clip3(+-2tc, (p2 - 3p1 + p0 + q0 + 2) >> 2)
//     p2' = p2 + Clip3(+-2tc, (2p3 - 5p2 + p1 + p0 + q0 + 4) >> 3)
//     and the same with p and q exchanged.
//   Normal luma (p0, p1, q0, q1 change):
//     D  = Clip3(+-tc, (9(q0 - p0) - 3(q1 - p1) + 8) >> 4)
//     p0' = p0 + D, q0' = q0 - D
//     p1' = p1 + Clip3(+-(tc>>1), (((p2 + p0 + 1) >> 1) - p1 + D) >> 1)
//     q1' = q1 + Clip3(+-(tc>>1), (((q2 + q0 + 1) >> 1) - q1 - D) >> 1)
//   Chroma (p0 and q0 change):
//     Dc = Clip3(+-tc, (((q0 - p0) << 2) + p1 - q1 + 4) >> 3)
//     p0' = p0 + Dc, q0' = q0 - Dc
// As in the architecture the work is split into the filter sums, one
// shifter, a clipper and a final adder that adds the clipped corrections
// to the original samples; results are limited to the sample range.
// The offset form of the equations is the architecture's; the clipping
// bounds (2tc, tc, tc/2) are the HEVC standard's. Purely combinational.
module filter_unit
  import dbf_pkg::*;
(
  input  line_t           line_in,
  input  logic [TC_W-1:0] tc,
  output filt_cand_t      cand
);

  typedef logic signed [12:0] s13_t;

  function automatic s13_t clip3(input s13_t lim, input s13_t v);
    if (v > lim)       return lim;
    else if (v < -lim) return -lim;
    else               return v;
  endfunction

  function automatic sample_t clip1(input s13_t v);
    if (v < 0)                         return '0;
    else if (v > s13_t'(2**SAMPLE_W - 1)) return '1;
    else                               return sample_t'(v);
  endfunction

  s13_t p [4];
  s13_t q [4];
  s13_t tc1, tc2, tch;

  // filter sums (before shifting)
  s13_t ss_p [3];
  s13_t ss_q [3];
  s13_t ns_d, cs_d;
  // shifted and clipped corrections
  s13_t sc_p [3];
  s13_t sc_q [3];
  s13_t nd, nd_p, nd_q, cd;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      p[k] = s13_t'({1'b0, line_in.p[k]});
      q[k] = s13_t'({1'b0, line_in.q[k]});
    end
    tc1 = s13_t'({1'b0, tc});
    tc2 = tc1 <<< 1;
    tch = tc1 >>> 1;

    // --- filter sums ---
    ss_p[0] = p[2] + (p[1] <<< 1) - 6 * p[0] + (q[0] <<< 1) + q[1] + 4;
    ss_p[1] = p[2] - 3 * p[1] + p[0] + q[0] + 2;
    ss_p[2] = (p[3] <<< 1) - 5 * p[2] + p[1] + p[0] + q[0] + 4;
    ss_q[0] = q[2] + (q[1] <<< 1) - 6 * q[0] + (p[0] <<< 1) + p[1] + 4;
    ss_q[1] = q[2] - 3 * q[1] + q[0] + p[0] + 2;
    ss_q[2] = (q[3] <<< 1) - 5 * q[2] + q[1] + q[0] + p[0] + 4;
    ns_d    = 9 * (q[0] - p[0]) - 3 * (q[1] - p[1]) + 8;
    cs_d    = ((q[0] - p[0]) <<< 2) + p[1] - q[1] + 4;

    // --- shifter and clipper ---
    sc_p[0] = clip3(tc2, ss_p[0] >>> 3);
    sc_p[1] = clip3(tc2, ss_p[1] >>> 2);
    sc_p[2] = clip3(tc2, ss_p[2] >>> 3);
    sc_q[0] = clip3(tc2, ss_q[0] >>> 3);
    sc_q[1] = clip3(tc2, ss_q[1] >>> 2);
    sc_q[2] = clip3(tc2, ss_q[2] >>> 3);
    nd      = clip3(tc1, ns_d >>> 4);
    nd_p    = clip3(tch, ((((p[2] + p[0] + 1) >>> 1) - p[1] + nd) >>> 1));
    nd_q    = clip3(tch, ((((q[2] + q[0] + 1) >>> 1) - q[1] - nd) >>> 1));
    cd      = clip3(tc1, cs_d >>> 3);

    // --- adder ---
    cand = '{strng: line_in, norm: line_in, chrm: line_in};
    for (int k = 0; k < 3; k++) begin
      cand.strng.p[k] = clip1(p[k] + sc_p[k]);
      cand.strng.q[k] = clip1(q[k] + sc_q[k]);
    end
    cand.norm.p[0] = clip1(p[0] + nd);
    cand.norm.q[0] = clip1(q[0] - nd);
    cand.norm.p[1] = clip1(p[1] + nd_p);
    cand.norm.q[1] = clip1(q[1] + nd_q);
    cand.chrm.p[0] = clip1(p[0] + cd);
    cand.chrm.q[0] = clip1(q[0] - cd);
  end

endmodule
