// ctrl_unit: filtering decisions for one edge segment.
//
// Works on the two decision lines of a segment (its first and fourth line)
// and the segment's side information, and drives the output multiplexers:
//   en   - filter this segment at all. Luma: bS > 0 and
//          dp0 + dq0 + dp3 + dq3 < beta, with dpi = |p2 - 2p1 + p0| and
//          dqi = |q2 - 2q1 + q0| on line i. Chroma: bS = 2.
//   sel0 - strong (1) or normal (0) luma filter. Strong only when both
//          decision lines satisfy
//            2(dpi + dqi) < beta >> 2,
//            |p3 - p0| + |q0 - q3| < beta >> 3,
//            |p0 - q0| < (5 tc + 1) >> 1.
//   sel1 - chroma (1) or luma (0) result; the segment's chroma flag.
// The on/off test and the use of both decision lines follow the
// architecture; the exact strong-filter thresholds are those of the HEVC
// standard. beta and tc arrive already looked up from the quantisation
// parameter. Purely combinational.
module ctrl_unit
  import dbf_pkg::*;
(
  input  seg_t              seg,
  input  bs_t               bs,
  input  logic [BETA_W-1:0] beta,
  input  logic [TC_W-1:0]   tc,
  input  logic              chroma,
  output logic              en,
  output logic              sel0,
  output logic              sel1
);

  typedef logic [11:0] u12_t;

  function automatic u12_t absd(input u12_t a, input u12_t b);
    return (a > b) ? a - b : b - a;
  endfunction

  // Second-difference activity |x2 - 2 x1 + x0| of one side of a line.
  function automatic u12_t act(input sample_t x2, input sample_t x1, input sample_t x0);
    return absd(u12_t'(x2) + u12_t'(x0), u12_t'(x1) << 1);
  endfunction

  function automatic logic strong_ok(input line_t l, input u12_t b, input u12_t t);
    u12_t dpq, flat, step;
    dpq  = act(l.p[2], l.p[1], l.p[0]) + act(l.q[2], l.q[1], l.q[0]);
    flat = absd(u12_t'(l.p[3]), u12_t'(l.p[0])) + absd(u12_t'(l.q[0]), u12_t'(l.q[3]));
    step = absd(u12_t'(l.p[0]), u12_t'(l.q[0]));
    return ((dpq << 1) < (b >> 2)) && (flat < (b >> 3)) && (step < ((t * 5 + 1) >> 1));
  endfunction

  u12_t b12, t12, d;

  always_comb begin
    b12  = u12_t'(beta);
    t12  = u12_t'(tc);
    d    = act(seg.up.p[2], seg.up.p[1], seg.up.p[0]) + act(seg.up.q[2], seg.up.q[1], seg.up.q[0])
         + act(seg.dn.p[2], seg.dn.p[1], seg.dn.p[0]) + act(seg.dn.q[2], seg.dn.q[1], seg.dn.q[0]);
    sel1 = chroma;
    if (chroma) begin
      en   = (bs == 2'd2);
      sel0 = 1'b0;
    end else begin
      en   = (bs != 2'd0) && (d < b12);
      sel0 = strong_ok(seg.up, b12, t12) && strong_ok(seg.dn, b12, t12);
    end
  end

endmodule
