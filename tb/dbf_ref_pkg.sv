// dbf_ref_pkg: reference model of the deblocking filter for the testbenches.
//
// Written directly from the HEVC filter equations in their averaging form
// (p0' = Clip3(p0 - 2tc, p0 + 2tc, (p2 + 2p1 + 2p0 + 2q0 + q1 + 4) >> 3)
// and so on), in plain integers, so that it shares no code with the RTL,
// which uses the offset form. Also holds stimulus helpers.
package dbf_ref_pkg;
  import dbf_pkg::*;

  function automatic int clip3(int lo, int hi, int v);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int clip1(int v);
    return clip3(0, 255, v);
  endfunction

  function automatic int sh(int v, int s);   // floor(v / 2**s)
    return v >>> s;
  endfunction

  function automatic line_t ref_strong(line_t l, int tc);
    int p0, p1, p2, p3, q0, q1, q2, q3;
    line_t o;
    p0 = int'(l.p[0]); p1 = int'(l.p[1]); p2 = int'(l.p[2]); p3 = int'(l.p[3]);
    q0 = int'(l.q[0]); q1 = int'(l.q[1]); q2 = int'(l.q[2]); q3 = int'(l.q[3]);
    o = l;
    o.p[0] = 8'(clip3(p0 - 2*tc, p0 + 2*tc, sh(p2 + 2*p1 + 2*p0 + 2*q0 + q1 + 4, 3)));
    o.p[1] = 8'(clip3(p1 - 2*tc, p1 + 2*tc, sh(p2 + p1 + p0 + q0 + 2, 2)));
    o.p[2] = 8'(clip3(p2 - 2*tc, p2 + 2*tc, sh(2*p3 + 3*p2 + p1 + p0 + q0 + 4, 3)));
    o.q[0] = 8'(clip3(q0 - 2*tc, q0 + 2*tc, sh(p1 + 2*p0 + 2*q0 + 2*q1 + q2 + 4, 3)));
    o.q[1] = 8'(clip3(q1 - 2*tc, q1 + 2*tc, sh(p0 + q0 + q1 + q2 + 2, 2)));
    o.q[2] = 8'(clip3(q2 - 2*tc, q2 + 2*tc, sh(p0 + q0 + q1 + 3*q2 + 2*q3 + 4, 3)));
    return o;
  endfunction

  function automatic line_t ref_normal(line_t l, int tc);
    int p0, p1, p2, q0, q1, q2, d, dp, dq;
    line_t o;
    p0 = int'(l.p[0]); p1 = int'(l.p[1]); p2 = int'(l.p[2]);
    q0 = int'(l.q[0]); q1 = int'(l.q[1]); q2 = int'(l.q[2]);
    o = l;
    d  = clip3(-tc, tc, sh(9*(q0 - p0) - 3*(q1 - p1) + 8, 4));
    dp = clip3(-(tc/2), tc/2, sh(sh(p2 + p0 + 1, 1) - p1 + d, 1));
    dq = clip3(-(tc/2), tc/2, sh(sh(q2 + q0 + 1, 1) - q1 - d, 1));
    o.p[0] = 8'(clip1(p0 + d));
    o.q[0] = 8'(clip1(q0 - d));
    o.p[1] = 8'(clip1(p1 + dp));
    o.q[1] = 8'(clip1(q1 + dq));
    return o;
  endfunction

  function automatic line_t ref_chroma(line_t l, int tc);
    int p0, p1, q0, q1, d;
    line_t o;
    p0 = int'(l.p[0]); p1 = int'(l.p[1]); q0 = int'(l.q[0]); q1 = int'(l.q[1]);
    o = l;
    d = clip3(-tc, tc, sh(4*(q0 - p0) + p1 - q1 + 4, 3));
    o.p[0] = 8'(clip1(p0 + d));
    o.q[0] = 8'(clip1(q0 - d));
    return o;
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic int ref_bs(pred_info_t pr);
    int dx, dy;
    dx = int'(pr.p_mvx) - int'(pr.q_mvx);
    dy = int'(pr.p_mvy) - int'(pr.q_mvy);
    if (pr.p_intra || pr.q_intra) return 2;
    if (pr.tu_edge && (pr.p_cbf || pr.q_cbf)) return 1;
    if (pr.p_ref != pr.q_ref) return 1;
    if (iabs(dx) >= 4 || iabs(dy) >= 4) return 1;
    return 0;
  endfunction

  function automatic int dp_of(line_t l);
    return iabs(int'(l.p[2]) - 2*int'(l.p[1]) + int'(l.p[0]));
  endfunction
  function automatic int dq_of(line_t l);
    return iabs(int'(l.q[2]) - 2*int'(l.q[1]) + int'(l.q[0]));
  endfunction

  function automatic bit strong_line(line_t l, int beta, int tc);
    return (2*(dp_of(l) + dq_of(l)) < beta/4)
        && (iabs(int'(l.p[3]) - int'(l.p[0])) + iabs(int'(l.q[0]) - int'(l.q[3])) < beta/8)
        && (iabs(int'(l.p[0]) - int'(l.q[0])) < (5*tc + 1)/2);
  endfunction

  // Decision: 0 = none, 1 = normal, 2 = strong, 3 = chroma.
  function automatic int ref_mode(seg_t s, int bs, int beta, int tc, bit chroma);
    int d;
    if (chroma) return (bs == 2) ? 3 : 0;
    d = dp_of(s.up) + dq_of(s.up) + dp_of(s.dn) + dq_of(s.dn);
    if (bs == 0 || d >= beta) return 0;
    if (strong_line(s.up, beta, tc) && strong_line(s.dn, beta, tc)) return 2;
    return 1;
  endfunction

  function automatic seg_t ref_seg(seg_t s, int mode, int tc);
    seg_t o;
    o = s;
    case (mode)
      1: begin o.up = ref_normal(s.up, tc); o.dn = ref_normal(s.dn, tc); end
      2: begin o.up = ref_strong(s.up, tc); o.dn = ref_strong(s.dn, tc); end
      3: begin o.up = ref_chroma(s.up, tc); o.dn = ref_chroma(s.dn, tc); end
      default: ;
    endcase
    return o;
  endfunction

  // ---- stimulus ----
  // A random line.
  function automatic line_t rand_line();
    line_t l;
    for (int k = 0; k < 4; k++) begin
      l.p[k] = 8'($urandom);
      l.q[k] = 8'($urandom);
    end
    return l;
  endfunction

  // A line that is flat on each side with a step of 'step' at the edge,
  // plus noise of +-'noise' per sample.
  function automatic line_t step_line(int base, int step, int noise);
    line_t l;
    for (int k = 0; k < 4; k++) begin
      l.p[k] = 8'(clip1(base + ((noise > 0) ? int'($urandom_range(0, 2*noise)) - noise : 0)));
      l.q[k] = 8'(clip1(base + step + ((noise > 0) ? int'($urandom_range(0, 2*noise)) - noise : 0)));
    end
    return l;
  endfunction

  // A line ramping by 'slope' per sample across the edge, with noise.
  function automatic line_t ramp_line(int base, int slope, int noise);
    line_t l;
    for (int k = 0; k < 4; k++) begin
      l.p[k] = 8'(clip1(base - slope*(k+1) + int'($urandom_range(0, 2*noise)) - noise));
      l.q[k] = 8'(clip1(base + slope*k + int'($urandom_range(0, 2*noise)) - noise));
    end
    return l;
  endfunction

endpackage
