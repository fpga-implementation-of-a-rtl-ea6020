// dbf_pkg: types and constants shared by the HEVC deblocking filter.
//
// A "line" is the eight samples of one row (or column) that crosses an
// 8x8 block edge: p3 p2 p1 p0 | q0 q1 q2 q3, p0 and q0 being the samples
// next to the edge. An "edge segment" is four such lines; the filter
// carries its first and fourth line (the "upper" and "lower" line, the two
// lines on which HEVC bases its decisions) as one 128-bit word, 16 samples.
// Samples are 8 bits (16 samples = 128 bits, as in the architecture). The
// widths of beta (0..64) and tc (0..24) fit 8-bit video; they are this
// design's choice.
package dbf_pkg;

  localparam int unsigned SAMPLE_W = 8;
  localparam int unsigned BETA_W   = 7;
  localparam int unsigned TC_W     = 5;
  localparam int unsigned MV_W     = 16;
  localparam int unsigned REF_W    = 4;

  typedef logic [SAMPLE_W-1:0] sample_t;

  // p[0] is p0 (next to the edge), p[3] is p3; the same for q.
  typedef struct packed {
    sample_t [3:0] p;
    sample_t [3:0] q;
  } line_t;

  // The two decision lines of one edge segment: 128 bits.
  typedef struct packed {
    line_t up;   // first line of the segment
    line_t dn;   // fourth line of the segment
  } seg_t;

  typedef logic [1:0] bs_t;

  // Prediction information of the two blocks that meet at an edge,
  // the input of the boundary strength computation.
  typedef struct packed {
    logic                    p_intra;
    logic                    q_intra;
    logic                    tu_edge;  // edge is also a transform unit edge
    logic                    p_cbf;    // P transform block has nonzero coefficients
    logic                    q_cbf;
    logic [REF_W-1:0]        p_ref;    // reference picture of P
    logic [REF_W-1:0]        q_ref;
    logic signed [MV_W-1:0]  p_mvx;    // quarter-sample motion vectors
    logic signed [MV_W-1:0]  p_mvy;
    logic signed [MV_W-1:0]  q_mvx;
    logic signed [MV_W-1:0]  q_mvy;
  } pred_info_t;

  // Side information delivered with each edge segment.
  typedef struct packed {
    pred_info_t          pred;
    logic [BETA_W-1:0]   beta;
    logic [TC_W-1:0]     tc;
    logic                chroma;   // 1: chroma edge, 0: luma edge
  } seg_info_t;

  // Side information kept per stored segment.
  typedef struct packed {
    bs_t                 bs;
    logic [BETA_W-1:0]   beta;
    logic [TC_W-1:0]     tc;
    logic                chroma;
  } seg_side_t;

  // Per-line filter candidates produced by the filter unit.
  typedef struct packed {
    line_t strng;
    line_t norm;
    line_t chrm;
  } filt_cand_t;

  typedef enum logic [1:0] {
    PH_LOAD   = 2'd0,
    PH_FILTER = 2'd1,
    PH_OUTPUT = 2'd2
  } phase_e;

endpackage
