// out_mux: output multiplexers of one sample line.
//
// Chooses among the filter unit's candidates for one line under the
// control unit's selects: Sel1 picks chroma (1) or luma (0), Sel0 the
// strong (1) or normal (0) luma filter, and with en low the line leaves
// unfiltered. The multiplexers and their two selects follow the
// architecture; the priority among them (en, then Sel1, then Sel0) is this
// design's choice. Purely combinational.
module out_mux
  import dbf_pkg::*;
(
  input  line_t      orig,
  input  filt_cand_t cand,
  input  logic       en,
  input  logic       sel0,
  input  logic       sel1,
  output line_t      line_out
);

  always_comb begin
    if (!en)       line_out = orig;
    else if (sel1) line_out = cand.chrm;
    else if (sel0) line_out = cand.strng;
    else           line_out = cand.norm;
  end

endmodule
