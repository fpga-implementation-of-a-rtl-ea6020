// dbf_top: HEVC deblocking filter for normal, strong and chroma filtering.
//
// Removes blocking artefacts along 8x8 block edges. The source delivers
// edge segments: the first and fourth line of four lines that cross one
// edge (p3..p0 | q0..q3 each, 16 samples, 128 bits), with the prediction
// information of the two blocks, beta and tc. Vertical edges of a 16x16
// block are sent first, then its horizontal edges (lines are then columns);
// gathering the lines, and feeding the vertically filtered samples into the
// horizontal pass, is left to the source.
//
// Structure: the segment and its boundary strength go into sixteen
// distributed dual-port RAMs (dist_mem) and a small side-information store.
// Each stored segment is then read, the control unit (ctrl_unit) decides
// whether and how to filter it, two filter units (one per line) compute the
// strong, normal and chroma results in parallel, the output multiplexers
// keep one, and the result goes back into the RAMs, from where it is read
// out in order. seq_ctrl runs this as batches of NSEG segments in three
// phases of NSEG cycles (load, filter, output): 3*NSEG cycles per batch,
// 48 cycles for the two directions of a 16x16 block with NSEG = 8.
//
// Interface: in_seg/in_info are taken when in_valid and in_ready are both
// high (in_ready is high for the load phase only). out_seg is valid when
// out_valid is high; segments leave in the order they came, with no
// back-pressure. Latency from the last segment of a batch taken to the
// first segment out: NSEG + 2 cycles.
//
// The block structure, the two parallel lines, the distributed RAMs and the
// 48-cycle budget follow the architecture, as do beta and tc arriving as
// inputs. This design's own choices: the in-place write-back, the
// valid/ready input, and leaving out lines 1 and 2 of each segment, since
// the sixteen RAMs hold only the first and fourth line.
module dbf_top
  import dbf_pkg::*;
#(
  parameter int unsigned NSEG = 8,
  localparam int unsigned AW = (NSEG > 1) ? $clog2(NSEG) : 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  seg_t      in_seg,
  input  seg_info_t in_info,
  output logic      out_valid,
  output seg_t      out_seg
);

  phase_e        phase;
  logic          load_we, wb_we;
  logic [AW-1:0] load_addr, rd_addr, wb_addr;

  seq_ctrl #(.NSEG(NSEG)) u_seq (
    .clk, .rst_n, .in_valid, .in_ready, .phase,
    .load_we, .load_addr, .rd_addr, .wb_we, .wb_addr, .out_valid
  );

  // ---- boundary strength and side-information store ----
  bs_t       in_bs;
  seg_side_t side [NSEG];
  seg_side_t cur;

  bs_calc u_bs (.pred(in_info.pred), .bs(in_bs));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NSEG); i++) side[i] <= '0;
    end else if (load_we) begin
      side[load_addr] <= '{bs: in_bs, beta: in_info.beta, tc: in_info.tc,
                           chroma: in_info.chroma};
    end
  end

  assign cur = side[wb_addr];

  // ---- distributed memory ----
  logic mem_we;
  logic [AW-1:0] mem_waddr;
  seg_t mem_wdata, mem_rdata, filt_seg;

  assign mem_we    = load_we || wb_we;
  assign mem_waddr = load_we ? load_addr : wb_addr;
  assign mem_wdata = (phase == PH_LOAD) ? in_seg : filt_seg;

  dist_mem #(.DEPTH(NSEG)) u_mem (
    .clk, .rst_n, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr(rd_addr), .rdata(mem_rdata)
  );

  // ---- control unit, filter units, output multiplexers ----
  logic       en, sel0, sel1;
  filt_cand_t cand_up, cand_dn;

  ctrl_unit u_ctrl (
    .seg(mem_rdata), .bs(cur.bs), .beta(cur.beta), .tc(cur.tc),
    .chroma(cur.chroma), .en, .sel0, .sel1
  );

  filter_unit u_filt_up (.line_in(mem_rdata.up), .tc(cur.tc), .cand(cand_up));
  filter_unit u_filt_dn (.line_in(mem_rdata.dn), .tc(cur.tc), .cand(cand_dn));

  out_mux u_mux_up (.orig(mem_rdata.up), .cand(cand_up), .en, .sel0, .sel1,
                    .line_out(filt_seg.up));
  out_mux u_mux_dn (.orig(mem_rdata.dn), .cand(cand_dn), .en, .sel0, .sel1,
                    .line_out(filt_seg.dn));

  assign out_seg = mem_rdata;

endmodule
