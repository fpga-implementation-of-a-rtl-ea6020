// dist_mem: the distributed sample memory of the deblocking filter.
//
// Sixteen small dual-port RAMs, one per sample position of the two stored
// lines of an edge segment: pu0..pu3 and qu0..qu3 hold p0..p3 and q0..q3 of
// the segment's first line, pd0..pd3 and qd0..qd3 those of its fourth line.
// Together they take and give 16 samples (128 bits) per clock, and because
// each RAM is dual-port one segment can be written back while another is
// read. Each RAM holds DEPTH segments, one per address (eight: the eight
// edge segments along the edges of a 16x16 block in one direction).
// The sixteen RAMs, their names and the 128-bit width follow the
// architecture; the depth of eight is read from its eight-cycle load phase.
//
// Timing: a write (we, waddr, wdata) lands at the clock edge; rdata shows
// the segment at raddr one clock after raddr is presented.
module dist_mem
  import dbf_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  seg_t          wdata,
  input  logic [AW-1:0] raddr,
  output seg_t          rdata
);

  for (genvar k = 0; k < 4; k++) begin : g_pos
    dpram #(.WIDTH(SAMPLE_W), .DEPTH(DEPTH)) u_pu (
      .clk, .rst_n, .we, .waddr, .wdata(wdata.up.p[k]), .raddr, .rdata(rdata.up.p[k]));
    dpram #(.WIDTH(SAMPLE_W), .DEPTH(DEPTH)) u_qu (
      .clk, .rst_n, .we, .waddr, .wdata(wdata.up.q[k]), .raddr, .rdata(rdata.up.q[k]));
    dpram #(.WIDTH(SAMPLE_W), .DEPTH(DEPTH)) u_pd (
      .clk, .rst_n, .we, .waddr, .wdata(wdata.dn.p[k]), .raddr, .rdata(rdata.dn.p[k]));
    dpram #(.WIDTH(SAMPLE_W), .DEPTH(DEPTH)) u_qd (
      .clk, .rst_n, .we, .waddr, .wdata(wdata.dn.q[k]), .raddr, .rdata(rdata.dn.q[k]));
  end

endmodule
