// dpram: simple dual-port RAM, one write port and one read port.
//
// One of the small distributed memories of the deblocking filter. The
// architecture uses dual-port RAMs so that one address can be written while
// another is read in the same cycle. Writes take effect at the clock edge
// when we is high; reads are synchronous: rdata shows the word at raddr one
// cycle after raddr is presented. Reading the address written in the same
// cycle returns the old word. DEPTH words of WIDTH bits. The array has no
// reset, as in an FPGA RAM; the read register is cleared at reset (this
// design's choice). The filter never reads a word it has not written.
module dpram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdata <= '0;
    else        rdata <= mem[raddr];
  end

endmodule
