// seq_ctrl: phase sequencer and address generator of the deblocking filter.
//
// The filter works in batches of NSEG edge segments (eight: the segments
// along the edges of a 16x16 block in one filtering direction) and takes
// each batch through three phases of NSEG cycles each:
//   LOAD   - in_ready is high; each accepted segment (in_valid) is written
//            to the distributed memory at address 0, 1, ... NSEG-1.
//   FILTER - address 0..NSEG-1 is read, one per cycle. One cycle later the
//            read segment is decided, filtered, multiplexed and written
//            back in place through the second RAM port (wb_we, wb_addr).
//   OUTPUT - the filtered segments are read out in order; out_valid is high
//            in the cycle after each read, when the RAM shows the data.
// The write-back of the last segment falls into the first OUTPUT cycle,
// which reads address 0, and the last output falls into the first LOAD
// cycle of the next batch, so batches follow each other every 3*NSEG
// cycles: 24 cycles per direction and 48 per 16x16 block, as in the
// architecture's cycle budget. Splitting that budget into load, filter and
// output phases of NSEG cycles follows the architecture; the in-place
// write-back is this design's choice. The output has no back-pressure.
// The assertions below use rst_n synchronously in disable iff, which lint
// reports next to its use as an asynchronous reset; that is intended.
module seq_ctrl
  import dbf_pkg::*;
#(
  parameter int unsigned NSEG = 8,
  localparam int unsigned AW = (NSEG > 1) ? $clog2(NSEG) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  output phase_e        phase,
  output logic          load_we,
  output logic [AW-1:0] load_addr,
  output logic [AW-1:0] rd_addr,
  output logic          wb_we,
  output logic [AW-1:0] wb_addr,
  output logic          out_valid
);

  localparam logic [AW-1:0] LAST = AW'(NSEG - 1);

  logic [AW-1:0] cnt;
  logic          last;

  assign last      = (cnt == LAST);
  assign in_ready  = (phase == PH_LOAD);
  assign load_we   = in_ready && in_valid;
  assign load_addr = cnt;
  assign rd_addr   = cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH_LOAD;
      cnt       <= '0;
      wb_we     <= 1'b0;
      wb_addr   <= '0;
      out_valid <= 1'b0;
    end else begin
      wb_we     <= (phase == PH_FILTER);
      wb_addr   <= cnt;
      out_valid <= (phase == PH_OUTPUT);
      unique case (phase)
        PH_LOAD: if (in_valid) begin
          cnt <= last ? '0 : cnt + 1'b1;
          if (last) phase <= PH_FILTER;
        end
        PH_FILTER: begin
          cnt <= last ? '0 : cnt + 1'b1;
          if (last) phase <= PH_OUTPUT;
        end
        PH_OUTPUT: begin
          cnt <= last ? '0 : cnt + 1'b1;
          if (last) phase <= PH_LOAD;
        end
        default: begin
          cnt   <= '0;
          phase <= PH_LOAD;
        end
      endcase
    end
  end

  // The RAM write port serves loading and write-back, never both at once.
  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n) !(load_we && wb_we));
  // Write-back never hits the address being read out in the same cycle.
  a_no_clash: assert property (@(posedge clk) disable iff (!rst_n)
                               (wb_we && phase == PH_OUTPUT) |-> (wb_addr != rd_addr));

endmodule
