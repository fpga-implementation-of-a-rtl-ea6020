// tb_seq_ctrl: self-checking test of the phase sequencer.
// Feeds batches of eight segments, first with random gaps in in_valid and
// then back to back, and checks the load, write-back and output address
// sequences, that in_ready is high only while loading, the latency from
// the last segment taken to the first output (NSEG + 2 = 10 cycles) and,
// with no gaps, the 24-cycle batch period (48 cycles per 16x16 block).
module tb_seq_ctrl;
  import dbf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, load_we, wb_we, out_valid;
  phase_e phase;
  logic [2:0] load_addr, rd_addr, wb_addr;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_load = 0, n_wb = 0, n_out = 0, n_frd = 0, n_ord = 0;
  int last_load_cyc = 0, first_out_cyc = -1;
  int batch_start [$];
  bit gaps = 1;

  seq_ctrl #(.NSEG(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %0d expected %0d", cyc, what, got, exp);
    end
  endtask

  always @(negedge clk) if (rst_n) in_valid <= gaps ? ($urandom_range(0, 2) != 0) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    expect_eq(int'(in_ready), int'(phase == PH_LOAD), "in_ready only in load phase");
    if (load_we) begin
      if (n_load % 8 == 0) batch_start.push_back(cyc);
      expect_eq(int'(load_addr), n_load % 8, "load address");
      n_load++;
      last_load_cyc = cyc;
    end
    if (wb_we) begin
      expect_eq(int'(wb_addr), n_wb % 8, "write-back address");
      if (n_wb % 8 == 0) expect_eq(cyc - last_load_cyc, 2, "write-back start");
      n_wb++;
    end
    if (out_valid) begin
      if (n_out % 8 == 0) expect_eq(cyc - last_load_cyc, 10, "first output latency");
      n_out++;
    end
    if (phase == PH_FILTER) begin
      expect_eq(int'(rd_addr), n_frd % 8, "filter read address");
      n_frd++;
    end
    if (phase == PH_OUTPUT) begin
      expect_eq(int'(rd_addr), n_ord % 8, "output read address");
      n_ord++;
    end
  end

  initial begin
    in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_out == 8 * 4);
    gaps = 0;
    wait (n_out == 8 * 10);
    @(posedge clk);
    expect_eq(n_wb, n_out, "write-backs equal outputs");
    // back-to-back batches: 24 cycles apart, 48 per pair of directions
    for (int b = 6; b < 9; b++) begin
      expect_eq(batch_start[b+1] - batch_start[b], 24, "batch period");
    end
    expect_eq(batch_start[9] - batch_start[7], 48, "cycles per 16x16 block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
