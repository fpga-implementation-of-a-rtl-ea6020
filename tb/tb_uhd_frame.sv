// tb_uhd_frame: one 4K UHD (3840x2160, 4:2:0) frame through the filter.
//
// Streams the edge segments of a whole frame with no input gaps: first the
// luma plane, 32,400 16x16 blocks of two batches each (vertical edges, then
// horizontal edges), then the two 1920x1080 chroma planes, half as many
// segments again. Sample values are random (the filter's cost does not
// depend on them); every output segment is compared with the reference
// model. Checks that the luma plane takes exactly 48 cycles per 16x16
// block, 1,555,200 cycles per frame, i.e. 46.66 M cycles per second at
// 30 frames/s, and reports the cycles the chroma planes add.
module tb_uhd_frame;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  localparam int W = 3840, H = 2160, FPS = 30;
  localparam int LUMA_BLOCKS16 = (W / 16) * (H / 16);      // 32,400
  localparam int LUMA_BATCHES  = 2 * LUMA_BLOCKS16;        // 64,800
  localparam int CHROMA_BATCHES = LUMA_BATCHES / 2;        // two quarter-size planes
  localparam int NBATCH = LUMA_BATCHES + CHROMA_BATCHES;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid;
  seg_t in_seg, out_seg;
  seg_info_t in_info;
  int checks = 0, failures = 0;
  longint cyc = 0;

  dbf_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  seg_t exp_q [$];
  int n_in = 0, n_out = 0, mism = 0;
  longint first_in_cyc = -1, chroma_start_cyc = -1, last_out_cyc = 0;

  function automatic void make(output seg_t s, output seg_info_t inf, input bit chroma);
    pred_info_t pr;
    int base;
    base = $urandom_range(30, 220);
    if ($urandom_range(0, 1) != 0) begin s.up = rand_line(); s.dn = rand_line(); end
    else begin
      s.up = step_line(base, int'($urandom_range(0, 16)) - 8, 1);
      s.dn = step_line(base, int'($urandom_range(0, 16)) - 8, 1);
    end
    pr = pred_info_t'({$urandom, $urandom, $urandom, $urandom});
    if ($urandom_range(0, 2) != 0) begin pr.p_intra = 0; pr.q_intra = 0; end
    inf.pred   = pr;
    inf.beta   = BETA_W'($urandom_range(6, 64));
    inf.tc     = TC_W'($urandom_range(1, 24));
    inf.chroma = chroma;
  endfunction

  initial begin
    seg_t s; seg_info_t inf;
    in_valid = 0; in_seg = '0; in_info = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    make(s, inf, 1'b0);
    in_valid = 1; in_seg = s; in_info = inf;
    while (n_in < NBATCH * 8) begin
      @(posedge clk);
      if (in_ready) begin
        exp_q.push_back(ref_seg(s, ref_mode(s, ref_bs(inf.pred), int'(inf.beta),
                                            int'(inf.tc), inf.chroma), int'(inf.tc)));
        make(s, inf, (n_in + 1) >= LUMA_BATCHES * 8);
      end
      @(negedge clk);
      in_seg = s; in_info = inf;
      if (n_in >= NBATCH * 8) in_valid = 0;
    end
    in_valid = 0;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && in_ready) begin
      if (n_in == 0) first_in_cyc = cyc;
      if (n_in == LUMA_BATCHES * 8) chroma_start_cyc = cyc;
      n_in++;
    end
    if (out_valid) begin
      seg_t e;
      e = exp_q.pop_front();
      checks++;
      if (out_seg !== e) begin
        mism++;
        failures++;
        if (mism < 10) $display("FAIL segment %0d: got %h expected %h", n_out, out_seg, e);
      end
      n_out++;
      last_out_cyc = cyc;
    end
  end

  initial begin
    longint luma_cycles, total_cycles;
    wait (n_out == NBATCH * 8);
    @(posedge clk);
    luma_cycles  = chroma_start_cyc - first_in_cyc;
    total_cycles = last_out_cyc - first_in_cyc + 1;
    $display("segments filtered and compared: %0d (%0d mismatches)", n_out, mism);
    $display("luma plane: %0d cycles = %0d per 16x16 block; %0d cycles/s at %0d fps",
             luma_cycles, luma_cycles / longint'(LUMA_BLOCKS16), luma_cycles * FPS, FPS);
    $display("luma + chroma, first input to last output: %0d cycles; %0d cycles/s at %0d fps",
             total_cycles, total_cycles * FPS, FPS);
    checks++;
    if (luma_cycles != 64'd1555200) begin
      failures++;
      $display("FAIL luma frame took %0d cycles, expected 1555200", luma_cycles);
    end
    checks++;
    if (total_cycles != longint'(NBATCH) * 24 + 1) begin
      failures++;
      $display("FAIL frame took %0d cycles, expected %0d", total_cycles, NBATCH * 24 + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
