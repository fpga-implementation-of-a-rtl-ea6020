// tb_dbf_top: end-to-end test of the deblocking filter at its default size.
//
// Sends NBATCH batches of eight edge segments (NBATCH/2 16x16 blocks, each
// a vertical-edge batch and a horizontal-edge batch) with random samples,
// prediction information, beta, tc and luma/chroma flag, and compares every
// segment that leaves with the reference model. The first half of the run
// has random gaps in in_valid (input stalls), the second half none, where
// the 24-cycle batch period, 48 cycles per 16x16 block, and the 10-cycle
// latency from the last segment taken to the first segment out are checked.
// It counts how often each mechanism happened: bS 0/1/2, luma edges left
// alone by bS = 0 and by the activity test, normal and strong luma
// filtering, chroma filtered and chroma left alone, input stalls and
// back-to-back batches. One that never happened counts as a failure.
module tb_dbf_top;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  localparam int NBATCH = 40;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid;
  seg_t in_seg, out_seg;
  seg_info_t in_info;
  int checks = 0, failures = 0;
  int cyc = 0;

  dbf_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum int {
    EV_BS0, EV_BS1, EV_BS2, EV_OFF_BS, EV_OFF_ACT, EV_NORMAL, EV_STRONG,
    EV_CHROMA, EV_CHROMA_OFF, EV_STALL, EV_BACK2BACK, EV_N
  } ev_e;
  string ev_name [EV_N] = '{"bS=0", "bS=1", "bS=2", "luma off (bS=0)",
    "luma off (activity >= beta)", "normal luma", "strong luma", "chroma filtered",
    "chroma left alone (bS<2)", "input stall", "back-to-back batch"};
  int ev [EV_N];

  seg_t exp_q [$];
  int n_in = 0, n_out = 0;
  int last_in_cyc = 0;
  int batch_first_in [$];
  bit gaps = 1;

  task automatic make_segment(output seg_t s, output seg_info_t inf);
    int kind, base, step;
    pred_info_t pr;
    kind = $urandom_range(0, 3);
    base = $urandom_range(30, 220);
    step = int'($urandom_range(0, 24)) - 12;
    case (kind)
      0: begin s.up = rand_line(); s.dn = rand_line(); end
      1: begin s.up = step_line(base, step, 0); s.dn = step_line(base, step, 1); end
      2: begin s.up = ramp_line(base, 2, 1); s.dn = ramp_line(base, 2, 1); end
      default: begin s.up = step_line(base, 3 * step, 5); s.dn = step_line(base, 3 * step, 5); end
    endcase
    pr = pred_info_t'({$urandom, $urandom, $urandom, $urandom});
    if ($urandom_range(0, 2) != 0) begin pr.p_intra = 0; pr.q_intra = 0; end
    if ($urandom_range(0, 1) != 0) begin pr.tu_edge = 0; end
    if ($urandom_range(0, 1) != 0) pr.q_ref = pr.p_ref;
    if ($urandom_range(0, 1) != 0) begin
      pr.q_mvx = pr.p_mvx + 16'($urandom_range(0, 6)) - 16'sd3;
      pr.q_mvy = pr.p_mvy + 16'($urandom_range(0, 6)) - 16'sd3;
    end
    inf.pred   = pr;
    inf.beta   = BETA_W'($urandom_range(6, 64));
    inf.tc     = TC_W'($urandom_range(1, 24));
    inf.chroma = ($urandom_range(0, 3) == 0);
  endtask

  // drive
  initial begin
    seg_t s; seg_info_t inf;
    in_valid = 0; in_seg = '0; in_info = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    make_segment(s, inf);
    while (n_in < NBATCH * 8) begin
      if (gaps && $urandom_range(0, 3) == 0) begin
        in_valid = 0;
      end else begin
        in_valid = 1; in_seg = s; in_info = inf;
      end
      @(posedge clk);
      if (in_valid && in_ready) begin
        int bs, mode;
        bs   = ref_bs(inf.pred);
        mode = ref_mode(s, bs, int'(inf.beta), int'(inf.tc), inf.chroma);
        exp_q.push_back(ref_seg(s, mode, int'(inf.tc)));
        ev[EV_BS0 + bs]++;
        if (inf.chroma) begin
          if (mode == 3) ev[EV_CHROMA]++; else ev[EV_CHROMA_OFF]++;
        end else begin
          if (mode == 1) ev[EV_NORMAL]++;
          else if (mode == 2) ev[EV_STRONG]++;
          else if (bs == 0) ev[EV_OFF_BS]++;
          else ev[EV_OFF_ACT]++;
        end
        make_segment(s, inf);
      end else if (in_ready && !in_valid) begin
        ev[EV_STALL]++;
      end
      @(negedge clk);
      if (n_in >= NBATCH * 4) gaps = 0;
    end
    in_valid = 0;
  end

  // monitor
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && in_ready) begin
      if (n_in % 8 == 0) begin
        if (batch_first_in.size() > 0 && cyc - batch_first_in[$] == 24) ev[EV_BACK2BACK]++;
        batch_first_in.push_back(cyc);
      end
      n_in++;
      last_in_cyc = cyc;
    end
    if (out_valid) begin
      seg_t e;
      if (n_out % 8 == 0) begin
        checks++;
        if (cyc - last_in_cyc != 10) begin
          failures++;
          $display("FAIL latency %0d cycles, expected 10", cyc - last_in_cyc);
        end
      end
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL output with nothing expected");
      end else begin
        e = exp_q.pop_front();
        if (out_seg !== e) begin
          failures++;
          if (failures < 10)
            $display("FAIL segment %0d: got %h expected %h", n_out, out_seg, e);
        end
      end
      n_out++;
    end
  end

  initial begin
    ev = '{default: 0};
    wait (n_out == NBATCH * 8);
    repeat (5) @(posedge clk);
    checks++;
    if (out_valid || exp_q.size() != 0) begin
      failures++;
      $display("FAIL stray output or missing segments");
    end
    // throughput of the gap-free second half
    for (int b = NBATCH - 6; b < NBATCH - 1; b++) begin
      checks++;
      if (batch_first_in[b+1] - batch_first_in[b] != 24) begin
        failures++;
        $display("FAIL batch period %0d, expected 24", batch_first_in[b+1] - batch_first_in[b]);
      end
    end
    checks++;
    if (batch_first_in[NBATCH-1] - batch_first_in[NBATCH-3] != 48) begin
      failures++;
      $display("FAIL cycles per 16x16 block %0d, expected 48",
               batch_first_in[NBATCH-1] - batch_first_in[NBATCH-3]);
    end
    for (int i = 0; i < EV_N; i++) begin
      $display("mechanism %-28s %0d times", ev_name[i], ev[i]);
      checks++;
      if (ev[i] == 0) begin
        failures++;
        $display("FAIL mechanism never happened: %s", ev_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
