// tb_ctrl_unit: self-checking test of the control unit's decisions.
// Builds segments that should be left alone, filtered normally, filtered
// strongly or chroma filtered, over random bS, beta and tc, compares
// en/sel0/sel1 with the reference model and counts how often each mode
// was seen; a mode never seen counts as a failure.
module tb_ctrl_unit;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;
  seg_t seg;
  bs_t bs;
  logic [BETA_W-1:0] beta;
  logic [TC_W-1:0] tc;
  logic chroma;
  logic en, sel0, sel1;
  int checks = 0, failures = 0;
  int seen [4];

  ctrl_unit dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run();
    int m, got;
    #1;
    m = ref_mode(seg, int'(bs), int'(beta), int'(tc), chroma);
    got = !en ? 0 : sel1 ? 3 : sel0 ? 2 : 1;
    checks++;
    seen[m]++;
    if (got != m || sel1 != chroma) begin
      failures++;
      if (failures < 10)
        $display("FAIL seg=%h bs=%0d beta=%0d tc=%0d chroma=%0d: got %0d expected %0d",
                 seg, bs, beta, tc, chroma, got, m);
    end
  endtask

  initial begin
    seen = '{0, 0, 0, 0};
    for (int i = 0; i < 20000; i++) begin
      int kind, base, step;
      kind = $urandom_range(0, 3);
      base = $urandom_range(20, 230);
      step = int'($urandom_range(0, 30)) - 15;
      case (kind)
        0: begin seg.up = rand_line(); seg.dn = rand_line(); end
        1: begin seg.up = step_line(base, step, 1); seg.dn = step_line(base, step, 1); end
        2: begin seg.up = ramp_line(base, 1, 1); seg.dn = ramp_line(base, 2, 1); end
        default: begin seg.up = step_line(base, step, 4); seg.dn = ramp_line(base, 3, 3); end
      endcase
      bs     = bs_t'($urandom_range(0, 2));
      beta   = BETA_W'($urandom_range(0, 64));
      tc     = TC_W'($urandom_range(0, 24));
      chroma = ($urandom_range(0, 4) == 0);
      run();
    end
    $display("modes seen: none %0d normal %0d strong %0d chroma %0d",
             seen[0], seen[1], seen[2], seen[3]);
    for (int m = 0; m < 4; m++) if (seen[m] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
