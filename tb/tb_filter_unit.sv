// tb_filter_unit: self-checking test of the per-line filter unit.
// Random lines, edge-like lines (a step, a ramp) and extreme values, for
// every tc from 0 to 24, compared with the reference model for all three
// candidates (strong, normal, chroma).
module tb_filter_unit;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;
  line_t line_in;
  logic [TC_W-1:0] tc;
  filt_cand_t cand;
  int checks = 0, failures = 0;

  filter_unit dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(line_t got, line_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s tc=%0d in=%h: got %h expected %h", what, tc, line_in, got, exp);
    end
  endtask

  task automatic run(line_t l, int t);
    line_in = l; tc = TC_W'(t);
    #1;
    check(cand.strng, ref_strong(l, t), "strong");
    check(cand.norm,  ref_normal(l, t), "normal");
    check(cand.chrm,  ref_chroma(l, t), "chroma");
  endtask

  initial begin
    for (int t = 0; t <= 24; t++) begin
      run('0, t);
      run('1, t);
      run('{p: '0, q: '1}, t);
      run('{p: '1, q: '0}, t);
      for (int i = 0; i < 200; i++) begin
        run(rand_line(), t);
        run(step_line($urandom_range(0, 255), int'($urandom_range(0, 40)) - 20, 3), t);
        run(ramp_line($urandom_range(0, 255), int'($urandom_range(0, 8)) - 4, 2), t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
