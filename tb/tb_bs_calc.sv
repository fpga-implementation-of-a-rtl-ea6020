// tb_bs_calc: self-checking test of the boundary strength computation.
// Directed cases for each rule, then random prediction information
// compared with the reference model.
module tb_bs_calc;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;
  pred_info_t pred;
  bs_t bs;
  int checks = 0, failures = 0;
  int hist [3];

  bs_calc dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int exp, string what);
    #1;
    checks++;
    if (int'(bs) != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, bs, exp);
    end
  endtask

  initial begin
    hist = '{0, 0, 0};
    pred = '0;                                  check(0, "all equal");
    pred = '0; pred.q_intra = 1;                check(2, "q intra");
    pred = '0; pred.p_intra = 1;                check(2, "p intra");
    pred = '0; pred.tu_edge = 1; pred.p_cbf = 1; check(1, "coefficients");
    pred = '0; pred.p_cbf = 1;                  check(0, "coefficients off a TU edge");
    pred = '0; pred.p_ref = 4'd3;               check(1, "reference");
    pred = '0; pred.p_mvx = 16'sd4;             check(1, "mv x +4");
    pred = '0; pred.q_mvy = 16'sd3;             check(0, "mv y 3");
    pred = '0; pred.p_mvy = -16'sd4;            check(1, "mv y -4");
    pred = '0; pred.p_mvx = 16'sh7fff; pred.q_mvx = 16'sh8000; check(1, "mv wrap");
    for (int i = 0; i < 3000; i++) begin
      pred = pred_info_t'({$urandom, $urandom, $urandom, $urandom});
      // keep the cases balanced
      if ($urandom_range(0, 3) != 0) begin pred.p_intra = 0; pred.q_intra = 0; end
      if ($urandom_range(0, 1) != 0) pred.q_ref = pred.p_ref;
      if ($urandom_range(0, 1) != 0) begin
        pred.q_mvx = pred.p_mvx + 16'($urandom_range(0, 8)) - 16'sd4;
        pred.q_mvy = pred.p_mvy + 16'($urandom_range(0, 8)) - 16'sd4;
      end
      check(ref_bs(pred), "random");
      hist[ref_bs(pred)]++;
    end
    $display("bS histogram: 0:%0d 1:%0d 2:%0d", hist[0], hist[1], hist[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
