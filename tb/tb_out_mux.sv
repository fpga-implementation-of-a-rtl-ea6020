// tb_out_mux: self-checking test of the output multiplexers.
// Random candidates under every combination of en, Sel0 and Sel1.
module tb_out_mux;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;
  line_t orig, line_out;
  filt_cand_t cand;
  logic en, sel0, sel1;
  int checks = 0, failures = 0;

  out_mux dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      line_t exp;
      orig = rand_line();
      cand.strng = rand_line(); cand.norm = rand_line(); cand.chrm = rand_line();
      {en, sel0, sel1} = 3'(i);
      #1;
      exp = !en ? orig : sel1 ? cand.chrm : sel0 ? cand.strng : cand.norm;
      checks++;
      if (line_out !== exp) begin
        failures++;
        $display("FAIL en=%b sel0=%b sel1=%b got %h expected %h", en, sel0, sel1, line_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
