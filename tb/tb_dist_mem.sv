// tb_dist_mem: self-checking test of the sixteen-RAM sample memory.
// Stores eight random 128-bit segments and reads them back, then writes and
// reads different addresses in the same cycles, and checks each sample
// position (pu0..qd3) comes back where it was written.
module tb_dist_mem;
  import dbf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic we;
  logic [2:0] waddr, raddr;
  seg_t wdata, rdata;
  seg_t model [8];
  int checks = 0, failures = 0;

  dist_mem #(.DEPTH(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic seg_t rseg();
    seg_t s;
    s = {$urandom, $urandom, $urandom, $urandom};
    return s;
  endfunction

  task automatic check(seg_t exp, string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, rdata, exp);
    end
  endtask

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 8; a++) begin
      @(negedge clk); we = 1; waddr = 3'(a); wdata = rseg(); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 8; a++) begin
      @(negedge clk); raddr = 3'(a);
      @(negedge clk); check(model[a], "readback");
    end
    for (int i = 0; i < 40; i++) begin
      logic [2:0] ra, wa;
      seg_t old;
      @(negedge clk);
      ra = 3'($urandom); wa = ra + 3'(1 + $urandom_range(0, 6));
      old = model[ra];
      raddr = ra; we = 1; waddr = wa; wdata = rseg();
      @(posedge clk); model[wa] = wdata;
      @(negedge clk); we = 0;
      check(old, "read while writing elsewhere");
    end
    for (int a = 0; a < 8; a++) begin
      @(negedge clk); raddr = 3'(a);
      @(negedge clk); check(model[a], "final");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
