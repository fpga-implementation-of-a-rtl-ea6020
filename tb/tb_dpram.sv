// tb_dpram: self-checking test of the dual-port RAM.
// Writes random words, reads them back one cycle later, and checks that a
// read of the address written in the same cycle returns the old word and
// that a read and a write to different addresses proceed together.
module tb_dpram;
  localparam int W = 8, D = 8;
  logic clk = 0, rst_n = 0;
  logic we;
  logic [2:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  dpram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [W-1:0] exp, string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, rdata, exp);
    end
  endtask

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1; waddr = 3'(a); wdata = 8'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    // read back
    for (int a = 0; a < D; a++) begin
      @(negedge clk); raddr = 3'(a);
      @(negedge clk); check(model[a], "readback");
    end
    // simultaneous write and read at different addresses
    for (int i = 0; i < 40; i++) begin
      logic [2:0] ra, wa;
      logic [W-1:0] old;
      @(negedge clk);
      ra = 3'($urandom); wa = 3'($urandom);
      old = model[ra];
      raddr = ra; we = 1; waddr = wa; wdata = 8'($urandom);
      @(posedge clk); model[wa] = wdata;
      @(negedge clk); we = 0;
      check(old, "read during write");
    end
    // the newly written words are all there
    for (int a = 0; a < D; a++) begin
      @(negedge clk); raddr = 3'(a);
      @(negedge clk); check(model[a], "final");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
