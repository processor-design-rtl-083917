// tb_cp0: self-checking test of the coprocessor-0 registers and PSR.
// Checks the reset state, mtc0 writes and mfc0 reads of $8/$12/$13/$14,
// exception entry (EPC, cause, bad address, privileged mode), that an
// exception wins over a simultaneous mtc0, that ret returns to user mode,
// and that unimplemented register numbers read zero.
module tb_cp0;
  import mips_pkg::*;

  logic clk = 0, rst;
  logic exc, we, ret, priv;
  exc_code_e exc_code;
  logic [31:0] exc_pc, exc_addr, wdata, rdata, epc, mask;
  logic [4:0] waddr, raddr;
  int checks = 0, failures = 0;

  cp0 dut (.clk, .rst, .exc, .exc_code, .exc_pc, .exc_addr, .we, .waddr, .wdata,
           .raddr, .rdata, .ret, .epc, .mask, .priv);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  task automatic rd(input logic [4:0] a, input logic [31:0] exp);
    raddr = a; #1; chk($sformatf("read $%0d", a), rdata, exp);
  endtask

  initial begin
    rst = 1; exc = 0; we = 0; ret = 0; exc_code = EXC_NONE; exc_pc = 0; exc_addr = 0;
    wdata = 0; waddr = 0; raddr = 0;
    @(posedge clk); @(negedge clk); rst = 0;
    chk("reset priv", 32'(priv), 1); chk("reset mask", mask, 32'hFFFF_FFFF);
    rd(CR_EPC, 0); rd(CR_CAUSE, 0); rd(CR_BADVADDR, 0);
    // mtc0 to each register
    we = 1;
    waddr = CR_EPC;      wdata = 32'h0000_1000; @(negedge clk);
    waddr = CR_MASK;     wdata = 32'h0000_1F00; @(negedge clk);
    waddr = CR_CAUSE;    wdata = 32'h0000_0007; @(negedge clk);
    waddr = CR_BADVADDR; wdata = 32'hCAFE_0000; @(negedge clk);
    waddr = 5'd3;        wdata = 32'hFFFF_FFFF; @(negedge clk);
    we = 0;
    rd(CR_EPC, 32'h1000); rd(CR_MASK, 32'h1F00); rd(CR_CAUSE, 7); rd(CR_BADVADDR, 32'hCAFE_0000);
    rd(5'd3, 0); rd(5'd0, 0);
    chk("epc port", epc, 32'h1000); chk("mask port", mask, 32'h1F00);
    // ret -> user
    @(negedge clk); ret = 1; @(negedge clk); ret = 0;
    chk("ret user", 32'(priv), 0);
    // overflow exception: EPC, cause, priv, badvaddr unchanged
    @(negedge clk); exc = 1; exc_code = EXC_OV; exc_pc = 32'h0000_0044; exc_addr = 32'h1234_5678; @(negedge clk); exc = 0;
    chk("exc priv", 32'(priv), 1); rd(CR_EPC, 32'h44); rd(CR_CAUSE, 32'(EXC_OV)); rd(CR_BADVADDR, 32'hCAFE_0000);
    // address error with a simultaneous mtc0: exception wins
    @(negedge clk); ret = 1; @(negedge clk); ret = 0;
    exc = 1; exc_code = EXC_ADES; exc_pc = 32'h0000_0088; exc_addr = 32'h0000_0102;
    we = 1; waddr = CR_EPC; wdata = 32'h5555_5555; @(negedge clk); exc = 0; we = 0;
    chk("exc2 priv", 32'(priv), 1); rd(CR_EPC, 32'h88); rd(CR_CAUSE, 32'(EXC_ADES)); rd(CR_BADVADDR, 32'h102);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
