// tb_control: self-checking test of the controller.
// For each instruction the expected control word is written out by hand
// below; for the six base instructions it is the row of the original control table
// (BR JP ALUinB ALUop DMwe Rwe Rdst Rwd), with addi writing rt. It then
// checks exception recognition: illegal opcodes and functions, privileged
// instructions in user mode, syscall, overflow, misaligned addresses, and
// that clearing a mask bit suppresses the matching exception.
module tb_control;
  import mips_pkg::*;

  logic [31:0] insn, exc_mask;
  logic        priv, alu_ovf, exc;
  logic [1:0]  addr_lo;
  ctrl_t       ctrl;
  exc_code_e   exc_code;
  int checks = 0, failures = 0;

  control dut (.insn, .priv, .alu_ovf, .addr_lo, .exc_mask, .ctrl, .exc, .exc_code);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rt_(input logic [5:0] fn, input int rs, input int rt, input int rd, input int sh);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] it_(input logic [5:0] op, input int rs, input int rt, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  // expected control word from the individual fields
  function automatic ctrl_t mk(input logic br, input logic jp, input logic jr, input logic inb,
                               input alu_op_e aop, input logic dmwe, input logic rwe, input rdst_e rd,
                               input rwd_e rwd, input logic crwe, input logic ret_, input logic ovc,
                               input logic mrd);
    ctrl_t c;
    c.br = br; c.jp = jp; c.jr = jr; c.alu_inb = inb; c.alu_op = aop; c.dm_we = dmwe;
    c.rwe = rwe; c.rdst = rd; c.rwd = rwd; c.cr_we = crwe; c.ret = ret_; c.ovf_chk = ovc;
    c.mem_rd = mrd;
    return c;
  endfunction

  task automatic expect_ctrl(input string name, input logic [31:0] i, input logic p, input ctrl_t ec,
                             input logic eexc, input exc_code_e ecode);
    insn = i; priv = p; #1;
    checks++;
    if (ctrl !== ec || exc !== eexc || (eexc && exc_code !== ecode)) begin
      failures++;
      $display("FAIL %s: ctrl=%h exp %h exc=%b code=%0d exp %b/%0d", name, ctrl, ec, exc, exc_code, eexc, ecode);
    end
  endtask

  initial begin
    ctrl_t nop;
    nop = mk(0,0,0,0,ALU_ADD,0,0,RDST_RT,RWD_ALU,0,0,0,0);
    exc_mask = '1; alu_ovf = 0; addr_lo = 0;
    for (int p = 0; p < 2; p++) begin
      // table rows                         BR JP jr inB ALUop   DMwe Rwe Rdst     Rwd
      expect_ctrl("add",  rt_(FN_ADD,1,2,3,0), p[0], mk(0,0,0,0,ALU_ADD,0,1,RDST_RD,RWD_ALU,0,0,1,0), 0, EXC_NONE);
      expect_ctrl("addi", it_(OP_ADDI,1,2,5),  p[0], mk(0,0,0,1,ALU_ADD,0,1,RDST_RT,RWD_ALU,0,0,1,0), 0, EXC_NONE);
      expect_ctrl("lw",   it_(OP_LW,1,2,8),    p[0], mk(0,0,0,1,ALU_ADD,0,1,RDST_RT,RWD_MEM,0,0,0,1), 0, EXC_NONE);
      expect_ctrl("sw",   it_(OP_SW,1,2,8),    p[0], mk(0,0,0,1,ALU_ADD,1,0,RDST_RT,RWD_ALU,0,0,0,0), 0, EXC_NONE);
      expect_ctrl("beq",  it_(OP_BEQ,1,2,-3),  p[0], mk(1,0,0,0,ALU_SUB,0,0,RDST_RT,RWD_ALU,0,0,0,0), 0, EXC_NONE);
      expect_ctrl("j",    {OP_J, 26'h123},     p[0], mk(0,1,0,0,ALU_ADD,0,0,RDST_RT,RWD_ALU,0,0,0,0), 0, EXC_NONE);
      // added instructions
      expect_ctrl("sll",  rt_(FN_SLL,0,2,3,4), p[0], mk(0,0,0,0,ALU_SLL,0,1,RDST_RD,RWD_ALU,0,0,0,0), 0, EXC_NONE);
      expect_ctrl("slt",  rt_(FN_SLT,1,2,3,0), p[0], mk(0,0,0,0,ALU_SLT,0,1,RDST_RD,RWD_ALU,0,0,0,0), 0, EXC_NONE);
      expect_ctrl("jal",  {OP_JAL, 26'h40},    p[0], mk(0,1,0,0,ALU_ADD,0,1,RDST_RA,RWD_PC4,0,0,0,0), 0, EXC_NONE);
      expect_ctrl("jr",   rt_(FN_JR,31,0,0,0), p[0], mk(0,0,1,0,ALU_ADD,0,0,RDST_RT,RWD_ALU,0,0,0,0), 0, EXC_NONE);
      expect_ctrl("syscall", rt_(FN_SYSCALL,0,0,0,0), p[0], nop, 1, EXC_SYS);
      expect_ctrl("illegal op", it_(6'h3F,1,2,3), p[0], nop, 1, EXC_RI);
      expect_ctrl("illegal fn", rt_(6'h22,1,2,3,0), p[0], nop, 1, EXC_RI);
      expect_ctrl("illegal cop0", {OP_COP0, 5'h01, 21'h0}, p[0], nop, 1, EXC_RI);
    end
    // privileged instructions
    expect_ctrl("mfc0 k", {OP_COP0, CP0_MF, 5'd4, 5'd14, 11'd0}, 1, mk(0,0,0,0,ALU_ADD,0,1,RDST_RT,RWD_CR,0,0,0,0), 0, EXC_NONE);
    expect_ctrl("mtc0 k", {OP_COP0, CP0_MT, 5'd4, 5'd14, 11'd0}, 1, mk(0,0,0,0,ALU_ADD,0,0,RDST_RT,RWD_ALU,1,0,0,0), 0, EXC_NONE);
    expect_ctrl("ret k",  {OP_COP0, CP0_CO, 15'd0, FN_RET},      1, mk(0,0,0,0,ALU_ADD,0,0,RDST_RT,RWD_ALU,0,1,0,0), 0, EXC_NONE);
    expect_ctrl("mfc0 u", {OP_COP0, CP0_MF, 5'd4, 5'd14, 11'd0}, 0, nop, 1, EXC_CPU);
    expect_ctrl("mtc0 u", {OP_COP0, CP0_MT, 5'd4, 5'd14, 11'd0}, 0, nop, 1, EXC_CPU);
    expect_ctrl("ret u",  {OP_COP0, CP0_CO, 15'd0, FN_RET},      0, nop, 1, EXC_CPU);
    // dynamic exceptions
    alu_ovf = 1;
    expect_ctrl("add ovf",  rt_(FN_ADD,1,2,3,0), 0, mk(0,0,0,0,ALU_ADD,0,1,RDST_RD,RWD_ALU,0,0,1,0), 1, EXC_OV);
    expect_ctrl("addi ovf", it_(OP_ADDI,1,2,5),  0, mk(0,0,0,1,ALU_ADD,0,1,RDST_RT,RWD_ALU,0,0,1,0), 1, EXC_OV);
    expect_ctrl("beq ovf ignored", it_(OP_BEQ,1,2,-3), 0, mk(1,0,0,0,ALU_SUB,0,0,RDST_RT,RWD_ALU,0,0,0,0), 0, EXC_NONE);
    alu_ovf = 0; addr_lo = 2'b10;
    expect_ctrl("lw misaligned", it_(OP_LW,1,2,8), 0, mk(0,0,0,1,ALU_ADD,0,1,RDST_RT,RWD_MEM,0,0,0,1), 1, EXC_ADEL);
    expect_ctrl("sw misaligned", it_(OP_SW,1,2,8), 0, mk(0,0,0,1,ALU_ADD,1,0,RDST_RT,RWD_ALU,0,0,0,0), 1, EXC_ADES);
    expect_ctrl("addi lo bits ignored", it_(OP_ADDI,1,2,5), 0, mk(0,0,0,1,ALU_ADD,0,1,RDST_RT,RWD_ALU,0,0,1,0), 0, EXC_NONE);
    // mask
    exc_mask = '1; exc_mask[EXC_ADEL] = 1'b0;
    expect_ctrl("lw misaligned masked", it_(OP_LW,1,2,8), 0, mk(0,0,0,1,ALU_ADD,0,1,RDST_RT,RWD_MEM,0,0,0,1), 0, EXC_NONE);
    expect_ctrl("sw misaligned unmasked", it_(OP_SW,1,2,8), 0, mk(0,0,0,1,ALU_ADD,1,0,RDST_RT,RWD_ALU,0,0,0,0), 1, EXC_ADES);
    addr_lo = 0; exc_mask = '0;
    expect_ctrl("syscall masked", rt_(FN_SYSCALL,0,0,0,0), 0, nop, 0, EXC_NONE);
    expect_ctrl("illegal masked", it_(6'h3F,1,2,3), 0, nop, 0, EXC_NONE);
    alu_ovf = 1;
    expect_ctrl("add ovf masked", rt_(FN_ADD,1,2,3,0), 0, mk(0,0,0,0,ALU_ADD,0,1,RDST_RD,RWD_ALU,0,0,1,0), 0, EXC_NONE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
