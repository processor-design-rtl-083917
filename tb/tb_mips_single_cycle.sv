// tb_mips_single_cycle: end-to-end test of the single-cycle processor at
// its default parameters.
//
// A kernel/user test program is assembled here with small encoding
// functions and loaded through the instruction-memory load port. It runs
// every implemented instruction, a taken and a not-taken beq, a call and
// return with jal/jr, a switch to user mode with ret, and every exception
// cause (overflow, illegal instruction, privileged instruction in user
// mode, misaligned load, misaligned store, syscall), plus an overflow that
// the exception mask suppresses. The handler at 0x180 logs each cause to
// data memory and returns past the faulting instruction.
//
// The instruction-set model of mips_ref_pkg runs alongside and is
// compared with the processor every cycle: PC, register-file write, data-
// memory write and exception. At the end, registers, memory and the
// coprocessor-0 state are compared with values worked out by hand, and the
// number of cycles to reach the final loop is compared with the hand count
// of executed instructions (one cycle per instruction). Each mechanism is
// counted and one that never happened counts as a failure.
module tb_mips_single_cycle;
  import mips_pkg::*;
  import mips_ref_pkg::*;

  localparam int IMEM_WORDS = 1024;
  localparam int END_PC     = 32'h42C;
  localparam int EXP_CYCLES = 87;

  logic clk = 0, rst;
  logic load_we;
  logic [9:0] load_addr;
  logic [31:0] load_data;
  logic [31:0] pc, insn, rf_wdata, dm_addr, dm_wdata;
  logic rf_we, dm_we, exc, priv;
  logic [4:0] rf_waddr;
  exc_code_e exc_code;

  int checks = 0, failures = 0;

  mips_single_cycle dut (
    .clk, .rst, .load_we, .load_addr, .load_data,
    .pc, .insn, .rf_we, .rf_waddr, .rf_wdata, .dm_we, .dm_addr, .dm_wdata,
    .exc, .exc_code, .priv
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [IMEM_WORDS];

  task automatic put(input int addr, input logic [31:0] w);
    prog[addr >> 2] = w;
  endtask

  task automatic build_program();
    for (int i = 0; i < IMEM_WORDS; i++) prog[i] = ILLEGAL;
    // reset code, kernel mode
    put(32'h000, I(OP_ADDI, 1, 0, 5));
    put(32'h004, I(OP_ADDI, 2, 0, 7));
    put(32'h008, R(FN_ADD, 3, 1, 2));
    put(32'h00C, I(OP_SW, 3, 0, 0));
    put(32'h010, I(OP_LW, 4, 0, 0));
    put(32'h014, R(FN_SLT, 5, 1, 2));
    put(32'h018, R(FN_SLT, 6, 2, 1));
    put(32'h01C, R(FN_SLL, 7, 0, 1, 4));
    put(32'h020, I(OP_BEQ, 6, 5, 1));          // not taken
    put(32'h024, I(OP_ADDI, 8, 0, 1));
    put(32'h028, I(OP_BEQ, 1, 1, 1));          // taken, skips 0x02C
    put(32'h02C, I(OP_ADDI, 8, 0, 99));
    put(32'h030, J(OP_JAL, 32'h300));
    put(32'h034, I(OP_ADDI, 9, 0, 3));
    put(32'h038, I(OP_ADDI, 20, 0, 8));
    put(32'h03C, I(OP_ADDI, 21, 0, -4097));    // mask with the overflow bit clear
    put(32'h040, J(OP_J, 32'h048));
    put(32'h044, I(OP_ADDI, 9, 0, 55));
    put(32'h048, I(OP_ADDI, 10, 0, 32'h400));
    put(32'h04C, MTC0(10, 14));
    put(32'h050, RET);                          // to user code at 0x400
    // exception handler
    put(32'h180, MFC0(26, 13));
    put(32'h184, MFC0(27, 14));
    put(32'h188, I(OP_ADDI, 25, 25, 1));
    put(32'h18C, R(FN_SLL, 24, 0, 25, 2));
    put(32'h190, I(OP_SW, 26, 24, 32'h100));
    put(32'h194, I(OP_ADDI, 27, 27, 4));
    put(32'h198, MTC0(27, 14));
    put(32'h19C, I(OP_BEQ, 20, 26, 1));
    put(32'h1A0, RET);
    put(32'h1A4, MTC0(21, 12));                 // syscall: stop overflow traps
    put(32'h1A8, RET);
    // subroutine
    put(32'h300, I(OP_ADDI, 11, 0, 42));
    put(32'h304, R(FN_JR, 0, 31, 0));
    // user code
    put(32'h400, I(OP_ADDI, 12, 0, 1));
    put(32'h404, I(OP_ADDI, 13, 0, 32'h7FFF));
    put(32'h408, R(FN_SLL, 13, 0, 13, 16));
    put(32'h40C, R(FN_ADD, 14, 13, 13));        // overflow trap
    put(32'h410, ILLEGAL);                      // illegal instruction
    put(32'h414, MFC0(15, 14));                 // privileged in user mode
    put(32'h418, I(OP_LW, 17, 0, 3));           // misaligned load
    put(32'h41C, I(OP_SW, 1, 0, 2));            // misaligned store
    put(32'h420, SYSCALL);
    put(32'h424, R(FN_ADD, 18, 13, 13));        // overflow, now masked
    put(32'h428, I(OP_ADDI, 19, 0, 77));
    put(32'h42C, I(OP_BEQ, 0, 0, -1));          // end: loop
  endtask

  // ---------------------------------------------------------------------------
  // mechanism counters
  int n_add, n_addi, n_lw, n_sw, n_beq_t, n_beq_n, n_j, n_jal, n_jr, n_sll, n_slt;
  int n_mfc0, n_mtc0, n_ret, n_to_user, n_masked;
  int n_exc [32];

  task automatic count(input logic [31:0] w, input logic [31:0] cur_pc, input logic [31:0] nxt);
    logic [5:0] op = w[31:26], fn = w[5:0];
    if (op == OP_RTYPE && fn == FN_ADD)  n_add++;
    if (op == OP_RTYPE && fn == FN_SLL)  n_sll++;
    if (op == OP_RTYPE && fn == FN_SLT)  n_slt++;
    if (op == OP_RTYPE && fn == FN_JR)   n_jr++;
    if (op == OP_ADDI) n_addi++;
    if (op == OP_LW && !exc) n_lw++;
    if (op == OP_SW && !exc) n_sw++;
    if (op == OP_BEQ) begin if (nxt != cur_pc + 4) n_beq_t++; else n_beq_n++; end
    if (op == OP_J)   n_j++;
    if (op == OP_JAL) n_jal++;
    if (op == OP_COP0 && !exc && w[25:21] == CP0_MF) n_mfc0++;
    if (op == OP_COP0 && !exc && w[25:21] == CP0_MT) n_mtc0++;
    if (op == OP_COP0 && !exc && w[25:21] == CP0_CO) begin n_ret++; end
    if (exc) n_exc[exc_code]++;
    if (op == OP_RTYPE && fn == FN_ADD && !exc && dut.alu_ovf) n_masked++;
  endtask

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  mips_ref_model model;

  initial begin
    int cycles;
    logic was_priv;
    expect_t e;
    build_program();
    // load the program while the processor is held in reset
    rst = 1; load_we = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < IMEM_WORDS; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 10'(i); load_data = prog[i];
    end
    @(negedge clk); load_we = 0;
    @(negedge clk); rst = 0;

    model = new(IMEM_WORDS, 32'h0, 32'h180);
    foreach (prog[i]) model.prog[i] = prog[i];

    cycles = 0;
    was_priv = 1;
    while (pc != END_PC && cycles < 1000) begin
      // combinational outputs of this cycle, sampled mid-cycle
      chk($sformatf("pc @%0d", cycles), pc, model.pc);
      e = model.step();
      chk($sformatf("exc @%0d pc=%h", cycles, pc), 32'(exc), 32'(e.exc));
      if (e.exc) chk($sformatf("exc code pc=%h", pc), 32'(exc_code), 32'(e.code));
      chk($sformatf("rf_we pc=%h", pc), 32'(rf_we), 32'(e.rf_we));
      if (e.rf_we) begin
        chk($sformatf("rf_waddr pc=%h", pc), 32'(rf_waddr), 32'(e.rf_waddr));
        chk($sformatf("rf_wdata pc=%h", pc), rf_wdata, e.rf_wdata);
      end
      chk($sformatf("dm_we pc=%h", pc), 32'(dm_we), 32'(e.dm_we));
      if (e.dm_we) begin
        chk($sformatf("dm_addr pc=%h", pc), dm_addr, e.dm_addr);
        chk($sformatf("dm_wdata pc=%h", pc), dm_wdata, e.dm_wdata);
      end
      chk($sformatf("pc_next pc=%h", pc), dut.pc_next, e.next);
      count(insn, pc, dut.pc_next);
      @(negedge clk);
      cycles++;
      if (was_priv && !priv) n_to_user++;
      was_priv = priv;
    end

    // one instruction per cycle
    chk("cycles to reach the end loop", 32'(cycles), 32'(EXP_CYCLES));

    // architectural state worked out by hand
    chk("$1", dut.u_rf.regs[1], 5);
    chk("$2", dut.u_rf.regs[2], 7);
    chk("$3", dut.u_rf.regs[3], 12);
    chk("$4", dut.u_rf.regs[4], 12);
    chk("$5", dut.u_rf.regs[5], 1);
    chk("$6", dut.u_rf.regs[6], 0);
    chk("$7", dut.u_rf.regs[7], 80);
    chk("$8", dut.u_rf.regs[8], 1);
    chk("$9", dut.u_rf.regs[9], 3);
    chk("$10", dut.u_rf.regs[10], 32'h400);
    chk("$11", dut.u_rf.regs[11], 42);
    chk("$12", dut.u_rf.regs[12], 1);
    chk("$13", dut.u_rf.regs[13], 32'h7FFF_0000);
    chk("$14", dut.u_rf.regs[14], 0);
    chk("$15", dut.u_rf.regs[15], 0);
    chk("$17", dut.u_rf.regs[17], 0);
    chk("$18", dut.u_rf.regs[18], 32'hFFFE_0000);
    chk("$19", dut.u_rf.regs[19], 77);
    chk("$21", dut.u_rf.regs[21], 32'hFFFF_EFFF);
    chk("$24", dut.u_rf.regs[24], 24);
    chk("$25", dut.u_rf.regs[25], 6);
    chk("$26", dut.u_rf.regs[26], 8);
    chk("$27", dut.u_rf.regs[27], 32'h424);
    chk("$31", dut.u_rf.regs[31], 32'h34);
    chk("mem[0]", dut.u_dmem.mem[0], 12);
    chk("log 1 overflow",  dut.u_dmem.mem[32'h41], 12);
    chk("log 2 illegal",   dut.u_dmem.mem[32'h42], 10);
    chk("log 3 privilege", dut.u_dmem.mem[32'h43], 11);
    chk("log 4 load addr", dut.u_dmem.mem[32'h44], 4);
    chk("log 5 store addr",dut.u_dmem.mem[32'h45], 5);
    chk("log 6 syscall",   dut.u_dmem.mem[32'h46], 8);
    chk("EPC", dut.u_cp0.epc, 32'h424);
    chk("cause", dut.u_cp0.cause, 8);
    chk("bad address", dut.u_cp0.badvaddr, 2);
    chk("mask", dut.u_cp0.mask, 32'hFFFF_EFFF);
    chk("user mode at end", 32'(priv), 0);

    $display("mechanisms:");
    need("add", n_add);           need("addi", n_addi);
    need("lw", n_lw);             need("sw", n_sw);
    need("beq taken", n_beq_t);   need("beq not taken", n_beq_n);
    need("j", n_j);               need("jal", n_jal);
    need("jr", n_jr);             need("sll", n_sll);
    need("slt", n_slt);           need("mfc0", n_mfc0);
    need("mtc0", n_mtc0);         need("ret", n_ret);
    need("switch to user mode", n_to_user);
    need("exception: overflow", n_exc[EXC_OV]);
    need("exception: illegal", n_exc[EXC_RI]);
    need("exception: privileged", n_exc[EXC_CPU]);
    need("exception: load address", n_exc[EXC_ADEL]);
    need("exception: store address", n_exc[EXC_ADES]);
    need("exception: syscall", n_exc[EXC_SYS]);
    need("masked overflow", n_masked);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
