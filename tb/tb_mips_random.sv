// tb_mips_random: random-program test of the single-cycle processor at its
// default parameters.
//
// A program of a few hundred random instructions is generated: addi, add,
// slt, sll, lw and sw (base $0, mostly aligned, sometimes misaligned), beq
// and j/jal with forward targets, syscall, illegal words, mfc0 of the CP0
// registers and mtc0 to the exception mask. The program starts in
// privileged mode; the first exception handler's ret drops to user mode,
// after which mfc0/mtc0 trap as privileged instructions. The handler at
// 0x180 skips the faulting instruction. The instruction-set model of
// mips_ref_pkg runs alongside and is compared with the processor every
// cycle; at the end all registers, the touched data words and the CP0
// state are compared. Several seeds are run, each from a fresh reset.
module tb_mips_random;
  import mips_pkg::*;
  import mips_ref_pkg::*;

  localparam int IMEM_WORDS = 1024;
  localparam int BODY       = 600;
  localparam int BODY_START = 32'h200;
  localparam int SEEDS      = 4;

  logic clk = 0, rst;
  logic load_we;
  logic [9:0] load_addr;
  logic [31:0] load_data;
  logic [31:0] pc, insn, rf_wdata, dm_addr, dm_wdata;
  logic rf_we, dm_we, exc, priv;
  logic [4:0] rf_waddr;
  exc_code_e exc_code;

  int checks = 0, failures = 0;
  int n_exc [32];
  int n_taken, n_user;

  mips_single_cycle dut (
    .clk, .rst, .load_we, .load_addr, .load_data,
    .pc, .insn, .rf_we, .rf_waddr, .rf_wdata, .dm_we, .dm_addr, .dm_wdata,
    .exc, .exc_code, .priv
  );

  always #5 clk = ~clk;

  initial begin
    repeat (SEEDS * (IMEM_WORDS + 3000)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic int rreg();  // registers the program may write
    return $urandom_range(1, 25);
  endfunction

  function automatic int moff();  // data offset, misaligned one time in eight
    int o = 4 * $urandom_range(0, 15);
    if ($urandom_range(0, 7) == 0) o += $urandom_range(1, 3);
    return o;
  endfunction

  task automatic build(ref logic [31:0] prog [IMEM_WORDS], output int end_pc);
    int a, k;
    for (int i = 0; i < IMEM_WORDS; i++) prog[i] = ILLEGAL;
    prog[0] = J(OP_J, BODY_START);
    // handler: EPC += 4, return
    prog[32'h180 >> 2] = MFC0(27, 14);
    prog[32'h184 >> 2] = I(OP_ADDI, 27, 27, 4);
    prog[32'h188 >> 2] = MTC0(27, 14);
    prog[32'h18C >> 2] = RET;
    a = BODY_START;
    for (int i = 0; i < 16; i++) begin prog[a >> 2] = I(OP_SW, 0, 0, 4 * i); a += 4; end
    for (int i = 0; i < BODY; i++) begin
      k = $urandom_range(0, 99);
      if (k < 22)      prog[a >> 2] = I(OP_ADDI, rreg(), $urandom_range(0, 25), int'($urandom_range(0, 65535)));
      else if (k < 34) prog[a >> 2] = R(FN_ADD, rreg(), $urandom_range(0, 25), $urandom_range(0, 25));
      else if (k < 42) prog[a >> 2] = R(FN_SLT, rreg(), $urandom_range(0, 25), $urandom_range(0, 25));
      else if (k < 50) prog[a >> 2] = R(FN_SLL, rreg(), 0, $urandom_range(0, 25), $urandom_range(0, 31));
      else if (k < 60) prog[a >> 2] = I(OP_LW, rreg(), 0, moff());
      else if (k < 70) prog[a >> 2] = I(OP_SW, $urandom_range(0, 25), 0, moff());
      else if (k < 80) prog[a >> 2] = I(OP_BEQ, $urandom_range(0, 3), $urandom_range(0, 3), $urandom_range(0, 3));
      else if (k < 83) prog[a >> 2] = J(OP_J, a + 4 * $urandom_range(1, 4));
      else if (k < 86) prog[a >> 2] = J(OP_JAL, a + 4 * $urandom_range(1, 4));
      else if (k < 89) prog[a >> 2] = SYSCALL;
      else if (k < 91) prog[a >> 2] = ILLEGAL;
      else if (k < 96) prog[a >> 2] = MFC0(rreg(), (k % 2 == 1) ? 13 : 12);
      else             prog[a >> 2] = MTC0($urandom_range(0, 25), 12);
      a += 4;
    end
    // landing pad for forward jumps past the end, then the end loop
    for (int i = 0; i < 5; i++) begin prog[a >> 2] = I(OP_ADDI, 0, 0, 0); a += 4; end
    prog[a >> 2] = I(OP_BEQ, 0, 0, -1);
    end_pc = a;
  endtask

  initial begin
    logic [31:0] prog [IMEM_WORDS];
    int end_pc, cycles;
    expect_t e;
    mips_ref_model model;
    void'($urandom(20261003));
    for (int s = 0; s < SEEDS; s++) begin
      build(prog, end_pc);
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
      while (pc != end_pc && cycles < 2500) begin
        chk($sformatf("seed %0d pc @%0d", s, cycles), pc, model.pc);
        e = model.step();
        chk($sformatf("exc pc=%h", pc), 32'(exc), 32'(e.exc));
        if (e.exc) begin chk($sformatf("code pc=%h", pc), 32'(exc_code), 32'(e.code)); n_exc[e.code]++; end
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
        if (insn[31:26] == OP_BEQ && e.next != pc + 4) n_taken++;
        @(negedge clk);
        if (!priv) n_user++;
        cycles++;
      end
      chk($sformatf("seed %0d reached the end", s), pc, end_pc);
      for (int i = 0; i < 32; i++) chk($sformatf("seed %0d $%0d", s, i), dut.u_rf.regs[i], model.r[i]);
      for (int i = 0; i < 16; i++) chk($sformatf("seed %0d mem[%0d]", s, i), dut.u_dmem.mem[i], model.mem[i]);
      chk("EPC", dut.u_cp0.epc, model.epc);
      chk("cause", dut.u_cp0.cause, model.cause);
      chk("bad address", dut.u_cp0.badvaddr, model.bad);
      chk("mask", dut.u_cp0.mask, model.mask);
      chk("mode", 32'(priv), 32'(model.priv));
      $display("seed %0d: %0d cycles", s, cycles);
    end
    $display("taken beq %0d, user-mode cycles %0d, exceptions: ov %0d ri %0d cpu %0d adel %0d ades %0d sys %0d",
             n_taken, n_user, n_exc[EXC_OV], n_exc[EXC_RI], n_exc[EXC_CPU], n_exc[EXC_ADEL],
             n_exc[EXC_ADES], n_exc[EXC_SYS]);
    checks++;
    if (n_taken == 0 || n_user == 0 || n_exc[EXC_SYS] == 0 || n_exc[EXC_CPU] == 0) begin
      failures++;
      $display("FAIL random programs did not reach taken branches, user mode and exceptions");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
