// mips_single_cycle: a single-cycle processor for a MIPS instruction subset.
//
// Every instruction is fetched, decoded, executed and retired in one clock
// cycle (CPI = 1). Within a cycle the PC addresses the instruction memory;
// the instruction's rs and rt fields read the register file; the sign-
// extension unit (a wiring of bit 15 into bits 31..16, written inline here)
// and the ALUinB mux form the second ALU operand; the ALU
// result addresses the data memory; the Rwd mux chooses what is written
// back; and the next-PC logic picks PC+4, the beq target, the jump target,
// the jr register, the exception handler or the saved EPC. At the rising
// clock edge that ends the cycle the register file, the data memory, the
// coprocessor-0 registers and the PC are all written.
//
// Instructions: add, addi, lw, sw, beq, j, sll, slt, jal, jr, syscall and
// the privileged mfc0, mtc0 and ret. Exceptions (illegal instruction,
// privileged instruction in user mode, syscall, overflow of add/addi,
// misaligned lw/sw) cancel the instruction's writes, save its PC in EPC and
// send the PC to EXC_VECTOR in privileged mode; ret returns to EPC in user
// mode.
//
// Interface: clk and an active-high synchronous rst. The instruction memory
// is filled through load_we/load_addr/load_data while rst is held. The
// remaining outputs show what the instruction of the current cycle does:
// its PC and encoding, its register-file and data-memory writes, whether it
// takes an exception, and the current mode. Memory sizes, the reset PC and
// the handler address are parameters of this design's choosing.
module mips_single_cycle
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000,
  parameter logic [31:0] EXC_VECTOR = 32'h0000_0180
) (
  input  logic                          clk,
  input  logic                          rst,
  // program load port of the instruction memory
  input  logic                          load_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] load_addr,
  input  logic [31:0]                   load_data,
  // what the current instruction does
  output logic [31:0]                   pc,
  output logic [31:0]                   insn,
  output logic                          rf_we,
  output logic [4:0]                    rf_waddr,
  output logic [31:0]                   rf_wdata,
  output logic                          dm_we,
  output logic [31:0]                   dm_addr,
  output logic [31:0]                   dm_wdata,
  output logic                          exc,
  output exc_code_e                     exc_code,
  output logic                          priv
);

  ctrl_t       ctrl;
  logic [31:0] pc_next, pc_plus4;
  logic [31:0] rs_val, rt_val, imm_ext, alu_b, alu_y, dm_rdata;
  logic [31:0] cr_rdata, epc, exc_mask;
  logic        alu_zero, alu_ovf;

  // ---- fetch -------------------------------------------------------------
  pc_reg #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst, .pc_next, .pc
  );

  insn_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .addr(pc), .insn, .load_we, .load_addr, .load_data
  );

  // ---- decode and control ---------------------------------------------------
  control u_ctrl (
    .insn, .priv, .alu_ovf, .addr_lo(alu_y[1:0]), .exc_mask,
    .ctrl, .exc, .exc_code
  );

  // ---- register read, operands, execute ---------------------------------------
  // sign-extension (sx) unit: bit 15 of the immediate copied into 31..16
  assign imm_ext = {{16{insn[15]}}, insn[15:0]};

  reg_file u_rf (
    .clk, .rst,
    .raddr1(insn[25:21]), .rdata1(rs_val),
    .raddr2(insn[20:16]), .rdata2(rt_val),
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata)
  );

  assign alu_b = ctrl.alu_inb ? imm_ext : rt_val;  // ALUinB mux

  alu u_alu (
    .a(rs_val), .b(alu_b), .shamt(insn[10:6]), .op(ctrl.alu_op),
    .y(alu_y), .zero(alu_zero), .ovf(alu_ovf)
  );

  // ---- memory ----------------------------------------------------------------
  assign dm_we    = ctrl.dm_we && !exc;
  assign dm_addr  = alu_y;
  assign dm_wdata = rt_val;

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(dm_addr), .we(dm_we), .wdata(dm_wdata), .rdata(dm_rdata)
  );

  // ---- write back: Rdst and Rwd muxes ----------------------------------------
  always_comb begin
    unique case (ctrl.rdst)
      RDST_RD: rf_waddr = insn[15:11];
      RDST_RA: rf_waddr = REG_RA;
      default: rf_waddr = insn[20:16];
    endcase
    unique case (ctrl.rwd)
      RWD_MEM: rf_wdata = dm_rdata;
      RWD_PC4: rf_wdata = pc_plus4;
      RWD_CR:  rf_wdata = cr_rdata;
      default: rf_wdata = alu_y;
    endcase
  end

  assign rf_we = ctrl.rwe && !exc;

  // ---- coprocessor 0 and PSR -------------------------------------------------
  cp0 u_cp0 (
    .clk, .rst,
    .exc, .exc_code, .exc_pc(pc), .exc_addr(alu_y),
    .we(ctrl.cr_we), .waddr(insn[15:11]), .wdata(rt_val),
    .raddr(insn[15:11]), .rdata(cr_rdata),
    .ret(ctrl.ret),
    .epc, .mask(exc_mask), .priv
  );

  // at most one PC-redirecting control is active per instruction
  always_comb begin
    if (!rst) assert ($onehot0({ctrl.br, ctrl.jp, ctrl.jr, ctrl.ret}))
      else $error("more than one next-PC source selected: insn=%h", insn);
  end

  // ---- next PC ---------------------------------------------------------------
  next_pc #(.EXC_VECTOR(EXC_VECTOR)) u_npc (
    .pc, .imm_ext, .target(insn[25:0]), .rs_val, .epc,
    .br(ctrl.br), .zero(alu_zero), .jp(ctrl.jp), .jr(ctrl.jr),
    .exc, .ret(ctrl.ret),
    .pc_plus4, .pc_next
  );

endmodule
