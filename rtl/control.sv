// control: the controller of the single-cycle processor.
//
// Part 1 (decode) turns the instruction into the control word: one row per
// instruction type, the way a control ROM indexed by opcode would hold it,
// written here as a case statement that synthesises to the equivalent
// gates. For the six base instructions (add, addi, lw, sw, beq, j) the
// rows follow the original design's control table over the signals BR, JP,
// ALUinB, ALUop, DMwe, Rwe, Rdst and Rwd, except that addi writes rt
// (Rdst = 0), as its definition requires, where that table has Rdst = 1;
// the rows for sll, slt, jal, jr, syscall, mfc0, mtc0
// and ret add the signals those instructions need (shifter and slt ALU
// operations, PC+4 and $31 for jal, the jr PC mux input, CR write enable,
// return from exception).
//
// Part 2 (exception recognition) raises exc with a cause code when the
// instruction is illegal, privileged while in user mode, a syscall, an
// add/addi that overflows, or a lw/sw with a misaligned word address, and
// the bit of the exception mask (CR $12) indexed by the cause code is set.
// A masked illegal, privileged or syscall instruction does nothing; a masked
// overflow or misaligned access completes normally. The datapath uses exc
// to cancel every write of the instruction and to send the PC to the
// handler. The cause codes, mask layout and the address check are this
// design's choices. Purely combinational.
module control
  import mips_pkg::*;
(
  input  logic [31:0] insn,
  input  logic        priv,       // 1 = privileged (kernel) mode
  input  logic        alu_ovf,    // ALU signed overflow
  input  logic [1:0]  addr_lo,    // low bits of the memory address
  input  logic [31:0] exc_mask,   // CR $12
  output ctrl_t       ctrl,
  output logic        exc,
  output exc_code_e   exc_code
);

  logic [5:0] op, fn;
  logic [4:0] rs;
  logic       illegal, priv_viol, syscall;

  assign op = insn[31:26];
  assign rs = insn[25:21];
  assign fn = insn[5:0];

  // ---- part 1: decode ---------------------------------------------------
  always_comb begin
    ctrl      = CTRL_NOP;
    illegal   = 1'b0;
    priv_viol = 1'b0;
    syscall   = 1'b0;
    unique case (op)
      OP_RTYPE: begin
        unique case (fn)
          FN_ADD: begin
            ctrl.rwe = 1'b1; ctrl.rdst = RDST_RD; ctrl.ovf_chk = 1'b1;
          end
          FN_SLL: begin
            ctrl.rwe = 1'b1; ctrl.rdst = RDST_RD; ctrl.alu_op = ALU_SLL;
          end
          FN_SLT: begin
            ctrl.rwe = 1'b1; ctrl.rdst = RDST_RD; ctrl.alu_op = ALU_SLT;
          end
          FN_JR:      ctrl.jr = 1'b1;
          FN_SYSCALL: syscall = 1'b1;
          default:    illegal = 1'b1;
        endcase
      end
      OP_ADDI: begin
        ctrl.rwe = 1'b1; ctrl.alu_inb = 1'b1; ctrl.ovf_chk = 1'b1;
      end
      OP_LW: begin
        ctrl.rwe = 1'b1; ctrl.alu_inb = 1'b1; ctrl.rwd = RWD_MEM;
        ctrl.mem_rd = 1'b1;
      end
      OP_SW: begin
        ctrl.dm_we = 1'b1; ctrl.alu_inb = 1'b1;
      end
      OP_BEQ: begin
        ctrl.br = 1'b1; ctrl.alu_op = ALU_SUB;
      end
      OP_J: ctrl.jp = 1'b1;
      OP_JAL: begin
        ctrl.jp = 1'b1; ctrl.rwe = 1'b1; ctrl.rdst = RDST_RA;
        ctrl.rwd = RWD_PC4;
      end
      OP_COP0: begin
        if (rs == CP0_MF || rs == CP0_MT || (rs == CP0_CO && fn == FN_RET)) begin
          if (!priv) begin
            priv_viol = 1'b1;
          end else if (rs == CP0_MF) begin
            ctrl.rwe = 1'b1; ctrl.rwd = RWD_CR;
          end else if (rs == CP0_MT) begin
            ctrl.cr_we = 1'b1;
          end else begin
            ctrl.ret = 1'b1;
          end
        end else begin
          illegal = 1'b1;
        end
      end
      default: illegal = 1'b1;
    endcase
  end

  // ---- part 2: exception recognition ------------------------------------
  always_comb begin
    exc_code = EXC_NONE;
    if (illegal)                              exc_code = EXC_RI;
    else if (priv_viol)                       exc_code = EXC_CPU;
    else if (syscall)                         exc_code = EXC_SYS;
    else if (ctrl.ovf_chk && alu_ovf)         exc_code = EXC_OV;
    else if (ctrl.mem_rd && addr_lo != 2'b00) exc_code = EXC_ADEL;
    else if (ctrl.dm_we && addr_lo != 2'b00)  exc_code = EXC_ADES;
    exc = (exc_code != EXC_NONE) && exc_mask[exc_code];
  end

endmodule
