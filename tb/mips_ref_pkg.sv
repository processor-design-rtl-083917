// mips_ref_pkg: reference material for the processor testbenches.
//
// Encoder functions for the implemented instructions, and mips_ref_model,
// an instruction-set model of the processor written independently of the
// RTL. step() executes the instruction at the model's PC from the program
// image and reports what the processor is expected to do in that cycle:
// register-file write, data-memory write, exception and next PC. It
// updates the model's architectural state (registers, data memory,
// coprocessor-0 registers, mode) the same way.
package mips_ref_pkg;
  import mips_pkg::*;

  localparam logic [31:0] RET     = {OP_COP0, CP0_CO, 15'd0, FN_RET};
  localparam logic [31:0] SYSCALL = {OP_RTYPE, 20'd0, FN_SYSCALL};
  localparam logic [31:0] ILLEGAL = 32'hFC00_0000;

  function automatic logic [31:0] R(input logic [5:0] fn, input int rd, input int rs, input int rt, input int sh = 0);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] I(input logic [5:0] op, input int rt, input int rs, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] J(input logic [5:0] op, input int addr);
    return {op, 26'(addr >> 2)};
  endfunction
  function automatic logic [31:0] MFC0(input int rt, input int cr);
    return {OP_COP0, CP0_MF, 5'(rt), 5'(cr), 11'd0};
  endfunction
  function automatic logic [31:0] MTC0(input int rt, input int cr);
    return {OP_COP0, CP0_MT, 5'(rt), 5'(cr), 11'd0};
  endfunction

  // what one instruction is expected to do
  typedef struct {
    logic        rf_we;
    logic [4:0]  rf_waddr;
    logic [31:0] rf_wdata;
    logic        dm_we;
    logic [31:0] dm_addr;
    logic [31:0] dm_wdata;
    logic        exc;
    exc_code_e   code;
    logic [31:0] next;
  } expect_t;

  class mips_ref_model;
    logic [31:0] prog [];
    int          words;
    logic [31:0] vector;
    logic [31:0] pc, r [32], epc, cause, bad, mask;
    logic        priv;
    logic [31:0] mem [int];

    function new(input int words, input logic [31:0] reset_pc, input logic [31:0] exc_vector);
      this.words = words;
      prog = new[words];
      vector = exc_vector;
      pc = reset_pc; epc = 0; cause = 0; bad = 0; mask = '1; priv = 1;
      foreach (r[i]) r[i] = 0;
    endfunction

    function automatic expect_t step();
      expect_t     e;
      logic [31:0] w, a, b, sx, addr;
      logic [5:0]  op, fn;
      int          rs, rt, rd, widx, pidx;
      logic [32:0] wide;
      exc_code_e   code;
      pidx = 32'(pc[31:2]);
      pidx = pidx % words;
      w    = prog[pidx];
      op   = w[31:26];
      fn   = w[5:0];
      rs   = int'(w[25:21]);
      rt   = int'(w[20:16]);
      rd   = int'(w[15:11]);
      a    = r[rs];
      b    = r[rt];
      sx   = 32'($signed(w[15:0]));
      addr = a + sx;
      widx = int'(addr[31:2]);
      code = EXC_NONE;
      e.rf_we = 0; e.dm_we = 0; e.exc = 0; e.rf_waddr = 0; e.rf_wdata = 0;
      e.dm_addr = 0; e.dm_wdata = 0; e.code = EXC_NONE; e.next = pc + 4;
      if (op == OP_RTYPE && fn == FN_ADD) begin
        wide = {a[31], a} + {b[31], b};
        if (wide[32] != wide[31]) code = EXC_OV;
        e.rf_we = 1; e.rf_waddr = 5'(rd); e.rf_wdata = a + b;
      end else if (op == OP_RTYPE && fn == FN_SLT) begin
        e.rf_we = 1; e.rf_waddr = 5'(rd); e.rf_wdata = ($signed(a) < $signed(b)) ? 1 : 0;
      end else if (op == OP_RTYPE && fn == FN_SLL) begin
        e.rf_we = 1; e.rf_waddr = 5'(rd); e.rf_wdata = b << w[10:6];
      end else if (op == OP_RTYPE && fn == FN_JR) begin
        e.next = a;
      end else if (op == OP_RTYPE && fn == FN_SYSCALL) begin
        code = EXC_SYS;
      end else if (op == OP_ADDI) begin
        wide = {a[31], a} + {sx[31], sx};
        if (wide[32] != wide[31]) code = EXC_OV;
        e.rf_we = 1; e.rf_waddr = 5'(rt); e.rf_wdata = a + sx;
      end else if (op == OP_LW) begin
        if (addr[1:0] != 0) code = EXC_ADEL;
        e.rf_we = 1; e.rf_waddr = 5'(rt);
        e.rf_wdata = mem.exists(widx) ? mem[widx] : 32'hBAD0_BAD0;
      end else if (op == OP_SW) begin
        if (addr[1:0] != 0) code = EXC_ADES;
        e.dm_we = 1; e.dm_addr = addr; e.dm_wdata = b;
      end else if (op == OP_BEQ) begin
        if (a == b) e.next = pc + 4 + (sx << 2);
      end else if (op == OP_J || op == OP_JAL) begin
        e.next = {e.next[31:28], w[25:0], 2'b00};
        if (op == OP_JAL) begin e.rf_we = 1; e.rf_waddr = 31; e.rf_wdata = pc + 4; end
      end else if (op == OP_COP0 && (w[25:21] == CP0_MF || w[25:21] == CP0_MT ||
                                     (w[25:21] == CP0_CO && fn == FN_RET))) begin
        if (!priv) code = EXC_CPU;
        else if (w[25:21] == CP0_MF) begin
          e.rf_we = 1; e.rf_waddr = 5'(rt);
          case (rd)
            8: e.rf_wdata = bad; 12: e.rf_wdata = mask; 13: e.rf_wdata = cause;
            14: e.rf_wdata = epc; default: e.rf_wdata = 0;
          endcase
        end else if (w[25:21] == CP0_MT) begin
          case (rd)
            8: bad = b; 12: mask = b; 13: cause = b; 14: epc = b; default: ;
          endcase
        end else begin
          e.next = epc; priv = 0;
        end
      end else begin
        code = EXC_RI;
      end
      if (code != EXC_NONE && mask[code]) begin
        e.exc = 1; e.code = code; e.rf_we = 0; e.dm_we = 0;
        epc = pc; cause = {27'd0, code}; priv = 1; e.next = vector;
        if (code == EXC_ADEL || code == EXC_ADES) bad = addr;
      end
      if (e.rf_we && e.rf_waddr != 0) r[e.rf_waddr] = e.rf_wdata;
      if (e.dm_we) mem[widx] = e.dm_wdata;
      pc = e.next;
      return e;
    endfunction
  endclass

endpackage
