// mips_pkg: types and constants shared by the single-cycle MIPS processor.
//
// It holds the instruction encodings of the implemented subset (add, addi,
// lw, sw, beq, j, sll, slt, jal, jr, syscall, mfc0, mtc0, ret), the
// encodings of the datapath mux selects, the control-word struct that the
// controller drives into the datapath, and the exception cause codes.
// The opcode and function-field values are the standard MIPS ones; the
// enum encodings of the mux selects are this design's own. The one-bit
// ALUop of the original six-instruction controller (0 = add, 1 = subtract) maps
// onto ALU_ADD and ALU_SUB; the two further codes serve sll and slt.
package mips_pkg;

  // ---- instruction fields ------------------------------------------------
  typedef logic [31:0] word_t;
  typedef logic [4:0]  reg_idx_t;

  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_JAL   = 6'h03;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_COP0  = 6'h10;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  localparam logic [5:0] FN_SLL     = 6'h00;
  localparam logic [5:0] FN_JR      = 6'h08;
  localparam logic [5:0] FN_SYSCALL = 6'h0C;
  localparam logic [5:0] FN_ADD     = 6'h20;
  localparam logic [5:0] FN_SLT     = 6'h2A;

  // COP0 sub-operations, in the rs field, and the ret function code
  localparam logic [4:0] CP0_MF  = 5'h00;
  localparam logic [4:0] CP0_MT  = 5'h04;
  localparam logic [4:0] CP0_CO  = 5'h10;
  localparam logic [5:0] FN_RET  = 6'h18;

  // Coprocessor-0 register numbers
  localparam logic [4:0] CR_BADVADDR = 5'd8;
  localparam logic [4:0] CR_MASK     = 5'd12;
  localparam logic [4:0] CR_CAUSE    = 5'd13;
  localparam logic [4:0] CR_EPC      = 5'd14;

  localparam logic [4:0] REG_RA = 5'd31;

  // ---- exception cause codes (value written to CR $13) -------------------
  typedef enum logic [4:0] {
    EXC_NONE = 5'd0,
    EXC_ADEL = 5'd4,   // misaligned load address
    EXC_ADES = 5'd5,   // misaligned store address
    EXC_SYS  = 5'd8,   // syscall
    EXC_RI   = 5'd10,  // illegal (reserved) instruction
    EXC_CPU  = 5'd11,  // privileged instruction in user mode
    EXC_OV   = 5'd12   // arithmetic overflow
  } exc_code_e;

  // ---- datapath selects ---------------------------------------------------
  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,
    ALU_SLL = 2'd2,
    ALU_SLT = 2'd3
  } alu_op_e;

  // register-file destination mux (Rdst): 1 selects rd, as in the original controller
  typedef enum logic [1:0] {
    RDST_RT = 2'd0,
    RDST_RD = 2'd1,
    RDST_RA = 2'd2
  } rdst_e;

  // register write data mux (Rwd): 1 selects memory, as in the original controller
  typedef enum logic [1:0] {
    RWD_ALU = 2'd0,
    RWD_MEM = 2'd1,
    RWD_PC4 = 2'd2,
    RWD_CR  = 2'd3
  } rwd_e;

  // control word
  typedef struct packed {
    logic    br;       // conditional branch (beq)
    logic    jp;       // absolute jump (j, jal)
    logic    jr;       // jump to register (jr)
    logic    alu_inb;  // ALU B input: 0 = register rt, 1 = sign-extended imm
    alu_op_e alu_op;
    logic    dm_we;    // data memory write enable
    logic    rwe;      // register file write enable
    rdst_e   rdst;
    rwd_e    rwd;
    logic    cr_we;    // coprocessor-0 register write (mtc0)
    logic    ret;      // return from exception (ret)
    logic    ovf_chk;  // instruction traps on signed overflow (add, addi)
    logic    mem_rd;   // instruction reads data memory (lw)
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{br: 1'b0, jp: 1'b0, jr: 1'b0, alu_inb: 1'b0,
                                 alu_op: ALU_ADD, dm_we: 1'b0, rwe: 1'b0,
                                 rdst: RDST_RT, rwd: RWD_ALU, cr_we: 1'b0,
                                 ret: 1'b0, ovf_chk: 1'b0, mem_rd: 1'b0};

endpackage
