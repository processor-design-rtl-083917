// next_pc: next-program-counter logic of the single-cycle processor.
//
// Computes PC+4 with the "+4" adder and the beq target as
// PC+4 + (sign-extended offset << 2) with a second adder, and then picks
// the next PC through a chain of muxes:
//   1. BR mux:   branch target when BR AND the ALU zero flag, else PC+4
//   2. JP mux:   jump target {PC+4[31:28], target26, 2'b00} when JP
//   3. jr mux:   the register value read on port s1 when jr
//   4. exception mux (PCwC): EXC_VECTOR when an exception is taken,
//      or the saved EPC when ret executes
// The first two muxes, the two shift-by-two units and the AND gate are those
// of the original single-cycle datapath; the jr input and the exception mux
// are the additions it makes for jr and for exception support. The order of the last two stages,
// and the handler address EXC_VECTOR, are this design's choices.
// Purely combinational.
module next_pc #(
  parameter logic [31:0] EXC_VECTOR = 32'h0000_0180
) (
  input  logic [31:0] pc,
  input  logic [31:0] imm_ext,   // sign-extended 16-bit immediate
  input  logic [25:0] target,    // J-type 26-bit immediate
  input  logic [31:0] rs_val,    // register read port s1 (jr)
  input  logic [31:0] epc,       // saved PC (ret)
  input  logic        br,
  input  logic        zero,
  input  logic        jp,
  input  logic        jr,
  input  logic        exc,
  input  logic        ret,
  output logic [31:0] pc_plus4,
  output logic [31:0] pc_next
);

  logic [31:0] br_target, jp_target, after_br, after_jp, after_jr;

  assign pc_plus4  = pc + 32'd4;
  assign br_target = pc_plus4 + {imm_ext[29:0], 2'b00};
  assign jp_target = {pc_plus4[31:28], target, 2'b00};

  assign after_br = (br && zero) ? br_target : pc_plus4;
  assign after_jp = jp ? jp_target : after_br;
  assign after_jr = jr ? rs_val : after_jp;

  always_comb begin
    if (exc)      pc_next = EXC_VECTOR;
    else if (ret) pc_next = epc;
    else          pc_next = after_jr;
  end

endmodule
