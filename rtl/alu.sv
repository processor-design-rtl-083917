// alu: the arithmetic unit of the single-cycle datapath.
//
// Operations, chosen by op (ALUop):
//   ALU_ADD  y = a + b            add, addi, lw/sw address
//   ALU_SUB  y = a - b            beq compares by subtracting
//   ALU_SLL  y = b << shamt       sll (the shifter beside the adder)
//   ALU_SLT  y = {31'b0, a < b}   slt: the signed-less-than condition bit,
//                                 zero-extended to 32 bits
// zero is high when y is zero and feeds the branch AND gate. ovf is high
// when an add or subtract overflows in two's complement; the controller
// turns it into an exception for add and addi. Purely combinational.
// The set of operations follows the instructions described; the op
// encoding and the overflow output are this design's choices.
module alu
  import mips_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  shamt,
  input  alu_op_e     op,
  output logic [31:0] y,
  output logic        zero,
  output logic        ovf
);

  logic [31:0] sum, diff;
  logic        lt;

  assign sum  = a + b;
  assign diff = a - b;
  // signed a < b: sign of the difference, corrected when it overflowed
  assign lt   = diff[31] ^ ((a[31] ^ b[31]) & (a[31] ^ diff[31]));

  always_comb begin
    unique case (op)
      ALU_ADD: y = sum;
      ALU_SUB: y = diff;
      ALU_SLL: y = b << shamt;
      ALU_SLT: y = {31'd0, lt};
      default: y = sum;
    endcase
  end

  always_comb begin
    unique case (op)
      ALU_ADD: ovf = (a[31] == b[31]) && (sum[31] != a[31]);
      ALU_SUB: ovf = (a[31] != b[31]) && (diff[31] != a[31]);
      default: ovf = 1'b0;
    endcase
  end

  assign zero = (y == 32'd0);

endmodule
