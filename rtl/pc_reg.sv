// pc_reg: the program counter of the single-cycle processor.
//
// The PC is a 32-bit register that takes the next-PC value at every rising
// clock edge, so one instruction completes per cycle. A synchronous,
// active-high reset loads RESET_PC; the reset value and the reset style are
// this design's choice.
//
// Interface: clk, rst, pc_next in; pc out. Timing: pc changes one cycle
// after pc_next is presented.
module pc_reg #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] pc_next,
  output logic [31:0] pc
);

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= pc_next;
  end

endmodule
