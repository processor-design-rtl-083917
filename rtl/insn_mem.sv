// insn_mem: instruction memory of the single-cycle processor.
//
// An array of WORDS 32-bit words, read without a clock: the instruction
// addressed by the PC appears in the same cycle, as the single-cycle timing
// requires (instruction memory is read first in the cycle). The word index
// is the byte address divided by four, taken modulo WORDS; the low two
// address bits are ignored.
//
// The processor never writes this memory. A separate synchronous load port
// (load_we, load_addr, load_data) lets a host fill it with a program while
// the processor is held in reset; the port and the memory size are this
// design's own choices.
module insn_mem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk,
  input  logic [31:0]              addr,       // byte address (PC)
  output logic [31:0]              insn,
  input  logic                     load_we,
  input  logic [$clog2(WORDS)-1:0] load_addr,  // word index
  input  logic [31:0]              load_data
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign insn = mem[addr[AW+1:2]];

endmodule
