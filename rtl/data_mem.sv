// data_mem: data memory of the single-cycle processor.
//
// An array of WORDS 32-bit words. The address is the ALU result (base
// register plus sign-extended offset). Reads are combinational, so a lw
// result reaches the register-file write mux within the cycle; writes of
// wdata (the second register-file read port) happen at the rising clock
// edge when we (DMwe) is high, at the end of the cycle. The word index is
// the byte address divided by four, modulo WORDS; only whole words are
// accessed. Size and word addressing are this design's choices.
module data_mem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr,   // byte address
  input  logic        we,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[addr[AW+1:2]];

endmodule
