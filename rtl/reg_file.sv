// reg_file: the 32 x 32-bit general-purpose register file.
//
// Two combinational read ports (s1 = rs, s2 = rt) and one write port (d)
// with write enable we (Rwe). The write happens at the rising clock edge at
// the end of the cycle, so an instruction reads the old values and its own
// result is visible to the next instruction. Register 0 always reads zero
// and ignores writes, as in MIPS. A synchronous active-high reset clears all
// registers so that simulation starts from a known state; the reset is this
// design's choice.
module reg_file (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  raddr1,
  output logic [31:0] rdata1,
  input  logic [4:0]  raddr2,
  output logic [31:0] rdata2,
  input  logic        we,
  input  logic [4:0]  waddr,
  input  logic [31:0] wdata
);

  logic [31:0] regs [32];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && waddr != 5'd0) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata1 = (raddr1 == 5'd0) ? 32'd0 : regs[raddr1];
  assign rdata2 = (raddr2 == 5'd0) ? 32'd0 : regs[raddr2];

endmodule
