// cp0: coprocessor-0 registers and the processor status register (PSR).
//
// Independent registers rather than a register array:
//   $8  BADVADDR  address of the last misaligned load or store that trapped
//   $12 MASK      exception mask: bit k set lets cause code k trap
//   $13 CAUSE     cause code of the last exception taken
//   $14 EPC       PC of the instruction that took the last exception
//   PSR           1 = privileged (kernel) mode, 0 = user mode
// When exc is high at a rising clock edge, EPC takes the PC (the CRwd mux
// selects the PC), CAUSE takes the code, BADVADDR takes the data address
// for address errors, and PSR is set. mtc0 (we) writes wdata (register rt)
// into the register numbered waddr; ret clears PSR. mfc0 reads through
// raddr/rdata, combinationally; unimplemented numbers read zero. Reset
// enters privileged mode with every exception enabled. Register numbers
// and roles follow MIPS usage; the reset values, the mask layout and the
// cause register holding the bare code are this design's choices.
module cp0
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // exception entry
  input  logic        exc,
  input  exc_code_e   exc_code,
  input  logic [31:0] exc_pc,
  input  logic [31:0] exc_addr,
  // mtc0 / mfc0
  input  logic        we,
  input  logic [4:0]  waddr,
  input  logic [31:0] wdata,
  input  logic [4:0]  raddr,
  output logic [31:0] rdata,
  // ret
  input  logic        ret,
  // state used by the datapath and controller
  output logic [31:0] epc,
  output logic [31:0] mask,
  output logic        priv
);

  logic [31:0] badvaddr, cause;

  always_ff @(posedge clk) begin
    if (rst) begin
      epc      <= '0;
      cause    <= '0;
      badvaddr <= '0;
      mask     <= '1;
      priv     <= 1'b1;
    end else if (exc) begin
      epc   <= exc_pc;
      cause <= {27'd0, exc_code};
      if (exc_code == EXC_ADEL || exc_code == EXC_ADES) badvaddr <= exc_addr;
      priv  <= 1'b1;
    end else begin
      if (we) begin
        unique case (waddr)
          CR_BADVADDR: badvaddr <= wdata;
          CR_MASK:     mask     <= wdata;
          CR_CAUSE:    cause    <= wdata;
          CR_EPC:      epc      <= wdata;
          default: ;
        endcase
      end
      if (ret) priv <= 1'b0;
    end
  end

  always_comb begin
    unique case (raddr)
      CR_BADVADDR: rdata = badvaddr;
      CR_MASK:     rdata = mask;
      CR_CAUSE:    rdata = cause;
      CR_EPC:      rdata = epc;
      default:     rdata = '0;
    endcase
  end

endmodule
