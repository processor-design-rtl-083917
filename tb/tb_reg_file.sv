// tb_reg_file: self-checking test of the register file.
// Checks reset to zero, random writes and dual reads against an array
// model, that register 0 stays zero, that we low blocks the write, and
// that a write becomes visible only after the clock edge.
module tb_reg_file;
  logic clk = 0, rst;
  logic [4:0] raddr1, raddr2, waddr;
  logic [31:0] rdata1, rdata2, wdata;
  logic we;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  reg_file dut (.clk, .rst, .raddr1, .rdata1, .raddr2, .rdata2, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; waddr = 0; wdata = 0; raddr1 = 0; raddr2 = 0;
    @(posedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 32; i++) begin
      model[i] = 0;
      raddr1 = 5'(i); #1;
      checks++; if (rdata1 !== 0) begin failures++; $display("FAIL reset r%0d=%h", i, rdata1); end
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 3) != 0;
      waddr = 5'($urandom); wdata = $urandom;
      raddr1 = waddr; raddr2 = 5'($urandom);
      #1;
      checks++;
      if (rdata1 !== model[raddr1] || rdata2 !== model[raddr2]) begin
        failures++;
        $display("FAIL read r%0d=%h exp %h r%0d=%h exp %h", raddr1, rdata1, model[raddr1], raddr2, rdata2, model[raddr2]);
      end
      @(posedge clk);
      if (we && waddr != 0) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
