// tb_pc_reg: self-checking test of the program-counter register.
// Checks the reset value and that each clock edge loads the presented next
// PC (one cycle of latency).
module tb_pc_reg;
  localparam logic [31:0] RST_PC = 32'h0040_0000;
  logic clk = 0, rst;
  logic [31:0] pc_next, pc;
  int checks = 0, failures = 0;

  pc_reg #(.RESET_PC(RST_PC)) dut (.clk, .rst, .pc_next, .pc);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    rst = 1; pc_next = 32'hDEAD_BEEF;
    @(posedge clk); #1;
    checks++; if (pc !== RST_PC) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst = 0;
    for (int n = 0; n < 100; n++) begin
      v = $urandom;
      pc_next = v;
      #3;
      checks++; if (n > 0 && pc === v) begin failures++; $display("FAIL pc changed before edge"); end
      @(posedge clk); #1;
      checks++; if (pc !== v) begin failures++; $display("FAIL pc=%h exp %h", pc, v); end
    end
    rst = 1; @(posedge clk); #1;
    checks++; if (pc !== RST_PC) begin failures++; $display("FAIL second reset pc=%h", pc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
