// tb_insn_mem: self-checking test of the instruction memory.
// Fills the memory through the load port with random words, then reads
// every word back through the byte-address port (all four byte offsets
// must give the same word) and checks the address wrap at the top.
module tb_insn_mem;
  localparam int WORDS = 64;
  logic clk = 0;
  logic [31:0] addr, insn, load_data;
  logic load_we;
  logic [5:0] load_addr;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  insn_mem #(.WORDS(WORDS)) dut (.clk, .addr, .insn, .load_we, .load_addr, .load_data);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_we = 0; addr = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < WORDS; i++) begin
      model[i] = $urandom;
      @(negedge clk);
      load_we = 1; load_addr = 6'(i); load_data = model[i];
    end
    @(negedge clk); load_we = 0;
    for (int i = 0; i < WORDS; i++)
      for (int off = 0; off < 4; off++) begin
        addr = 32'(i * 4 + off); #1;
        checks++;
        if (insn !== model[i]) begin failures++; $display("FAIL addr=%h insn=%h exp %h", addr, insn, model[i]); end
      end
    addr = 32'(WORDS * 4 + 8); #1;
    checks++; if (insn !== model[2]) begin failures++; $display("FAIL wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
