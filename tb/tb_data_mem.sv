// tb_data_mem: self-checking test of the data memory.
// Random mix of writes and reads against a word-array model: reads are
// combinational, writes land at the clock edge only when we is high, and
// a read in the cycle of a write still sees the old word.
module tb_data_mem;
  localparam int WORDS = 32;
  logic clk = 0;
  logic [31:0] addr, wdata, rdata;
  logic we;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  data_mem #(.WORDS(WORDS)) dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx;
    we = 0; addr = 0; wdata = 0;
    // initialise every word
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      model[i] = $urandom;
      we = 1; addr = 32'(i * 4); wdata = model[i];
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      idx = $urandom_range(0, WORDS - 1);
      addr = 32'(idx * 4);
      we = 1'($urandom_range(0, 1));
      wdata = $urandom;
      #1;
      checks++;
      if (rdata !== model[idx]) begin failures++; $display("FAIL read idx=%0d %h exp %h", idx, rdata, model[idx]); end
      @(posedge clk);
      if (we) model[idx] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
