// tb_alu: self-checking test of the ALU.
// Drives edge-case and random operands through all four operations and
// compares result, zero and overflow flags with values computed here in
// 64-bit signed arithmetic.
module tb_alu;
  import mips_pkg::*;

  logic [31:0] a, b, y;
  logic [4:0]  shamt;
  alu_op_e     op;
  logic        zero, ovf;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .shamt, .op, .y, .zero, .ovf);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [31:0] ta, input logic [31:0] tb_, input logic [4:0] sh,
                           input alu_op_e top);
    longint sa, sb, r;
    logic [31:0] ey;
    logic        eovf;
    a = ta; b = tb_; shamt = sh; op = top;
    #1;
    sa = longint'($signed(ta));
    sb = longint'($signed(tb_));
    case (top)
      ALU_ADD: begin r = sa + sb; ey = r[31:0]; eovf = (r > 64'sd2147483647) || (r < -64'sd2147483648); end
      ALU_SUB: begin r = sa - sb; ey = r[31:0]; eovf = (r > 64'sd2147483647) || (r < -64'sd2147483648); end
      ALU_SLL: begin ey = tb_ << sh; eovf = 1'b0; end
      default: begin ey = (sa < sb) ? 32'd1 : 32'd0; eovf = 1'b0; end
    endcase
    checks++;
    if (y !== ey || zero !== (ey == 0) || ovf !== eovf) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h sh=%0d: y=%h exp %h zero=%b ovf=%b exp %b",
               top, ta, tb_, sh, y, ey, zero, ovf, eovf);
    end
  endtask

  initial begin
    automatic logic [31:0] edges [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000, 32'h1234_5678};
    for (int o = 0; o < 4; o++)
      foreach (edges[i]) foreach (edges[j])
        check_one(edges[i], edges[j], 5'(i * 5 + j), alu_op_e'(o));
    for (int n = 0; n < 4000; n++)
      check_one($urandom, $urandom, 5'($urandom), alu_op_e'($urandom_range(0, 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
