// tb_next_pc: self-checking test of the next-PC logic.
// Random PCs, offsets, targets and select combinations; the expected next
// PC is worked out here from the priority exception > ret > jr > j > taken
// beq > PC+4.
module tb_next_pc;
  localparam logic [31:0] VEC = 32'h0000_0180;
  logic [31:0] pc, imm_ext, rs_val, epc, pc_plus4, pc_next;
  logic [25:0] target;
  logic br, zero, jp, jr, exc, ret;
  int checks = 0, failures = 0;

  next_pc #(.EXC_VECTOR(VEC)) dut (.pc, .imm_ext, .target, .rs_val, .epc, .br, .zero,
                                   .jp, .jr, .exc, .ret, .pc_plus4, .pc_next);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e4, e;
    int sel;
    for (int n = 0; n < 5000; n++) begin
      pc = {$urandom} & ~32'h3; imm_ext = 32'($signed(16'($urandom)));
      target = 26'($urandom); rs_val = $urandom; epc = $urandom;
      sel = $urandom_range(0, 6);
      {br, zero, jp, jr, exc, ret} = '0;
      zero = 1'($urandom_range(0, 1));
      case (sel)
        1: br = 1;
        2: jp = 1;
        3: jr = 1;
        4: begin exc = 1; br = 1'($urandom_range(0, 1)); jp = 1'($urandom_range(0, 1)); end
        5: ret = 1;
        6: begin br = 1; jp = 1; end
        default: ;
      endcase
      #1;
      e4 = pc + 4;
      if (exc)             e = VEC;
      else if (ret)        e = epc;
      else if (jr)         e = rs_val;
      else if (jp)         e = {e4[31:28], target, 2'b00};
      else if (br && zero) e = e4 + (imm_ext * 4);
      else                 e = e4;
      checks++;
      if (pc_plus4 !== e4 || pc_next !== e) begin
        failures++;
        $display("FAIL sel=%0d pc=%h next=%h exp %h", sel, pc, pc_next, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
