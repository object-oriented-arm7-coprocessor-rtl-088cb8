// tb_ocp_alu: random operands for each of the four address operations,
// compared with the arithmetic worked out here.
module tb_ocp_alu;
  import ocp_pkg::*;
  alu_op_e op;
  logic [31:0] a, y, exp;
  logic [14:0] b;
  int checks = 0, failures = 0;

  ocp_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      op = alu_op_e'(i % 4);
      a  = $urandom;
      b  = 15'($urandom);
      #1;
      case (op)
        ALU_INDEX: exp = a + 32'(b) * 4;
        ALU_PCREL: exp = 32'(longint'(a) + 8 + 4 * longint'($signed(b)));
        ALU_DEC4:  exp = a - 4;
        default:   exp = a + 4;
      endcase
      checks++;
      if (y !== exp) begin failures++; $display("FAIL op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
