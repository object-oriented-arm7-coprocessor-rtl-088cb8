// tb_ocp_isg: for every Object Instruction and return mode, at random OI
// addresses, fetches slots 0..5 and compares the generated word with the
// expected sequence, including the run-time immediate of SUB R14,PC,#k that
// must leave R14 = OI address + 8.
module tb_ocp_isg;
  import ocp_pkg::*;
  oi_op_e op;
  ret_mode_e ret_mode;
  logic [31:0] oi_addr, fetch_addr, instr, exp;
  logic is_jump;
  int checks = 0, failures = 0;

  ocp_isg dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] sub_lr(logic [31:0] at, logic [31:0] oi);
    // SUB R14,PC,#k executes with PC = at + 8 and must give oi + 8
    return ARM_SUB_LR | ((at + 32'd8) - (oi + 32'd8));
  endfunction

  initial begin
    for (int k = 0; k < 30; k++) begin
      oi_addr = {$urandom, 2'b00} & 32'h00FF_FFFC;
      for (int o = 0; o < 7; o++) begin
        for (int rm = 0; rm < 3; rm++) begin
          op = oi_op_e'(o); ret_mode = ret_mode_e'(rm);
          for (int s = 0; s < 6; s++) begin
            fetch_addr = oi_addr + 8 + 4 * s;
            #1;
            exp = ARM_NOP;
            case (op)
              OI_METVM, OI_METVR, OI_METSM, OI_METSR:
                case (s) 0: exp = ARM_STR_SELF; 1: exp = sub_lr(fetch_addr, oi_addr); 2: exp = ARM_LDR_PC; default: ; endcase
              OI_METVI, OI_METSI:
                case (s) 0: exp = sub_lr(fetch_addr, oi_addr); 1: exp = ARM_LDR_PC; default: ; endcase
              default:
                if (ret_mode == RET_RESTORE)
                  case (s) 0: exp = ARM_LDR_SELF; 1: exp = ARM_MOV_PCLR; default: ; endcase
                else if (s == 0) exp = ARM_MOV_PCLR;
            endcase
            checks++;
            if (instr !== exp || is_jump !== (exp == ARM_LDR_PC || exp == ARM_MOV_PCLR)) begin
              failures++; $display("FAIL op=%s mode=%0d slot=%0d got %h expected %h", op.name(), rm, s, instr, exp);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
