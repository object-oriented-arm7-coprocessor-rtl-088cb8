// tb_oi_decoder: every Object Instruction with random fields, MCR/MRC and
// PUSH/POP for each coprocessor register, instructions for another coprocessor and plain ARM
// instructions; then the ancillary rules of each OI against a table of legal
// and illegal ancillary instructions worked out by hand.
module tb_oi_decoder;
  import ocp_pkg::*;
  import arm_asm_pkg::*;
  logic [31:0] exec_instr, anc_instr;
  logic is_cp, ours, is_mcr, is_mrc, is_push, is_pop, anc_legal;
  oi_op_e oi_op;
  logic [14:0] oi_field;
  logic [2:0] cr_sel;
  logic [3:0] xfer_reg;
  int checks = 0, failures = 0;

  oi_decoder dut (.*);

  task automatic expect1(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b expected %b", what, got, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ancillary legality: {METVM, METVR, METVI, METSM, METSR, METSI, RETM}
  typedef struct { logic [31:0] w; logic [6:0] legal; string name; } anc_case_t;
  anc_case_t cases [11];

  initial begin
    logic [14:0] f;
    cases[0] = '{ldr(10, 1, 4),        7'b1001000, "LDR R10,[R1,#4]"};
    cases[1] = '{mov_r(10, 2),         7'b0100100, "MOV R10,R2"};
    cases[2] = '{NOP,                  7'b0010011, "MOV R0,R0"};
    cases[3] = '{add_i(13, 13, 8),     7'b0010011, "ADD SP,SP,#8"};
    cases[4] = '{ldr(3, 1, 0),         7'b0010011, "LDR R3,[R1]"};
    cases[5] = '{mov_r(15, 14),        7'b0000000, "MOV PC,R14"};
    cases[6] = '{br(0, 32'h100),       7'b0000000, "B"};
    cases[7] = '{retm(),               7'b0000000, "RETM"};
    cases[8] = '{ldr(10, 1, 0) & 32'h0FFF_FFFF, 7'b0000000, "LDREQ R10"};
    cases[9] = '{ldr(15, 1, 0),        7'b0000000, "LDR PC"};
    cases[10] = '{add_i(10, 10, 4),    7'b0000000, "ADD R10,R10,#4"};

    for (int op = 0; op < 7; op++) begin
      for (int k = 0; k < 20; k++) begin
        f = 15'($urandom);
        exec_instr = oi_word(oi_op_e'(op), f);
        anc_instr  = NOP;
        #1;
        expect1("OI is_cp", is_cp, 1); expect1("OI ours", ours, 1);
        checks++; if (oi_op !== oi_op_e'(op) || oi_field !== f) begin failures++; $display("FAIL OI %0d decode %0d %h", op, oi_op, oi_field); end
        expect1("OI not mcr", is_mcr | is_mrc, 0);
        // another coprocessor number
        exec_instr[11:8] = 4'd3; #1;
        expect1("other cp: is_cp", is_cp, 1); expect1("other cp: ours", ours, 0);
        checks++; if (oi_op !== OI_NONE) begin failures++; $display("FAIL other cp decoded as OI"); end
      end
      for (int c = 0; c < 11; c++) begin
        exec_instr = oi_word(oi_op_e'(op), 15'd1);
        anc_instr  = cases[c].w;
        #1;
        expect1($sformatf("ancillary %s for OI %0d", cases[c].name, op), anc_legal, cases[c].legal[6 - op]);
      end
    end
    exec_instr = oi_word(OI_NONE, 15'd0); #1;
    checks++; if (oi_op !== OI_NONE) begin failures++; $display("FAIL opcode1 7 decoded as OI"); end
    for (int cr = 0; cr < 5; cr++) begin
      exec_instr = mcr(cr_sel_e'(cr), 4'(cr + 2)); #1;
      expect1("MCR", is_mcr, 1); expect1("MCR not MRC", is_mrc, 0);
      checks++; if (cr_sel !== 3'(cr) || xfer_reg !== 4'(cr + 2)) begin failures++; $display("FAIL MCR fields"); end
      exec_instr = mrc(cr_sel_e'(cr), 4'(cr + 5)); #1;
      expect1("MRC", is_mrc, 1); expect1("MRC not MCR", is_mcr, 0);
      checks++; if (oi_op !== OI_NONE || xfer_reg !== 4'(cr + 5)) begin failures++; $display("FAIL MRC fields"); end
    end
    for (int cr = 0; cr < 5; cr++) begin
      exec_instr = cpush(cr_sel_e'(cr)); #1;
      checks++; if (is_push !== 1 || is_pop !== 0 || oi_op !== OI_NONE || is_mcr || is_mrc || cr_sel !== 3'(cr)) begin failures++; $display("FAIL PUSH CR%0d", cr); end
      exec_instr = cpop(cr_sel_e'(cr)); #1;
      checks++; if (is_push !== 0 || is_pop !== 1 || oi_op !== OI_NONE || cr_sel !== 3'(cr)) begin failures++; $display("FAIL POP CR%0d", cr); end
      exec_instr[11:8] = 4'd5; #1;
      checks++; if (is_push || is_pop) begin failures++; $display("FAIL POP to another coprocessor decoded"); end
    end
    exec_instr = cpush(CR_SELF) | 32'h0005_0000; #1;   // CRn 5: no such register
    checks++; if (is_push || is_pop) begin failures++; $display("FAIL PUSH of CR5 decoded"); end
    exec_instr = add_i(1, 2, 3); #1;
    expect1("ADD not cp", is_cp, 0); expect1("ADD not ours", ours, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
