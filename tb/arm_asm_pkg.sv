// arm_asm_pkg: helpers that build ARM instruction words (and the Object
// Instruction words of the coprocessor) for the testbenches' programs.
package arm_asm_pkg;
  import ocp_pkg::*;

  localparam logic [3:0] AL = 4'hE, EQ = 4'h0, NE = 4'h1;

  // data processing with a 32-bit immediate (must be an 8-bit value rotated
  // right by an even amount)
  function automatic logic [31:0] dpi(logic [3:0] opc, logic [3:0] rd, logic [3:0] rn,
                                      logic [31:0] imm, logic [3:0] c = AL);
    for (int rot = 0; rot < 16; rot++) begin
      logic [31:0] v;
      v = (imm << (2 * rot)) | (imm >> ((32 - 2 * rot) % 32));
      if (rot == 0) v = imm;
      if (v[31:8] == 0)
        return {c, 3'b001, opc, (opc == 4'hA) ? 1'b1 : 1'b0, rn, rd, 4'(rot), v[7:0]};
    end
    $fatal(1, "immediate %h not encodable", imm);
    return 0;
  endfunction
  function automatic logic [31:0] dpr(logic [3:0] opc, logic [3:0] rd, logic [3:0] rn,
                                      logic [3:0] rm, logic [3:0] c = AL);
    return {c, 3'b000, opc, (opc == 4'hA) ? 1'b1 : 1'b0, rn, rd, 8'd0, rm};
  endfunction
  function automatic logic [31:0] mov_i(logic [3:0] rd, logic [31:0] imm); return dpi(4'hD, rd, 4'd0, imm); endfunction
  function automatic logic [31:0] mov_r(logic [3:0] rd, logic [3:0] rm);   return dpr(4'hD, rd, 4'd0, rm);  endfunction
  function automatic logic [31:0] add_i(logic [3:0] rd, logic [3:0] rn, logic [31:0] imm); return dpi(4'h4, rd, rn, imm); endfunction
  function automatic logic [31:0] sub_i(logic [3:0] rd, logic [3:0] rn, logic [31:0] imm); return dpi(4'h2, rd, rn, imm); endfunction
  function automatic logic [31:0] cmp_i(logic [3:0] rn, logic [31:0] imm); return dpi(4'hA, 4'd0, rn, imm); endfunction
  function automatic logic [31:0] ldr(logic [3:0] rd, logic [3:0] rn, logic [11:0] off);
    return {AL, 8'b0101_1001, rn, rd, off};
  endfunction
  function automatic logic [31:0] str(logic [3:0] rd, logic [3:0] rn, logic [11:0] off);
    return {AL, 8'b0101_1000, rn, rd, off};
  endfunction
  function automatic logic [31:0] br(logic [31:0] from, logic [31:0] to, logic link = 1'b0);
    logic [31:0] o;
    o = (to - from - 32'd8) >> 2;
    return {AL, 3'b101, link, o[23:0]};
  endfunction
  function automatic logic [31:0] mcr(cr_sel_e cr, logic [3:0] rd);
    return {AL, 4'hE, 3'd0, 1'b0, 1'b0, cr, rd, OCP_CPNUM, 3'd0, 1'b1, 4'd0};
  endfunction
  function automatic logic [31:0] mrc(cr_sel_e cr, logic [3:0] rd);
    return {AL, 4'hE, 3'd0, 1'b1, 1'b0, cr, rd, OCP_CPNUM, 3'd0, 1'b1, 4'd0};
  endfunction
  // Object Instructions: virtual forms take a method index, static forms the
  // target address (turned into a word offset from the OI's address + 8)
  function automatic logic [31:0] oi_virt(oi_op_e op, int unsigned index);
    return oi_word(op, 15'(index));
  endfunction
  function automatic logic [31:0] oi_stat(oi_op_e op, logic [31:0] at, logic [31:0] target,
                                          logic [3:0] c = AL);
    logic [31:0] w, o;
    o = (target - at - 32'd8) >>> 2;
    w = oi_word(op, o[14:0]);
    return {c, w[27:0]};
  endfunction
  // service instructions: push / pop an OCP register on the stack at CRControlA
  function automatic logic [31:0] cpush(cr_sel_e cr);
    return {AL, 4'hE, SVC_OPC1[3:1], 1'b0, 1'b0, cr, 4'd0, OCP_CPNUM, 3'd0, 1'b0, 4'd0};
  endfunction
  function automatic logic [31:0] cpop(cr_sel_e cr);
    return {AL, 4'hE, SVC_OPC1[3:1], 1'b1, 1'b0, cr, 4'd0, OCP_CPNUM, 3'd0, 1'b0, 4'd0};
  endfunction
  function automatic logic [31:0] retm(); return oi_word(OI_RETM, 15'd0); endfunction
  localparam logic [31:0] NOP = 32'hE1A0_0000;
endpackage
