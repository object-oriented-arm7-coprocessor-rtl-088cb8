// oi_decoder: recognises the coprocessor instructions in the OCP pipe and
// checks the ancillary instruction that follows an Object Instruction.
//
// exec_instr is the word in the core's execute stage (Pipe 1). The decoder
// finds whether it is a coprocessor instruction, whether it is addressed to
// the OCP, and then which Object Instruction (a CDP with the OI number in
// opcode1) or which service transfer (MCR: core register to OCP register,
// MRC: OCP register to core register, PUSH/POP: OCP register to or from the
// stack in memory, a CDP with opcode1 8 or 9 and the register number in CRn)
// it is. anc_instr is the word in the
// decode stage (Pipe 0): the ancillary instruction the core executes during
// the OI. Its legality depends on the OI:
//   METVM, METSM: must be an unconditional LDR into RSelf (it fetches the new
//                 Self from memory);
//   METVR, METSR: must be an unconditional MOV into RSelf (it copies the new
//                 Self from a core register);
//   METVI, METSI, RETM: any unconditional data-processing or single load/store
//                 that writes neither PC nor RSelf.
// Branches, coprocessor instructions, block transfers, multiplies and swaps
// are never legal there. Combinational. oi_field, cr_sel and xfer_reg are
// plain bit fields of exec_instr, valid only when the flags say so.
//
// That an illegal ancillary makes the OI refused (the core then takes the
// Undefined Instruction trap) and which ancillary each OI needs follow the
// description. The exact rule set is this design's choice; the rule that the
// ancillary must be unconditional comes from the coprocessor being unable to
// read the core's flags, so it cannot tell whether a conditional one ran.
module oi_decoder
  import ocp_pkg::*;
(
  input  logic [XLEN-1:0] exec_instr,
  input  logic [XLEN-1:0] anc_instr,
  output logic            is_cp,      // any coprocessor instruction
  output logic            ours,       // addressed to the OCP
  output oi_op_e          oi_op,      // OI_NONE when not a valid OI
  output logic [14:0]     oi_field,   // method index or word offset
  output logic            is_mcr,
  output logic            is_mrc,
  output logic            is_push,    // service: push an OCP register
  output logic            is_pop,     // service: pop an OCP register
  output logic [2:0]      cr_sel,     // coprocessor register of MCR/MRC/PUSH/POP
  output logic [3:0]      xfer_reg,   // core register of MCR/MRC
  output logic            anc_legal
);

  logic       a_al, a_dp, a_misc, a_sdt, a_load, a_wb, a_dp_dest;
  logic [3:0] a_rd, a_rn, a_dp_opc;
  logic       writes_pc, writes_self;

  always_comb begin
    is_cp    = (exec_instr[27:24] == 4'hE) || (exec_instr[27:25] == 3'b110);
    ours     = is_cp && (exec_instr[11:8] == OCP_CPNUM);
    oi_field = {exec_instr[19:12], exec_instr[7:5], exec_instr[3:0]};
    cr_sel   = exec_instr[18:16];
    xfer_reg = exec_instr[15:12];
    oi_op    = OI_NONE;
    is_mcr   = 1'b0;
    is_mrc   = 1'b0;
    is_push  = 1'b0;
    is_pop   = 1'b0;
    if (ours && exec_instr[27:24] == 4'hE) begin
      if (!exec_instr[4]) begin
        if (exec_instr[23] == 1'b0 && exec_instr[22:20] != 3'd7)
          oi_op = oi_op_e'(exec_instr[22:20]);
        else if (exec_instr[23:21] == SVC_OPC1[3:1] && exec_instr[19] == 1'b0 &&
                 exec_instr[18:16] <= 3'd4) begin
          is_push = !exec_instr[20];
          is_pop  =  exec_instr[20];
        end
      end else if (exec_instr[23:21] == 3'd0 && exec_instr[19] == 1'b0 &&
                   exec_instr[18:16] <= 3'd4) begin
        is_mcr = !exec_instr[20];
        is_mrc =  exec_instr[20];
      end
    end

    // ancillary instruction fields
    a_al      = (anc_instr[31:28] == 4'hE);
    a_rd      = anc_instr[15:12];
    a_rn      = anc_instr[19:16];
    a_misc    = (anc_instr[27:25] == 3'b000) && anc_instr[7] && anc_instr[4];
    a_dp      = (anc_instr[27:26] == 2'b00) && !a_misc;
    a_dp_opc  = anc_instr[24:21];
    a_dp_dest = a_dp && !(a_dp_opc[3:2] == 2'b10);   // TST/TEQ/CMP/CMN write nothing
    a_sdt     = (anc_instr[27:26] == 2'b01) && !(anc_instr[25] && anc_instr[4]);
    a_load    = a_sdt && anc_instr[20];
    a_wb      = a_sdt && (anc_instr[21] || !anc_instr[24]);
    writes_pc   = ((a_dp_dest || a_load) && a_rd == REG_PC) || (a_wb && a_rn == REG_PC);
    writes_self = ((a_dp_dest || a_load) && a_rd == RSELF_REG) || (a_wb && a_rn == RSELF_REG);

    unique case (oi_op)
      OI_METVM, OI_METSM:
        anc_legal = a_al && a_load && a_rd == RSELF_REG && !writes_pc;
      OI_METVR, OI_METSR:
        anc_legal = a_al && a_dp && a_dp_opc == 4'b1101 && a_rd == RSELF_REG;
      OI_METVI, OI_METSI, OI_RETM:
        anc_legal = a_al && (a_dp || a_sdt) && !writes_pc && !writes_self;
      default:
        anc_legal = 1'b0;
    endcase
  end

endmodule
