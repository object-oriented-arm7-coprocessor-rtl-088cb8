// ocp_isg: the Instruction Sequence Generator.
//
// While an Object Instruction runs, the core's opcode fetches are answered by
// this block instead of memory. It builds each word from an internal table
// indexed by the OI (and, for RETM, the return mode) and by the slot number,
// the position of the fetch after the ancillary instruction:
//   slot = (fetch_addr - (oi_addr + 8)) / 4
// Table (R10 is RSelf, R0 only names a base register: the OCP answers these
// loads and stores itself, they never reach memory):
//   METVM METVR METSM METSR : STR R10,[R0]   hand the new Self to the OCP
//                             SUB R14,PC,#k  return address
//                             LDR PC,[R0]    jump; the OCP serves the address
//   METVI METSI             : SUB R14,PC,#k ; LDR PC,[R0]
//   RETM, restore Self      : LDR R10,[R0]   the OCP serves the caller's Self
//                             MOV PC,R14
//   RETM, same instance     : MOV PC,R14
// Later slots are NOPs (MOV R0,R0); the jump flushes them from the core. The
// immediate k is filled in at run time so that R14 receives oi_addr + 8, the
// address after the ancillary instruction: the SUB executes with PC =
// fetch_addr + 8, so k = fetch_addr - oi_addr. Combinational. Bits that are
// the same in every generated word (condition, base register R0) come out as
// constants.
//
// A generator that builds opcodes at run time from the OI fields and an
// internal table is from the description; the instruction sequences are this
// design's own.
module ocp_isg
  import ocp_pkg::*;
(
  input  oi_op_e          op,
  input  ret_mode_e       ret_mode,
  input  logic [XLEN-1:0] oi_addr,
  input  logic [XLEN-1:0] fetch_addr,
  output logic [XLEN-1:0] instr,
  output logic            is_jump    // the word is the sequence's final jump
);

  typedef enum logic [2:0] {K_NOP, K_STR_SELF, K_SUB_LR, K_LDR_PC, K_LDR_SELF, K_MOV_PC} kind_e;

  logic [XLEN-1:0] distance;
  logic [XLEN-3:0] slot;
  kind_e           kind;

  always_comb begin
    distance = fetch_addr - oi_addr;
    slot = distance[XLEN-1:2] - 30'd2;
    kind = K_NOP;
    unique case (op)
      OI_METVM, OI_METVR, OI_METSM, OI_METSR:
        unique case (slot)
          0: kind = K_STR_SELF;
          1: kind = K_SUB_LR;
          2: kind = K_LDR_PC;
          default: kind = K_NOP;
        endcase
      OI_METVI, OI_METSI:
        unique case (slot)
          0: kind = K_SUB_LR;
          1: kind = K_LDR_PC;
          default: kind = K_NOP;
        endcase
      OI_RETM:
        if (ret_mode == RET_RESTORE) begin
          unique case (slot)
            0: kind = K_LDR_SELF;
            1: kind = K_MOV_PC;
            default: kind = K_NOP;
          endcase
        end else begin
          kind = (slot == 0) ? K_MOV_PC : K_NOP;
        end
      default: kind = K_NOP;
    endcase

    unique case (kind)
      K_STR_SELF: instr = ARM_STR_SELF;
      K_SUB_LR:   instr = ARM_SUB_LR | {24'd0, distance[7:0]};
      K_LDR_PC:   instr = ARM_LDR_PC;
      K_LDR_SELF: instr = ARM_LDR_SELF;
      K_MOV_PC:   instr = ARM_MOV_PCLR;
      default:    instr = ARM_NOP;
    endcase
    is_jump = (kind == K_LDR_PC) || (kind == K_MOV_PC);
  end

endmodule
