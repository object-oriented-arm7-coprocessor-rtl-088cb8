// ocp_pkg: types and constants shared by the Object Coprocessor (OCP) blocks.
//
// The OCP sits beside an ARM7-class core and runs "Object Instructions" (OIs):
// six method calls (virtual/static, new Self from memory, from a register, or
// unchanged) and one unified method return. This package holds the bus
// structures of the internal (core side) and external (memory side) busses,
// the OI opcodes, the ARM instruction words the sequence generator emits, and
// the layout of the CRSavedSelf register.
//
// Follows the description: 32-bit registers, seven OIs, an 8-bit call counter
// in the upper part of CRSavedSelf (overflow every 256 nested calls).
// This design's own choices: the bus is a simple single-cycle request with a
// ready (wait) reply; the OI encoding (a CDP on coprocessor OCP_CPNUM with the
// OI number in opcode1 and a 15-bit index/offset in CRn,CRd,opcode2,CRm); the
// register reserved as RSelf (R10); the coprocessor register numbers used by
// the MCR/MRC service instructions.
package ocp_pkg;

  localparam int unsigned XLEN    = 32;
  localparam int unsigned COUNT_W = 8;                 // CRSavedSelf counter field
  localparam int unsigned SELF_W  = XLEN - COUNT_W;    // CRSavedSelf address field

  localparam logic [3:0] OCP_CPNUM = 4'd6;   // coprocessor number answered by the OCP
  localparam logic [3:0] SVC_OPC1  = 4'd8;   // opcode1 of PUSH (8) and POP (9)
  localparam logic [3:0] RSELF_REG = 4'd10;  // ARM register reserved as RSelf
  localparam logic [3:0] REG_PC    = 4'd15;

  // Marker written in the address field of CRSavedSelf after the register was
  // pushed on overflow: never a word-aligned Self address.
  localparam logic [SELF_W-1:0] SELF_MARKER = '1;

  // Object Instructions: value of the CDP opcode1 field.
  typedef enum logic [2:0] {
    OI_METVM = 3'd0,  // virtual call, new Self from memory
    OI_METVR = 3'd1,  // virtual call, new Self from an ARM register
    OI_METVI = 3'd2,  // virtual call, same instance
    OI_METSM = 3'd3,  // static call, new Self from memory
    OI_METSR = 3'd4,  // static call, new Self from an ARM register
    OI_METSI = 3'd5,  // static call, same instance
    OI_RETM  = 3'd6,  // unified return
    OI_NONE  = 3'd7
  } oi_op_e;

  // How a RETM is served, chosen from CRSavedSelf when it is accepted.
  typedef enum logic [1:0] {
    RET_RESTORE = 2'd0,  // count zero: restore the caller's Self
    RET_DEC     = 2'd1,  // count non-zero: decrement, Self unchanged
    RET_POP     = 2'd2   // count one after an overflow push: pop CRSavedSelf
  } ret_mode_e;

  // Coprocessor register numbers (CRn field of MCR/MRC).
  typedef enum logic [2:0] {
    CR_SELF      = 3'd0,
    CR_SAVEDSELF = 3'd1,
    CR_VMT       = 3'd2,
    CR_CONTROLA  = 3'd3,
    CR_CONTROLB  = 3'd4
  } cr_sel_e;

  // CRSavedSelf update operations (Inc/Dec logic).
  typedef enum logic [2:0] {
    SS_HOLD = 3'd0,
    SS_SAVE = 3'd1,  // {0, CRSelf}: call between different instances
    SS_INC  = 3'd2,
    SS_DEC  = 3'd3,
    SS_LOAD = 3'd4,  // whole word (MCR or pop)
    SS_MARK = 3'd5   // {1, marker}: after an overflow push
  } ss_op_e;

  // Address ALU operations.
  typedef enum logic [1:0] {
    ALU_INDEX = 2'd0,  // a + 4*b            (VMT entry)
    ALU_PCREL = 2'd1,  // a + 8 + 4*sext(b)  (static method target)
    ALU_DEC4  = 2'd2,  // a - 4              (push)
    ALU_INC4  = 2'd3   // a + 4              (pop)
  } alu_op_e;

  // One bus cycle request (from a master) and reply (to it). A request is
  // held until a cycle with ready = 1 completes it; read data is valid then.
  typedef struct packed {
    logic [XLEN-1:0] addr;
    logic [XLEN-1:0] wdata;
    logic            mreq;   // memory cycle requested
    logic            rw;     // 1 = write
    logic            opc;    // 1 = opcode fetch
  } bus_req_t;

  typedef struct packed {
    logic [XLEN-1:0] rdata;
    logic            ready;
  } bus_rsp_t;

  // One entry of the OCP instruction pipe.
  typedef struct packed {
    logic [XLEN-1:0] instr;
    logic [XLEN-1:0] addr;
    logic            isg;    // word came from the sequence generator
  } pipe_entry_t;

  // ARM instruction words emitted by the sequence generator.
  localparam logic [XLEN-1:0] ARM_NOP      = 32'hE1A0_0000;  // MOV R0,R0
  localparam logic [XLEN-1:0] ARM_STR_SELF = 32'hE580_A000;  // STR R10,[R0]
  localparam logic [XLEN-1:0] ARM_LDR_SELF = 32'hE590_A000;  // LDR R10,[R0]
  localparam logic [XLEN-1:0] ARM_LDR_PC   = 32'hE590_F000;  // LDR PC,[R0]
  localparam logic [XLEN-1:0] ARM_MOV_PCLR = 32'hE1A0_F00E;  // MOV PC,R14
  localparam logic [XLEN-1:0] ARM_SUB_LR   = 32'hE24F_E000;  // SUB R14,PC,#imm8

  // OI instruction word: CDP, condition AL, on the OCP coprocessor number.
  function automatic logic [XLEN-1:0] oi_word(oi_op_e op, logic [14:0] field);
    return {4'hE, 4'hE, 1'b0, op, field[14:7], OCP_CPNUM, field[6:4], 1'b0, field[3:0]};
  endfunction

endpackage
