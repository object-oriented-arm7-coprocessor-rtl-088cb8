// ocp_regs: the coprocessor registers CRSelf, CRVmt, RTemp, CRControlA and
// CRControlB, and the read port of the MRC service instruction.
//
// CRSelf holds the Self (instance address) of the current instance, copied in
// the core's RSelf. CRVmt holds the VMT address fetched during a virtual call.
// RTemp holds the ALU's working value and, at the end of a call sequence, the
// method address. CRControlA is the stack pointer of the coprocessor's own
// stack (full descending, word aligned), used by the counter overflow and by
// the PUSH/POP service instructions. CRControlB bit 0 enables the
// Object Instructions; the other bits read back what was written. Each
// register loads its own input when its enable is high; a service write
// (mcr_we) loads the register cr_sel selects and has priority over the other
// enables. rd_data returns the register cr_sel selects (CRSavedSelf comes in
// from its own block). Reset: all zero except CRControlB = CTRLB_RESET.
//
// The registers, their 32-bit size and their roles are from the description;
// the meaning of the control registers' bits is this design's choice (the
// description says only that they control the overall operation and are
// loaded at initialisation).
module ocp_regs
  import ocp_pkg::*;
#(
  parameter logic [XLEN-1:0] CTRLB_RESET = 32'h0000_0001
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            self_we,
  input  logic [XLEN-1:0] self_d,
  input  logic            vmt_we,
  input  logic [XLEN-1:0] vmt_d,
  input  logic            rtemp_we,
  input  logic [XLEN-1:0] rtemp_d,
  input  logic            sp_we,
  input  logic [XLEN-1:0] sp_d,
  input  logic            mcr_we,
  input  logic [2:0]      cr_sel,
  input  logic [XLEN-1:0] mcr_data,
  input  logic [XLEN-1:0] savedself,
  output logic [XLEN-1:0] crself,
  output logic [XLEN-1:0] crvmt,
  output logic [XLEN-1:0] rtemp,
  output logic [XLEN-1:0] ctrla,
  output logic [XLEN-1:0] ctrlb,
  output logic [XLEN-1:0] rd_data
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crself <= '0;
      crvmt  <= '0;
      rtemp  <= '0;
      ctrla  <= '0;
      ctrlb  <= CTRLB_RESET;
    end else begin
      if (mcr_we && cr_sel == CR_SELF)     crself <= mcr_data;
      else if (self_we)                    crself <= self_d;
      if (mcr_we && cr_sel == CR_VMT)      crvmt  <= mcr_data;
      else if (vmt_we)                     crvmt  <= vmt_d;
      if (rtemp_we)                        rtemp  <= rtemp_d;
      if (mcr_we && cr_sel == CR_CONTROLA) ctrla  <= mcr_data;
      else if (sp_we)                      ctrla  <= sp_d;
      if (mcr_we && cr_sel == CR_CONTROLB) ctrlb  <= mcr_data;
    end
  end

  always_comb begin
    unique case (cr_sel)
      CR_SELF:      rd_data = crself;
      CR_SAVEDSELF: rd_data = savedself;
      CR_VMT:       rd_data = crvmt;
      CR_CONTROLA:  rd_data = ctrla;
      CR_CONTROLB:  rd_data = ctrlb;
      default:      rd_data = '0;
    endcase
  end

endmodule
