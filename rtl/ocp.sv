// ocp: the Object Coprocessor.
//
// Joins the blocks of the coprocessor: the instruction pipe (Pipe 0-2) that
// follows the core's fetches on the internal bus, the decoder of coprocessor
// and ancillary instructions, the Timing & Control sequencer, the Instruction
// Sequence Generator that feeds the core while an Object Instruction runs, the
// address ALU, the registers CRSelf, CRVmt, RTemp, CRControlA/B, and
// CRSavedSelf with its Inc/Dec logic. It has a port on each bus: on the
// internal bus it watches the core's requests and can answer them; on the
// external bus it can act as master. drv_ext and drv_int control the
// separator that joins the two busses. Single clock, asynchronous active-low
// reset; see ocp_control for the cycle behaviour.
//
// The set of blocks and how they connect follow the coprocessor block diagram
// of the description; the interfaces between them are this design's.
//
// Some decoder and pipe outputs are left unconnected here: Pipe 0's address
// and tag, Pipe 2 (the copy of the stage that just left execute; nothing in
// the sequencing needs it, it is kept so the pipe mirrors the core's three
// stages), the "any coprocessor instruction" flag, the core register number
// of MCR/MRC (the core moves the data itself) and the count output of
// CRSavedSelf (the sequencer uses its flags).
module ocp
  import ocp_pkg::*;
#(
  parameter logic [XLEN-1:0] CTRLB_RESET = 32'h0000_0001
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cpi,
  output logic     cpa,
  output logic     cpb,
  input  bus_req_t core_req,     // internal bus, from the core
  input  bus_rsp_t core_rsp,     // internal bus, what the core receives
  output bus_rsp_t ocp_int_rsp,
  output bus_req_t ocp_ext_req,
  input  bus_rsp_t ext_rsp,
  output logic     drv_ext,
  output logic     drv_int,
  output logic     busy,
  output logic     oi_accept,
  output logic     oi_refuse,
  output logic [XLEN-1:0] crself,
  output logic [XLEN-1:0] crsavedself
);

  pipe_entry_t     pipe0, pipe1, pipe2;
  logic            fetch_isg;
  logic            dec_cp, dec_ours, dec_mcr, dec_mrc, dec_push, dec_pop, dec_anc_legal;
  oi_op_e          dec_op;
  logic [14:0]     dec_field;
  logic [2:0]      dec_cr;
  logic [3:0]      dec_xreg;
  oi_op_e          isg_op;
  ret_mode_e       isg_ret_mode;
  logic [XLEN-1:0] isg_oi_addr, isg_instr;
  logic            isg_jump;
  alu_op_e         alu_op;
  logic [XLEN-1:0] alu_a, alu_y;
  logic [14:0]     alu_b;
  logic [XLEN-1:0] crvmt, rtemp, ctrla, ctrlb, cr_rd_data;
  logic            self_we, vmt_we, rtemp_we, sp_we, mcr_we;
  logic [XLEN-1:0] self_d, rtemp_d, mcr_data, ss_word;
  logic [2:0]      cr_sel;
  ss_op_e          ss_op;
  logic [COUNT_W-1:0] ss_count;
  logic [SELF_W-1:0]  ss_self;
  logic            ss_zero, ss_full, ss_pop;

  ocp_pipe u_pipe (
    .clk, .rst_n,
    .fetch_fire (core_req.mreq && core_req.opc && core_rsp.ready),
    .fetch_addr (core_req.addr),
    .fetch_data (core_rsp.rdata),
    .fetch_isg,
    .pipe0, .pipe1, .pipe2
  );

  oi_decoder u_dec (
    .exec_instr (pipe1.instr),
    .anc_instr  (pipe0.instr),
    .is_cp      (dec_cp),
    .ours       (dec_ours),
    .oi_op      (dec_op),
    .oi_field   (dec_field),
    .is_mcr     (dec_mcr),
    .is_mrc     (dec_mrc),
    .is_push    (dec_push),
    .is_pop     (dec_pop),
    .cr_sel     (dec_cr),
    .xfer_reg   (dec_xreg),
    .anc_legal  (dec_anc_legal)
  );

  ocp_isg u_isg (
    .op         (isg_op),
    .ret_mode   (isg_ret_mode),
    .oi_addr    (isg_oi_addr),
    .fetch_addr (core_req.addr),
    .instr      (isg_instr),
    .is_jump    (isg_jump)
  );

  ocp_alu u_alu (.op(alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  ocp_regs #(.CTRLB_RESET(CTRLB_RESET)) u_regs (
    .clk, .rst_n,
    .self_we, .self_d,
    .vmt_we,  .vmt_d (ext_rsp.rdata),
    .rtemp_we, .rtemp_d,
    .sp_we,   .sp_d  (alu_y),
    .mcr_we,  .cr_sel, .mcr_data,
    .savedself (crsavedself),
    .crself, .crvmt, .rtemp, .ctrla, .ctrlb,
    .rd_data (cr_rd_data)
  );

  ocp_saved_self u_saved (
    .clk, .rst_n,
    .op          (ss_op),
    .self_in     (crself),
    .word_in     (ss_word),
    .value       (crsavedself),
    .count       (ss_count),
    .saved_self  (ss_self),
    .count_zero  (ss_zero),
    .count_full  (ss_full),
    .pop_pending (ss_pop)
  );

  ocp_control u_ctrl (
    .clk, .rst_n,
    .cpi, .cpa, .cpb,
    .core_req, .ocp_int_rsp, .fetch_isg,
    .ocp_ext_req, .ext_rsp,
    .drv_ext, .drv_int,
    .pipe1,
    .dec_ours, .dec_op, .dec_field, .dec_mcr, .dec_mrc, .dec_push, .dec_pop, .dec_cr, .dec_anc_legal,
    .isg_op, .isg_ret_mode, .isg_oi_addr, .isg_instr, .isg_jump,
    .alu_op, .alu_a, .alu_b, .alu_y,
    .crself, .crvmt, .rtemp, .ctrla, .ctrlb, .cr_rd_data,
    .self_we, .self_d, .vmt_we, .rtemp_we, .rtemp_d, .sp_we,
    .mcr_we, .cr_sel, .mcr_data,
    .ss_op, .ss_word, .ss_value (crsavedself), .ss_self, .ss_zero, .ss_full, .ss_pop,
    .busy, .oi_accept, .oi_refuse
  );

endmodule
