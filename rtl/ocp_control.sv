// ocp_control: "Timing & Control", the sequencer of the Object Coprocessor.
//
// Idle, it leaves the separator closed (core connected to the external bus)
// and only watches. When the core offers a coprocessor instruction (cpi) it
// answers with cpa (absent: the core takes the Undefined Instruction trap) or
// cpb (busy: ask again next cycle), or accepts it:
//  * MCR/MRC service transfers complete in the same cycle, the data riding on
//    the internal bus (wdata from the core, rdata to it).
//  * PUSH/POP service instructions (save or restore a coprocessor register
//    on the stack addressed by CRControlA, full-descending) hold the core
//    with cpb, which leaves its bus idle, make the one memory access from the
//    cycle of the offer on, and are accepted in the cycle after it.
//  * An Object Instruction with a legal ancillary instruction starts two
//    synchronised sequences in that same cycle.
//    Core side: opcode fetches are answered by the sequence generator. Data
//    cycles of the ancillary instruction pass through the separator to memory;
//    data cycles of generated instructions are answered here: a store of RSelf
//    hands over the new Self (captured into CRSelf, the old one saved into
//    CRSavedSelf), a load into PC receives the method address from RTemp, a
//    load into RSelf receives the caller's Self on a restoring RETM. The
//    final jump waits (ready low) until the external side is done: the data
//    cycle of LDR PC for calls, the fetch of MOV PC,R14 for RETM. The separator closes again on the fetch that follows the jump.
//    External side, as bus master while the core does not use the bus:
//      METVM/METVR: wait for the new Self, read the VMT pointer at [Self] into
//                   CRVmt, read the method address at [CRVmt + 4*index] into
//                   RTemp.
//      METVI:       (push CRSavedSelf on overflow), same two reads from CRSelf.
//      METSx:       the ALU puts oi_addr + 8 + 4*offset into RTemp at accept;
//                   METSI pushes CRSavedSelf on overflow.
//      RETM:        count zero: restore Self; count one over a push marker:
//                   pop CRSavedSelf from [CRControlA]; otherwise decrement.
//    Same-instance calls (METVI, METSI) increment the CRSavedSelf count, and
//    when it is full push the register at [CRControlA - 4] and mark it.
// All state changes on the rising clock edge; the bus answers are
// combinational in the cycle of the request.
//
// From the description: the take-over at execute upon the core's permission,
// the bus split, the two synchronised sequences, the VMT walk, the Self
// save/restore and the counter rules of RETM, refusal of illegal ancillary
// instructions. This design's own: the cycle-level protocol, the overflow
// stack in memory addressed by CRControlA (shared by overflow and the
// PUSH/POP service instructions), the enable bit in CRControlB.
module ocp_control
  import ocp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // coprocessor handshake with the core
  input  logic            cpi,          // coprocessor instruction in execute
  output logic            cpa,          // absent: refuse
  output logic            cpb,          // busy: wait
  // internal bus
  input  bus_req_t        core_req,
  output bus_rsp_t        ocp_int_rsp,
  output logic            fetch_isg,    // current fetch answered by the generator
  // external bus master
  output bus_req_t        ocp_ext_req,
  input  bus_rsp_t        ext_rsp,
  // separator
  output logic            drv_ext,
  output logic            drv_int,
  // pipe and decoder
  input  pipe_entry_t     pipe1,
  input  logic            dec_ours,
  input  oi_op_e          dec_op,
  input  logic [14:0]     dec_field,
  input  logic            dec_mcr,
  input  logic            dec_mrc,
  input  logic            dec_push,
  input  logic            dec_pop,
  input  logic [2:0]      dec_cr,
  input  logic            dec_anc_legal,
  // sequence generator
  output oi_op_e          isg_op,
  output ret_mode_e       isg_ret_mode,
  output logic [XLEN-1:0] isg_oi_addr,
  input  logic [XLEN-1:0] isg_instr,
  input  logic            isg_jump,
  // ALU
  output alu_op_e         alu_op,
  output logic [XLEN-1:0] alu_a,
  output logic [14:0]     alu_b,
  input  logic [XLEN-1:0] alu_y,
  // registers
  input  logic [XLEN-1:0] crself,
  input  logic [XLEN-1:0] crvmt,
  input  logic [XLEN-1:0] rtemp,
  input  logic [XLEN-1:0] ctrla,
  input  logic [XLEN-1:0] ctrlb,
  input  logic [XLEN-1:0] cr_rd_data,
  output logic            self_we,
  output logic [XLEN-1:0] self_d,
  output logic            vmt_we,
  output logic            rtemp_we,
  output logic [XLEN-1:0] rtemp_d,
  output logic            sp_we,
  output logic            mcr_we,
  output logic [2:0]      cr_sel,
  output logic [XLEN-1:0] mcr_data,
  // CRSavedSelf
  output ss_op_e          ss_op,
  output logic [XLEN-1:0] ss_word,
  input  logic [XLEN-1:0] ss_value,
  input  logic [SELF_W-1:0] ss_self,
  input  logic            ss_zero,
  input  logic            ss_full,
  input  logic            ss_pop,
  // status
  output logic            busy,
  output logic            oi_accept,    // an OI is accepted this cycle
  output logic            oi_refuse     // a coprocessor instruction is refused
);

  typedef enum logic [3:0] {X_IDLE, X_WAIT_SELF, X_PUSH, X_RD_VMT, X_RD_MA, X_POP, X_DONE,
                            X_SVC, X_SVC_END} xstate_e;

  logic            busy_q, jump_done_q;
  oi_op_e          op_q;
  ret_mode_e       ret_mode_q, ret_mode_new;
  logic [14:0]     field_q;
  logic [XLEN-1:0] oi_addr_q;
  xstate_e         xs_q, xs_d, xs_start;

  logic accept_oi, accept_xfer, active, pass_data, final_connect;
  logic fetch, data, ext_grant, ext_fire, int_fire;
  logic capture, serve_self, jump_fire;
  logic svc_go, svc_bus, svc_end;

  always_comb begin
    ret_mode_new = ss_zero ? RET_RESTORE : (ss_pop ? RET_POP : RET_DEC);

    // first external-side state of an OI accepted now
    unique case (dec_op)
      OI_METVM, OI_METVR: xs_start = X_WAIT_SELF;
      OI_METVI:           xs_start = ss_full ? X_PUSH : X_RD_VMT;
      OI_METSI:           xs_start = ss_full ? X_PUSH : X_DONE;
      OI_RETM:            xs_start = (ret_mode_new == RET_POP) ? X_POP : X_DONE;
      default:            xs_start = X_DONE;
    endcase

    accept_oi   = !busy_q && cpi && dec_ours && dec_op != OI_NONE && ctrlb[0] && dec_anc_legal;
    accept_xfer = !busy_q && cpi && dec_ours && (dec_mcr || dec_mrc);
    // PUSH/POP: the memory access runs while the core is held with cpb
    // (it leaves the bus idle then); the instruction is accepted the cycle
    // after the access
    svc_go      = !busy_q && cpi && dec_ours && (dec_push || dec_pop) && xs_q == X_IDLE;
    svc_bus     = svc_go || xs_q == X_SVC;
    svc_end     = xs_q == X_SVC_END;
    cpa         = !busy_q && cpi && !accept_oi && !accept_xfer && !svc_bus && !svc_end;
    cpb         = (busy_q || svc_bus) && cpi;
    active      = busy_q || accept_oi;

    isg_op       = busy_q ? op_q       : dec_op;
    isg_ret_mode = busy_q ? ret_mode_q : ret_mode_new;
    isg_oi_addr  = busy_q ? oi_addr_q  : pipe1.addr;

    fetch = core_req.mreq && core_req.opc;
    data  = core_req.mreq && !core_req.opc;

    // the jump is executing: its target fetch goes to memory
    final_connect = busy_q && pipe1.isg &&
                    (pipe1.instr == ARM_MOV_PCLR || (pipe1.instr == ARM_LDR_PC && jump_done_q));
    // data cycles of the ancillary instruction go to memory
    pass_data = busy_q && data && !pipe1.isg;

    drv_ext   = (!active || pass_data || final_connect) && !svc_bus;
    drv_int   = drv_ext && !accept_xfer;
    fetch_isg = active && fetch && !drv_ext;

    // core-side answers
    ocp_int_rsp = '{rdata: '0, ready: 1'b1};
    capture    = 1'b0;
    serve_self = 1'b0;
    jump_fire  = 1'b0;
    if (accept_xfer) begin
      ocp_int_rsp.rdata = cr_rd_data;
    end else if (fetch_isg) begin
      ocp_int_rsp.rdata = isg_instr;
      // the fetch of MOV PC,R14 waits for the external side (a pop must end
      // before the bus reconnects); LDR PC is fetched at once and its data
      // cycle waits instead
      ocp_int_rsp.ready = !isg_jump || isg_instr == ARM_LDR_PC || xs_q == X_DONE ||
                          (accept_oi && xs_start == X_DONE);
    end else if (busy_q && data && !drv_ext) begin
      if (pipe1.instr == ARM_STR_SELF) begin
        capture = 1'b1;
      end else if (pipe1.instr == ARM_LDR_PC) begin
        ocp_int_rsp.rdata = rtemp;
        ocp_int_rsp.ready = (xs_q == X_DONE);
        jump_fire = ocp_int_rsp.ready;
      end else if (pipe1.instr == ARM_LDR_SELF) begin
        ocp_int_rsp.rdata = {{COUNT_W{1'b0}}, ss_self};
        serve_self = 1'b1;
      end
    end
    int_fire = fetch && final_connect && core_req.mreq;

    // external-side master
    ocp_ext_req = '{addr: '0, wdata: '0, mreq: 1'b0, rw: 1'b0, opc: 1'b0};
    alu_op = ALU_INDEX;
    alu_a  = crvmt;
    alu_b  = busy_q ? field_q : dec_field;
    unique case (xs_q)
      X_PUSH: begin
        alu_op = ALU_DEC4; alu_a = ctrla;
        ocp_ext_req = '{addr: alu_y, wdata: ss_value, mreq: 1'b1, rw: 1'b1, opc: 1'b0};
      end
      X_RD_VMT: ocp_ext_req = '{addr: crself, wdata: '0, mreq: 1'b1, rw: 1'b0, opc: 1'b0};
      X_RD_MA:  ocp_ext_req = '{addr: alu_y,  wdata: '0, mreq: 1'b1, rw: 1'b0, opc: 1'b0};
      X_POP: begin
        alu_op = ALU_INC4; alu_a = ctrla;
        ocp_ext_req = '{addr: ctrla, wdata: '0, mreq: 1'b1, rw: 1'b0, opc: 1'b0};
      end
      default: ;
    endcase
    if (svc_bus) begin
      alu_a = ctrla;
      if (dec_push) begin
        alu_op = ALU_DEC4;
        ocp_ext_req = '{addr: alu_y, wdata: cr_rd_data, mreq: 1'b1, rw: 1'b1, opc: 1'b0};
      end else begin
        alu_op = ALU_INC4;
        ocp_ext_req = '{addr: ctrla, wdata: '0, mreq: 1'b1, rw: 1'b0, opc: 1'b0};
      end
    end
    if (accept_oi) begin
      alu_op = ALU_PCREL;
      alu_a  = pipe1.addr;
    end
    ext_grant = !drv_ext;
    ext_fire  = ext_grant && ocp_ext_req.mreq && ext_rsp.ready;

    // register updates
    self_we  = capture || serve_self;
    self_d   = capture ? core_req.wdata : {{COUNT_W{1'b0}}, ss_self};
    vmt_we   = (xs_q == X_RD_VMT) && ext_fire;
    rtemp_we = (accept_oi && (dec_op == OI_METSM || dec_op == OI_METSR || dec_op == OI_METSI)) ||
               ((xs_q == X_RD_MA) && ext_fire);
    rtemp_d  = accept_oi ? alu_y : ext_rsp.rdata;
    sp_we    = (xs_q == X_PUSH || xs_q == X_POP || svc_bus) && ext_fire;
    mcr_we   = (accept_xfer && dec_mcr) || (svc_bus && dec_pop && ext_fire);
    cr_sel   = dec_cr;
    mcr_data = svc_bus ? ext_rsp.rdata : core_req.wdata;

    ss_op   = SS_HOLD;
    ss_word = mcr_data;
    if (mcr_we && dec_cr == CR_SAVEDSELF) begin
      ss_op = SS_LOAD;
    end else if (capture) begin
      ss_op = SS_SAVE;
    end else if (accept_oi) begin
      if ((dec_op == OI_METVI || dec_op == OI_METSI) && !ss_full) ss_op = SS_INC;
      if (dec_op == OI_RETM && ret_mode_new == RET_DEC)           ss_op = SS_DEC;
    end else if (xs_q == X_PUSH && ext_fire) begin
      ss_op = SS_MARK;
    end else if (xs_q == X_POP && ext_fire) begin
      ss_op   = SS_LOAD;
      ss_word = ext_rsp.rdata;
    end

    // external-side next state
    xs_d = xs_q;
    if (accept_oi) begin
      xs_d = xs_start;
    end else if (svc_bus) begin
      xs_d = ext_fire ? X_SVC_END : X_SVC;
    end else begin
      unique case (xs_q)
        X_WAIT_SELF: if (capture)  xs_d = X_RD_VMT;
        X_PUSH:      if (ext_fire) xs_d = (op_q == OI_METVI) ? X_RD_VMT : X_DONE;
        X_RD_VMT:    if (ext_fire) xs_d = X_RD_MA;
        X_RD_MA:     if (ext_fire) xs_d = X_DONE;
        X_POP:       if (ext_fire) xs_d = X_DONE;
        X_SVC_END:   xs_d = X_IDLE;
        default: ;
      endcase
    end
    if (int_fire) xs_d = X_IDLE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q      <= 1'b0;
      jump_done_q <= 1'b0;
      op_q        <= OI_NONE;
      ret_mode_q  <= RET_RESTORE;
      field_q     <= '0;
      oi_addr_q   <= '0;
      xs_q        <= X_IDLE;
    end else begin
      xs_q <= xs_d;
      if (accept_oi) begin
        busy_q      <= 1'b1;
        jump_done_q <= 1'b0;
        op_q        <= dec_op;
        ret_mode_q  <= ret_mode_new;
        field_q     <= dec_field;
        oi_addr_q   <= pipe1.addr;
      end else if (int_fire) begin
        busy_q <= 1'b0;
      end
      if (jump_fire) jump_done_q <= 1'b1;
    end
  end

  assign busy      = busy_q;
  assign oi_accept = accept_oi;
  assign oi_refuse = cpa;

endmodule
