// arm7_core_model: behavioural model of an ARM7-class core, for testbenches.
//
// A three-stage (fetch, decode, execute) in-order pipeline that does one bus
// cycle per clock on the internal bus and runs a small subset of the ARM
// instruction set: data processing without shifts (AND EOR SUB RSB ADD ORR
// MOV BIC MVN CMP; CMP and S forms set only Z), LDR/STR with an immediate
// offset, B/BL, and the coprocessor handshake for CDP/MCR/MRC. Conditions AL,
// EQ and NE. R15 reads as the instruction's address plus 8. Timing:
//   single-cycle instruction: completes in the cycle of the next fetch;
//   LDR/STR: one data cycle, then the completing fetch cycle;
//   taken branch / write to PC: the target is fetched in the completing cycle
//     and the pipeline refills (two fetches before it executes);
//   coprocessor instruction: cpi high in execute; cpa -> Undefined trap
//     (R14 = address + 4, jump to 0x4); cpb -> wait; accepted CDP completes
//     with that cycle's fetch (once accepted it is not offered again while
//     the fetch waits); MCR/MRC move their word in that cycle (wdata
//     out, rdata in, no memory cycle) and complete on the next fetch.
// Every bus cycle waits while ready is low. A branch to itself halts the model.
// It is a stand-in for the real core, which is not part of this design.
module arm7_core_model
  import ocp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  output bus_req_t req,
  input  bus_rsp_t rsp,
  output logic     cpi,
  input  logic     cpa,
  input  logic     cpb,
  output logic     halted,
  output logic [31:0] e_pc_o,     // address of the instruction in execute
  output logic     e_valid_o,
  output int unsigned traps
);

  logic [31:0] r [16];
  logic [31:0] f_pc, d_ir, d_pc, e_ir, e_pc, ldata;
  logic        d_v, e_v, phase, zf, halted_q;

  // combinational results
  logic        cond_ok, adv, br, wr_en, z_en, z_val;
  logic [3:0]  wr_idx;
  logic [31:0] wr_val, br_tgt, op2, rn_v, res, addr;
  logic        phase_set, ldata_en;

  function automatic logic [31:0] rd(input logic [3:0] n, input logic [31:0] pc, input logic [31:0] rr [16]);
    return (n == 4'd15) ? pc + 32'd8 : rr[n];
  endfunction

  always_comb begin
    req       = '{addr: f_pc, wdata: '0, mreq: 1'b0, rw: 1'b0, opc: 1'b1};
    cpi       = 1'b0;
    adv       = 1'b0;
    br        = 1'b0;
    br_tgt    = '0;
    wr_en     = 1'b0;
    wr_idx    = '0;
    wr_val    = '0;
    z_en      = 1'b0;
    z_val     = 1'b0;
    phase_set = 1'b0;
    ldata_en  = 1'b0;
    op2       = '0;
    res       = '0;
    addr      = '0;
    rn_v      = rd(e_ir[19:16], e_pc, r);
    unique case (e_ir[31:28])
      4'h0:    cond_ok = zf;
      4'h1:    cond_ok = !zf;
      default: cond_ok = 1'b1;
    endcase
    if (halted_q) begin
      // nothing
    end else if (!e_v || !cond_ok) begin
      adv = 1'b1;
    end else if (e_ir[27:24] == 4'hE || e_ir[27:25] == 3'b110) begin
      if (!phase) begin
        cpi = 1'b1;
        if (cpa) begin
          br = 1'b1; br_tgt = 32'h4; wr_en = 1'b1; wr_idx = 4'd14; wr_val = e_pc + 32'd4;
        end else if (!cpb) begin
          if (e_ir[27:24] == 4'hE && e_ir[4]) begin
            req.mreq  = 1'b0;
            req.wdata = rd(e_ir[15:12], e_pc, r);
            phase_set = 1'b1;
            ldata_en  = e_ir[20];
          end else begin
            adv       = 1'b1;
            phase_set = 1'b1;   // accepted even if the fetch waits
          end
        end else begin
          req.mreq = 1'b0;
        end
      end else begin
        adv = 1'b1;
        if (e_ir[27:24] == 4'hE && e_ir[4] && e_ir[20]) begin
          wr_en = 1'b1; wr_idx = e_ir[15:12]; wr_val = ldata;
        end
      end
    end else if (e_ir[27:25] == 3'b101) begin
      br     = 1'b1;
      br_tgt = e_pc + 32'd8 + {{6{e_ir[23]}}, e_ir[23:0], 2'b00};
      if (e_ir[24]) begin wr_en = 1'b1; wr_idx = 4'd14; wr_val = e_pc + 32'd4; end
    end else if (e_ir[27:26] == 2'b01) begin
      addr = e_ir[23] ? rn_v + {20'd0, e_ir[11:0]} : rn_v - {20'd0, e_ir[11:0]};
      if (!phase) begin
        req = '{addr: addr, wdata: rd(e_ir[15:12], e_pc, r), mreq: 1'b1, rw: !e_ir[20], opc: 1'b0};
        phase_set = 1'b1;
        ldata_en  = e_ir[20];
      end else if (e_ir[20]) begin
        if (e_ir[15:12] == 4'd15) begin
          br = 1'b1; br_tgt = ldata;
        end else begin
          adv = 1'b1; wr_en = 1'b1; wr_idx = e_ir[15:12]; wr_val = ldata;
        end
      end else begin
        adv = 1'b1;
      end
    end else begin
      op2 = e_ir[25] ? ({24'd0, e_ir[7:0]} >> (2 * e_ir[11:8])) |
                       ({24'd0, e_ir[7:0]} << (32 - 2 * e_ir[11:8]))
                     : rd(e_ir[3:0], e_pc, r);
      unique case (e_ir[24:21])
        4'h0: res = rn_v & op2;
        4'h1: res = rn_v ^ op2;
        4'h2: res = rn_v - op2;
        4'h3: res = op2 - rn_v;
        4'h4: res = rn_v + op2;
        4'hA: res = rn_v - op2;
        4'hC: res = rn_v | op2;
        4'hD: res = op2;
        4'hE: res = rn_v & ~op2;
        4'hF: res = ~op2;
        default: res = op2;
      endcase
      z_en  = e_ir[20] || e_ir[24:21] == 4'hA;
      z_val = (res == 0);
      if (e_ir[24:21] != 4'hA) begin
        if (e_ir[15:12] == 4'd15) begin
          br = 1'b1; br_tgt = res;
        end else begin
          adv = 1'b1; wr_en = 1'b1; wr_idx = e_ir[15:12]; wr_val = res;
        end
      end else begin
        adv = 1'b1;
      end
    end
    if (br) req = '{addr: br_tgt, wdata: '0, mreq: 1'b1, rw: 1'b0, opc: 1'b1};
    else if (adv) req = '{addr: f_pc, wdata: '0, mreq: 1'b1, rw: 1'b0, opc: 1'b1};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) r[i] <= '0;
      f_pc <= '0; d_ir <= '0; d_pc <= '0; e_ir <= '0; e_pc <= '0; ldata <= '0;
      d_v <= 1'b0; e_v <= 1'b0; phase <= 1'b0; zf <= 1'b0; halted_q <= 1'b0;
      traps <= 0;
    end else if (!halted_q) begin
      if (phase_set && (rsp.ready || !req.mreq || adv)) begin
        phase <= 1'b1;
        if (ldata_en) ldata <= rsp.rdata;
      end
      if ((adv || br) && rsp.ready) begin
        if (wr_en) r[wr_idx] <= wr_val;
        if (z_en)  zf <= z_val;
        phase <= 1'b0;
        if (cpi && cpa) traps <= traps + 1;
        if (br) begin
          if (br_tgt == e_pc) halted_q <= 1'b1;
          e_v  <= 1'b0;
          d_ir <= rsp.rdata; d_pc <= br_tgt; d_v <= 1'b1;
          f_pc <= br_tgt + 32'd4;
        end else begin
          e_ir <= d_ir; e_pc <= d_pc; e_v <= d_v;
          d_ir <= rsp.rdata; d_pc <= f_pc; d_v <= 1'b1;
          f_pc <= f_pc + 32'd4;
        end
      end
    end
  end

  assign halted    = halted_q;
  assign e_pc_o    = e_pc;
  assign e_valid_o = e_v;

endmodule
