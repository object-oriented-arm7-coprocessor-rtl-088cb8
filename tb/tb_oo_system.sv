// tb_oo_system: end-to-end test of the object-oriented processor.
//
// A behavioural ARM7-class core and a memory with wait states are wired to
// oo_system (default parameters). A program built below runs every Object
// Instruction: METVM into a method that makes a METVI call, METVR, METSR,
// METSM into a static method that calls itself 299 times with METSI (so the
// CRSavedSelf counter overflows once and is pushed and popped), RETM in all
// three return modes, an OI with an illegal ancillary instruction (refused,
// Undefined trap), MCR/MRC service transfers, and a PUSH/POP pair of
// CRSavedSelf whose cost is measured (8T at one wait state in the
// description, at most 9T allowed here). A software-only virtual call
// and return of the same shape are in the program for comparison. The program
// is run with 1, 2 and 3 wait states. The testbench checks the Self values the
// methods observe, the call counts, the overflow stack word, and that each
// coprocessor-assisted call takes fewer cycles than the software sequence, a
// same-instance return no more, and that the gain grows with the wait
// states. Every mechanism is counted and must occur.
module tb_oo_system;
  import ocp_pkg::*;
  import arm_asm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_req_t core_req, ext_req;
  bus_rsp_t core_rsp, ext_rsp;
  logic cpi, cpa, cpb, halted, e_valid, ocp_busy, oi_accept, oi_refuse, bus_split;
  logic [31:0] e_pc, crself, crsavedself;
  int unsigned traps, accesses, waits;

  arm7_core_model u_core (.clk, .rst_n, .req(core_req), .rsp(core_rsp), .cpi, .cpa, .cpb,
                          .halted, .e_pc_o(e_pc), .e_valid_o(e_valid), .traps);
  bus_req_t mem_req;
  bus_rsp_t mem_rsp;
  logic [3:0] extra_waits;
  oo_system dut (.clk, .rst_n, .core_req, .core_rsp, .cpi, .cpa, .cpb,
                 .extra_waits, .mem_req, .mem_rsp,
                 .ocp_busy, .oi_accept, .oi_refuse, .bus_split, .crself, .crsavedself);
  ext_mem_model #(.WORDS(4096)) u_mem (.clk, .rst_n, .req(mem_req), .rsp(mem_rsp), .waits(0), .accesses);
  assign ext_req     = dut.ext_req;
  assign ext_rsp     = dut.ext_rsp;
  assign extra_waits = 4'(waits - 1);

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // memory map
  localparam logic [31:0] MAIN = 32'h100, B2 = 32'h400, B3 = 32'h480, A1 = 32'h500,
                          S1 = 32'h580, REC = 32'h600, SWM = 32'h700, TRAP = 32'h4;
  localparam logic [31:0] INST_A = 32'h2000, INST_B = 32'h2100, PTRS = 32'h2200,
                          VMT_A = 32'h3000, VMT_B = 32'h3100, RES = 32'h2800, STK = 32'h3F00,
                          SP0 = 32'h3E00;
  localparam int unsigned NREC = 300;

  logic [31:0] call_vm, call_vi, call_sw, ret_restore, ret_dec, ret_sw, pp_at;  // addresses
  logic [31:0] pc;
  int gain1_call, gain1_ret;

  task automatic put(logic [31:0] w); u_mem.mem[pc[13:2]] = w; pc += 4; endtask
  task automatic wr(logic [31:0] a, logic [31:0] w); u_mem.mem[a[13:2]] = w; endtask

  task automatic build();
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = 32'hE1A0_0000;
    pc = 0;    put(br(0, MAIN));
    pc = TRAP; put(add_i(8, 8, 1)); put(mov_r(15, 14));
    // objects
    wr(INST_A, VMT_A); wr(INST_B, VMT_B); wr(PTRS, INST_B); wr(PTRS + 4, INST_A);
    wr(VMT_B + 8, B2); wr(VMT_B + 12, B3); wr(VMT_B + 16, SWM); wr(VMT_A + 4, A1);
    pc = MAIN;
    put(mov_i(9, RES)); put(mov_i(1, PTRS)); put(mov_i(13, SP0)); put(mov_i(0, STK)); put(mcr(CR_CONTROLA, 0));
    put(mov_i(10, INST_A)); put(mcr(CR_SELF, 10));
    pp_at = pc;                                            // PUSH/POP pair, then NOPs
    put(cpush(CR_SAVEDSELF)); put(cpop(CR_SAVEDSELF)); put(NOP); put(NOP);
    put(NOP); put(NOP); put(NOP); put(NOP);
    call_vm = pc;                                          // METVM into B2
    put(oi_virt(OI_METVM, 2)); put(ldr(10, 1, 0));
    put(str(10, 9, 0));
    put(mov_i(2, INST_A));                                 // METVR into A1
    put(oi_virt(OI_METVR, 1)); put(mov_r(10, 2));
    put(str(10, 9, 4));
    put(mov_i(3, INST_B));                                 // METSR into S1
    put(oi_stat(OI_METSR, pc, S1)); put(mov_r(10, 3));
    put(mov_i(3, 255)); put(add_i(3, 3, NREC - 255)); put(mov_i(4, 0));
    put(oi_stat(OI_METSM, pc, REC)); put(ldr(10, 1, 0));   // METSM into REC
    put(str(4, 9, 16)); put(str(10, 9, 20));
    put(oi_virt(OI_METVM, 2)); put(mov_r(0, 0));           // illegal ancillary
    put(mrc(CR_SAVEDSELF, 7)); put(str(7, 9, 24));
    call_sw = pc;                                          // software-only call
    put(mov_r(11, 10)); put(ldr(10, 1, 0)); put(ldr(12, 10, 0));
    put(mov_r(14, 15)); put(ldr(15, 12, 16));
    put(str(10, 9, 40));
    put(br(pc, pc));                                       // halt
    // B2 (not a leaf): entry saves R14, METVI into B3, unified return
    pc = B2;
    put(sub_i(13, 13, 4)); put(str(14, 13, 0)); put(str(10, 9, 28));
    call_vi = pc;
    put(oi_virt(OI_METVI, 3)); put(mov_r(0, 0));
    put(str(10, 9, 32)); put(ldr(14, 13, 0));
    ret_restore = pc;
    put(retm()); put(add_i(13, 13, 4));
    // B3
    pc = B3;
    put(add_i(6, 6, 1)); put(mrc(CR_SAVEDSELF, 7)); put(str(7, 9, 36));
    ret_dec = pc;
    put(retm()); put(mov_r(0, 0));
    // A1, S1
    pc = A1; put(str(10, 9, 8)); put(retm()); put(add_i(5, 5, 1));
    pc = S1; put(str(10, 9, 12)); put(retm()); put(mov_r(0, 0));
    // REC: calls itself with METSI while R3 != 0
    pc = REC;
    put(sub_i(13, 13, 4)); put(str(14, 13, 0));
    put(sub_i(3, 3, 1)); put(cmp_i(3, 0));
    put(oi_stat(OI_METSI, pc, REC, NE)); put(mov_r(0, 0));
    put(add_i(4, 4, 1)); put(ldr(14, 13, 0)); put(retm()); put(add_i(13, 13, 4));
    // SWM: software-only method and return
    pc = SWM;
    put(sub_i(13, 13, 4));
    ret_sw = pc;
    put(mov_r(10, 11)); put(add_i(13, 13, 4)); put(mov_r(15, 14));
  endtask

  // event counters
  int unsigned n_op [7];
  int unsigned n_svc_push, n_svc_pop, n_split, n_pass, n_isg, n_push, n_pop, n_vmt_walk, n_refuse, n_mcr, n_mrc;
  int unsigned n_ret_restore, n_ret_dec, n_ret_pop, n_wait_cycles, max_count;
  // latency measurement: cycles from fetch of the sequence's first word to
  // fetch of the target
  longint unsigned cyc = 0;
  longint unsigned t_start [string];
  int unsigned lat [string];

  // plain always: the run loop below also clears the measurement tables
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (core_req.mreq && core_req.opc && core_rsp.ready && !bus_split) begin
        if (core_req.addr == pp_at && !t_start.exists("pp")) t_start["pp"] = cyc;
        if (core_req.addr == pp_at + 16 && t_start.exists("pp") && !t_start.exists("nn")) begin
          lat["pp"] = int'(cyc - t_start["pp"]); t_start["nn"] = cyc;
        end
        if (core_req.addr == pp_at + 32 && t_start.exists("nn") && !lat.exists("nn")) lat["nn"] = int'(cyc - t_start["nn"]);
        if (core_req.addr == call_vm && !t_start.exists("vm")) t_start["vm"] = cyc;
        if (core_req.addr == B2 && t_start.exists("vm") && !lat.exists("vm")) lat["vm"] = int'(cyc - t_start["vm"]);
        if (core_req.addr == call_vi && !t_start.exists("vi")) t_start["vi"] = cyc;
        if (core_req.addr == B3 && t_start.exists("vi") && !lat.exists("vi")) lat["vi"] = int'(cyc - t_start["vi"]);
        if (core_req.addr == call_sw && !t_start.exists("sw")) t_start["sw"] = cyc;
        if (core_req.addr == SWM && t_start.exists("sw") && !lat.exists("sw")) lat["sw"] = int'(cyc - t_start["sw"]);
        if (core_req.addr == ret_restore && !t_start.exists("rr")) t_start["rr"] = cyc;
        if (core_req.addr == call_vm + 8 && t_start.exists("rr") && !lat.exists("rr")) lat["rr"] = int'(cyc - t_start["rr"]);
        if (core_req.addr == ret_dec && !t_start.exists("rd")) t_start["rd"] = cyc;
        if (core_req.addr == call_vi + 8 && t_start.exists("rd") && !lat.exists("rd")) lat["rd"] = int'(cyc - t_start["rd"]);
        if (core_req.addr == ret_sw && !t_start.exists("rs")) t_start["rs"] = cyc;
        if (core_req.addr == call_sw + 20 && t_start.exists("rs") && !lat.exists("rs")) lat["rs"] = int'(cyc - t_start["rs"]);
      end
      if (oi_accept) begin
        n_op[dut.u_ocp.u_ctrl.dec_op]++;
        if (dut.u_ocp.u_ctrl.dec_op == OI_RETM)
          unique case (dut.u_ocp.u_ctrl.ret_mode_new)
            RET_RESTORE: n_ret_restore++;
            RET_DEC:     n_ret_dec++;
            default:     n_ret_pop++;
          endcase
      end
      if (bus_split) n_split++;
      if (ocp_busy && core_req.mreq && !core_req.opc && !bus_split) n_pass++;
      if (dut.u_ocp.fetch_isg && core_rsp.ready) n_isg++;
      if (dut.u_ocp.u_ctrl.xs_q == 4'd2 && ext_rsp.ready && bus_split) n_push++;
      if (dut.u_ocp.u_ctrl.xs_q == 4'd5 && ext_rsp.ready && bus_split) n_pop++;
      if (dut.u_ocp.u_ctrl.vmt_we) n_vmt_walk++;
      if (oi_refuse && core_rsp.ready) n_refuse++;
      if (dut.u_ocp.u_ctrl.accept_xfer && dut.u_ocp.dec_mcr) n_mcr++;
      if (dut.u_ocp.u_ctrl.accept_xfer && dut.u_ocp.dec_mrc) n_mrc++;
      if (dut.u_ocp.u_ctrl.svc_end && dut.u_ocp.dec_push) n_svc_push++;
      if (dut.u_ocp.u_ctrl.svc_end && dut.u_ocp.dec_pop) n_svc_pop++;
      if (ext_req.mreq && !ext_rsp.ready) n_wait_cycles++;
      if (32'(crsavedself[31:24]) > max_count) max_count = 32'(crsavedself[31:24]);
    end
  end

  // watchdog
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 1; w <= 3; w++) begin
      rst_n = 1'b0;
      waits = w;
      t_start.delete(); lat.delete();
      build();
      repeat (3) @(posedge clk);
      rst_n = 1'b1;
      wait (halted);
      repeat (2) @(posedge clk);
      $display("waits=%0d: call METVM %0dT METVI %0dT software %0dT | return RETM(restore) %0dT RETM(same) %0dT software %0dT",
               w, lat["vm"], lat["vi"], lat["sw"], lat["rr"], lat["rd"], lat["rs"]);
      // the pair costs what its four slots take beyond two NOP slots
      $display("waits=%0d: PUSH+POP pair costs %0dT", w, lat["pp"] - lat["nn"] / 2);
      // 8T at one wait state in the description; here the instruction is
      // accepted one cycle after its memory access, so one more is allowed
      if (w == 1) check("PUSH+POP pair within 1T of 8T", 32'(lat["pp"] - lat["nn"] / 2 <= 9), 1);
      if (w == 3) begin
        checks++; if (!(lat["pp"] - lat["nn"] / 2 > 9)) begin failures++; $display("FAIL PUSH+POP cost does not grow with wait states"); end
      end
      check("Self after METVM/RETM", u_mem.mem[(RES + 0) >> 2], INST_A);
      check("Self after METVR/RETM", u_mem.mem[(RES + 4) >> 2], INST_A);
      check("Self inside A1 (METVR)", u_mem.mem[(RES + 8) >> 2], INST_A);
      check("Self inside S1 (METSR)", u_mem.mem[(RES + 12) >> 2], INST_B);
      check("recursion returns", u_mem.mem[(RES + 16) >> 2], NREC);
      check("Self after METSM recursion", u_mem.mem[(RES + 20) >> 2], INST_A);
      check("CRSavedSelf read by MRC", u_mem.mem[(RES + 24) >> 2], INST_A);
      check("Self inside B2 (METVM)", u_mem.mem[(RES + 28) >> 2], INST_B);
      check("Self in B2 after METVI/RETM", u_mem.mem[(RES + 32) >> 2], INST_B);
      check("CRSavedSelf inside B3", u_mem.mem[(RES + 36) >> 2], {8'd1, INST_A[23:0]});
      check("software call/return restores Self", u_mem.mem[(RES + 40) >> 2], INST_A);
      check("overflow stack word", u_mem.mem[(STK - 4) >> 2], {8'hFF, INST_A[23:0]});
      check("CRControlA back at stack top", dut.u_ocp.u_regs.ctrla, STK);
      check("CRSelf at end", crself, INST_A);
      check("trap count (illegal ancillary)", traps, 1);
      check("A1 ancillary ran", u_core.r[5], 1);
      check("B3 entered once", u_core.r[6], 1);
      check("stack pointer balanced", u_core.r[13], SP0);
      checks++; if (!(lat["vm"] < lat["sw"])) begin failures++; $display("FAIL METVM not faster than software"); end
      checks++; if (!(lat["vi"] < lat["vm"])) begin failures++; $display("FAIL METVI not faster than METVM"); end
      checks++; if (!(lat["rd"] <= lat["rs"])) begin failures++; $display("FAIL same-instance RETM slower than software"); end
      if (w == 1) begin gain1_call = lat["sw"] - lat["vm"]; gain1_ret = lat["rs"] - lat["rd"]; end
      if (w == 3) begin
        checks++; if (!(lat["sw"] - lat["vm"] > gain1_call)) begin failures++; $display("FAIL METVM gain does not grow with wait states"); end
        checks++; if (!(lat["rs"] - lat["rd"] > gain1_ret)) begin failures++; $display("FAIL RETM gain does not grow with wait states"); end
      end
      checks++; if (!(lat["rr"] <= lat["rs"] + 2)) begin failures++; $display("FAIL restoring RETM much slower than software"); end
    end
    $display("mechanisms: METVM=%0d METVR=%0d METVI=%0d METSM=%0d METSR=%0d METSI=%0d RETM=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6]);
    $display("  service PUSH=%0d POP=%0d", n_svc_push, n_svc_pop);
    $display("  RETM restore=%0d dec=%0d pop=%0d push=%0d vmt_walks=%0d split_cycles=%0d isg_words=%0d ancillary_passthrough=%0d refused=%0d mcr=%0d mrc=%0d wait_cycles=%0d max_count=%0d",
             n_ret_restore, n_ret_dec, n_ret_pop, n_push, n_vmt_walk, n_split, n_isg, n_pass, n_refuse, n_mcr, n_mrc, n_wait_cycles, max_count);
    for (int i = 0; i < 7; i++) begin checks++; if (n_op[i] == 0) begin failures++; $display("FAIL OI %0d never ran", i); end end
    checks++; if (n_op[5] != 3 * (NREC - 1)) begin failures++; $display("FAIL METSI count %0d", n_op[5]); end
    checks++; if (n_ret_restore == 0 || n_ret_dec == 0 || n_ret_pop != 3) begin failures++; $display("FAIL RETM modes"); end
    checks++; if (n_push != 3 || n_pop != 3) begin failures++; $display("FAIL overflow push/pop"); end
    checks++; if (n_vmt_walk == 0 || n_split == 0 || n_isg == 0 || n_pass == 0) begin failures++; $display("FAIL split/ISG/walk/passthrough never seen"); end
    checks++; if (n_refuse != 3 || n_mcr == 0 || n_mrc == 0 || n_wait_cycles == 0) begin failures++; $display("FAIL refuse/service/wait never seen"); end
    checks++; if (n_svc_push != 3 || n_svc_pop != 3) begin failures++; $display("FAIL PUSH/POP count %0d %0d", n_svc_push, n_svc_pop); end
    checks++; if (max_count != 255) begin failures++; $display("FAIL counter never reached 255"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
