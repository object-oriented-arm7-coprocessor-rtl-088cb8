// tb_ocp: the coprocessor with its bus separator, a behavioural ARM7-class
// core and a memory model, without the memory access controller, so the
// memory's own wait states (0 to 3, random per run) are seen directly.
//
// Each run: METVM into a method that calls a second method of the same
// instance with METVI and then, keeping CRSavedSelf on the stack with the
// PUSH/POP service instructions as a non-leaf method must, a method of
// another instance with METVR; a METSM recursion of random depth (1..400 calls, so
// that some runs overflow the CRSavedSelf counter and push/pop it), an OI
// refused because CRControlB disables the coprocessor, a PUSH/POP of CRSelf
// around an MCR that overwrites it (as at a context switch), and MRC reads of
// CRSavedSelf, CRVmt and CRControlA. Checks the values the methods see, the
// recursion count, the number of overflow pushes, the trap count and the
// registers at the end.
module tb_ocp;
  import ocp_pkg::*;
  import arm_asm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_req_t core_req, ext_req, ocp_ext_req;
  bus_rsp_t core_rsp, ext_rsp, ocp_int_rsp;
  logic cpi, cpa, cpb, halted, e_valid, drv_ext, drv_int, busy, oi_accept, oi_refuse;
  logic [31:0] e_pc, crself, crsavedself;
  int unsigned traps, accesses, waits;

  arm7_core_model u_core (.clk, .rst_n, .req(core_req), .rsp(core_rsp), .cpi, .cpa, .cpb,
                          .halted, .e_pc_o(e_pc), .e_valid_o(e_valid), .traps);
  ocp dut (.clk, .rst_n, .cpi, .cpa, .cpb, .core_req, .core_rsp, .ocp_int_rsp, .ocp_ext_req,
           .ext_rsp, .drv_ext, .drv_int, .busy, .oi_accept, .oi_refuse, .crself, .crsavedself);
  ocp_separator u_sep (.drv_ext, .drv_int, .core_req, .core_rsp, .ocp_ext_req, .ocp_int_rsp,
                       .ext_req, .ext_rsp);
  ext_mem_model #(.WORDS(4096)) u_mem (.clk, .rst_n, .req(ext_req), .rsp(ext_rsp), .waits, .accesses);

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  localparam logic [31:0] MAIN = 32'h100, B2 = 32'h400, B3 = 32'h480, A1 = 32'h500, REC = 32'h600, TRAP = 32'h4;
  localparam logic [31:0] INST_A = 32'h2000, INST_B = 32'h2100, PTRS = 32'h2200,
                          VMT_A = 32'h3000, VMT_B = 32'h3100, RES = 32'h2800, STK = 32'h3F00, SP0 = 32'h3E00;

  logic [31:0] pc;
  task automatic put(logic [31:0] w); u_mem.mem[pc[13:2]] = w; pc += 4; endtask
  task automatic wr(logic [31:0] a, logic [31:0] w); u_mem.mem[a[13:2]] = w; endtask

  task automatic build(int unsigned depth);
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = ARM_NOP;
    pc = 0;    put(br(0, MAIN));
    pc = TRAP; put(add_i(8, 8, 1)); put(mov_r(15, 14));
    wr(INST_A, VMT_A); wr(INST_B, VMT_B); wr(VMT_A + 4, A1); wr(PTRS, INST_B); wr(PTRS + 4, INST_A);
    wr(VMT_B + 8, B2); wr(VMT_B + 12, B3);
    pc = MAIN;
    put(mov_i(9, RES)); put(mov_i(1, PTRS)); put(mov_i(13, SP0)); put(mov_i(0, STK)); put(mcr(CR_CONTROLA, 0));
    put(mov_i(10, INST_A)); put(mcr(CR_SELF, 10));
    put(oi_virt(OI_METVM, 2)); put(ldr(10, 1, 0));            // METVM into B2 of INST_B
    put(str(10, 9, 0));
    put(mov_i(3, depth & 32'hFF)); put(add_i(3, 3, depth & 32'hF00)); put(mov_i(4, 0));
    put(oi_stat(OI_METSM, pc, REC)); put(ldr(10, 1, 4));      // METSM into REC of INST_A
    put(str(4, 9, 4)); put(str(10, 9, 8));
    put(cpush(CR_SELF)); put(mov_i(2, INST_B)); put(mcr(CR_SELF, 2));   // context switch
    put(cpop(CR_SELF)); put(mrc(CR_SELF, 7)); put(str(7, 9, 44));
    put(mov_i(2, 0)); put(mcr(CR_CONTROLB, 2));              // disable the coprocessor
    put(oi_virt(OI_METVM, 2)); put(ldr(10, 1, 0));            // refused: Undefined trap
    put(mov_i(2, 1)); put(mcr(CR_CONTROLB, 2));
    put(mrc(CR_CONTROLB, 7)); put(str(7, 9, 40));
    put(mrc(CR_VMT, 7)); put(str(7, 9, 12));
    put(mrc(CR_CONTROLA, 7)); put(str(7, 9, 16));
    put(br(pc, pc));
    pc = B2;
    put(sub_i(13, 13, 4)); put(str(14, 13, 0)); put(str(10, 9, 20));
    put(oi_virt(OI_METVI, 3)); put(mov_r(0, 0));
    put(mrc(CR_SAVEDSELF, 7)); put(str(7, 9, 24));
    // call into another instance: CRSavedSelf is kept on the stack meanwhile
    put(cpush(CR_SAVEDSELF));
    put(mov_i(2, INST_A)); put(oi_virt(OI_METVR, 1)); put(mov_r(10, 2));
    put(str(10, 9, 36));
    put(cpop(CR_SAVEDSELF));
    put(ldr(14, 13, 0)); put(retm()); put(add_i(13, 13, 4));
    pc = A1;
    put(str(10, 9, 32)); put(retm()); put(mov_r(0, 0));
    pc = B3;
    put(mrc(CR_SAVEDSELF, 7)); put(str(7, 9, 28)); put(retm()); put(mov_r(0, 0));
    pc = REC;
    put(sub_i(13, 13, 4)); put(str(14, 13, 0));
    put(sub_i(3, 3, 1)); put(cmp_i(3, 0));
    put(oi_stat(OI_METSI, pc, REC, NE)); put(mov_r(0, 0));
    put(add_i(4, 4, 1)); put(ldr(14, 13, 0)); put(retm()); put(add_i(13, 13, 4));
  endtask

  int unsigned n_push, n_accept;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_push   <= 0;
      n_accept <= 0;
    end else begin
      if (!drv_ext && ext_req.mreq && ext_req.rw && ext_rsp.ready) n_push <= n_push + 1;
      if (oi_accept) n_accept <= n_accept + 1;
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned depth;
    int unsigned depths [8];
    depths = '{1, 2, 255, 256, 257, 300, 0, 0};
    depths[6] = 1 + $urandom % 400; depths[7] = 1 + $urandom % 400;
    for (int run = 0; run < 8; run++) begin
      depth = depths[run];
      waits = $urandom % 4;
      rst_n = 1'b0;
      build(depth);
      repeat (3) @(posedge clk);
      rst_n = 1'b1;
      wait (halted);
      repeat (2) @(posedge clk);
      $display("run %0d: depth %0d, %0d wait states, %0d OIs accepted, %0d OCP stack writes", run, depth, waits, n_accept, n_push);
      check("Self after METVM/RETM", u_mem.mem[RES[13:2] + 0], INST_A);
      check("recursion returns", u_mem.mem[RES[13:2] + 1], depth);
      check("Self after METSM recursion", u_mem.mem[RES[13:2] + 2], INST_A);
      check("CRVmt after the last virtual call (METVR into A)", u_mem.mem[RES[13:2] + 3], VMT_A);
      check("CRControlA back at stack top", u_mem.mem[RES[13:2] + 4], STK);
      check("Self inside B2", u_mem.mem[RES[13:2] + 5], INST_B);
      check("CRSavedSelf in B2 after return from B3", u_mem.mem[RES[13:2] + 6], INST_A);
      check("CRSavedSelf inside B3", u_mem.mem[RES[13:2] + 7], {8'd1, INST_A[23:0]});
      check("Self inside A1 (METVR from B2)", u_mem.mem[RES[13:2] + 8], INST_A);
      check("Self in B2 after return from A1", u_mem.mem[RES[13:2] + 9], INST_B);
      check("OCP stack writes (2 service pushes + overflow)", n_push, 2 + ((depth - 1 >= 256) ? 1 : 0));
      check("OIs accepted", n_accept, 6 + 2 * depth);
      check("refused OI trapped", traps, 1);
      check("CRSelf at end", crself, INST_A);
      check("CRSelf pushed and popped", u_mem.mem[RES[13:2] + 11], INST_A);
      check("CRControlB re-enabled", u_mem.mem[RES[13:2] + 10], 1);
      check("stack pointer balanced", u_core.r[13], SP0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
