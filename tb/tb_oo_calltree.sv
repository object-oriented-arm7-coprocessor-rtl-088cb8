// tb_oo_calltree: random call trees on the whole system.
//
// One method body, M, is shared by four instances through a common VMT (index
// 1). M is a small interpreter of a script in memory, built at random by the
// testbench. At each step it reads one word:
//   0            return (RETM);
//   1            call M again on the same instance (METVI);
//   pointer      call M on the instance the pointer names (METVM, the
//                ancillary LDR R10 fetches the new Self).
// M is not a leaf, so its entry and exit code keep R14 on the core's stack
// and CRSavedSelf on the coprocessor's stack (PUSH/POP service
// instructions). M writes the Self it sees to a log at entry, after every
// call returns and before its own return; the testbench works out the same
// log from the script and compares every word. Each run draws a new tree
// (up to 6 calls deep, at most 150 calls); the runs cycle through 1, 2 and 3
// wait states, on the top at its default parameters.
module tb_oo_calltree;
  import ocp_pkg::*;
  import arm_asm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_req_t core_req, mem_req;
  bus_rsp_t core_rsp, mem_rsp;
  logic cpi, cpa, cpb, halted, e_valid, ocp_busy, oi_accept, oi_refuse, bus_split;
  logic [31:0] e_pc, crself, crsavedself;
  logic [3:0] extra_waits;
  int unsigned traps, accesses;

  arm7_core_model u_core (.clk, .rst_n, .req(core_req), .rsp(core_rsp), .cpi, .cpa, .cpb,
                          .halted, .e_pc_o(e_pc), .e_valid_o(e_valid), .traps);
  oo_system dut (.clk, .rst_n, .core_req, .core_rsp, .cpi, .cpa, .cpb,
                 .extra_waits, .mem_req, .mem_rsp,
                 .ocp_busy, .oi_accept, .oi_refuse, .bus_split, .crself, .crsavedself);
  ext_mem_model #(.WORDS(4096)) u_mem (.clk, .rst_n, .req(mem_req), .rsp(mem_rsp), .waits(0), .accesses);

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  localparam logic [31:0] MAIN = 32'h100, M = 32'h400, SAME = 32'h480, RET = 32'h500,
                          SCR = 32'h0C00, LOG = 32'h1400, INST0 = 32'h2000, PTRS = 32'h2200,
                          VMT = 32'h3000, SP0 = 32'h3E00, STK = 32'h3F00, RES = 32'h3F80;
  localparam int MAX_DEPTH = 6, MAX_CALLS = 150;

  function automatic logic [31:0] inst(int k); return INST0 + 32'(k) * 32'h40; endfunction
  // instance pointers, 0x100 apart so that MOV can load each one
  function automatic logic [31:0] ptr(int k); return PTRS + 32'(k) * 32'h100; endfunction

  logic [31:0] pc;
  logic [31:0] script [$];
  logic [31:0] expect_log [$];
  int unsigned n_calls, n_same, n_other;

  task automatic put(logic [31:0] w); u_mem.mem[pc[13:2]] = w; pc += 4; endtask
  task automatic wr(logic [31:0] a, logic [31:0] w); u_mem.mem[a[13:2]] = w; endtask

  // random script and the log the program must write
  function automatic void gen(logic [31:0] self, int depth);
    int steps;
    expect_log.push_back(self);
    steps = (depth >= MAX_DEPTH) ? 0 : (depth == 0) ? 1 + int'($urandom % 3) : int'($urandom % 4);
    for (int s = 0; s < steps && n_calls < MAX_CALLS; s++) begin
      n_calls++;
      if ($urandom % 2 == 0) begin
        n_same++;
        script.push_back(32'd1);
        gen(self, depth + 1);
      end else begin
        int k;
        k = int'($urandom % 4);
        n_other++;
        script.push_back(ptr(k));
        gen(inst(k), depth + 1);
      end
      expect_log.push_back(self);
    end
    script.push_back(32'd0);
    expect_log.push_back(self);
  endfunction

  task automatic build(int k0);
    logic [31:0] loop;
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = ARM_NOP;
    for (int k = 0; k < 4; k++) begin
      wr(inst(k), VMT);
      wr(ptr(k), inst(k));
    end
    wr(VMT + 4, M);
    foreach (script[i]) wr(SCR + 32'(4 * i), script[i]);
    pc = 0; put(br(0, MAIN));
    pc = MAIN;
    put(mov_i(13, SP0)); put(mov_i(0, STK)); put(mcr(CR_CONTROLA, 0));
    put(mov_i(5, SCR)); put(mov_i(6, LOG));
    put(mov_i(10, INST0)); put(mcr(CR_SELF, 10));
    put(mov_i(7, ptr(k0)));
    put(oi_virt(OI_METVM, 1)); put(ldr(10, 7, 0));
    put(str(10, 6, 0)); put(add_i(6, 6, 4));
    put(mrc(CR_CONTROLA, 7)); put(mov_i(8, RES)); put(str(7, 8, 0));
    put(br(pc, pc));
    // M: entry code, then the script loop
    pc = M;
    put(sub_i(13, 13, 4)); put(str(14, 13, 0)); put(cpush(CR_SAVEDSELF));
    put(str(10, 6, 0)); put(add_i(6, 6, 4));
    loop = pc;
    put(ldr(7, 5, 0)); put(add_i(5, 5, 4));
    put(cmp_i(7, 0)); put(dpi(4'hD, 4'd15, 4'd0, RET, EQ));
    put(cmp_i(7, 1)); put(dpi(4'hD, 4'd15, 4'd0, SAME, EQ));
    put(oi_virt(OI_METVM, 1)); put(ldr(10, 7, 0));
    put(str(10, 6, 0)); put(add_i(6, 6, 4)); put(br(pc, loop));
    pc = SAME;
    put(oi_virt(OI_METVI, 1)); put(mov_r(0, 0));
    put(str(10, 6, 0)); put(add_i(6, 6, 4)); put(br(pc, loop));
    pc = RET;
    put(str(10, 6, 0)); put(add_i(6, 6, 4));
    put(cpop(CR_SAVEDSELF)); put(ldr(14, 13, 0)); put(retm()); put(add_i(13, 13, 4));
  endtask

  int unsigned n_accept;
  always @(posedge clk) begin
    if (!rst_n) n_accept <= 0;
    else if (oi_accept) n_accept <= n_accept + 1;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k0;
    for (int run = 0; run < 12; run++) begin
      script.delete(); expect_log.delete();
      n_calls = 0; n_same = 0; n_other = 0;
      k0 = int'($urandom % 4);
      gen(inst(k0), 0);
      expect_log.push_back(INST0);
      extra_waits = 4'(run % 3);
      rst_n = 1'b0;
      build(k0);
      repeat (3) @(posedge clk);
      rst_n = 1'b1;
      wait (halted);
      repeat (2) @(posedge clk);
      $display("run %0d: %0d wait states, %0d calls (%0d same-instance), %0d log words",
               run, extra_waits + 1, n_calls + 1, n_same, expect_log.size());
      foreach (expect_log[i]) check($sformatf("log word %0d", i), u_mem.mem[(LOG >> 2) + 32'(i)], expect_log[i]);
      check("OIs accepted", n_accept, 2 * (n_calls + 1));
      check("coprocessor stack pointer balanced", u_mem.mem[RES[13:2]], STK);
      check("core stack pointer balanced", u_core.r[13], SP0);
      check("no traps", traps, 0);
      check("CRSelf at end", crself, INST0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
