// tb_mem_wait_ctrl: reads and writes through the controller to a RAM model
// that is always ready, for 0..3 extra wait cycles; checks the data, that each
// access takes 1 + 1 + extra_waits cycles, and that each write reaches the
// memory exactly once.
module tb_mem_wait_ctrl;
  import ocp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] extra_waits;
  bus_req_t req, mem_req;
  bus_rsp_t rsp, mem_rsp;
  int unsigned accesses;
  int checks = 0, failures = 0;

  mem_wait_ctrl dut (.*);
  ext_mem_model #(.WORDS(256)) u_mem (.clk, .rst_n, .req(mem_req), .rsp(mem_rsp), .waits(0), .accesses);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(logic rw, logic [31:0] addr, logic [31:0] wdata, output logic [31:0] rdata, output int cycles);
    @(posedge clk); #1;
    req = '{addr: addr, wdata: wdata, mreq: 1'b1, rw: rw, opc: 1'b0};
    cycles = 0;
    do begin
      @(negedge clk);
      cycles++;
    end while (!rsp.ready);
    rdata = rsp.rdata;
    @(posedge clk); #1;
    req.mreq = 1'b0;
  endtask

  initial begin
    logic [31:0] golden [64];
    logic [31:0] rd;
    int cyc;
    int unsigned acc0;
    req = '0; extra_waits = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 64; i++) begin golden[i] = $urandom; end
    for (int w = 0; w < 4; w++) begin
      extra_waits = 4'(w);
      for (int i = 0; i < 64; i++) begin
        acc0 = accesses;
        access(1'b1, 32'(i * 4), golden[i] + 32'(w), rd, cyc);
        checks++; if (cyc != 2 + w) begin failures++; $display("FAIL write took %0d cycles, waits %0d", cyc, w); end
        checks++; if (accesses != acc0 + 1) begin failures++; $display("FAIL write reached memory %0d times", accesses - acc0); end
      end
      for (int i = 0; i < 64; i++) begin
        access(1'b0, 32'(i * 4), 0, rd, cyc);
        checks++; if (cyc != 2 + w) begin failures++; $display("FAIL read took %0d cycles", cyc); end
        checks++; if (rd !== golden[i] + 32'(w)) begin failures++; $display("FAIL read data %h", rd); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
