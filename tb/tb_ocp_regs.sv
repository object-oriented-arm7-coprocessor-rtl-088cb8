// tb_ocp_regs: random load enables and service writes on the coprocessor
// registers against a model; checks every register, the MRC read port for
// each register number, the priority of a service write, and reset values.
module tb_ocp_regs;
  import ocp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic self_we, vmt_we, rtemp_we, sp_we, mcr_we;
  logic [31:0] self_d, vmt_d, rtemp_d, sp_d, mcr_data, savedself;
  logic [2:0] cr_sel;
  logic [31:0] crself, crvmt, rtemp, ctrla, ctrlb, rd_data;
  logic [31:0] m [5];
  int checks = 0, failures = 0;

  ocp_regs dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {self_we, vmt_we, rtemp_we, sp_we, mcr_we} = '0;
    self_d = 0; vmt_d = 0; rtemp_d = 0; sp_d = 0; mcr_data = 0; savedself = 0; cr_sel = 0;
    m = '{0, 0, 0, 0, 1};   // CRSelf, RTemp, CRVmt, CRControlA, CRControlB
    #12 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (crself !== m[0] || rtemp !== m[1] || crvmt !== m[2] || ctrla !== m[3] || ctrlb !== m[4]) begin
        failures++; $display("FAIL step %0d regs %h %h %h %h %h", i, crself, rtemp, crvmt, ctrla, ctrlb);
      end
      cr_sel = 3'($urandom % 6); savedself = $urandom; #1;
      checks++;
      case (cr_sel)
        0: if (rd_data !== m[0]) failures++;
        1: if (rd_data !== savedself) failures++;
        2: if (rd_data !== m[2]) failures++;
        3: if (rd_data !== m[3]) failures++;
        4: if (rd_data !== m[4]) failures++;
        default: if (rd_data !== 0) failures++;
      endcase
      {self_we, vmt_we, rtemp_we, sp_we} = 4'($urandom);
      mcr_we = ($urandom % 3) == 0;
      self_d = $urandom; vmt_d = $urandom; rtemp_d = $urandom; sp_d = $urandom; mcr_data = $urandom;
      @(posedge clk); #1;
      if (mcr_we && cr_sel == 0) m[0] = mcr_data; else if (self_we) m[0] = self_d;
      if (mcr_we && cr_sel == 2) m[2] = mcr_data; else if (vmt_we) m[2] = vmt_d;
      if (rtemp_we) m[1] = rtemp_d;
      if (mcr_we && cr_sel == 3) m[3] = mcr_data; else if (sp_we) m[3] = sp_d;
      if (mcr_we && cr_sel == 4) m[4] = mcr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
