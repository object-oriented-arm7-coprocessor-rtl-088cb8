// tb_ocp_pipe: random opcode fetches, some cycles without a fetch; a queue
// model of the last three fetched words checks Pipe 0, 1 and 2 every cycle,
// and the reset contents.
module tb_ocp_pipe;
  import ocp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic fetch_fire, fetch_isg;
  logic [31:0] fetch_addr, fetch_data;
  pipe_entry_t pipe0, pipe1, pipe2;
  pipe_entry_t model [3];
  int checks = 0, failures = 0;

  ocp_pipe dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fetch_fire = 0; fetch_isg = 0; fetch_addr = 0; fetch_data = 0;
    for (int i = 0; i < 3; i++) model[i] = '{instr: ARM_NOP, addr: '0, isg: 1'b0};
    #12 rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      checks++;
      if (pipe0 !== model[0] || pipe1 !== model[1] || pipe2 !== model[2]) begin
        failures++; $display("FAIL cycle %0d: %h %h %h", i, pipe0.instr, pipe1.instr, pipe2.instr);
      end
      fetch_fire = ($urandom % 4) != 0;
      fetch_addr = $urandom; fetch_data = $urandom; fetch_isg = 1'($urandom);
      @(posedge clk); #1;
      if (fetch_fire) begin
        model[2] = model[1]; model[1] = model[0];
        model[0] = '{instr: fetch_data, addr: fetch_addr, isg: fetch_isg};
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
