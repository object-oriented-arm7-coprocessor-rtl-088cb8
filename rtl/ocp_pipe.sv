// ocp_pipe: Pipe 0, 1 and 2, the coprocessor's copy of the core's pipeline.
//
// Every opcode fetch the core completes on the internal bus (whether memory or
// the sequence generator supplied the word) is shifted in: the word, its
// address and whether the sequence generator made it. Pipe 0 then holds the
// instruction the core is decoding, Pipe 1 the one it executes and Pipe 2 the
// one that last left execution. The shift happens at the clock edge that
// ends the fetch cycle (fetch_fire). Reset fills all three with NOPs.
//
// Three registers that follow the core's fetches are from the description;
// tagging each entry with its address and origin is this design's choice (the
// sequencer uses them to find the ancillary instruction and its own words).
module ocp_pipe
  import ocp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            fetch_fire,  // an opcode fetch completes this cycle
  input  logic [XLEN-1:0] fetch_addr,
  input  logic [XLEN-1:0] fetch_data,
  input  logic            fetch_isg,   // the word came from the sequence generator
  output pipe_entry_t     pipe0,       // decode stage
  output pipe_entry_t     pipe1,       // execute stage
  output pipe_entry_t     pipe2        // last executed
);

  pipe_entry_t stage_q [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) stage_q[i] <= '{instr: ARM_NOP, addr: '0, isg: 1'b0};
    end else if (fetch_fire) begin
      stage_q[0] <= '{instr: fetch_data, addr: fetch_addr, isg: fetch_isg};
      stage_q[1] <= stage_q[0];
      stage_q[2] <= stage_q[1];
    end
  end

  assign pipe0 = stage_q[0];
  assign pipe1 = stage_q[1];
  assign pipe2 = stage_q[2];

endmodule
