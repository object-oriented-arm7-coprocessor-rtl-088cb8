// ext_mem_model: behavioural model of the external memory system, for
// testbenches: a word-addressed RAM behind a memory controller that inserts
// `waits` wait cycles (ready low) into every access. Reads are combinational
// in the cycle ready is high; writes happen at the end of that cycle.
// Addresses wrap modulo the RAM size. It counts accesses.
module ext_mem_model
  import ocp_pkg::*;
#(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    req,
  output bus_rsp_t    rsp,
  input  int unsigned waits,
  output int unsigned accesses
);

  logic [31:0] mem [WORDS];
  int unsigned cnt;
  logic [$clog2(WORDS)-1:0] idx;

  always_comb begin
    idx       = req.addr[$clog2(WORDS)+1:2];
    rsp.ready = !req.mreq || (cnt >= waits);
    rsp.rdata = mem[idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= 0;
      accesses <= 0;
    end else if (req.mreq) begin
      if (rsp.ready) begin
        cnt      <= 0;
        accesses <= accesses + 1;
        if (req.rw) mem[idx] <= req.wdata;
      end else begin
        cnt <= cnt + 1;
      end
    end
  end

endmodule
