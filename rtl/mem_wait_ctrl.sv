// mem_wait_ctrl: the memory access controller on the external bus, which
// stretches every access by wait cycles.
//
// An access presented on the external bus is held for BASE_WAITS +
// extra_waits cycles with ready low, then passed to the memory in its last
// cycle (mem_req.mreq is high only then, so a write happens once). The
// memory's own ready can stretch that last cycle further; its read data goes
// straight back. The counter restarts after each completed access. Address,
// write data, direction and opcode flag pass through unchanged; only the
// request strobe and the ready are timed here.
// Cycles per access: 1 + BASE_WAITS + extra_waits with a memory that is
// always ready.
//
// From the description: the controller adds one wait cycle by default, and
// more can be set. The counter scheme and the extra_waits input are this
// design's choices.
module mem_wait_ctrl
  import ocp_pkg::*;
#(
  parameter int unsigned BASE_WAITS = 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic [3:0] extra_waits,
  input  bus_req_t req,       // external bus
  output bus_rsp_t rsp,
  output bus_req_t mem_req,   // to the memory devices
  input  bus_rsp_t mem_rsp
);

  logic [4:0] cnt_q;
  logic [4:0] need;
  logic       last;

  always_comb begin
    need            = 5'(BASE_WAITS) + {1'b0, extra_waits};
    last            = (cnt_q >= need);
    mem_req         = req;
    mem_req.mreq    = req.mreq && last;
    rsp.rdata       = mem_rsp.rdata;
    rsp.ready       = !req.mreq || (last && mem_rsp.ready);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         cnt_q <= '0;
    else if (req.mreq && rsp.ready)     cnt_q <= '0;
    else if (req.mreq && !last)         cnt_q <= cnt_q + 1'b1;
  end

endmodule
