// oo_system: the object-oriented processor around an ARM7-class core.
//
// The core itself is outside this module: its internal bus and coprocessor
// handshake are ports. Between the internal bus and the external system bus
// sits the separator; the Object Coprocessor watches the internal bus, drives
// the separator's two enables and can master the external bus. With no Object
// Instruction running the separator is closed and the core owns the system;
// during one the coprocessor splits the bus, feeds the core generated
// instructions and walks the object tables in external memory in parallel.
// The coprocessor also takes the bus for the single memory access of a
// PUSH/POP service instruction while it holds the core with cpb.
//
// The external bus ends in the memory access controller, which adds one wait
// cycle to every access plus extra_waits more.
//
// Interface: core_req/core_rsp is the core's bus (a request held until a
// cycle with ready = 1), cpi/cpa/cpb the coprocessor handshake, mem_req/mem_rsp
// the port to the memory devices behind the access controller. Status outputs show when an OI is
// accepted or a coprocessor instruction refused, and the Self registers.
//
// The connection (core, separator, coprocessor on both busses, control signals
// between core and coprocessor) follows the description's system block
// diagram, the default wait cycle the description's figures for the memory
// controller; the signal set is this design's.
module oo_system
  import ocp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // ARM7 core side
  input  bus_req_t core_req,
  output bus_rsp_t core_rsp,
  input  logic     cpi,
  output logic     cpa,
  output logic     cpb,
  // memory devices behind the memory access controller
  input  logic [3:0] extra_waits,
  output bus_req_t mem_req,
  input  bus_rsp_t mem_rsp,
  // status
  output logic     ocp_busy,
  output logic     oi_accept,
  output logic     oi_refuse,
  output logic     bus_split,
  output logic [XLEN-1:0] crself,
  output logic [XLEN-1:0] crsavedself
);

  bus_rsp_t ocp_int_rsp, ext_rsp;
  bus_req_t ocp_ext_req, ext_req;
  logic     drv_ext, drv_int;

  ocp u_ocp (
    .clk, .rst_n,
    .cpi, .cpa, .cpb,
    .core_req, .core_rsp,
    .ocp_int_rsp, .ocp_ext_req, .ext_rsp,
    .drv_ext, .drv_int,
    .busy (ocp_busy), .oi_accept, .oi_refuse,
    .crself, .crsavedself
  );

  ocp_separator u_sep (
    .drv_ext, .drv_int,
    .core_req, .core_rsp,
    .ocp_ext_req, .ocp_int_rsp,
    .ext_req, .ext_rsp
  );

  mem_wait_ctrl u_wait (
    .clk, .rst_n, .extra_waits,
    .req (ext_req), .rsp (ext_rsp),
    .mem_req, .mem_rsp
  );

  assign bus_split = !drv_ext;

endmodule
