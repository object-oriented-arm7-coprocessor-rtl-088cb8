// ocp_separator: the bus separator between the core's internal bus and the
// external system bus.
//
// Two enables from the coprocessor set its two directions. With drv_ext the
// core's requests reach the external bus; otherwise the coprocessor's own
// master port drives it. With drv_int the external replies (read data, ready)
// reach the core; otherwise the coprocessor answers the core itself (the
// instruction sequence generator acting in place of memory, or a value it
// serves to a core load). Both enables high is the normal connection, in
// which the coprocessor stays idle and the core owns the system.
//
// The separator being a two-way buffer under coprocessor control follows the
// description; having one enable per direction, and building it from
// multiplexers on point-to-point request and reply structures instead of
// tri-state lines, are this design's choices. Purely combinational.
module ocp_separator
  import ocp_pkg::*;
(
  input  logic     drv_ext,     // core request -> external bus
  input  logic     drv_int,     // external reply -> core
  // internal bus (core side)
  input  bus_req_t core_req,
  output bus_rsp_t core_rsp,
  // coprocessor side of both busses
  input  bus_req_t ocp_ext_req, // coprocessor as external bus master
  input  bus_rsp_t ocp_int_rsp, // coprocessor reply to the core
  // external bus (memory side)
  output bus_req_t ext_req,
  input  bus_rsp_t ext_rsp
);

  always_comb begin
    ext_req  = drv_ext ? core_req : ocp_ext_req;
    core_rsp = drv_int ? ext_rsp  : ocp_int_rsp;
  end

endmodule
