// tb_ocp_separator: random requests and replies on all four sides and every
// setting of the two enables; checks which side reaches the external bus and
// which reply reaches the core.
module tb_ocp_separator;
  import ocp_pkg::*;
  logic drv_ext, drv_int;
  bus_req_t core_req, ocp_ext_req, ext_req;
  bus_rsp_t core_rsp, ocp_int_rsp, ext_rsp;
  int checks = 0, failures = 0;

  ocp_separator dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      core_req    = {$urandom, $urandom, 3'($urandom)};
      ocp_ext_req = {$urandom, $urandom, 3'($urandom)};
      ext_rsp     = {$urandom, 1'($urandom)};
      ocp_int_rsp = {$urandom, 1'($urandom)};
      drv_ext     = 1'(i % 2);
      drv_int     = 1'((i / 2) % 2);
      #1;
      checks++;
      if (ext_req !== (drv_ext ? core_req : ocp_ext_req)) begin
        failures++; $display("FAIL ext_req drv_ext=%b", drv_ext);
      end
      checks++;
      if (core_rsp !== (drv_int ? ext_rsp : ocp_int_rsp)) begin
        failures++; $display("FAIL core_rsp drv_int=%b", drv_int);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
