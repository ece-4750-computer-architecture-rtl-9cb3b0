// Self-checking testbench of the memory-response to network-message adapter.
//
// Random 16-byte responses go through the adapter of node 2. Checks: the
// destination is the top two opaque bits, the source field is 2 and the
// response is carried unchanged.
module tb_mem_resp_net_adapter;
  import mcore_pkg::*;

  mem_resp_16B_t resp;
  logic [$bits(mem_resp_16B_t)+3:0] net;

  mem_resp_net_adapter #(.resp_t(mem_resp_16B_t), .p_src_id(2)) dut (.resp, .net_msg(net));

  int checks = 0, failures = 0;

  initial begin
    for (int n = 0; n < 200; n++) begin
      resp = '{typ: mem_type_e'($urandom_range(1, 0)), opaque: 8'($urandom), test: 2'($urandom),
               len: 4'($urandom), data: {$urandom, $urandom, $urandom, $urandom}};
      #1;
      checks += 3;
      if (net[$bits(net)-1 -: 2] != resp.opaque[7:6]) begin failures++; $display("FAIL: dest"); end
      if (net[$bits(net)-3 -: 2] != 2'd2)            begin failures++; $display("FAIL: src"); end
      if (mem_resp_16B_t'(net[$bits(mem_resp_16B_t)-1:0]) != resp) begin failures++; $display("FAIL: payload"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
