// Self-checking testbench of the memory-request to network-message adapter.
//
// Random 4-byte requests go through a banked adapter (source 3) and a
// single-bank adapter (source 1). Checks: destination is address bits [5:4]
// in banked mode and 0 in single-bank mode, the source field and the top two
// opaque bits carry the source id, and every other field is unchanged.
module tb_mem_req_net_adapter;
  import mcore_pkg::*;

  mem_req_4B_t req;
  logic [$bits(mem_req_4B_t)+3:0] net_b, net_s;

  mem_req_net_adapter #(.req_t(mem_req_4B_t), .p_single_bank(0), .p_src_id(3)) banked (.req, .net_msg(net_b));
  mem_req_net_adapter #(.req_t(mem_req_4B_t), .p_single_bank(1), .p_src_id(1)) single (.req, .net_msg(net_s));

  int checks = 0, failures = 0;

  initial begin
    for (int n = 0; n < 200; n++) begin
      mem_req_4B_t exp_b, exp_s, got_b, got_s;
      req = '{typ: mem_type_e'($urandom_range(1, 0)), opaque: 8'($urandom), addr: $urandom,
              len: 2'($urandom), data: $urandom};
      #1;
      got_b = mem_req_4B_t'(net_b[$bits(mem_req_4B_t)-1:0]);
      got_s = mem_req_4B_t'(net_s[$bits(mem_req_4B_t)-1:0]);
      exp_b = req; exp_b.opaque[7:6] = 2'd3;
      exp_s = req; exp_s.opaque[7:6] = 2'd1;
      checks += 4;
      if (net_b[$bits(net_b)-1 -: 2] != req.addr[5:4]) begin failures++; $display("FAIL: banked dest"); end
      if (net_s[$bits(net_s)-1 -: 2] != 2'd0)          begin failures++; $display("FAIL: single dest"); end
      if (net_b[$bits(net_b)-3 -: 2] != 2'd3 || net_s[$bits(net_s)-3 -: 2] != 2'd1) begin
        failures++; $display("FAIL: src field");
      end
      if (got_b != exp_b || got_s != exp_s) begin failures++; $display("FAIL: payload %h", got_b); end
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
