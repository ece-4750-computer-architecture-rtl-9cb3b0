// Self-checking testbench of the memory request/response network.
//
// Two networks run side by side.
//  * Banked (p_single_bank = 0, 4-byte messages): four requesters each issue
//    random reads and writes, one at a time, to their own address region,
//    which spreads over all four banks. Behavioural memories serve the banks.
//    Checks: each request reaches the bank named by address bits [5:4] with
//    the requester id in the top opaque bits, each response returns to its
//    requester with the data of a reference model, and every bank is used.
//  * Single bank (p_single_bank = 1, 16-byte messages): four requesters share
//    memory port 0. Checks: all requests reach port 0 and line data is right.
module tb_mem_net;
  import mcore_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int done_cnt = 0;
  int bank_hits [4];

  //------------------------------------------------------------------
  // banked network
  //------------------------------------------------------------------
  logic [3:0]   b_rq_val, b_rq_rdy, b_rs_val, b_rs_rdy, b_bq_val, b_bq_rdy, b_bs_val, b_bs_rdy;
  mem_req_4B_t  b_rq_msg [4], b_bq_msg [4];
  mem_resp_4B_t b_rs_msg [4], b_bs_msg [4];

  mem_net #(.req_t(mem_req_4B_t), .resp_t(mem_resp_4B_t), .p_single_bank(0)) banked (
    .clk, .reset,
    .req_in_val(b_rq_val), .req_in_rdy(b_rq_rdy), .req_in_msg(b_rq_msg),
    .resp_out_val(b_rs_val), .resp_out_rdy(b_rs_rdy), .resp_out_msg(b_rs_msg),
    .req_out_val(b_bq_val), .req_out_rdy(b_bq_rdy), .req_out_msg(b_bq_msg),
    .resp_in_val(b_bs_val), .resp_in_rdy(b_bs_rdy), .resp_in_msg(b_bs_msg)
  );

  for (genvar k = 0; k < 2; k++) begin : g_bankmem
    mem_req_4B_t  q [2];
    mem_resp_4B_t s [2];
    logic [1:0]   sv;
    assign q[0] = b_bq_msg[2*k];  assign q[1] = b_bq_msg[2*k+1];
    assign b_bs_msg[2*k] = s[0];  assign b_bs_msg[2*k+1] = s[1];
    assign b_bs_val[2*k +: 2] = sv;
    test_mem_4B #(.p_words(1024), .p_max_delay(3)) mem (
      .clk, .reset, .req_val(b_bq_val[2*k +: 2]), .req_rdy(b_bq_rdy[2*k +: 2]), .req_msg(q),
      .resp_val(sv), .resp_rdy(b_bs_rdy[2*k +: 2]), .resp_msg(s)
    );
  end

  // bank-side monitor
  always @(posedge clk) if (!reset)
    for (int j = 0; j < 4; j++) if (b_bq_val[j] && b_bq_rdy[j]) begin
      checks++;
      bank_hits[j]++;
      if (b_bq_msg[j].addr[5:4] != 2'(j) || b_bq_msg[j].opaque[7:6] != b_bq_msg[j].addr[11:10]) begin
        failures++;
        $display("FAIL: bank %0d got addr %h opaque %h", j, b_bq_msg[j].addr, b_bq_msg[j].opaque);
      end
    end

  logic [31:0] b_ref [1024];

  for (genvar i = 0; i < 4; i++) begin : g_breq
    initial begin
      b_rq_val[i] = 0;
      b_rs_rdy[i] = 1;
      wait (!reset);
      @(posedge clk); #1;
      for (int n = 0; n < 150; n++) begin
        logic [31:0] addr, data;
        bit wr;
        int w;
        addr = (32'(i) << 10) | (32'($urandom_range(255, 0)) << 2);
        w    = addr >> 2;
        wr   = $urandom_range(1, 0);
        data = $urandom;
        b_rq_msg[i] = '{typ: wr ? MEM_WRITE : MEM_READ, opaque: 8'(n & 63), addr: addr, len: 2'd0, data: data};
        b_rq_val[i] = 1;
        @(posedge clk);
        while (!b_rq_rdy[i]) @(posedge clk);
        #1 b_rq_val[i] = 0;
        while (!b_rs_val[i]) begin @(posedge clk); #1; end
        checks++;
        if (b_rs_msg[i].opaque[5:0] != 6'(n) || b_rs_msg[i].opaque[7:6] != 2'(i) ||
            (!wr && b_rs_msg[i].data != b_ref[w])) begin
          failures++;
          $display("FAIL: requester %0d response %p (ref %h)", i, b_rs_msg[i], b_ref[w]);
        end
        if (wr) b_ref[w] = data;
        @(posedge clk); #1;
      end
      done_cnt++;
    end
  end

  //------------------------------------------------------------------
  // single-bank network
  //------------------------------------------------------------------
  logic [3:0]    s_rq_val, s_rq_rdy, s_rs_val, s_rs_rdy, s_bq_val, s_bq_rdy, s_bs_val, s_bs_rdy;
  mem_req_16B_t  s_rq_msg [4], s_bq_msg [4];
  mem_resp_16B_t s_rs_msg [4], s_bs_msg [4];

  mem_net #(.req_t(mem_req_16B_t), .resp_t(mem_resp_16B_t), .p_single_bank(1)) single (
    .clk, .reset,
    .req_in_val(s_rq_val), .req_in_rdy(s_rq_rdy), .req_in_msg(s_rq_msg),
    .resp_out_val(s_rs_val), .resp_out_rdy(s_rs_rdy), .resp_out_msg(s_rs_msg),
    .req_out_val(s_bq_val), .req_out_rdy(s_bq_rdy), .req_out_msg(s_bq_msg),
    .resp_in_val(s_bs_val), .resp_in_rdy(s_bs_rdy), .resp_in_msg(s_bs_msg)
  );

  mem_req_16B_t  sm_q [2];
  mem_resp_16B_t sm_s [2];
  logic [1:0]    sm_qv, sm_qr, sm_sv, sm_sr;
  assign sm_q[0] = s_bq_msg[0];  assign sm_q[1] = '0;
  assign sm_qv = {1'b0, s_bq_val[0]};
  assign s_bq_rdy = {3'b000, sm_qr[0]};
  assign s_bs_val = {3'b000, sm_sv[0]};
  assign s_bs_msg[0] = sm_s[0];
  assign s_bs_msg[1] = '0; assign s_bs_msg[2] = '0; assign s_bs_msg[3] = '0;
  assign sm_sr = {1'b0, s_bs_rdy[0]};

  test_mem_16B #(.p_words(1024), .p_max_delay(3)) smem (
    .clk, .reset, .req_val(sm_qv), .req_rdy(sm_qr), .req_msg(sm_q),
    .resp_val(sm_sv), .resp_rdy(sm_sr), .resp_msg(sm_s)
  );

  always @(posedge clk) if (!reset)
    for (int j = 1; j < 4; j++) if (s_bq_val[j]) begin
      checks++; failures++;
      $display("FAIL: single-bank request on port %0d", j);
    end

  logic [127:0] s_ref [256];

  for (genvar i = 0; i < 4; i++) begin : g_sreq
    initial begin
      s_rq_val[i] = 0;
      s_rs_rdy[i] = 1;
      wait (!reset);
      @(posedge clk); #1;
      for (int n = 0; n < 100; n++) begin
        logic [31:0]  addr;
        logic [127:0] data;
        bit wr;
        int l;
        l    = i * 64 + $urandom_range(63, 0);
        addr = 32'(l) << 4;
        wr   = $urandom_range(1, 0);
        data = {$urandom, $urandom, $urandom, $urandom};
        s_rq_msg[i] = '{typ: wr ? MEM_WRITE : MEM_READ, opaque: 8'(n & 63), addr: addr, len: 4'd0, data: data};
        s_rq_val[i] = 1;
        @(posedge clk);
        while (!s_rq_rdy[i]) @(posedge clk);
        #1 s_rq_val[i] = 0;
        while (!s_rs_val[i]) begin @(posedge clk); #1; end
        checks++;
        if (s_rs_msg[i].opaque[7:6] != 2'(i) || (!wr && s_rs_msg[i].data != s_ref[l])) begin
          failures++;
          $display("FAIL: single-bank requester %0d line %0d", i, l);
        end
        if (wr) s_ref[l] = data;
        @(posedge clk); #1;
      end
      done_cnt++;
    end
  end

  initial begin
    for (int j = 0; j < 4; j++) bank_hits[j] = 0;
    for (int w = 0; w < 1024; w++) begin
      b_ref[w] = $urandom;
      g_bankmem[0].mem.m[w] = b_ref[w];
      g_bankmem[1].mem.m[w] = b_ref[w];
      smem.m[w] = $urandom;
    end
    for (int l = 0; l < 256; l++)
      s_ref[l] = {smem.m[4*l+3], smem.m[4*l+2], smem.m[4*l+1], smem.m[4*l]};
    repeat (3) @(posedge clk);
    reset = 0;
    wait (done_cnt == 8);
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (bank_hits[j] == 0) begin failures++; $display("FAIL: bank %0d never used", j); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
