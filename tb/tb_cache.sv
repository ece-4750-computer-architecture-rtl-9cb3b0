// Self-checking testbench of the blocking write-back cache.
//
// Two caches are tested side by side: one built with a single bank (the
// instruction-cache configuration) and one with four banks, fed only
// addresses whose bank bits select bank 2. Each receives a random stream of
// word, halfword and byte reads and writes over an address range four times
// the cache size, so lines conflict and dirty victims are written back; a
// word array next to each cache is the reference. After every access the same
// address is read again: that read must hit (test bit) and its response must
// be valid in the third cycle after the one that accepts the request, the
// four-cycle hit of this cache.
module tb_cache;
  import mcore_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int hits_checked = 0, evictions = 0;
  bit finished [2];

  for (genvar g = 0; g < 2; g++) begin : g_t
    localparam int unsigned NB = (g == 0) ? 1 : 4;

    logic          creq_val, creq_rdy, cresp_val, cresp_rdy;
    mem_req_4B_t   creq_msg;
    mem_resp_4B_t  cresp_msg;
    logic [1:0]    mreq_val, mreq_rdy, mresp_val, mresp_rdy;
    mem_req_16B_t  mreq_msg  [2];
    mem_resp_16B_t mresp_msg [2];

    cache #(.p_num_banks(NB)) dut (
      .clk, .reset,
      .cachereq_val (creq_val),     .cachereq_rdy (creq_rdy),     .cachereq_msg (creq_msg),
      .cacheresp_val(cresp_val),    .cacheresp_rdy(cresp_rdy),    .cacheresp_msg(cresp_msg),
      .memreq_val   (mreq_val[0]),  .memreq_rdy   (mreq_rdy[0]),  .memreq_msg   (mreq_msg[0]),
      .memresp_val  (mresp_val[0]), .memresp_rdy  (mresp_rdy[0]), .memresp_msg  (mresp_msg[0])
    );

    assign mreq_val[1]  = 1'b0;
    assign mreq_msg[1]  = '0;
    assign mresp_rdy[1] = 1'b0;

    test_mem_16B #(.p_words(4096), .p_max_delay(2)) mem (
      .clk, .reset, .req_val(mreq_val), .req_rdy(mreq_rdy), .req_msg(mreq_msg),
      .resp_val(mresp_val), .resp_rdy(mresp_rdy), .resp_msg(mresp_msg)
    );

    logic [31:0] ref_m [4096];

    always @(posedge clk) if (!reset && mreq_val[0] && mreq_rdy[0] && mreq_msg[0].typ == MEM_WRITE)
      evictions++;

    // one access; lat counts clock edges from the accepting edge to the first
    // edge with the response valid: 2 means valid in the third cycle after acceptance
    task automatic access(input mem_type_e typ, input logic [31:0] addr, input logic [1:0] len,
                          input logic [31:0] data, output mem_resp_4B_t resp, output int lat);
      creq_msg = '{typ: typ, opaque: 8'(addr), addr: addr, len: len, data: data};
      creq_val = 1'b1;
      @(posedge clk);
      while (!creq_rdy) @(posedge clk);
      #1 creq_val = 1'b0;
      lat = 0;
      while (!cresp_val) begin @(posedge clk); #1 lat++; end
      resp = cresp_msg;
      @(posedge clk); #1;
    endtask

    function automatic logic [31:0] mask(logic [1:0] len);
      return (len == 1) ? 32'hff : (len == 2) ? 32'hffff : 32'hffff_ffff;
    endfunction

    initial begin
      mem_resp_4B_t r;
      int lat;
      creq_val  = 1'b0;
      cresp_rdy = 1'b1;
      for (int i = 0; i < 4096; i++) begin
        ref_m[i]   = $urandom;
        mem.m[i]   = ref_m[i];
      end
      wait (!reset);
      @(posedge clk); #1;
      for (int n = 0; n < 400; n++) begin
        logic [31:0] addr, data, wd, word;
        logic [1:0]  len;
        logic [3:0]  be;
        bit          wr;
        addr = $urandom_range(1023, 0) & ~32'h3;          // 4 x 256 bytes
        if (NB == 4)                                        // 64 lines of bank 2
          addr = (32'($urandom_range(63, 0)) << 6) | 32'h20 | (addr & 32'hc);
        addr = addr & 32'hfff;
        len  = 2'($urandom_range(2, 0));
        if (len == 1) addr[1:0] = 2'($urandom_range(3, 0));
        if (len == 2) addr[1:0] = {1'($urandom_range(1, 0)), 1'b0};
        wr   = $urandom_range(1, 0);
        data = $urandom;
        access(wr ? MEM_WRITE : MEM_READ, addr, len, data, r, lat);
        checks++;
        if (r.opaque !== 8'(addr) || r.typ !== (wr ? MEM_WRITE : MEM_READ)) begin
          failures++; $display("FAIL[%0d]: opaque/type not echoed", NB);
        end
        word = ref_m[addr >> 2];
        if (wr) begin
          be = (len == 1) ? (4'b0001 << addr[1:0]) : (len == 2) ? (4'b0011 << addr[1:0]) : 4'b1111;
          wd = data << (8 * addr[1:0]);
          for (int b = 0; b < 4; b++) if (be[b]) word[8*b +: 8] = wd[8*b +: 8];
          ref_m[addr >> 2] = word;
        end else begin
          checks++;
          if (((r.data ^ (word >> (8 * addr[1:0]))) & mask(len)) != 0) begin
            failures++;
            $display("FAIL[%0d]: read %h len %0d got %h ref word %h", NB, addr, len, r.data, word);
          end
        end
        // immediate re-read must hit with the four-cycle latency
        access(MEM_READ, addr & ~32'h3, 2'd0, 32'd0, r, lat);
        checks++;
        hits_checked++;
        if (!r.test[0] || lat != 2 || r.data !== ref_m[addr >> 2]) begin
          failures++;
          $display("FAIL[%0d]: re-read %h hit=%0d lat=%0d data %h ref %h", NB, addr, r.test[0], lat,
                   r.data, ref_m[addr >> 2]);
        end
      end
      finished[g] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    reset = 1'b0;
    wait (finished[0] && finished[1]);
    checks++;
    if (evictions == 0) begin failures++; $display("FAIL: no dirty eviction happened"); end
    $display("hit checks %0d, write-backs %0d", hits_checked, evictions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
