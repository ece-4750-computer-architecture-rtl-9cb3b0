// End-to-end testbench of the quad-core system at its default size.
//
// All four cores run the same hand-assembled parallel vector add: each reads
// its core id and the core count (mfc0 $17 / $16), divides the 64 elements
// into equal chunks, adds its chunk of src0 and src1 into dest with the stats
// bit set, and raises its flag in a shared array. Core 0 then waits for the
// three other flags, reads all of dest back and sends the sum and an
// index-weighted sum to the manager; the testbench compares both with values
// computed here. The three arrays map onto the same data-cache sets, so the
// run also forces dirty write-backs.
//
// A two-port behavioural memory with random delays sits behind memreq0/1.
// The testbench counts how often each mechanism of the design happened and
// fails if one never did: instruction and data refills through the refill
// networks, data-cache write-backs, several caches waiting on one refill
// network, requests from every core reaching every bank, a request waiting
// at a busy data-cache bank, load-use stalls, taken-branch squashes, the stats
// bit, and instructions retired on every core.
module tb_proc_cache_net_alt;
  import mcore_pkg::*;
  import parc_asm_pkg::*;

  localparam int N_ELEM = 64;
  localparam int SRC0 = 32'h2000, SRC1 = 32'h2400, DEST = 32'h2800, FLAGS = 32'h3000;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;

  logic          m2p_val, m2p_rdy, p2m_val, p2m_rdy;
  logic [31:0]   m2p_msg, p2m_msg;
  logic [1:0]    mreq_val, mreq_rdy, mresp_val, mresp_rdy;
  mem_req_16B_t  mreq_msg  [2];
  mem_resp_16B_t mresp_msg [2];
  logic          stats_en;
  logic [3:0]    commit;

  proc_cache_net_alt dut (
    .clk, .reset,
    .mngr2proc_val(m2p_val), .mngr2proc_rdy(m2p_rdy), .mngr2proc_msg(m2p_msg),
    .proc2mngr_val(p2m_val), .proc2mngr_rdy(p2m_rdy), .proc2mngr_msg(p2m_msg),
    .memreq0_val (mreq_val[0]),  .memreq0_rdy (mreq_rdy[0]),  .memreq0_msg (mreq_msg[0]),
    .memresp0_val(mresp_val[0]), .memresp0_rdy(mresp_rdy[0]), .memresp0_msg(mresp_msg[0]),
    .memreq1_val (mreq_val[1]),  .memreq1_rdy (mreq_rdy[1]),  .memreq1_msg (mreq_msg[1]),
    .memresp1_val(mresp_val[1]), .memresp1_rdy(mresp_rdy[1]), .memresp1_msg(mresp_msg[1]),
    .stats_en, .commit
  );

  test_mem_16B #(.p_words(16384), .p_max_delay(3)) mem (
    .clk, .reset, .req_val(mreq_val), .req_rdy(mreq_rdy), .req_msg(mreq_msg),
    .resp_val(mresp_val), .resp_rdy(mresp_rdy), .resp_msg(mresp_msg)
  );

  assign m2p_val = 1'b0;
  assign m2p_msg = '0;
  assign p2m_rdy = 1'b1;

  int checks = 0, failures = 0;
  int unsigned pc;
  logic [31:0] exp_sum, exp_wsum;

  task automatic emit(logic [31:0] inst);
    mem.m[pc >> 2] = inst;
    pc += 4;
  endtask

  //------------------------------------------------------------------
  // mechanism counters
  //------------------------------------------------------------------
  int n_irefill, n_drefill, n_writeback, n_refill_contend, n_net_wait, n_ld_use, n_squash, n_stats;
  int n_commit [4];
  bit pair_seen [4][4];   // [core][bank]

  always @(posedge clk) if (!reset) begin
    if (mreq_val[0] && mreq_rdy[0]) n_irefill++;
    if (mreq_val[1] && mreq_rdy[1] && mreq_msg[1].typ == MEM_READ)  n_drefill++;
    if (mreq_val[1] && mreq_rdy[1] && mreq_msg[1].typ == MEM_WRITE) n_writeback++;
    if ($countones(dut.irefreq_val) >= 2 || $countones(dut.drefreq_val) >= 2) n_refill_contend++;
    if ((dut.dcreq_val & ~dut.dcreq_rdy) != 0) n_net_wait++;
    if (stats_en) n_stats++;
    for (int j = 0; j < 4; j++) begin
      if (commit[j]) n_commit[j]++;
      if (dut.dcreq_val[j] && dut.dcreq_rdy[j]) pair_seen[dut.dcreq_msg[j].opaque[7:6]][j] = 1;
    end
    if (dut.g_core[0].proc.val_D && dut.g_core[0].proc.ld_use_D) n_ld_use++;
    if (dut.g_core[1].proc.val_D && dut.g_core[1].proc.ld_use_D) n_ld_use++;
    if (dut.g_core[0].proc.squash_X || dut.g_core[3].proc.squash_X) n_squash++;
  end

  task automatic mechanism(string name, int count);
    checks++;
    $display("  %-34s %0d", name, count);
    if (count == 0) begin failures++; $display("FAIL: %s never happened", name); end
  endtask

  //------------------------------------------------------------------
  // manager output
  //------------------------------------------------------------------
  int got = 0;
  logic [31:0] msgs [2];
  always @(posedge clk) if (!reset && p2m_val) begin
    if (got < 2) msgs[got] = p2m_msg;
    got++;
  end

  int unsigned cycles = 0;
  always @(posedge clk) if (!reset) cycles++;

  initial begin
    int bne_end, bne_pos, w_loop, r_loop, l_loop;
    for (int i = 0; i < 16384; i++) mem.m[i] = 32'd0;
    exp_sum = 0; exp_wsum = 0;
    for (int i = 0; i < N_ELEM; i++) begin
      logic [31:0] a, b;
      a = $urandom; b = $urandom;
      mem.m[(SRC0 >> 2) + i] = a;
      mem.m[(SRC1 >> 2) + i] = b;
      exp_sum  += a + b;
      exp_wsum += (a + b) * 32'(i + 1);
    end
    for (int i = 0; i < 4; i++) n_commit[i] = 0;

    pc = 32'h200;
    emit(mfc0(1, 17));              // r1 = core id
    emit(mfc0(2, 16));              // r2 = number of cores
    emit(addiu(3, 0, N_ELEM));      // r3 = N
    emit(div(4, 3, 2));             // r4 = chunk
    emit(mul(5, 1, 4));             // r5 = first index
    emit(addu(6, 5, 4));            // r6 = end index
    emit(sll(7, 5, 2));
    emit(addiu(8, 7, SRC0));
    emit(addiu(9, 7, SRC1));
    emit(addiu(10, 7, DEST));
    emit(addiu(11, 0, 1));
    emit(mtc0(11, 21));             // stats on
    l_loop = pc;
    emit(lw(12, 0, 8));
    emit(lw(13, 0, 9));
    emit(addu(14, 12, 13));
    emit(sw(14, 0, 10));
    emit(addiu(8, 8, 4));
    emit(addiu(9, 9, 4));
    emit(addiu(10, 10, 4));
    emit(addiu(5, 5, 1));
    emit(bne(5, 6, (l_loop - (pc + 4)) / 4));
    emit(mtc0(0, 21));              // stats off
    emit(sll(15, 1, 2));
    emit(sw(11, FLAGS, 15));        // flag[id] = 1
    bne_pos = pc;
    emit(nop());                    // patched: workers branch to the end
    emit(addiu(16, 0, 1));          // core 0 waits for cores 1..3
    w_loop = pc;
    emit(sll(17, 16, 2));
    emit(lw(18, FLAGS, 17));
    emit(beq(18, 0, (w_loop - (pc + 4)) / 4));
    emit(addiu(16, 16, 1));
    emit(bne(16, 2, (w_loop - (pc + 4)) / 4));
    emit(addiu(19, 0, 0));          // reduction over dest
    emit(addiu(20, 0, 0));
    emit(addiu(21, 0, 0));
    emit(addiu(22, 0, DEST));
    r_loop = pc;
    emit(lw(23, 0, 22));
    emit(addu(19, 19, 23));
    emit(addiu(21, 21, 1));
    emit(mul(24, 23, 21));
    emit(addu(20, 20, 24));
    emit(addiu(22, 22, 4));
    emit(bne(21, 3, (r_loop - (pc + 4)) / 4));
    emit(mtc0(19, 2));
    emit(mtc0(20, 2));
    bne_end = pc;
    emit(j(pc));                    // everyone ends here
    mem.m[bne_pos >> 2] = bne(1, 0, (bne_end - (bne_pos + 4)) / 4);
  end

  initial begin
    repeat (3) @(posedge clk);
    reset = 1'b0;
    wait (got == 2);
    repeat (20) @(posedge clk);
    checks += 3;
    if (msgs[0] !== exp_sum)  begin failures++; $display("FAIL: sum %h expected %h", msgs[0], exp_sum); end
    if (msgs[1] !== exp_wsum) begin failures++; $display("FAIL: weighted sum %h expected %h", msgs[1], exp_wsum); end
    if (got != 2)             begin failures++; $display("FAIL: %0d manager messages", got); end
    $display("cycles %0d, instructions per core %0d %0d %0d %0d", cycles,
             n_commit[0], n_commit[1], n_commit[2], n_commit[3]);
    mechanism("instruction refills", n_irefill);
    mechanism("data refills", n_drefill);
    mechanism("data write-backs", n_writeback);
    mechanism("refill network contention", n_refill_contend);
    mechanism("request waiting at a busy bank", n_net_wait);
    mechanism("load-use stalls", n_ld_use);
    mechanism("taken-branch squashes", n_squash);
    mechanism("stats bit cycles", n_stats);
    for (int c = 0; c < 4; c++) begin
      automatic int banks = 0;
      for (int b = 0; b < 4; b++) banks += pair_seen[c][b];
      mechanism($sformatf("core %0d retired instructions", c), n_commit[c]);
      checks++;
      if (banks != 4) begin failures++; $display("FAIL: core %0d reached %0d banks", c, banks); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d manager messages", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
