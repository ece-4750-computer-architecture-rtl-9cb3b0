// Sorting workload on the quad-core system: scalar against parallel.
//
// The same hand-assembled program runs twice on the full-size system, with a
// reset and a fresh memory image in between. A mode word in memory selects:
//  * scalar (mode 1): cores 1-3 stop at once; core 0 sorts all 64 elements;
//  * parallel (mode 4): every core sorts its quarter (found from mfc0 $17 and
//    $16), raises its flag, and core 0 waits for the other flags and then
//    merges the quarters with three calls of a merge routine (two pairs, then
//    the two halves).
// Each part is sorted with an insertion sort called through jal/jr. The sort
// runs with the stats bit set. Core 0 then streams the sorted array to the
// manager. The testbench checks the 64 values against its own sorted copy, both runs,
// and reports the cycles spent with the stats bit set. The parallel run must
// take fewer such cycles than the scalar one.
module tb_sort_workload;
  import mcore_pkg::*;
  import parc_asm_pkg::*;

  localparam int N_ELEM = 64;
  localparam int ARR = 32'h2000, TMP = 32'h2800, DST = 32'h2c00, FLAGS = 32'h3000, MODE = 32'h3100;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;

  logic          p2m_val;
  logic [31:0]   p2m_msg;
  logic [1:0]    mreq_val, mreq_rdy, mresp_val, mresp_rdy;
  mem_req_16B_t  mreq_msg  [2];
  mem_resp_16B_t mresp_msg [2];
  logic          stats_en, m2p_rdy;
  logic [3:0]    commit;

  proc_cache_net_alt dut (
    .clk, .reset,
    .mngr2proc_val(1'b0), .mngr2proc_rdy(m2p_rdy), .mngr2proc_msg(32'd0),
    .proc2mngr_val(p2m_val), .proc2mngr_rdy(1'b1), .proc2mngr_msg(p2m_msg),
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

  int checks = 0, failures = 0;

  //------------------------------------------------------------------
  // tiny assembler with labels
  //------------------------------------------------------------------
  int unsigned pc;
  int unsigned labels [string];
  typedef struct { int unsigned at; int kind; int rs; int rt; string name; } fixup_t;
  fixup_t fixups [$];

  task automatic emit(logic [31:0] inst);
    mem.m[pc >> 2] = inst;
    pc += 4;
  endtask
  task automatic label(string name);
    labels[name] = pc;
  endtask
  // kind 0: beq, 1: bne, 2: j, 3: jal
  task automatic to(int kind, int rs, int rt, string name);
    fixups.push_back('{at: pc, kind: kind, rs: rs, rt: rt, name: name});
    emit(nop());
  endtask
  task automatic resolve();
    foreach (fixups[k]) begin
      automatic fixup_t f = fixups[k];
      automatic int off = (int'(labels[f.name]) - int'(f.at + 4)) / 4;
      case (f.kind)
        0: mem.m[f.at >> 2] = beq(f.rs, f.rt, off);
        1: mem.m[f.at >> 2] = bne(f.rs, f.rt, off);
        2: mem.m[f.at >> 2] = j(labels[f.name]);
        default: mem.m[f.at >> 2] = jal(labels[f.name]);
      endcase
    end
    fixups.delete();
  endtask

  task automatic load_program();
    pc = 32'h200;
    emit(mfc0(1, 17));                // r1 = core id
    emit(mfc0(2, 16));                // r2 = core count
    emit(lw(3, MODE, 0));             // r3 = mode: 1 scalar, 4 parallel
    emit(addiu(11, 0, 1));
    emit(mtc0(11, 21));               // stats on
    to(1, 3, 11, "par");              // mode != 1: parallel
    to(1, 1, 0, "end");               // scalar: only core 0 works
    emit(addiu(8, 0, ARR));
    emit(addiu(9, 0, N_ELEM));
    to(3, 0, 0, "isort");
    emit(addiu(22, 0, ARR));          // result pointer
    to(0, 0, 0, "report");

    label("par");
    emit(addiu(9, 0, N_ELEM));
    emit(div(9, 9, 2));               // r9 = chunk
    emit(mul(8, 1, 9));
    emit(sll(8, 8, 2));
    emit(addiu(8, 8, ARR));           // r8 = &arr[id * chunk]
    to(3, 0, 0, "isort");
    emit(sll(15, 1, 2));
    emit(sw(11, FLAGS, 15));          // flag[id] = 1
    to(1, 1, 0, "end");
    emit(addiu(16, 0, 1));            // core 0: wait for the others
    label("wait");
    emit(sll(17, 16, 2));
    emit(lw(18, FLAGS, 17));
    to(0, 18, 0, "wait");
    emit(addiu(16, 16, 1));
    to(1, 16, 2, "wait");
    // merge quarters 0,1 -> TMP and 2,3 -> TMP+128, then halves -> DST
    emit(addiu(20, 0, ARR));       emit(addiu(21, 0, ARR + 64));
    emit(addiu(22, 0, ARR + 64));  emit(addiu(23, 0, ARR + 128));
    emit(addiu(24, 0, TMP));       to(3, 0, 0, "merge");
    emit(addiu(20, 0, ARR + 128)); emit(addiu(21, 0, ARR + 192));
    emit(addiu(22, 0, ARR + 192)); emit(addiu(23, 0, ARR + 256));
    emit(addiu(24, 0, TMP + 128)); to(3, 0, 0, "merge");
    emit(addiu(20, 0, TMP));       emit(addiu(21, 0, TMP + 128));
    emit(addiu(22, 0, TMP + 128)); emit(addiu(23, 0, TMP + 256));
    emit(addiu(24, 0, DST));       to(3, 0, 0, "merge");
    emit(addiu(22, 0, DST));

    label("report");                  // r22: sorted array
    emit(mtc0(0, 21));                // stats off
    emit(addiu(9, 0, N_ELEM));
    label("rloop");
    emit(lw(13, 0, 22));
    emit(mtc0(13, 2));
    emit(addiu(22, 22, 4));
    emit(addiu(9, 9, -1));
    to(1, 9, 0, "rloop");
    label("end");
    emit(mtc0(0, 21));
    label("spin");
    to(2, 0, 0, "spin");

    // insertion sort of r9 words at r8 (signed); clobbers r10-r16
    label("isort");
    emit(addiu(10, 0, 1));
    label("outer");
    emit(slt(11, 10, 9));
    to(0, 11, 0, "sdone");
    emit(sll(12, 10, 2));
    emit(addu(12, 12, 8));
    emit(lw(13, 0, 12));              // key
    emit(addiu(14, 12, -4));
    label("inner");
    emit(slt(15, 14, 8));
    to(1, 15, 0, "place");
    emit(lw(16, 0, 14));
    emit(slt(15, 13, 16));            // key < a[j]
    to(0, 15, 0, "place");
    emit(sw(16, 4, 14));
    emit(addiu(14, 14, -4));
    to(0, 0, 0, "inner");
    label("place");
    emit(sw(13, 4, 14));
    emit(addiu(10, 10, 1));
    to(0, 0, 0, "outer");
    label("sdone");
    emit(addiu(11, 0, 1));
    emit(jr(31));

    // merge [r20,r21) and [r22,r23) into r24; clobbers r25-r27
    label("merge");
    to(0, 20, 21, "copyb");
    to(0, 22, 23, "copya");
    emit(lw(25, 0, 20));
    emit(lw(26, 0, 22));
    emit(slt(27, 26, 25));
    to(1, 27, 0, "takeb");
    emit(sw(25, 0, 24));
    emit(addiu(20, 20, 4));
    emit(addiu(24, 24, 4));
    to(0, 0, 0, "merge");
    label("takeb");
    emit(sw(26, 0, 24));
    emit(addiu(22, 22, 4));
    emit(addiu(24, 24, 4));
    to(0, 0, 0, "merge");
    label("copya");
    to(0, 20, 21, "mdone");
    emit(lw(25, 0, 20));
    emit(sw(25, 0, 24));
    emit(addiu(20, 20, 4));
    emit(addiu(24, 24, 4));
    to(0, 0, 0, "copya");
    label("copyb");
    to(0, 22, 23, "mdone");
    emit(lw(26, 0, 22));
    emit(sw(26, 0, 24));
    emit(addiu(22, 22, 4));
    emit(addiu(24, 24, 4));
    to(0, 0, 0, "copyb");
    label("mdone");
    emit(jr(31));
    resolve();
  endtask

  //------------------------------------------------------------------
  // run control and checking
  //------------------------------------------------------------------
  int got;
  logic [31:0] sorted [N_ELEM];
  int unsigned stats_cycles;
  always @(posedge clk) if (!reset) begin
    if (stats_en) stats_cycles++;
    if (p2m_val) begin
      checks++;
      if (got >= N_ELEM || p2m_msg !== sorted[got]) begin
        failures++;
        $display("FAIL: element %0d got %h expected %h", got, p2m_msg, (got < N_ELEM) ? sorted[got] : 0);
      end
      got++;
    end
  end

  task automatic run(int mode, output int unsigned cyc);
    logic [31:0] vals [$];
    reset = 1'b1;
    for (int i = 0; i < 16384; i++) mem.m[i] = 32'd0;
    load_program();
    mem.m[MODE >> 2] = mode;
    for (int i = 0; i < N_ELEM; i++) begin
      automatic logic [31:0] v = $urandom_range(2000, 0) - 1000;
      mem.m[(ARR >> 2) + i] = v;
      vals.push_back(v);
    end
    for (int i = 0; i < N_ELEM; i++) sorted[i] = vals[i];
    for (int i = 1; i < N_ELEM; i++)          // reference: signed insertion sort
      for (int k = i; k > 0 && $signed(sorted[k]) < $signed(sorted[k-1]); k--) begin
        automatic logic [31:0] t = sorted[k];
        sorted[k] = sorted[k-1];
        sorted[k-1] = t;
      end
    repeat (3) @(posedge clk);
    got = 0;
    stats_cycles = 0;
    #1 reset = 1'b0;
    wait (got == N_ELEM);
    repeat (20) @(posedge clk);
    checks++;
    if (got != N_ELEM) begin failures++; $display("FAIL: %0d values reported", got); end
    cyc = stats_cycles;
  endtask

  initial begin
    int unsigned scalar_cyc, parallel_cyc;
    run(1, scalar_cyc);
    run(4, parallel_cyc);
    $display("sort of %0d elements: scalar %0d cycles, parallel %0d cycles (stats bit set on core 0)",
             N_ELEM, scalar_cyc, parallel_cyc);
    checks++;
    if (!(parallel_cyc < scalar_cyc)) begin failures++; $display("FAIL: no speedup"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d values", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
