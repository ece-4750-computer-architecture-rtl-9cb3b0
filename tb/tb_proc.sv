// Self-checking testbench of the pipelined processor.
//
// Runs a hand-assembled program from a behavioural memory with random
// response delays. The program covers ALU and immediate operations, shifts,
// multiply and divide, bypassing (back-to-back dependences), a load-use stall,
// byte and halfword loads and stores, a counted loop, taken and not-taken
// branches of every kind, j, jal, jr and jalr, the coprocessor-0 moves
// (manager input and output, core count, core id, stats bit). Every result
// is sent out with mtc0 $x,$2 and compared with values worked out here.
// Also checks that two back-to-back independent ALU instructions commit in
// consecutive cycles once they are fetched, and that the stats bit was seen.
module tb_proc;
  import mcore_pkg::*;
  import parc_asm_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;

  logic         m2p_val, m2p_rdy, p2m_val, p2m_rdy;
  logic [31:0]  m2p_msg, p2m_msg;
  logic [1:0]   req_val, req_rdy, resp_val, resp_rdy;
  mem_req_4B_t  req_msg  [2];
  mem_resp_4B_t resp_msg [2];
  logic         stats_en, commit;

  proc #(.p_num_cores(4), .p_core_id(2)) dut (
    .clk, .reset,
    .mngr2proc_val(m2p_val), .mngr2proc_rdy(m2p_rdy), .mngr2proc_msg(m2p_msg),
    .proc2mngr_val(p2m_val), .proc2mngr_rdy(p2m_rdy), .proc2mngr_msg(p2m_msg),
    .imemreq_val (req_val[0]),  .imemreq_rdy (req_rdy[0]),  .imemreq_msg (req_msg[0]),
    .imemresp_val(resp_val[0]), .imemresp_rdy(resp_rdy[0]), .imemresp_msg(resp_msg[0]),
    .dmemreq_val (req_val[1]),  .dmemreq_rdy (req_rdy[1]),  .dmemreq_msg (req_msg[1]),
    .dmemresp_val(resp_val[1]), .dmemresp_rdy(resp_rdy[1]), .dmemresp_msg(resp_msg[1]),
    .stats_en, .commit
  );

  test_mem_4B #(.p_words(4096), .p_max_delay(2)) mem (
    .clk, .reset, .req_val, .req_rdy, .req_msg, .resp_val, .resp_rdy, .resp_msg
  );

  int checks = 0, failures = 0;
  logic [31:0] expected [$];
  logic [31:0] m2p_data [$];
  int unsigned pc;

  task automatic emit(logic [31:0] inst);
    mem.m[pc >> 2] = inst;
    pc += 4;
  endtask

  // manager input stream
  int m2p_idx = 0;
  assign m2p_val = (m2p_idx < m2p_data.size());
  assign m2p_msg = m2p_val ? m2p_data[m2p_idx] : 32'd0;
  always @(posedge clk) if (!reset && m2p_val && m2p_rdy) m2p_idx <= m2p_idx + 1;

  // manager output stream: compare in order
  int  got = 0;
  bit  done = 0;
  assign p2m_rdy = 1'b1;
  always @(posedge clk) if (!reset && p2m_val) begin
    checks++;
    if (got >= expected.size()) begin
      failures++;
      $display("FAIL: unexpected message %h", p2m_msg);
    end else if (p2m_msg !== expected[got]) begin
      failures++;
      $display("FAIL: message %0d got %h expected %h", got, p2m_msg, expected[got]);
    end
    got++;
    if (got == expected.size()) done = 1;
  end

  int stats_cycles = 0;
  always @(posedge clk) if (!reset && stats_en) stats_cycles++;

  // back-to-back commit observation
  int max_run = 0, run = 0;
  always @(posedge clk) if (!reset) begin
    run = commit ? run + 1 : 0;
    if (run > max_run) max_run = run;
  end

  initial begin
    for (int i = 0; i < 4096; i++) mem.m[i] = 32'd0;
    mem.m[32'h2004 >> 2] = 32'h1122_3344;
    m2p_data.push_back(5);
    m2p_data.push_back(7);

    pc = 32'h200;
    emit(mfc0(1, 1));
    emit(mfc0(2, 1));
    emit(addu(3, 1, 2));
    emit(mtc0(3, 2));            expected.push_back(12);
    emit(subu(4, 3, 1));
    emit(sll(5, 4, 3));
    emit(mtc0(5, 2));            expected.push_back(56);
    emit(mfc0(6, 16));
    emit(mtc0(6, 2));            expected.push_back(4);
    emit(mfc0(7, 17));
    emit(mtc0(7, 2));            expected.push_back(2);
    emit(addiu(8, 0, 32'h2000));
    emit(sw(5, 0, 8));
    emit(lw(9, 0, 8));
    emit(addu(10, 9, 9));        // load-use
    emit(mtc0(10, 2));           expected.push_back(112);
    emit(addiu(11, 0, -2));
    emit(sb(11, 5, 8));
    emit(lb(12, 5, 8));
    emit(mtc0(12, 2));           expected.push_back(32'hffff_fffe);
    emit(lbu(13, 5, 8));
    emit(mtc0(13, 2));           expected.push_back(32'h0000_00fe);
    emit(lw(14, 4, 8));
    emit(mtc0(14, 2));           expected.push_back(32'h1122_fe44);
    emit(sh(11, 6, 8));
    emit(lh(14, 6, 8));
    emit(mtc0(14, 2));           expected.push_back(32'hffff_fffe);
    emit(mul(15, 1, 2));
    emit(mtc0(15, 2));           expected.push_back(35);
    emit(addiu(17, 0, -20));
    emit(div(16, 17, 1));
    emit(mtc0(16, 2));           expected.push_back(32'hffff_fffc);
    emit(remu(18, 2, 1));
    emit(mtc0(18, 2));           expected.push_back(2);
    // loop: r19 = 5 + 4 + 3 + 2 + 1
    emit(addiu(19, 0, 0));
    emit(addu(20, 1, 0));
    emit(addu(19, 19, 20));
    emit(addiu(20, 20, -1));
    emit(bne(20, 0, -3));
    emit(mtc0(19, 2));           expected.push_back(15);
    // branches of each kind
    emit(addiu(24, 0, -16));
    emit(bltz(24, 1));
    emit(addiu(19, 0, 999));
    emit(bgez(24, 1));
    emit(addiu(19, 19, 1));
    emit(blez(0, 1));
    emit(addiu(19, 19, 100));
    emit(bgtz(0, 1));
    emit(addiu(19, 19, 2));
    emit(beq(0, 0, 1));
    emit(addiu(19, 19, 1000));
    emit(mtc0(19, 2));           expected.push_back(18);
    // shifts and compares
    emit(sra(25, 24, 2));
    emit(mtc0(25, 2));           expected.push_back(32'hffff_fffc);
    emit(srl(25, 24, 28));
    emit(mtc0(25, 2));           expected.push_back(32'h0000_000f);
    emit(slt(26, 24, 0));
    emit(sltu(27, 24, 1));
    emit(sll(26, 26, 1));
    emit(or_(26, 26, 27));
    emit(mtc0(26, 2));           expected.push_back(2);
    emit(lui(28, 16'h1234));
    emit(ori(28, 28, 16'h5678));
    emit(xor_(29, 28, 24));
    emit(nor_(29, 29, 0));
    emit(mtc0(29, 2));           expected.push_back(~(32'h1234_5678 ^ 32'hffff_fff0));
    // jal / jr
    emit(jal(32'h800));
    emit(mtc0(21, 2));           expected.push_back(77);
    // jalr
    emit(addiu(22, 0, 32'h900));
    emit(jalr(23, 22));          // link = pc after the jalr
    expected.push_back(pc + 4);
    emit(mtc0(30, 2));
    // stats bit on, then off
    emit(addiu(26, 0, 1));
    emit(mtc0(26, 21));
    emit(addiu(1, 0, 3));
    emit(addiu(2, 0, 4));
    emit(addu(3, 1, 2));
    emit(mtc0(0, 21));
    emit(mtc0(3, 2));            expected.push_back(7);
    emit(j(pc));                 // spin

    pc = 32'h800;                // function: r21 = 77, return
    emit(addiu(21, 0, 77));
    emit(jr(31));
    emit(addiu(21, 0, 1));       // never executed

    pc = 32'h900;                // function: r30 = link + 4, return through the link register
    emit(addiu(30, 23, 4));
    emit(jr(23));
  end

  initial begin
    repeat (3) @(posedge clk);
    reset = 1'b0;
    wait (done);
    repeat (5) @(posedge clk);
    checks++;
    if (got != expected.size()) begin failures++; $display("FAIL: %0d messages", got); end
    checks++;
    if (stats_cycles == 0) begin failures++; $display("FAIL: stats bit never set"); end
    checks++;
    if (max_run < 2) begin failures++; $display("FAIL: no back-to-back commits"); end
    checks++;
    if (m2p_idx != 2) begin failures++; $display("FAIL: manager input not consumed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d messages", got, expected.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
