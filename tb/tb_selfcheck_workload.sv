// Self-checking single-threaded instruction test run on all four cores.
//
// The program tests the instruction set in software, in the style of a
// self-checking assembly test: each step computes a value from random
// operands, loads the expected value (worked out here) as a constant and
// branches to a fail handler on a mismatch. The fail handler sends 0x100 plus
// the step number through mtc0 $x,$2. Reaching the end sends 1 (pass). The
// steps cover every ALU, shift, compare, multiply/divide, load/store width,
// branch and jump instruction.
//
// All four cores execute the same code. The memory steps use a data block
// chosen by core id, so the cores do not overwrite each other's stores. Only core 0 can reach the manager. The testbench checks that
// exactly one message, a pass, arrives, that all four cores ran the whole
// program (each retired at least as many instructions as the program has
// steps), and that several instruction caches refilled at the same time
// through the shared single-bank refill network.
module tb_selfcheck_workload;
  import mcore_pkg::*;
  import parc_asm_pkg::*;

  localparam int DATA = 32'h3000;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;

  logic          p2m_val, m2p_rdy, stats_en;
  logic [31:0]   p2m_msg;
  logic [1:0]    mreq_val, mreq_rdy, mresp_val, mresp_rdy;
  mem_req_16B_t  mreq_msg  [2];
  mem_resp_16B_t mresp_msg [2];
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
  int unsigned pc;
  int step = 0;
  int unsigned fail_branches [$];

  task automatic emit(logic [31:0] inst);
    mem.m[pc >> 2] = inst;
    pc += 4;
  endtask

  // r = constant
  task automatic li(int r, logic [31:0] v);
    emit(lui(r, int'(v[31:16])));
    emit(ori(r, r, int'(v[15:0])));
  endtask

  // compare register r with the expected value, branch to fail on mismatch
  task automatic expect_reg(int r, logic [31:0] v);
    step++;
    li(5, v);
    emit(addiu(6, 0, step));
    fail_branches.push_back(pc);
    emit(nop());                     // patched: bne r, r5, fail
    mem.m[(pc - 4) >> 2] = {6'b000101, 5'(r), 5'd5, 16'd0};
  endtask

  int n_commit [4];
  int n_ifetch_wait;
  always @(posedge clk) if (!reset) begin
    for (int c = 0; c < 4; c++) if (commit[c]) n_commit[c]++;
    if ($countones(dut.irefreq_val) >= 2) n_ifetch_wait++;
  end

  int got = 0;
  logic [31:0] msg0;
  always @(posedge clk) if (!reset && p2m_val) begin
    if (got == 0) msg0 = p2m_msg;
    got++;
  end

  initial begin
    logic [31:0] a, b, e;
    logic [4:0]  s;
    int fail_pc;
    int unsigned jpc;
    for (int i = 0; i < 16384; i++) mem.m[i] = 32'd0;
    for (int c = 0; c < 4; c++) n_commit[c] = 0;
    n_ifetch_wait = 0;
    a = $urandom; b = $urandom | 32'h1; s = 5'($urandom);
    if (b == 32'hffff_ffff) b = 32'd3;

    pc = 32'h200;
    li(1, a);
    li(2, b);
    emit(addiu(3, 0, int'(s)));
    emit(addu(4, 1, 2));  expect_reg(4, a + b);
    emit(subu(4, 1, 2));  expect_reg(4, a - b);
    emit(and_(4, 1, 2));  expect_reg(4, a & b);
    emit(or_(4, 1, 2));   expect_reg(4, a | b);
    emit(xor_(4, 1, 2));  expect_reg(4, a ^ b);
    emit(nor_(4, 1, 2));  expect_reg(4, ~(a | b));
    emit(slt(4, 1, 2));   expect_reg(4, 32'($signed(a) < $signed(b)));
    emit(sltu(4, 1, 2));  expect_reg(4, 32'(a < b));
    emit(sll(4, 1, 7));   expect_reg(4, a << 7);
    emit(srl(4, 1, 9));   expect_reg(4, a >> 9);
    emit(sra(4, 1, 13));  expect_reg(4, $unsigned($signed(a) >>> 13));
    emit(sllv(4, 1, 3));  expect_reg(4, a << s);
    emit(r_type(3, 1, 4, 0, 6'b000110)); expect_reg(4, a >> s);                        // srlv
    emit(srav(4, 1, 3));  expect_reg(4, $unsigned($signed(a) >>> s));
    emit(addiu(4, 1, -1234));          expect_reg(4, a - 1234);
    emit(slti(4, 1, -5));              expect_reg(4, 32'($signed(a) < -5));
    emit(i_type(6'b001011, 1, 4, -5)); expect_reg(4, 32'(a < 32'hffff_fffb));          // sltiu
    emit(andi(4, 1, 'hf0f0));        expect_reg(4, a & 32'h0000_f0f0);
    emit(i_type(6'b001110, 1, 4, 'h1234)); expect_reg(4, a ^ 32'h0000_1234);        // xori
    emit(mul(4, 1, 2));   expect_reg(4, a * b);
    emit(div(4, 1, 2));   expect_reg(4, $unsigned($signed(a) / $signed(b)));
    emit(s2_type(1, 2, 4, 6'b011011)); expect_reg(4, a / b);                           // divu
    emit(s2_type(1, 2, 4, 6'b011110)); expect_reg(4, $unsigned($signed(a) % $signed(b))); // rem
    emit(remu(4, 1, 2));  expect_reg(4, a % b);
    // memory: word, halfword and byte stores and loads
    emit(mfc0(7, 17));               // own 64-byte block per core, so the
    emit(sll(7, 7, 6));              // cores do not overwrite each other
    emit(addiu(7, 7, DATA));
    emit(sw(1, 0, 7));
    emit(sh(2, 2, 7));
    emit(sb(2, 1, 7));
    e = a;
    e[31:16] = b[15:0];
    e[15:8]  = b[7:0];
    emit(lw(4, 0, 7));    expect_reg(4, e);
    emit(lh(4, 2, 7));    expect_reg(4, {{16{e[31]}}, e[31:16]});
    emit(i_type(6'b100101, 7, 4, 2)); expect_reg(4, {16'b0, e[31:16]});                // lhu
    emit(lb(4, 1, 7));    expect_reg(4, {{24{e[15]}}, e[15:8]});
    emit(lbu(4, 3, 7));   expect_reg(4, {24'b0, e[31:24]});
    // branches: r8 collects one bit per correctly taken / not-taken branch
    emit(addiu(8, 0, 0));
    emit(addiu(9, 0, -3));
    emit(beq(1, 1, 1));   emit(addiu(8, 8, 1000));
    emit(bne(1, 1, 1));   emit(ori(8, 8, 1));
    emit(bltz(9, 1));     emit(addiu(8, 8, 1000));
    emit(bgez(9, 1));     emit(ori(8, 8, 2));
    emit(blez(9, 1));     emit(addiu(8, 8, 1000));
    emit(bgtz(9, 1));     emit(ori(8, 8, 4));
    emit(bgez(0, 1));     emit(addiu(8, 8, 1000));
    emit(bltz(0, 1));     emit(ori(8, 8, 8));
    expect_reg(8, 32'd15);
    // jumps: each skipped instruction would break r8
    jpc = pc;
    emit(jal(jpc + 12));
    emit(addiu(8, 0, 1000));
    emit(addiu(8, 0, 1000));
    emit(addiu(10, 31, 0));          // r10 = link of the jal
    expect_reg(10, jpc + 4);
    emit(j(pc + 8));
    emit(addiu(8, 0, 1000));
    jpc = pc + 8;                    // address of the jalr
    li(11, jpc + 8);
    emit(jalr(12, 11));
    emit(addiu(8, 0, 1000));
    expect_reg(12, jpc + 4);
    li(11, pc + 16);
    emit(jr(11));
    emit(addiu(8, 0, 1000));
    expect_reg(8, 32'd15);
    // pass
    emit(addiu(13, 0, 1));
    emit(mtc0(13, 2));
    emit(j(pc));
    // fail handler
    fail_pc = pc;
    emit(ori(6, 6, 'h100));
    emit(mtc0(6, 2));
    emit(j(pc));
    foreach (fail_branches[k])
      mem.m[fail_branches[k] >> 2][15:0] = 16'((fail_pc - int'(fail_branches[k] + 4)) / 4);
  end

  initial begin
    repeat (3) @(posedge clk);
    reset = 1'b0;
    wait (got >= 1);
    repeat (3000) @(posedge clk);
    checks++;
    if (msg0 !== 32'd1) begin failures++; $display("FAIL: result %h (0x100 + failing step)", msg0); end
    checks++;
    if (got != 1) begin failures++; $display("FAIL: %0d manager messages", got); end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (n_commit[c] < step) begin failures++; $display("FAIL: core %0d retired only %0d", c, n_commit[c]); end
    end
    checks++;
    if (n_ifetch_wait == 0) begin failures++; $display("FAIL: no shared instruction refills seen"); end
    $display("%0d steps; instructions per core %0d %0d %0d %0d", step,
             n_commit[0], n_commit[1], n_commit[2], n_commit[3]);
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
