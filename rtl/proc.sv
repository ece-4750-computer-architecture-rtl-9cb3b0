// Five-stage pipelined PARC processor with full bypassing.
//
// Stages: F (instruction fetch through the imem port), D (decode, register
// read with bypassing, jumps), X (ALU, branch resolution, data memory request,
// manager output, stats enable), M (waits for the data memory response) and W
// (register write-back). ALU and coprocessor results are bypassed to D from X,
// M and W; a load's data is bypassed from W only, so an instruction that needs
// a load result stalls in D while the load is in X or M. Taken branches
// resolve in X and squash F and D; j, jal, jr and jalr resolve in D and
// squash F. There are no branch delay slots.
//
// Memory ports are latency-insensitive valid/ready streams of 4-byte memory
// messages (mcore_pkg::mem_req_4B_t). Fetch keeps one request in flight and
// discards the response of a fetch squashed by a redirect. The data port also
// keeps one request in flight: X sends it and M waits for the answer.
//
// Instructions: the PARCv2 integer set in MIPS32 encodings (addu subu and or
// xor nor slt sltu sll srl sra sllv srlv srav addiu slti sltiu andi ori xori
// lui lw lh lhu lb lbu sw sh sb beq bne blez bgtz bltz bgez j jal jr jalr),
// mul, div, divu, rem, remu (SPECIAL2 opcode; division by zero gives 0 for
// the quotient and the dividend for the remainder), and the coprocessor-0
// moves: mfc0 $x,$1 reads the manager input stream, mtc0 $x,$2 writes the
// manager output stream, mtc0 $x,$21 sets the stats bit when $x is non-zero
// and clears it otherwise, mfc0 $x,$16 reads the number of cores
// (p_num_cores) and mfc0 $x,$17 this core's id (p_core_id). Other encodings
// execute as no-ops. Execution starts at mcore_pkg::RESET_VECTOR.
//
// commit pulses for one cycle for each instruction leaving W.
module proc
  import mcore_pkg::*;
#(
  parameter int unsigned p_num_cores = 1,
  parameter int unsigned p_core_id   = 0
)(
  input  logic         clk,
  input  logic         reset,

  input  logic         mngr2proc_val,
  output logic         mngr2proc_rdy,
  input  logic [31:0]  mngr2proc_msg,

  output logic         proc2mngr_val,
  input  logic         proc2mngr_rdy,
  output logic [31:0]  proc2mngr_msg,

  output logic         imemreq_val,
  input  logic         imemreq_rdy,
  output mem_req_4B_t  imemreq_msg,

  input  logic         imemresp_val,
  output logic         imemresp_rdy,
  input  mem_resp_4B_t imemresp_msg,

  output logic         dmemreq_val,
  input  logic         dmemreq_rdy,
  output mem_req_4B_t  dmemreq_msg,

  input  logic         dmemresp_val,
  output logic         dmemresp_rdy,
  input  mem_resp_4B_t dmemresp_msg,

  output logic         stats_en,
  output logic         commit
);

  typedef enum logic [4:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR, ALU_SLT, ALU_SLTU,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_MUL, ALU_DIV, ALU_DIVU, ALU_REM, ALU_REMU,
    ALU_CPA, ALU_CPB
  } alu_e;

  typedef enum logic [2:0] { BR_NONE, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ } br_e;
  typedef enum logic [1:0] { MEM_NONE, MEM_LD, MEM_ST } memop_e;

  // decoded control of one instruction
  typedef struct packed {
    alu_e        alu;
    br_e         br;
    memop_e      mem;
    logic [1:0]  mlen;      // 0 word, 1 byte, 2 half
    logic        msigned;
    logic [4:0]  rd;        // destination register, 0 for none
    logic        p2m;       // mtc0 to proc2mngr
    logic        stats;     // mtc0 to stats_en
  } ctl_t;

  localparam ctl_t CTL_NOP = '{alu: ALU_ADD, br: BR_NONE, mem: MEM_NONE, mlen: 2'd0,
                               msigned: 1'b0, rd: 5'd0, p2m: 1'b0, stats: 1'b0};

  //--------------------------------------------------------------------
  // Pipeline registers
  //--------------------------------------------------------------------

  // F
  logic [31:0] pc_F, ipc_F;
  logic        inflight_F, drop_F;
  // D
  logic        val_D;
  logic [31:0] inst_D, pc_D;
  // X
  logic        val_X;
  ctl_t        ctl_X;
  logic [31:0] a_X, b_X, wdata_X, brtarg_X;
  // M
  logic        val_M;
  ctl_t        ctl_M;
  logic [31:0] result_M;
  // W
  logic        val_W;
  logic [4:0]  rd_W;
  logic [31:0] result_W;

  logic [31:0] rf [32];

  //--------------------------------------------------------------------
  // X stage: ALU and branch
  //--------------------------------------------------------------------

  logic [31:0] result_X;
  logic        br_cond_X;

  always_comb begin
    unique case (ctl_X.alu)
      ALU_ADD:  result_X = a_X + b_X;
      ALU_SUB:  result_X = a_X - b_X;
      ALU_AND:  result_X = a_X & b_X;
      ALU_OR:   result_X = a_X | b_X;
      ALU_XOR:  result_X = a_X ^ b_X;
      ALU_NOR:  result_X = ~(a_X | b_X);
      ALU_SLT:  result_X = {31'b0, $signed(a_X) < $signed(b_X)};
      ALU_SLTU: result_X = {31'b0, a_X < b_X};
      ALU_SLL:  result_X = a_X << b_X[4:0];
      ALU_SRL:  result_X = a_X >> b_X[4:0];
      ALU_SRA:  result_X = $unsigned($signed(a_X) >>> b_X[4:0]);
      ALU_MUL:  result_X = a_X * b_X;
      ALU_DIV:  result_X = (b_X == 0) ? 32'd0 : $unsigned($signed(a_X) / $signed(b_X));
      ALU_DIVU: result_X = (b_X == 0) ? 32'd0 : a_X / b_X;
      ALU_REM:  result_X = (b_X == 0) ? a_X   : $unsigned($signed(a_X) % $signed(b_X));
      ALU_REMU: result_X = (b_X == 0) ? a_X   : a_X % b_X;
      ALU_CPA:  result_X = a_X;
      ALU_CPB:  result_X = b_X;
      default:  result_X = a_X + b_X;
    endcase

    unique case (ctl_X.br)
      BR_EQ:   br_cond_X = (a_X == b_X);
      BR_NE:   br_cond_X = (a_X != b_X);
      BR_LEZ:  br_cond_X = ($signed(a_X) <= 0);
      BR_GTZ:  br_cond_X = ($signed(a_X) >  0);
      BR_LTZ:  br_cond_X = ($signed(a_X) <  0);
      BR_GEZ:  br_cond_X = ($signed(a_X) >= 0);
      default: br_cond_X = 1'b0;
    endcase
  end

  //--------------------------------------------------------------------
  // Stall and squash logic
  //--------------------------------------------------------------------

  wire mem_M  = (ctl_M.mem != MEM_NONE);
  wire mem_X  = (ctl_X.mem != MEM_NONE);

  wire stall_M = val_M && mem_M && !dmemresp_val;
  wire stall_X = val_X && (stall_M ||
                           (mem_X && !dmemreq_rdy) ||
                           (ctl_X.p2m && !proc2mngr_rdy));
  wire go_X    = val_X && !stall_X;

  wire squash_X = go_X && br_cond_X;        // taken branch: squash D and F

  // D stage decode outputs (computed below)
  ctl_t        ctl_D;
  logic [31:0] a_D, b_D, wdata_D, brtarg_D, jtarg_D;
  logic        jump_D, m2p_D, use_rs_D, use_rt_D;
  logic [4:0]  rs_D, rt_D;

  // load-use hazard: a load in X or M whose result D needs
  function automatic logic ld_hazard(logic v, ctl_t c, logic [4:0] r, logic use_r);
    return v && (c.mem == MEM_LD) && (c.rd != 5'd0) && use_r && (c.rd == r);
  endfunction

  wire ld_use_D = ld_hazard(val_X, ctl_X, rs_D, use_rs_D) || ld_hazard(val_X, ctl_X, rt_D, use_rt_D) ||
                  ld_hazard(val_M, ctl_M, rs_D, use_rs_D) || ld_hazard(val_M, ctl_M, rt_D, use_rt_D);

  wire stall_D  = val_D && (ld_use_D || (m2p_D && !mngr2proc_val) || stall_X);
  wire go_D     = val_D && !stall_D && !squash_X;
  wire redirect_D = go_D && jump_D;
  wire redirect   = squash_X || redirect_D;
  wire [31:0] redirect_pc = squash_X ? brtarg_X : jtarg_D;

  assign mngr2proc_rdy = val_D && m2p_D && !ld_use_D && !stall_X && !squash_X;

  //--------------------------------------------------------------------
  // F stage
  //--------------------------------------------------------------------

  wire d_free = !val_D || go_D;

  assign imemreq_val = !inflight_F;
  always_comb begin
    imemreq_msg      = '0;
    imemreq_msg.typ  = MEM_READ;
    imemreq_msg.addr = pc_F;
  end
  assign imemresp_rdy = inflight_F && (drop_F || (!redirect && d_free));

  wire ifetch_go = imemreq_val && imemreq_rdy;
  wire iresp_go  = imemresp_val && imemresp_rdy;

  always_ff @(posedge clk) begin
    if (reset) begin
      pc_F       <= RESET_VECTOR;
      inflight_F <= 1'b0;
      drop_F     <= 1'b0;
    end else begin
      if (ifetch_go) begin
        inflight_F <= 1'b1;
        ipc_F      <= pc_F;
      end else if (iresp_go) begin
        inflight_F <= 1'b0;
      end

      if (ifetch_go)                  drop_F <= redirect;   // fetched down the wrong path
      else if (iresp_go)              drop_F <= 1'b0;
      else if (redirect && inflight_F) drop_F <= 1'b1;

      if (redirect)       pc_F <= redirect_pc;
      else if (ifetch_go) pc_F <= pc_F + 32'd4;
    end
  end

  //--------------------------------------------------------------------
  // D stage
  //--------------------------------------------------------------------

  always_ff @(posedge clk) begin
    if (reset) val_D <= 1'b0;
    else if (iresp_go && !drop_F) begin
      val_D  <= 1'b1;
      inst_D <= imemresp_msg.data;
      pc_D   <= ipc_F;
    end
    else if (squash_X || go_D) val_D <= 1'b0;
  end

  // bypass network: X, then M, then W, then the register file
  function automatic logic [31:0] read_reg(logic [4:0] r);
    if (r == 5'd0)                                                 return 32'd0;
    if (val_X && ctl_X.rd == r && ctl_X.mem != MEM_LD)             return result_X;
    if (val_M && ctl_M.rd == r && ctl_M.mem != MEM_LD)             return result_M;
    if (val_W && rd_W == r)                                        return result_W;
    return rf[r];
  endfunction

  logic [31:0] rs_val, rt_val;
  logic [5:0]  op, funct;
  logic [4:0]  rd_f, shamt;
  logic [31:0] simm, zimm, pc4_D;

  always_comb begin
    op    = inst_D[31:26];
    rs_D  = inst_D[25:21];
    rt_D  = inst_D[20:16];
    rd_f  = inst_D[15:11];
    shamt = inst_D[10:6];
    funct = inst_D[5:0];
    simm  = {{16{inst_D[15]}}, inst_D[15:0]};
    zimm  = {16'b0, inst_D[15:0]};
    pc4_D = pc_D + 32'd4;

    rs_val = read_reg(rs_D);
    rt_val = read_reg(rt_D);

    ctl_D    = CTL_NOP;
    a_D      = rs_val;
    b_D      = rt_val;
    wdata_D  = rt_val;
    brtarg_D = pc4_D + {simm[29:0], 2'b00};
    jtarg_D  = {pc4_D[31:28], inst_D[25:0], 2'b00};
    jump_D   = 1'b0;
    m2p_D    = 1'b0;
    use_rs_D = 1'b0;
    use_rt_D = 1'b0;

    unique case (op)
      6'b000000: begin // SPECIAL
        use_rs_D = 1'b1; use_rt_D = 1'b1; ctl_D.rd = rd_f;
        unique case (funct)
          6'b000000: begin ctl_D.alu = ALU_SLL; a_D = rt_val; b_D = {27'b0, shamt}; use_rs_D = 1'b0; end
          6'b000010: begin ctl_D.alu = ALU_SRL; a_D = rt_val; b_D = {27'b0, shamt}; use_rs_D = 1'b0; end
          6'b000011: begin ctl_D.alu = ALU_SRA; a_D = rt_val; b_D = {27'b0, shamt}; use_rs_D = 1'b0; end
          6'b000100: begin ctl_D.alu = ALU_SLL; a_D = rt_val; b_D = rs_val; end
          6'b000110: begin ctl_D.alu = ALU_SRL; a_D = rt_val; b_D = rs_val; end
          6'b000111: begin ctl_D.alu = ALU_SRA; a_D = rt_val; b_D = rs_val; end
          6'b001000: begin // jr
            jump_D = 1'b1; jtarg_D = rs_val; use_rt_D = 1'b0; ctl_D.rd = 5'd0;
          end
          6'b001001: begin // jalr
            jump_D = 1'b1; jtarg_D = rs_val; use_rt_D = 1'b0;
            ctl_D.alu = ALU_CPA; a_D = pc4_D;
          end
          6'b100001: ctl_D.alu = ALU_ADD;
          6'b100011: ctl_D.alu = ALU_SUB;
          6'b100100: ctl_D.alu = ALU_AND;
          6'b100101: ctl_D.alu = ALU_OR;
          6'b100110: ctl_D.alu = ALU_XOR;
          6'b100111: ctl_D.alu = ALU_NOR;
          6'b101010: ctl_D.alu = ALU_SLT;
          6'b101011: ctl_D.alu = ALU_SLTU;
          default:   begin ctl_D.rd = 5'd0; use_rs_D = 1'b0; use_rt_D = 1'b0; end
        endcase
      end
      6'b011100: begin // SPECIAL2: multiply / divide
        use_rs_D = 1'b1; use_rt_D = 1'b1; ctl_D.rd = rd_f;
        unique case (funct)
          6'b000010: ctl_D.alu = ALU_MUL;
          6'b011010: ctl_D.alu = ALU_DIV;
          6'b011011: ctl_D.alu = ALU_DIVU;
          6'b011110: ctl_D.alu = ALU_REM;
          6'b011111: ctl_D.alu = ALU_REMU;
          default:   begin ctl_D.rd = 5'd0; use_rs_D = 1'b0; use_rt_D = 1'b0; end
        endcase
      end
      6'b001001: begin ctl_D.alu = ALU_ADD;  b_D = simm; use_rs_D = 1'b1; ctl_D.rd = rt_D; end // addiu
      6'b001010: begin ctl_D.alu = ALU_SLT;  b_D = simm; use_rs_D = 1'b1; ctl_D.rd = rt_D; end // slti
      6'b001011: begin ctl_D.alu = ALU_SLTU; b_D = simm; use_rs_D = 1'b1; ctl_D.rd = rt_D; end // sltiu
      6'b001100: begin ctl_D.alu = ALU_AND;  b_D = zimm; use_rs_D = 1'b1; ctl_D.rd = rt_D; end // andi
      6'b001101: begin ctl_D.alu = ALU_OR;   b_D = zimm; use_rs_D = 1'b1; ctl_D.rd = rt_D; end // ori
      6'b001110: begin ctl_D.alu = ALU_XOR;  b_D = zimm; use_rs_D = 1'b1; ctl_D.rd = rt_D; end // xori
      6'b001111: begin ctl_D.alu = ALU_CPB;  b_D = {inst_D[15:0], 16'b0}; ctl_D.rd = rt_D; end // lui
      6'b100011, 6'b100001, 6'b100101, 6'b100000, 6'b100100: begin // loads
        ctl_D.alu = ALU_ADD; b_D = simm; use_rs_D = 1'b1; ctl_D.rd = rt_D;
        ctl_D.mem = MEM_LD;
        ctl_D.mlen    = (op[1:0] == 2'b11) ? 2'd0 : (op[0] ? 2'd2 : 2'd1);
        ctl_D.msigned = !op[2];
      end
      6'b101011, 6'b101001, 6'b101000: begin // stores
        ctl_D.alu = ALU_ADD; b_D = simm; use_rs_D = 1'b1; use_rt_D = 1'b1;
        ctl_D.mem  = MEM_ST;
        ctl_D.mlen = (op[1:0] == 2'b11) ? 2'd0 : (op[0] ? 2'd2 : 2'd1);
      end
      6'b000100: begin ctl_D.br = BR_EQ;  use_rs_D = 1'b1; use_rt_D = 1'b1; end // beq
      6'b000101: begin ctl_D.br = BR_NE;  use_rs_D = 1'b1; use_rt_D = 1'b1; end // bne
      6'b000110: begin ctl_D.br = BR_LEZ; use_rs_D = 1'b1; end                  // blez
      6'b000111: begin ctl_D.br = BR_GTZ; use_rs_D = 1'b1; end                  // bgtz
      6'b000001: begin                                                          // bltz / bgez
        use_rs_D = 1'b1;
        if (rt_D == 5'd0)      ctl_D.br = BR_LTZ;
        else if (rt_D == 5'd1) ctl_D.br = BR_GEZ;
      end
      6'b000010: jump_D = 1'b1;                                                 // j
      6'b000011: begin jump_D = 1'b1; ctl_D.alu = ALU_CPA; a_D = pc4_D; ctl_D.rd = 5'd31; end // jal
      6'b010000: begin // COP0
        if (rs_D == 5'b00000) begin // mfc0
          ctl_D.alu = ALU_CPA; ctl_D.rd = rt_D;
          unique case (rd_f)
            CP0_MNGR2PROC: begin m2p_D = 1'b1; a_D = mngr2proc_msg; end
            CP0_NUMCORES:  a_D = 32'(p_num_cores);
            CP0_COREID:    a_D = 32'(p_core_id);
            default:       a_D = 32'd0;
          endcase
        end else if (rs_D == 5'b00100) begin // mtc0
          use_rt_D = 1'b1;
          ctl_D.p2m   = (rd_f == CP0_PROC2MNGR);
          ctl_D.stats = (rd_f == CP0_STATS_EN);
        end
      end
      default: ;
    endcase
  end

  //--------------------------------------------------------------------
  // X stage registers and side effects
  //--------------------------------------------------------------------

  always_ff @(posedge clk) begin
    if (reset) val_X <= 1'b0;
    else if (!stall_X) begin
      val_X    <= go_D;
      ctl_X    <= ctl_D;
      a_X      <= a_D;
      b_X      <= b_D;
      wdata_X  <= wdata_D;
      brtarg_X <= brtarg_D;
    end
  end

  assign dmemreq_val = val_X && mem_X && !stall_M;
  always_comb begin
    dmemreq_msg      = '0;
    dmemreq_msg.typ  = (ctl_X.mem == MEM_ST) ? MEM_WRITE : MEM_READ;
    dmemreq_msg.addr = result_X;
    dmemreq_msg.len  = ctl_X.mlen;
    dmemreq_msg.data = (ctl_X.mem == MEM_ST) ? wdata_X : 32'd0;
  end

  assign proc2mngr_val = val_X && ctl_X.p2m && !stall_M;
  assign proc2mngr_msg = wdata_X;

  always_ff @(posedge clk) begin
    if (reset) stats_en <= 1'b0;
    else if (go_X && ctl_X.stats) stats_en <= (wdata_X != 32'd0);
  end

  //--------------------------------------------------------------------
  // M stage
  //--------------------------------------------------------------------

  always_ff @(posedge clk) begin
    if (reset) val_M <= 1'b0;
    else if (!stall_M) begin
      val_M    <= go_X;
      ctl_M    <= ctl_X;
      result_M <= result_X;
    end
  end

  assign dmemresp_rdy = val_M && mem_M;

  logic [31:0] ldata_M, wb_M;
  always_comb begin
    unique case (ctl_M.mlen)
      2'd1:    ldata_M = ctl_M.msigned ? {{24{dmemresp_msg.data[7]}},  dmemresp_msg.data[7:0]}
                                       : {24'b0, dmemresp_msg.data[7:0]};
      2'd2:    ldata_M = ctl_M.msigned ? {{16{dmemresp_msg.data[15]}}, dmemresp_msg.data[15:0]}
                                       : {16'b0, dmemresp_msg.data[15:0]};
      default: ldata_M = dmemresp_msg.data;
    endcase
    wb_M = (ctl_M.mem == MEM_LD) ? ldata_M : result_M;
  end

  //--------------------------------------------------------------------
  // W stage
  //--------------------------------------------------------------------

  always_ff @(posedge clk) begin
    if (reset) val_W <= 1'b0;
    else begin
      val_W    <= val_M && !stall_M;
      rd_W     <= (ctl_M.mem == MEM_ST) ? 5'd0 : ctl_M.rd;
      result_W <= wb_M;
    end
  end

  always_ff @(posedge clk)
    if (val_W && rd_W != 5'd0) rf[rd_W] <= result_W;

  assign commit = val_W;

endmodule
