// Quad-core system: four processors, four private instruction caches, a
// four-bank shared data cache and three memory networks.
//
//   proc i  --imem-->  icache i  --refill-->  icache refill net --> memreq0/memresp0
//   proc i  --dmem-->  data-cache net (bank = addr[5:4]) --> dcache bank j
//   dcache j --refill--> dcache refill net --> memreq1/memresp1
//
// Each network is a mem_net: a request ring and a response ring of four
// nodes. The data-cache network sends each processor request to the bank
// that owns its cache line (consecutive lines sit in consecutive banks) and
// returns the response to the requesting core through the id it wrote in the
// opaque field. The two refill networks run in single-bank mode and merge the
// four caches' line requests onto one memory port each.
//
// Processor i is built with p_num_cores = 4 and p_core_id = i, which software
// reads with mfc0 $x,$16 and mfc0 $x,$17. Only proc0 is connected to the
// manager: the manager input of cores 1-3 is never valid and their manager
// output is accepted and dropped. stats_en is proc0's stats bit; commit has
// one bit per core, high for each retired instruction.
//
// Instruction caches have one bank (24-bit tags), data-cache banks are built
// with p_num_banks = 4 (22-bit tags). There is no coherence to keep: the data
// cache is shared and the instruction caches are read-only.
module proc_cache_net_alt
  import mcore_pkg::*;
(
  input  logic          clk,
  input  logic          reset,

  input  logic          mngr2proc_val,
  output logic          mngr2proc_rdy,
  input  logic [31:0]   mngr2proc_msg,

  output logic          proc2mngr_val,
  input  logic          proc2mngr_rdy,
  output logic [31:0]   proc2mngr_msg,

  output logic          memreq0_val,
  input  logic          memreq0_rdy,
  output mem_req_16B_t  memreq0_msg,
  input  logic          memresp0_val,
  output logic          memresp0_rdy,
  input  mem_resp_16B_t memresp0_msg,

  output logic          memreq1_val,
  input  logic          memreq1_rdy,
  output mem_req_16B_t  memreq1_msg,
  input  logic          memresp1_val,
  output logic          memresp1_rdy,
  input  mem_resp_16B_t memresp1_msg,

  output logic                 stats_en,
  output logic [NUM_CORES-1:0] commit
);

  localparam int unsigned N = NUM_CORES;

  // processor <-> icache
  logic [N-1:0]  imemreq_val, imemreq_rdy, imemresp_val, imemresp_rdy;
  mem_req_4B_t   imemreq_msg  [N];
  mem_resp_4B_t  imemresp_msg [N];
  // processor <-> data-cache network
  logic [N-1:0]  dmemreq_val, dmemreq_rdy, dmemresp_val, dmemresp_rdy;
  mem_req_4B_t   dmemreq_msg  [N];
  mem_resp_4B_t  dmemresp_msg [N];
  // data-cache network <-> banks
  logic [N-1:0]  dcreq_val, dcreq_rdy, dcresp_val, dcresp_rdy;
  mem_req_4B_t   dcreq_msg  [N];
  mem_resp_4B_t  dcresp_msg [N];
  // caches <-> refill networks
  logic [N-1:0]  irefreq_val, irefreq_rdy, irefresp_val, irefresp_rdy;
  mem_req_16B_t  irefreq_msg  [N];
  mem_resp_16B_t irefresp_msg [N];
  logic [N-1:0]  drefreq_val, drefreq_rdy, drefresp_val, drefresp_rdy;
  mem_req_16B_t  drefreq_msg  [N];
  mem_resp_16B_t drefresp_msg [N];
  // refill networks <-> memory ports
  logic [N-1:0]  imem_val, imem_rdy, imemr_val, imemr_rdy;
  mem_req_16B_t  imem_msg  [N];
  mem_resp_16B_t imemr_msg [N];
  logic [N-1:0]  dmem_val, dmem_rdy, dmemr_val, dmemr_rdy;
  mem_req_16B_t  dmem_msg  [N];
  mem_resp_16B_t dmemr_msg [N];

  logic [N-1:0]  m2p_val, m2p_rdy, p2m_val, p2m_rdy, stats;
  logic [31:0]   p2m_msg [N];

  for (genvar i = 0; i < N; i++) begin : g_core

    if (i == 0) begin : g_mngr
      assign m2p_val[i]    = mngr2proc_val;
      assign mngr2proc_rdy = m2p_rdy[i];
      assign proc2mngr_val = p2m_val[i];
      assign proc2mngr_msg = p2m_msg[i];
      assign p2m_rdy[i]    = proc2mngr_rdy;
    end else begin : g_no_mngr
      assign m2p_val[i] = 1'b0;
      assign p2m_rdy[i] = 1'b1;
    end

    proc #(.p_num_cores(N), .p_core_id(i)) proc (
      .clk, .reset,
      .mngr2proc_val(m2p_val[i]), .mngr2proc_rdy(m2p_rdy[i]), .mngr2proc_msg(mngr2proc_msg),
      .proc2mngr_val(p2m_val[i]), .proc2mngr_rdy(p2m_rdy[i]), .proc2mngr_msg(p2m_msg[i]),
      .imemreq_val (imemreq_val[i]),  .imemreq_rdy (imemreq_rdy[i]),  .imemreq_msg (imemreq_msg[i]),
      .imemresp_val(imemresp_val[i]), .imemresp_rdy(imemresp_rdy[i]), .imemresp_msg(imemresp_msg[i]),
      .dmemreq_val (dmemreq_val[i]),  .dmemreq_rdy (dmemreq_rdy[i]),  .dmemreq_msg (dmemreq_msg[i]),
      .dmemresp_val(dmemresp_val[i]), .dmemresp_rdy(dmemresp_rdy[i]), .dmemresp_msg(dmemresp_msg[i]),
      .stats_en(stats[i]), .commit(commit[i])
    );

    cache #(.p_num_banks(1)) icache (
      .clk, .reset,
      .cachereq_val (imemreq_val[i]),  .cachereq_rdy (imemreq_rdy[i]),  .cachereq_msg (imemreq_msg[i]),
      .cacheresp_val(imemresp_val[i]), .cacheresp_rdy(imemresp_rdy[i]), .cacheresp_msg(imemresp_msg[i]),
      .memreq_val   (irefreq_val[i]),  .memreq_rdy   (irefreq_rdy[i]),  .memreq_msg   (irefreq_msg[i]),
      .memresp_val  (irefresp_val[i]), .memresp_rdy  (irefresp_rdy[i]), .memresp_msg  (irefresp_msg[i])
    );

    cache #(.p_num_banks(N)) dcache (
      .clk, .reset,
      .cachereq_val (dcreq_val[i]),    .cachereq_rdy (dcreq_rdy[i]),    .cachereq_msg (dcreq_msg[i]),
      .cacheresp_val(dcresp_val[i]),   .cacheresp_rdy(dcresp_rdy[i]),   .cacheresp_msg(dcresp_msg[i]),
      .memreq_val   (drefreq_val[i]),  .memreq_rdy   (drefreq_rdy[i]),  .memreq_msg   (drefreq_msg[i]),
      .memresp_val  (drefresp_val[i]), .memresp_rdy  (drefresp_rdy[i]), .memresp_msg  (drefresp_msg[i])
    );

    // only node 0 of each refill network is wired to memory
    if (i == 0) begin : g_mem
      assign memreq0_val  = imem_val[i];
      assign memreq0_msg  = imem_msg[i];
      assign imem_rdy[i]  = memreq0_rdy;
      assign imemr_val[i] = memresp0_val;
      assign imemr_msg[i] = memresp0_msg;
      assign memresp0_rdy = imemr_rdy[i];

      assign memreq1_val  = dmem_val[i];
      assign memreq1_msg  = dmem_msg[i];
      assign dmem_rdy[i]  = memreq1_rdy;
      assign dmemr_val[i] = memresp1_val;
      assign dmemr_msg[i] = memresp1_msg;
      assign memresp1_rdy = dmemr_rdy[i];
    end else begin : g_no_mem
      assign imem_rdy[i]  = 1'b0;
      assign imemr_val[i] = 1'b0;
      assign imemr_msg[i] = '0;
      assign dmem_rdy[i]  = 1'b0;
      assign dmemr_val[i] = 1'b0;
      assign dmemr_msg[i] = '0;
    end
  end

  assign stats_en = stats[0];

  mem_net #(.req_t(mem_req_4B_t), .resp_t(mem_resp_4B_t), .p_single_bank(0)) dcache_net (
    .clk, .reset,
    .req_in_val (dmemreq_val),  .req_in_rdy (dmemreq_rdy),  .req_in_msg (dmemreq_msg),
    .resp_out_val(dmemresp_val), .resp_out_rdy(dmemresp_rdy), .resp_out_msg(dmemresp_msg),
    .req_out_val(dcreq_val),    .req_out_rdy(dcreq_rdy),    .req_out_msg(dcreq_msg),
    .resp_in_val(dcresp_val),   .resp_in_rdy(dcresp_rdy),   .resp_in_msg(dcresp_msg)
  );

  mem_net #(.req_t(mem_req_16B_t), .resp_t(mem_resp_16B_t), .p_single_bank(1)) icache_refill_net (
    .clk, .reset,
    .req_in_val (irefreq_val),  .req_in_rdy (irefreq_rdy),  .req_in_msg (irefreq_msg),
    .resp_out_val(irefresp_val), .resp_out_rdy(irefresp_rdy), .resp_out_msg(irefresp_msg),
    .req_out_val(imem_val),     .req_out_rdy(imem_rdy),     .req_out_msg(imem_msg),
    .resp_in_val(imemr_val),    .resp_in_rdy(imemr_rdy),    .resp_in_msg(imemr_msg)
  );

  mem_net #(.req_t(mem_req_16B_t), .resp_t(mem_resp_16B_t), .p_single_bank(1)) dcache_refill_net (
    .clk, .reset,
    .req_in_val (drefreq_val),  .req_in_rdy (drefreq_rdy),  .req_in_msg (drefreq_msg),
    .resp_out_val(drefresp_val), .resp_out_rdy(drefresp_rdy), .resp_out_msg(drefresp_msg),
    .req_out_val(dmem_val),     .req_out_rdy(dmem_rdy),     .req_out_msg(dmem_msg),
    .resp_in_val(dmemr_val),    .resp_in_rdy(dmemr_rdy),    .resp_in_msg(dmemr_msg)
  );

endmodule
