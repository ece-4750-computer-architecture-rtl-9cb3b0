// Memory request/response network between four requesters and four memory
// ports (cache banks or a single memory port).
//
// Requests from requester i pass through a mem_req_net_adapter (destination
// bank, requester id in the opaque field) into a four-node request ring; at
// the destination node the network header is stripped and the plain request
// leaves on req_out. Responses enter at the bank's node through a
// mem_resp_net_adapter, cross a separate response ring, and leave on resp_out
// of the requester named in their opaque field. Two separate rings keep
// requests from blocking responses.
//
// p_single_bank = 0: the destination is the bank named by address bits [5:4]
// (the data-cache network). p_single_bank = 1: every request goes to port 0,
// so four requesters share one memory port (the refill networks); ports 1-3
// of req_out are then never valid and resp_in 1-3 must be held invalid.
//
// req_t / resp_t choose the message width (4-byte words or 16-byte lines).
module mem_net
  import mcore_pkg::*;
#(
  parameter type         req_t         = mem_req_4B_t,
  parameter type         resp_t        = mem_resp_4B_t,
  parameter int unsigned p_single_bank = 0
)(
  input  logic        clk,
  input  logic        reset,
  // requester side
  input  logic [NUM_CORES-1:0] req_in_val,
  output logic [NUM_CORES-1:0] req_in_rdy,
  input  req_t                 req_in_msg   [NUM_CORES],
  output logic [NUM_CORES-1:0] resp_out_val,
  input  logic [NUM_CORES-1:0] resp_out_rdy,
  output resp_t                resp_out_msg [NUM_CORES],
  // memory / bank side
  output logic [NUM_CORES-1:0] req_out_val,
  input  logic [NUM_CORES-1:0] req_out_rdy,
  output req_t                 req_out_msg  [NUM_CORES],
  input  logic [NUM_CORES-1:0] resp_in_val,
  output logic [NUM_CORES-1:0] resp_in_rdy,
  input  resp_t                resp_in_msg  [NUM_CORES]
);

  localparam int unsigned REQ_NBITS  = 2*NODE_NBITS + $bits(req_t);
  localparam int unsigned RESP_NBITS = 2*NODE_NBITS + $bits(resp_t);

  logic [REQ_NBITS-1:0]  reqnet_in  [NUM_CORES];
  logic [REQ_NBITS-1:0]  reqnet_out [NUM_CORES];
  logic [RESP_NBITS-1:0] respnet_in  [NUM_CORES];
  logic [RESP_NBITS-1:0] respnet_out [NUM_CORES];

  for (genvar i = 0; i < NUM_CORES; i++) begin : g_port
    mem_req_net_adapter #(.req_t(req_t), .p_single_bank(p_single_bank), .p_src_id(i))
      req_adapter (.req(req_in_msg[i]), .net_msg(reqnet_in[i]));

    mem_resp_net_adapter #(.resp_t(resp_t), .p_src_id(i))
      resp_adapter (.resp(resp_in_msg[i]), .net_msg(respnet_in[i]));

    // strip the {dest, src} header on the way out
    assign req_out_msg[i]  = req_t'(reqnet_out[i][$bits(req_t)-1:0]);
    assign resp_out_msg[i] = resp_t'(respnet_out[i][$bits(resp_t)-1:0]);
  end

  ring_net #(.p_msg_nbits(REQ_NBITS), .p_node_nbits(NODE_NBITS), .p_num_nodes(NUM_CORES))
  req_net (
    .clk, .reset,
    .in_val (req_in_val),  .in_rdy (req_in_rdy),  .in_msg (reqnet_in),
    .out_val(req_out_val), .out_rdy(req_out_rdy), .out_msg(reqnet_out)
  );

  ring_net #(.p_msg_nbits(RESP_NBITS), .p_node_nbits(NODE_NBITS), .p_num_nodes(NUM_CORES))
  resp_net (
    .clk, .reset,
    .in_val (resp_in_val),  .in_rdy (resp_in_rdy),  .in_msg (respnet_in),
    .out_val(resp_out_val), .out_rdy(resp_out_rdy), .out_msg(respnet_out)
  );

endmodule
