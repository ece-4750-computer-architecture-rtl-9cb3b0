// Router of a four-node bidirectional ring.
//
// Three ports: the terminal (index 0), the clockwise link (index 1, arriving
// from node id-1 and leaving towards node id+1) and the counter-clockwise link
// (index 2, arriving from node id+1 and leaving towards node id-1). A message
// is one flit whose top p_node_nbits bits are its destination node.
//
// Routing is shortest path: one hop clockwise or counter-clockwise, and the
// two-hop case (opposite node) always clockwise, so a message never turns.
// Terminal input is buffered in a small queue; each ring output has an output
// queue whose head is the next router's input. Each output has a round-robin
// arbiter over the inputs that want it.
//
// Deadlock freedom uses bubble flow control: a message already travelling in a
// direction may enter that direction's output queue when one entry is free,
// but a message injected from the terminal needs two free entries, so each
// ring direction always keeps a free slot.
//
// Timing: one cycle per hop through an output queue; terminal ejection is
// combinational from the incoming link head to out_val[0].
module ring_router #(
  parameter int unsigned p_msg_nbits  = 16,
  parameter int unsigned p_node_nbits = 2,
  parameter int unsigned p_num_nodes  = 4,
  parameter int unsigned p_id         = 0,
  parameter int unsigned p_qdepth     = 2
)(
  input  logic                   clk,
  input  logic                   reset,
  // terminal
  input  logic                   term_in_val,
  output logic                   term_in_rdy,
  input  logic [p_msg_nbits-1:0] term_in_msg,
  output logic                   term_out_val,
  input  logic                   term_out_rdy,
  output logic [p_msg_nbits-1:0] term_out_msg,
  // clockwise link: in from node id-1, out to node id+1
  input  logic                   cw_in_val,
  output logic                   cw_in_rdy,
  input  logic [p_msg_nbits-1:0] cw_in_msg,
  output logic                   cw_out_val,
  input  logic                   cw_out_rdy,
  output logic [p_msg_nbits-1:0] cw_out_msg,
  // counter-clockwise link: in from node id+1, out to node id-1
  input  logic                   ccw_in_val,
  output logic                   ccw_in_rdy,
  input  logic [p_msg_nbits-1:0] ccw_in_msg,
  output logic                   ccw_out_val,
  input  logic                   ccw_out_rdy,
  output logic [p_msg_nbits-1:0] ccw_out_msg
);


  localparam int unsigned FW = $clog2(p_qdepth+1);

  // Terminal input queue
  logic                   tq_val, tq_rdy;
  logic [p_msg_nbits-1:0] tq_msg;
  logic [FW-1:0]          tq_free_unused;

  queue #(.p_nbits(p_msg_nbits), .p_depth(p_qdepth)) term_q (
    .clk, .reset,
    .enq_val(term_in_val), .enq_rdy(term_in_rdy), .enq_msg(term_in_msg),
    .deq_val(tq_val),    .deq_rdy(tq_rdy),    .deq_msg(tq_msg),
    .num_free(tq_free_unused)
  );

  // Heads of the three inputs
  logic [2:0]             h_val;
  logic [p_msg_nbits-1:0] h_msg [3];
  logic [2:0]             h_rdy;

  assign h_val[0] = tq_val;       assign h_msg[0] = tq_msg;
  assign h_val[1] = cw_in_val;    assign h_msg[1] = cw_in_msg;
  assign h_val[2] = ccw_in_val;   assign h_msg[2] = ccw_in_msg;
  assign tq_rdy     = h_rdy[0];
  assign cw_in_rdy  = h_rdy[1];
  assign ccw_in_rdy = h_rdy[2];

  // Route: which output does each input head want
  function automatic logic [1:0] route(logic [p_msg_nbits-1:0] m);
    logic [p_node_nbits-1:0] dest;
    int unsigned hops;
    dest = m[p_msg_nbits-1 -: p_node_nbits];  // only the header is routed on
    hops = (int'(dest) + p_num_nodes - p_id) % p_num_nodes;
    if (hops == 0)                     return 2'd0;
    else if (hops <= p_num_nodes / 2)  return 2'd1;
    else                               return 2'd2;
  endfunction

  logic [1:0] want [3];
  always_comb for (int i = 0; i < 3; i++) want[i] = route(h_msg[i]);

  // Output queues of the two ring directions
  logic [2:0]             oq_enq_val, oq_enq_rdy_unused;
  logic [p_msg_nbits-1:0] oq_enq_msg [3];
  logic [FW-1:0]          oq_free [3];

  assign oq_enq_rdy_unused[0] = 1'b0;
  assign oq_free[0]           = '0;
  assign oq_enq_val[0]        = 1'b0;

  logic [2:0]             oq_deq_val, oq_deq_rdy;
  logic [p_msg_nbits-1:0] oq_deq_msg [3];
  assign oq_deq_val[0] = 1'b0;
  assign oq_deq_msg[0] = '0;
  assign oq_deq_rdy    = {ccw_out_rdy, cw_out_rdy, 1'b0};
  assign cw_out_val    = oq_deq_val[1];
  assign cw_out_msg    = oq_deq_msg[1];
  assign ccw_out_val   = oq_deq_val[2];
  assign ccw_out_msg   = oq_deq_msg[2];

  for (genvar o = 1; o < 3; o++) begin : g_oq
    queue #(.p_nbits(p_msg_nbits), .p_depth(p_qdepth)) out_q (
      .clk, .reset,
      .enq_val(oq_enq_val[o]), .enq_rdy(oq_enq_rdy_unused[o]), .enq_msg(oq_enq_msg[o]),
      .deq_val(oq_deq_val[o]), .deq_rdy(oq_deq_rdy[o]),        .deq_msg(oq_deq_msg[o]),
      .num_free(oq_free[o])
    );
  end

  // Switch allocation: one round-robin arbiter per output
  logic [2:0] req   [3];   // req[o][i]: input i wants output o
  logic [2:0] grant [3];
  logic [2:0] go;          // output o transfers this cycle

  always_comb begin
    for (int o = 0; o < 3; o++)
      for (int i = 0; i < 3; i++) begin
        req[o][i] = h_val[i] && (want[i] == 2'(o));
        // bubble rule: injecting into a ring direction needs two free slots
        if (o != 0) begin
          if (i == 0) req[o][i] = req[o][i] && (oq_free[o] >= FW'(2));
          else        req[o][i] = req[o][i] && (oq_free[o] >= FW'(1));
        end
      end
  end

  for (genvar o = 0; o < 3; o++) begin : g_arb
    rr_arb #(.p_n(3)) arb (.clk, .reset, .en(go[o]), .req(req[o]), .grant(grant[o]));
  end

  always_comb begin
    // terminal output is driven straight from the switch
    term_out_val = (grant[0] != '0);
    term_out_msg = '0;
    for (int i = 0; i < 3; i++) if (grant[0][i]) term_out_msg = h_msg[i];
    go[0] = term_out_val && term_out_rdy;

    for (int o = 1; o < 3; o++) begin
      oq_enq_val[o] = (grant[o] != '0);
      oq_enq_msg[o] = '0;
      for (int i = 0; i < 3; i++) if (grant[o][i]) oq_enq_msg[o] = h_msg[i];
      go[o] = oq_enq_val[o];
    end

    for (int i = 0; i < 3; i++)
      h_rdy[i] = (grant[0][i] && term_out_rdy) || grant[1][i] || grant[2][i];
  end

endmodule
