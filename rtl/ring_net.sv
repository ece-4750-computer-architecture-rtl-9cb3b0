// Four-node bidirectional ring network.
//
// p_num_nodes routers (ring_router) in a ring: the clockwise output of node i
// feeds the clockwise input of node i+1, the counter-clockwise output of node i
// feeds the counter-clockwise input of node i-1. Each terminal injects and
// receives single-flit messages whose top p_node_nbits bits hold the
// destination node; the message is delivered unchanged. Messages between one
// source and one destination arrive in order (one fixed path, FIFO queues).
//
// Latency with no contention: one cycle in the source terminal queue plus one
// cycle per hop, so 1, 2 or 3 cycles from in_val to out_val.
module ring_net #(
  parameter int unsigned p_msg_nbits  = 16,
  parameter int unsigned p_node_nbits = 2,
  parameter int unsigned p_num_nodes  = 4
)(
  input  logic                   clk,
  input  logic                   reset,
  input  logic [p_num_nodes-1:0] in_val,
  output logic [p_num_nodes-1:0] in_rdy,
  input  logic [p_msg_nbits-1:0] in_msg  [p_num_nodes],
  output logic [p_num_nodes-1:0] out_val,
  input  logic [p_num_nodes-1:0] out_rdy,
  output logic [p_msg_nbits-1:0] out_msg [p_num_nodes]
);

  // link signals, indexed by the router that drives them
  logic [p_num_nodes-1:0] cw_val, cw_rdy, ccw_val, ccw_rdy;
  logic [p_msg_nbits-1:0] cw_msg  [p_num_nodes];
  logic [p_msg_nbits-1:0] ccw_msg [p_num_nodes];
  // ready of the link entering each router
  logic [p_num_nodes-1:0] cw_in_rdy, ccw_in_rdy;

  for (genvar n = 0; n < p_num_nodes; n++) begin : g_node
    localparam int unsigned PREV = (n + p_num_nodes - 1) % p_num_nodes;
    localparam int unsigned NEXT = (n + 1) % p_num_nodes;

    // the downstream router's acceptance closes each link's handshake
    assign cw_rdy[n]  = cw_in_rdy[NEXT];
    assign ccw_rdy[n] = ccw_in_rdy[PREV];

    ring_router #(
      .p_msg_nbits(p_msg_nbits), .p_node_nbits(p_node_nbits),
      .p_num_nodes(p_num_nodes), .p_id(n)
    ) router (
      .clk, .reset,
      .term_in_val (in_val[n]),     .term_in_rdy (in_rdy[n]),      .term_in_msg (in_msg[n]),
      .term_out_val(out_val[n]),    .term_out_rdy(out_rdy[n]),     .term_out_msg(out_msg[n]),
      .cw_in_val   (cw_val[PREV]),  .cw_in_rdy   (cw_in_rdy[n]),   .cw_in_msg   (cw_msg[PREV]),
      .cw_out_val  (cw_val[n]),     .cw_out_rdy  (cw_rdy[n]),      .cw_out_msg  (cw_msg[n]),
      .ccw_in_val  (ccw_val[NEXT]), .ccw_in_rdy  (ccw_in_rdy[n]),  .ccw_in_msg  (ccw_msg[NEXT]),
      .ccw_out_val (ccw_val[n]),    .ccw_out_rdy (ccw_rdy[n]),     .ccw_out_msg (ccw_msg[n])
    );
  end

endmodule
