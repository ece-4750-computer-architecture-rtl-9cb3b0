// Wraps a memory response into a ring-network message.
//
// The network message is {dest, src, response}. The destination is the
// requester id that the request adapter stored in the top bits of the opaque
// field, which every cache and memory returns unchanged; the source is this
// bank's node id p_src_id. Purely combinational.
module mem_resp_net_adapter
  import mcore_pkg::*;
#(
  parameter type         resp_t   = mem_resp_4B_t,
  parameter int unsigned p_src_id = 0
)(
  input  resp_t                                 resp,
  output logic [2*NODE_NBITS+$bits(resp_t)-1:0] net_msg
);

  assign net_msg = {resp.opaque[OPAQUE_NBITS-1 -: NODE_NBITS], NODE_NBITS'(p_src_id), resp};

endmodule
