// Wraps a memory request into a ring-network message.
//
// The network message is {dest, src, request}. The destination is the
// data-cache bank that owns the address: with cache lines interleaved across
// banks, the bank index is the two address bits just above the 4-bit line
// offset (addr[5:4]). In single-bank mode (p_single_bank = 1, used by the
// refill networks where several requesters share one memory port) the
// destination is always node 0. The requester id p_src_id is written into the
// top bits of the request's opaque field so that the response network can
// send the answer back; the rest of the request is passed on unchanged.
// Purely combinational.
module mem_req_net_adapter
  import mcore_pkg::*;
#(
  parameter type         req_t         = mem_req_4B_t,
  parameter int unsigned p_single_bank = 0,
  parameter int unsigned p_src_id      = 0
)(
  input  req_t                                  req,
  output logic [2*NODE_NBITS+$bits(req_t)-1:0]  net_msg
);

  req_t                  req_tag;
  logic [NODE_NBITS-1:0] dest;

  always_comb begin
    req_tag = req;
    req_tag.opaque[OPAQUE_NBITS-1 -: NODE_NBITS] = NODE_NBITS'(p_src_id);
    dest = (p_single_bank != 0) ? '0 : req.addr[4 +: NODE_NBITS];
    net_msg = {dest, NODE_NBITS'(p_src_id), req_tag};
  end

endmodule
