// Behavioural two-port test memory with 4-byte memory messages.
//
// Word array m, directly loadable by a testbench. Each port accepts one
// request when it holds no response, then answers after a random delay of 0
// to p_max_delay extra cycles (at least one cycle). Reads return the
// addressed bytes in the low data bits; writes honour len (0 word, 1 byte,
// 2 halfword). Opaque and type are echoed.
module test_mem_4B
  import mcore_pkg::*;
#(
  parameter int unsigned p_words     = 4096,
  parameter int unsigned p_max_delay = 3
)(
  input  logic         clk,
  input  logic         reset,
  input  logic [1:0]   req_val,
  output logic [1:0]   req_rdy,
  input  mem_req_4B_t  req_msg  [2],
  output logic [1:0]   resp_val,
  input  logic [1:0]   resp_rdy,
  output mem_resp_4B_t resp_msg [2]
);

  logic [31:0] m [p_words];

  logic [1:0]  busy;
  int unsigned wait_cnt [2];

  always_comb for (int p = 0; p < 2; p++) begin
    req_rdy[p]  = !busy[p];
    resp_val[p] = busy[p] && (wait_cnt[p] == 0);
  end

  always_ff @(posedge clk) begin
    if (reset) busy <= '0;
    else for (int p = 0; p < 2; p++) begin
      if (req_val[p] && req_rdy[p]) begin
        automatic mem_req_4B_t r = req_msg[p];
        automatic int unsigned w = (r.addr >> 2) % p_words;
        automatic logic [31:0] word = m[w];
        automatic logic [3:0] be = (r.len == 1) ? (4'b0001 << r.addr[1:0]) :
                                   (r.len == 2) ? (4'b0011 << r.addr[1:0]) : 4'b1111;
        automatic logic [31:0] wd = r.data << (8 * r.addr[1:0]);
        busy[p]            <= 1'b1;
        wait_cnt[p]        <= (p_max_delay == 0) ? 0 : $urandom_range(p_max_delay, 0);
        resp_msg[p].typ    <= r.typ;
        resp_msg[p].opaque <= r.opaque;
        resp_msg[p].test   <= '0;
        resp_msg[p].len    <= r.len;
        resp_msg[p].data   <= (r.typ == MEM_READ) ? (word >> (8 * r.addr[1:0])) : '0;
        if (r.typ == MEM_WRITE) begin
          for (int b = 0; b < 4; b++) if (be[b]) word[8*b +: 8] = wd[8*b +: 8];
          m[w] <= word;
        end
      end else if (busy[p]) begin
        if (wait_cnt[p] != 0) wait_cnt[p] <= wait_cnt[p] - 1;
        else if (resp_rdy[p]) busy[p] <= 1'b0;
      end
    end
  end

endmodule
