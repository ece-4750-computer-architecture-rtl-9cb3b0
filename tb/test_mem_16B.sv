// Behavioural two-port test memory with 16-byte (cache line) memory messages.
//
// Word array m, directly loadable by a testbench. Each port accepts one
// request when it holds no response, then answers after a random delay of 0
// to p_max_delay extra cycles (at least one cycle). Requests read or write
// the whole aligned line. Opaque and type are echoed; reads, writes and
// served requests per port are counted.
module test_mem_16B
  import mcore_pkg::*;
#(
  parameter int unsigned p_words     = 16384,
  parameter int unsigned p_max_delay = 3
)(
  input  logic          clk,
  input  logic          reset,
  input  logic [1:0]    req_val,
  output logic [1:0]    req_rdy,
  input  mem_req_16B_t  req_msg  [2],
  output logic [1:0]    resp_val,
  input  logic [1:0]    resp_rdy,
  output mem_resp_16B_t resp_msg [2]
);

  logic [31:0] m [p_words];

  logic [1:0]  busy;
  int unsigned wait_cnt [2];
  int unsigned num_reads [2];
  int unsigned num_writes [2];

  always_comb for (int p = 0; p < 2; p++) begin
    req_rdy[p]  = !busy[p];
    resp_val[p] = busy[p] && (wait_cnt[p] == 0);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      busy <= '0;
      for (int p = 0; p < 2; p++) begin num_reads[p] <= 0; num_writes[p] <= 0; end
    end else for (int p = 0; p < 2; p++) begin
      if (req_val[p] && req_rdy[p]) begin
        automatic mem_req_16B_t r = req_msg[p];
        automatic int unsigned w = ((r.addr >> 2) & ~32'h3) % p_words;
        busy[p]            <= 1'b1;
        wait_cnt[p]        <= (p_max_delay == 0) ? 0 : $urandom_range(p_max_delay, 0);
        resp_msg[p].typ    <= r.typ;
        resp_msg[p].opaque <= r.opaque;
        resp_msg[p].test   <= '0;
        resp_msg[p].len    <= r.len;
        resp_msg[p].data   <= (r.typ == MEM_READ) ? {m[w+3], m[w+2], m[w+1], m[w]} : '0;
        if (r.typ == MEM_WRITE) begin
          for (int k = 0; k < 4; k++) m[w+k] <= r.data[32*k +: 32];
          num_writes[p] <= num_writes[p] + 1;
        end else begin
          num_reads[p] <= num_reads[p] + 1;
        end
      end else if (busy[p]) begin
        if (wait_cnt[p] != 0) wait_cnt[p] <= wait_cnt[p] - 1;
        else if (resp_rdy[p]) busy[p] <= 1'b0;
      end
    end
  end

endmodule
