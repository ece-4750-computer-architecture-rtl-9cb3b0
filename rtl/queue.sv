// Small synchronous FIFO with valid/ready handshakes on both sides.
//
// A circular buffer of p_depth entries. enq_rdy is high while an entry is
// free; deq_val is high while an entry is held, and the head is shown on
// deq_msg in the same cycle (no bypass from enq to deq, so an entry spends at
// least one cycle in the queue). num_free reports the free entries, which the
// ring routers use for bubble flow control.
module queue #(
  parameter int unsigned p_nbits = 8,
  parameter int unsigned p_depth = 2
)(
  input  logic               clk,
  input  logic               reset,
  input  logic               enq_val,
  output logic               enq_rdy,
  input  logic [p_nbits-1:0] enq_msg,
  output logic               deq_val,
  input  logic               deq_rdy,
  output logic [p_nbits-1:0] deq_msg,
  output logic [$clog2(p_depth+1)-1:0] num_free
);

  localparam int unsigned PW = (p_depth > 1) ? $clog2(p_depth) : 1;
  localparam int unsigned CW = $clog2(p_depth+1);

  logic [p_nbits-1:0] mem [p_depth];
  logic [PW-1:0]      head, tail;
  logic [CW-1:0]      count;

  wire do_enq = enq_val & enq_rdy;
  wire do_deq = deq_val & deq_rdy;

  assign enq_rdy  = (count != CW'(p_depth));
  assign deq_val  = (count != '0);
  assign deq_msg  = mem[head];
  assign num_free = CW'(p_depth) - count;

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (p == PW'(p_depth-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (do_enq) begin
        mem[tail] <= enq_msg;
        tail      <= incr(tail);
      end
      if (do_deq) head <= incr(head);
      count <= count + CW'(do_enq) - CW'(do_deq);
    end
  end

endmodule
