// Round-robin arbiter.
//
// Grants one of p_n requesters, searching from the one after the last winner.
// The priority pointer moves only when the grant is used (en high), so a
// requester that is granted but blocked keeps its turn. Purely combinational
// from req to grant; the pointer is a register.
module rr_arb #(
  parameter int unsigned p_n = 3
)(
  input  logic           clk,
  input  logic           reset,
  input  logic           en,
  input  logic [p_n-1:0] req,
  output logic [p_n-1:0] grant
);

  localparam int unsigned IW = (p_n > 1) ? $clog2(p_n) : 1;

  logic [IW-1:0] last;

  always_comb begin
    grant = '0;
    for (int k = 1; k <= int'(p_n); k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % p_n;
      if (req[idx] && (grant == '0)) grant[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) last <= IW'(p_n - 1);
    else if (en && grant != '0) begin
      for (int i = 0; i < int'(p_n); i++)
        if (grant[i]) last <= IW'(i);
    end
  end

endmodule
