// Self-checking testbench of one ring router (node 1 of four).
//
// Checks the routing of every input/destination pair (to the terminal, one
// hop clockwise or counter-clockwise, the opposite node clockwise) and the
// bubble rule: with the clockwise link blocked, the terminal may put only one
// message into the two-entry clockwise output queue, while a message already
// travelling clockwise may still take the last slot.
module tb_ring_router;

  localparam int NB = 8;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;

  logic          t_iv, t_ir, t_ov, t_or, c_iv, c_ir, c_ov, c_or, a_iv, a_ir, a_ov, a_or;
  logic [NB-1:0] t_im, t_om, c_im, c_om, a_im, a_om;

  ring_router #(.p_msg_nbits(NB), .p_id(1)) dut (
    .clk, .reset,
    .term_in_val(t_iv), .term_in_rdy(t_ir), .term_in_msg(t_im),
    .term_out_val(t_ov), .term_out_rdy(t_or), .term_out_msg(t_om),
    .cw_in_val(c_iv), .cw_in_rdy(c_ir), .cw_in_msg(c_im),
    .cw_out_val(c_ov), .cw_out_rdy(c_or), .cw_out_msg(c_om),
    .ccw_in_val(a_iv), .ccw_in_rdy(a_ir), .ccw_in_msg(a_im),
    .ccw_out_val(a_ov), .ccw_out_rdy(a_or), .ccw_out_msg(a_om)
  );

  int checks = 0, failures = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // send one message on input port p (0 term, 1 cw, 2 ccw), then find it on an output
  task automatic route_one(int p, int dest, int expect_out);
    logic [NB-1:0] m;
    int where;
    m = {2'(dest), 6'($urandom)};
    case (p)
      0: begin t_iv = 1; t_im = m; end
      1: begin c_iv = 1; c_im = m; end
      default: begin a_iv = 1; a_im = m; end
    endcase
    @(posedge clk); #1;
    t_iv = 0; c_iv = 0; a_iv = 0;
    where = -1;
    for (int k = 0; k < 4 && where < 0; k++) begin
      if (t_ov && t_om == m) where = 0;
      else if (c_ov && c_om == m) where = 1;
      else if (a_ov && a_om == m) where = 2;
      @(posedge clk); #1;
    end
    check($sformatf("input %0d dest %0d left on %0d, expected %0d", p, dest, where, expect_out),
          where == expect_out);
  endtask

  initial begin
    t_iv = 0; c_iv = 0; a_iv = 0; t_im = 0; c_im = 0; a_im = 0;
    t_or = 1; c_or = 1; a_or = 1;
    repeat (3) @(posedge clk);
    reset = 0;
    @(posedge clk); #1;

    route_one(0, 1, 0);   // to itself
    route_one(0, 2, 1);   // one hop clockwise
    route_one(0, 0, 2);   // one hop counter-clockwise
    route_one(0, 3, 1);   // opposite node: clockwise
    route_one(1, 1, 0);   // arrived
    route_one(1, 2, 1);   // passing through clockwise
    route_one(2, 1, 0);
    route_one(2, 0, 2);   // passing through counter-clockwise

    // bubble rule
    c_or = 0;
    for (int n = 0; n < 3; n++) begin
      t_iv = 1; t_im = {2'd2, 6'(n)};
      @(posedge clk); #1;
    end
    t_iv = 0;
    repeat (3) @(posedge clk); #1;
    check("one injected message waits on the blocked link", c_ov && c_om == {2'd2, 6'd0});
    check("terminal queue is full behind the bubble", !t_ir);
    c_iv = 1; c_im = {2'd3, 6'h3f};
    #1 check("transit message may take the last slot", c_ir);
    @(posedge clk); #1;
    c_iv = 0;
    check("queue full after the transit message", !c_ir);
    // drain: order must be injected 0, transit, injected 1, injected 2
    c_or = 1;
    begin
      logic [NB-1:0] order [4] = '{ {2'd2, 6'd0}, {2'd3, 6'h3f}, {2'd2, 6'd1}, {2'd2, 6'd2} };
      for (int k = 0; k < 4; k++) begin
        int w = 0;
        while (!c_ov && w < 10) begin @(posedge clk); #1; w++; end
        check($sformatf("drain %0d got %h", k, c_om), c_ov && c_om == order[k]);
        @(posedge clk); #1;
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
