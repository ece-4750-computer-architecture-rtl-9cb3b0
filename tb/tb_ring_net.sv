// Self-checking testbench of the four-node ring network.
//
// Phase 1 sends one message at a time from every node to every node and checks
// the zero-load latency of this ring: 1 cycle to itself, 2 for one hop, 3 for
// the opposite node. Phase 2 injects random traffic from all four terminals
// at full rate while the receivers accept at random, including long runs of
// messages to the opposite node that load both ring directions; every message
// must arrive once, at its destination, in order per source/destination pair.
// A stuck network is caught by the watchdog.
module tb_ring_net;

  localparam int NB = 16;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;

  logic [3:0]    in_val, in_rdy, out_val, out_rdy;
  logic [NB-1:0] in_msg  [4];
  logic [NB-1:0] out_msg [4];

  ring_net #(.p_msg_nbits(NB)) dut (
    .clk, .reset, .in_val, .in_rdy, .in_msg, .out_val, .out_rdy, .out_msg
  );

  int checks = 0, failures = 0;
  int received = 0;
  int next_seq [4][4];     // expected next sequence number per (src, dest)
  int sent_seq [4][4];
  int lat_now;

  // message: {dest[1:0], src[1:0], seq[11:0]}
  always @(posedge clk) if (!reset) begin
    for (int d = 0; d < 4; d++) if (out_val[d] && out_rdy[d]) begin
      automatic int dest = out_msg[d][15:14];
      automatic int src  = out_msg[d][13:12];
      automatic int seq  = out_msg[d][11:0];
      checks++;
      received++;
      if (dest != d || seq != next_seq[src][d]) begin
        failures++;
        $display("FAIL: node %0d got dest %0d src %0d seq %0d (expected seq %0d)",
                 d, dest, src, seq, next_seq[src][d]);
      end
      next_seq[src][d] = seq + 1;
    end
  end

  initial begin
    in_val  = '0;
    out_rdy = '1;
    for (int i = 0; i < 4; i++) begin in_msg[i] = '0; for (int k = 0; k < 4; k++) begin next_seq[i][k] = 0; sent_seq[i][k] = 0; end end
    repeat (3) @(posedge clk);
    reset = 1'b0;
    @(posedge clk); #1;

    // phase 1: zero-load latency
    for (int s = 0; s < 4; s++)
      for (int d = 0; d < 4; d++) begin
        automatic int hops = (d - s + 4) % 4;
        automatic int expect_lat = (hops == 0) ? 1 : (hops == 2) ? 3 : 2;
        in_msg[s] = {2'(d), 2'(s), 12'(sent_seq[s][d]++)};
        in_val[s] = 1'b1;
        @(posedge clk); #1;
        in_val[s] = 1'b0;
        lat_now = 1;
        while (!out_val[d]) begin @(posedge clk); #1; lat_now++; end
        checks++;
        if (lat_now != expect_lat) begin
          failures++;
          $display("FAIL: latency %0d->%0d is %0d, expected %0d", s, d, lat_now, expect_lat);
        end
        @(posedge clk); #1;
      end

    // phase 2: random full-rate traffic with random back-pressure
    fork
      for (int s = 0; s < 4; s++) begin
        automatic int src = s;
        fork
          for (int n = 0; n < 300; n++) begin
            automatic int d = (n < 100) ? (src + 2) % 4 : $urandom_range(3, 0);
            automatic int q = sent_seq[src][d];
            sent_seq[src][d] = q + 1;
            in_msg[src] = {2'(d), 2'(src), 12'(q)};
            in_val[src] = 1'b1;
            @(posedge clk);
            while (!in_rdy[src]) @(posedge clk);
            #1 in_val[src] = 1'b0;
          end
        join_none
      end
      repeat (4000) begin
        @(negedge clk);
        out_rdy = 4'($urandom);
      end
    join_any
    wait (received == 16 + 4 * 300);
    out_rdy = '1;
    repeat (5) @(posedge clk);
    checks++;
    if (received != 16 + 4 * 300) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d received", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
