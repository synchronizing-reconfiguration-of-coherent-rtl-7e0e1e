// tb_snfr_fpga_node: two FPGA nodes, both at their default parameters, in
// the demonstration set-up: node 1's transmit port 0 feeds node 2's receive
// port. Each node has region 0 (key A) and region 1 (key B); a flow coded by a
// region on node 1 is decoded only by the region with the same key on node 2.
//   state 0: node 1 region 0, node 2 region 0, node 2 sends on port 0
//   state 1: node 1 region 1, node 2 region 1, node 2 sends on port 1
// A stream of regular frames, with an SNFR frame every few frames that
// switches to the other state (one write for node 1, two for node 2), goes
// in at near line rate while the outputs apply random back-pressure.
// Checks: every regular frame leaves node 2 intact (so encoder and decoder
// always matched) on the port of the state in force at its place in the flow,
// in order; each SNFR frame leaves with OFFSET advanced past both segments;
// region packet counters and map-update counts agree. It also counts how often
// each mechanism happened (SNFR processing on each node, traffic held in a
// FIFO, switches to each state, transmit back-pressure) and fails if one never
// did.
module tb_snfr_fpga_node;
  import snfr_pkg::*;
  import tb_pkt_pkg::*;
  localparam logic [63:0] KEY_A = 64'h0123_4567_89AB_CDEF;
  localparam logic [63:0] KEY_B = 64'hC3C3_5A5A_0F0F_9696;
  localparam int N_SWITCH = 8, PER_STATE = 12;

  logic clk = 0, rst_n = 0;
  // node 1
  logic       rx1_tvalid, rx1_tready;
  axis_beat_t rx1_beat;
  logic       [1:0] tx1_tvalid, tx1_tready;
  axis_beat_t [1:0] tx1_beat;
  logic [1:0][31:0] cnt1;
  logic [2:0][7:0]  map1;
  logic [31:0] upd1, snfr1, reg1, serr1, aerr1, aok1, pairs1, trunc1;
  logic hold1;
  logic [3:0] st1;
  logic [12:0] lvl1;
  // node 2
  logic       [1:0] tx2_tvalid, tx2_tready;
  axis_beat_t [1:0] tx2_beat;
  logic [1:0][31:0] cnt2;
  logic [2:0][7:0]  map2;
  logic [31:0] upd2, snfr2, reg2, serr2, aerr2, aok2, pairs2, trunc2;
  logic hold2;
  logic [3:0] st2;
  logic [12:0] lvl2;

  snfr_fpga_node u_node1 (
    .clk, .rst_n,
    .eth_rx_tvalid(rx1_tvalid), .eth_rx_tready(rx1_tready), .eth_rx_beat(rx1_beat),
    .eth_tx_tvalid(tx1_tvalid), .eth_tx_tready(tx1_tready), .eth_tx_beat(tx1_beat),
    .region_pkt_count(cnt1), .port_map(map1), .map_updates(upd1), .holding(hold1),
    .ppu_state(st1), .snfr_pkt_count(snfr1), .reg_pkt_count(reg1),
    .snfr_err_count(serr1), .axi_err_count(aerr1), .axi_ok_count(aok1),
    .pairs_applied(pairs1), .truncated_count(trunc1), .fifo_level(lvl1));

  snfr_fpga_node u_node2 (
    .clk, .rst_n,
    .eth_rx_tvalid(tx1_tvalid[0]), .eth_rx_tready(tx1_tready[0]), .eth_rx_beat(tx1_beat[0]),
    .eth_tx_tvalid(tx2_tvalid), .eth_tx_tready(tx2_tready), .eth_tx_beat(tx2_beat),
    .region_pkt_count(cnt2), .port_map(map2), .map_updates(upd2), .holding(hold2),
    .ppu_state(st2), .snfr_pkt_count(snfr2), .reg_pkt_count(reg2),
    .snfr_err_count(serr2), .axi_err_count(aerr2), .axi_ok_count(aok2),
    .pairs_applied(pairs2), .truncated_count(trunc2), .fifo_level(lvl2));

  assign tx1_tready[1] = 1'b1;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters
  int n_held1 = 0, n_held2 = 0, n_bp = 0, n_to_state[2] = '{0, 0}, n_tx1_port1 = 0;
  always @(posedge clk) if (rst_n) begin
    if (hold1 && lvl1 > 0) n_held1++;
    if (hold2 && lvl2 > 0) n_held2++;
    if (tx2_tvalid != 0 && (tx2_tvalid & ~tx2_tready) != 0) n_bp++;
    if (tx1_tvalid[1]) n_tx1_port1++;
  end

  // ---------------- sinks on node 2
  bytes_t exp_q [2][$];
  beats_t rx [2];
  int n_out [2] = '{0, 0};
  always @(negedge clk) begin
    tx2_tready[0] = ($urandom % 5 != 0);
    tx2_tready[1] = ($urandom % 5 != 0);
  end
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 2; o++) if (tx2_tvalid[o] && tx2_tready[o]) begin
      rx[o].push_back(tx2_beat[o]);
      if (tx2_beat[o].tlast) begin
        bytes_t got;
        got = from_beats(rx[o]);
        rx[o].delete();
        check(exp_q[o].size() > 0 && same(got, exp_q[o][0]),
              $sformatf("output %0d frame %0d intact and in order", o, n_out[o]));
        if (exp_q[o].size() > 0) void'(exp_q[o].pop_front());
        n_out[o]++;
      end
    end
  end

  // ---------------- source into node 1
  beats_t tx_q;
  always @(negedge clk) begin
    rx1_tvalid = tx_q.size() > 0 && ($urandom % 8 != 0);
    rx1_beat   = (tx_q.size() > 0) ? tx_q[0] : '0;
  end
  always @(posedge clk) if (rst_n && rx1_tvalid && rx1_tready) void'(tx_q.pop_front());

  task automatic queue_frame(input bytes_t f);
    beats_t q;
    q = to_beats(f);
    foreach (q[i]) tx_q.push_back(q[i]);
  endtask

  initial begin
    writes_t segs[$];
    bytes_t f, e;
    int state = 0;
    int n_reg = 0;
    int n_frames_total;
    rx1_tvalid = 0; rx1_beat = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(map1 == {8'd0, 8'd0, 8'd2} && map2 == {8'd0, 8'd0, 8'd2}, "reset state 0");
    for (int s = 0; s <= N_SWITCH; s++) begin
      for (int k = 0; k < PER_STATE; k++) begin
        f = regular_frame(60 + ($urandom % 400), $urandom);
        queue_frame(f);
        exp_q[state].push_back(f);
        n_reg++;
      end
      if (s < N_SWITCH) begin
        int ns;
        ns = 1 - state;
        segs.delete();
        segs.push_back('{'{addr: 32'h0, data: 32'(2 + ns)}});
        segs.push_back('{'{addr: 32'h0, data: 32'(2 + ns)},
                         '{addr: 32'(4 * (1 + ns)), data: 32'(ns)}});
        f = snfr_frame(segs, 64'd1, SNFR_IP_PROTO_DEFAULT);
        queue_frame(f);
        e = f;
        e[SNFR_HDR_BYTES + 7] = 8'd6;     // 1 + (1 + 1) + (2 + 1)
        exp_q[ns].push_back(e);
        n_to_state[ns]++;
        state = ns;
      end
    end
    n_frames_total = n_reg + N_SWITCH;
    while (n_out[0] + n_out[1] < n_frames_total) @(posedge clk);
    repeat (10) @(posedge clk); #1;
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0, "every frame delivered");
    check(snfr1 == N_SWITCH && snfr2 == N_SWITCH, "both nodes processed every SNFR frame");
    check(upd1 == N_SWITCH && upd2 == 2 * N_SWITCH, "map updates: 1 per switch on node 1, 2 on node 2");
    check(serr1 == 0 && serr2 == 0 && aerr1 == 0 && aerr2 == 0, "no errors");
    check(reg1 == 32'(n_reg) && reg2 == 32'(n_reg), "regular frame counts");
    check(cnt1[0] + cnt1[1] == 32'(n_frames_total) && cnt2[0] + cnt2[1] == 32'(n_frames_total),
          "region packet counters add up");
    check(cnt1[0] == cnt2[0] && cnt1[1] == cnt2[1], "coherent regions saw the same packets");
    check(n_tx1_port1 == 0, "node 1 never sends on port 1");
    // mechanisms
    $display("mechanisms: held1=%0d held2=%0d to_state0=%0d to_state1=%0d backpressure=%0d",
             n_held1, n_held2, n_to_state[0], n_to_state[1], n_bp);
    check(n_held1 > 0, "traffic held on node 1");
    check(n_held2 > 0, "traffic held on node 2");
    check(n_to_state[0] > 0 && n_to_state[1] > 0, "both states reached");
    check(n_bp > 0, "transmit back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
