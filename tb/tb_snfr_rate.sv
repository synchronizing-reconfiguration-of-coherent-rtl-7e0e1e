// tb_snfr_rate: the SNFR protocol processor, at its default sizes, under the
// heaviest load it is meant to carry: 9 Gbps on a 10 Gbps link, 8.1 Gbps of
// regular frames and 0.9 Gbps of SNFR frames, all of random length between
// 64 and 1518 bytes.
//
// The source offers beats at 9/10 of the clock rate (a credit of 9 per cycle,
// 10 per beat). One frame in ten is an SNFR frame whose payload is filled with
// pairs for this node (the worst case: every pair is written here). The AXI4
// slave model answers at once; the output is never stalled.
// Checks: every frame leaves in order, regular frames unchanged and SNFR
// frames with OFFSET past the segment; one AXI write per pair; and the
// offered load is carried, i.e. the last beat is accepted no more than 1 %
// (plus a short start-up margin) later than an unblocked source would have
// sent it. It prints how often the input was blocked, the deepest FIFO
// level, and the longest first-beat latency of a regular frame.
module tb_snfr_rate;
  import snfr_pkg::*;
  import tb_pkt_pkg::*;
  localparam int N_FRAMES = 400;

  logic clk = 0, rst_n = 0;
  logic s_tvalid, s_tready, m_tvalid, m_tready;
  axis_beat_t s_beat, m_beat;
  logic [31:0] m_axi_awaddr, m_axi_wdata;
  logic [7:0]  m_axi_awlen;
  logic [2:0]  m_axi_awsize;
  logic [1:0]  m_axi_awburst, m_axi_bresp;
  logic [3:0]  m_axi_wstrb;
  logic m_axi_awvalid, m_axi_awready, m_axi_wlast, m_axi_wvalid, m_axi_wready;
  logic m_axi_bvalid, m_axi_bready;
  logic holding;
  logic [3:0] ppu_state;
  logic [31:0] snfr_pkt_count, reg_pkt_count, pairs_applied, snfr_err_count;
  logic [31:0] axi_ok_count, axi_err_count, truncated_count;
  logic [$clog2(2048+1):0] fifo_level;
  int checks = 0, failures = 0;
  longint cycle = 0;

  snfr_processor dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

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

  // AXI4 slave: always ready, responds one cycle after each write
  int n_wr = 0, b_pending = 0;
  initial begin m_axi_awready = 1; m_axi_wready = 1; m_axi_bresp = AXI_RESP_OKAY; end
  always @(negedge clk) m_axi_bvalid = b_pending > 0;
  always @(posedge clk) if (rst_n) begin
    if (m_axi_bvalid && m_axi_bready) b_pending--;
    if (m_axi_awvalid && m_axi_wvalid) begin n_wr++; b_pending++; end
  end
  a_together: assert property (@(posedge clk) disable iff (!rst_n) m_axi_awvalid == m_axi_wvalid);

  // sink, never stalled
  bytes_t expected[$];
  beats_t rx;
  int n_rx = 0;
  longint first_out[$];
  initial m_tready = 1;
  always @(posedge clk) if (rst_n && m_tvalid && m_tready) begin
    if (rx.size() == 0) first_out.push_back(cycle);
    rx.push_back(m_beat);
    if (m_beat.tlast) begin
      bytes_t got;
      got = from_beats(rx);
      rx.delete();
      check(expected.size() > n_rx && same(got, expected[n_rx]), $sformatf("frame %0d", n_rx));
      n_rx++;
    end
  end

  // source: 9 beats offered per 10 cycles
  beats_t tx_q;
  int credit = 0;
  int n_blocked = 0, n_sent = 0;
  longint first_in[$];
  longint t_first = -1, t_last = 0;
  bit at_sop = 1;
  always @(negedge clk) begin
    s_tvalid = rst_n && tx_q.size() > 0 && credit >= 10;
    s_beat   = (tx_q.size() > 0) ? tx_q[0] : '0;
  end
  always @(posedge clk) if (rst_n) begin
    if (credit < 100) credit += 9;
    if (s_tvalid && !s_tready) n_blocked++;
    if (s_tvalid && s_tready) begin
      if (t_first < 0) t_first = cycle;
      t_last = cycle;
      if (at_sop) first_in.push_back(cycle);
      at_sop = tx_q[0].tlast;
      void'(tx_q.pop_front());
      credit -= 10;
      n_sent++;
    end
  end

  bit is_snfr[$];

  initial begin
    writes_t segs[$];
    writes_t mine;
    bytes_t f, g;
    beats_t q;
    int len, npairs, total_pairs, nbeats, max_level, max_lat, lat;
    longint ideal;
    total_pairs = 0; nbeats = 0; max_level = 0; max_lat = 0;
    s_tvalid = 0; s_beat = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N_FRAMES; k++) begin
      len = 64 + int'($urandom % (1518 - 64 + 1));
      if ($urandom % 10 == 0) begin
        // OFFSET word, n pairs and one terminator after the 34-byte header
        npairs = (len - SNFR_HDR_BYTES - 8) / 8 - 1;
        mine.delete();
        for (int p = 0; p < npairs; p++) mine.push_back('{addr: 32'(4 * (p % 3)), data: $urandom});
        segs.delete();
        segs.push_back(mine);
        f = snfr_frame(segs, 64'd1, SNFR_IP_PROTO_DEFAULT);
        g = f;
        for (int b = 0; b < 8; b++) g[SNFR_HDR_BYTES + b] = (b == 7) ? 8'(npairs + 2) : 8'd0;
        total_pairs += npairs;
        is_snfr.push_back(1);
      end else begin
        f = regular_frame(len, $urandom);
        g = f;
        is_snfr.push_back(0);
      end
      nbeats += (f.size() + 7) / 8;
      q = to_beats(f);
      foreach (q[i]) tx_q.push_back(q[i]);
      expected.push_back(g);
    end
    while (n_rx < N_FRAMES) begin
      @(posedge clk);
      if (int'(fifo_level) > max_level) max_level = int'(fifo_level);
    end
    @(posedge clk); #1;
    for (int k = 0; k < N_FRAMES; k++) if (!is_snfr[k]) begin
      lat = int'(first_out[k] - first_in[k]);
      if (lat > max_lat) max_lat = lat;
    end
    // an unblocked source sends nbeats beats in nbeats * 10 / 9 cycles
    ideal = longint'(nbeats) * 10 / 9;
    $display("%0d frames, %0d beats, %0d SNFR frames with %0d pairs: accepted in %0d cycles (unblocked source: %0d)",
             N_FRAMES, nbeats, snfr_pkt_count, total_pairs, t_last - t_first + 1, ideal);
    $display("input blocked %0d cycles, deepest FIFO level %0d beats, longest regular-frame latency %0d cycles",
             n_blocked, max_level, max_lat);
    check(t_last - t_first + 1 <= ideal + ideal / 100 + 50, "9 Gbps offered load carried");
    check(snfr_pkt_count > 0 && pairs_applied == 32'(total_pairs), "every pair applied");
    check(n_wr == total_pairs && axi_ok_count == 32'(total_pairs), "one AXI write per pair");
    check(snfr_err_count == 0 && truncated_count == 0, "no malformed or over-long SNFR frame");
    check(snfr_pkt_count + reg_pkt_count == N_FRAMES, "frame counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
