// tb_snfr_processor: end-to-end test of the SNFR protocol processor.
//
// A stream of regular frames with SNFR frames mixed in goes through the
// processor into a checking sink with random back-pressure; an AXI4 slave
// model with random ready and response delays (none in the
// throughput tests) answers the writes. Checks:
//   - every frame leaves in the order it came, regular frames unchanged;
//   - an SNFR frame leaves with OFFSET advanced past this node's segment and
//     is otherwise unchanged;
//   - exactly this node's ADD/DATA pairs are written, in order;
//   - every write is answered after the last beat of the frame ahead of the
//     SNFR frame has left and before the SNFR frame itself leaves
//     (the synchronisation point), and traffic piles up in the FIFO meanwhile;
//   - a malformed SNFR frame (OFFSET past its end) is counted as an error and
//     forwarded unchanged without writes;
//   - regular frames pass at one beat per cycle, with a first-beat latency of
//     at most 16 cycles (0.1 us at 156.25 MHz);
//   - with SNFR frames mixed in, each costs at most its beats once more, one
//     cycle per pair and a fixed overhead, also when longer than a BRAM slot;
//   - when the frames are already buffered, an SNFR frame holds the traffic
//     only for about one cycle per pair plus a few cycles.
module tb_snfr_processor;
  import snfr_pkg::*;
  import tb_pkt_pkg::*;
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
  logic [$clog2(256+1):0] fifo_level;
  int checks = 0, failures = 0;
  longint cycle = 0;
  bit bp = 1;

  snfr_processor #(.FIFO_DEPTH(256), .BUF_WORDS(64), .REQ_DEPTH(16)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- AXI4 slave model
  logic [31:0] aw_q[$], w_q[$];
  cfg_write_t  got_wr[$];
  longint      b_cycle[$];
  int          b_pending = 0;
  always @(negedge clk) begin
    m_axi_awready = !bp || ($urandom % 2) == 0;
    m_axi_wready  = !bp || ($urandom % 2) == 0;
    m_axi_bvalid  = (b_pending > 0) && (!bp || $urandom % 3 == 0);
    m_axi_bresp   = AXI_RESP_OKAY;
  end
  always @(posedge clk) if (rst_n) begin
    if (m_axi_awvalid && m_axi_awready) aw_q.push_back(m_axi_awaddr);
    if (m_axi_wvalid && m_axi_wready)   w_q.push_back(m_axi_wdata);
    if (m_axi_bvalid && m_axi_bready) begin b_pending--; b_cycle.push_back(cycle); end
    while (aw_q.size() > 0 && w_q.size() > 0) begin
      got_wr.push_back('{addr: aw_q.pop_front(), data: w_q.pop_front()});
      b_pending++;
    end
  end

  // ---------------- sink
  bytes_t expected[$];
  beats_t rx;
  longint first_cycle[$], last_cycle[$];
  int n_rx = 0;
  bit stop_out = 0;
  always @(negedge clk) m_tready = !stop_out && (!bp || ($urandom % 4 != 0));
  always @(posedge clk) if (rst_n && m_tvalid && m_tready) begin
    if (rx.size() == 0) first_cycle.push_back(cycle);
    rx.push_back(m_beat);
    if (m_beat.tlast) begin
      bytes_t got;
      got = from_beats(rx);
      rx.delete();
      last_cycle.push_back(cycle);
      check(expected.size() > n_rx && same(got, expected[n_rx]), $sformatf("frame %0d", n_rx));
      n_rx++;
    end
  end

  // ---------------- source
  beats_t tx_q;
  longint in_first[$];
  task automatic queue_frame(input bytes_t f, input bytes_t exp);
    beats_t q;
    q = to_beats(f);
    foreach (q[i]) tx_q.push_back(q[i]);
    expected.push_back(exp);
  endtask

  bit in_gap = 0;
  bit at_sop = 1;
  always @(negedge clk) begin
    s_tvalid = tx_q.size() > 0 && !in_gap;
    s_beat   = (tx_q.size() > 0) ? tx_q[0] : '0;
  end
  always @(posedge clk) if (rst_n && s_tvalid && s_tready) begin
    if (at_sop) in_first.push_back(cycle);
    at_sop = tx_q[0].tlast;
    void'(tx_q.pop_front());
  end

  function automatic bytes_t with_offset(input bytes_t f, input logic [63:0] off);
    bytes_t g = f;
    for (int k = 0; k < 8; k++) g[SNFR_HDR_BYTES + k] = off[63 - 8*k -: 8];
    return g;
  endfunction

  initial begin
    writes_t segs[$];
    writes_t mine;
    bytes_t f;
    int snfr_idx [$];
    int max_level = 0;
    longint t0;
    int nbeats;
    int n_pairs = 0;
    int extra = 0;
    s_tvalid = 0; s_beat = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // 1. throughput and latency of regular traffic (no back-pressure)
    bp = 0;
    nbeats = 0;
    for (int k = 0; k < 20; k++) begin
      f = regular_frame(64 + 8 * (k % 10), 100 + k);
      nbeats += (f.size() + 7) / 8;
      queue_frame(f, f);
    end
    t0 = cycle;
    while (n_rx < 20) @(posedge clk);
    check(cycle - t0 <= longint'(nbeats + 16),
          $sformatf("20 regular frames, %0d beats, in %0d cycles", nbeats, cycle - t0));
    for (int k = 0; k < 20; k++)
      check(first_cycle[k] - in_first[k] <= 16,
            $sformatf("latency of frame %0d: %0d cycles", k, first_cycle[k] - in_first[k]));
    check(s_tready, "input never blocked");

    // 2. mixed traffic with SNFR frames, back-pressure on
    bp = 1;
    for (int k = 0; k < 24; k++) begin
      if (k % 6 == 5) begin
        segs.delete(); mine.delete();
        for (int p = 0; p < 1 + k % 4; p++)
          mine.push_back('{addr: 32'(4 * p), data: 32'(k * 16 + p)});
        segs.push_back(mine);
        segs.push_back('{'{addr: 32'h10, data: 32'h77}, '{addr: 32'h14, data: 32'h78}});
        f = snfr_frame(segs, 64'd1, SNFR_IP_PROTO_DEFAULT);
        snfr_idx.push_back(20 + k);
        queue_frame(f, with_offset(f, 64'(1 + mine.size() + 1)));
        n_pairs += mine.size();
      end else begin
        f = regular_frame(48 + ($urandom % 300), $urandom);
        queue_frame(f, f);
      end
    end
    while (n_rx < 44) begin
      @(posedge clk);
      if (int'(fifo_level) > max_level) max_level = int'(fifo_level);
    end
    check(snfr_pkt_count == 4, "four SNFR frames processed");
    check(n_pairs == 12 && pairs_applied == 32'(n_pairs), "every pair applied");
    check(got_wr.size() == n_pairs, $sformatf("one AXI write per pair (%0d)", got_wr.size()));
    begin
      int w = 0;
      for (int s = 0; s < 4; s++) begin
        int k;
        k = 5 + 6 * s;
        for (int p = 0; p < 1 + k % 4; p++) begin
          if (w < got_wr.size())
            check(got_wr[w].addr == 32'(4 * p) && got_wr[w].data == 32'(k * 16 + p),
                  $sformatf("write %0d", w));
          // synchronisation point
          if (w < b_cycle.size())
            check(b_cycle[w] > last_cycle[snfr_idx[s] - 1] && b_cycle[w] < first_cycle[snfr_idx[s]],
                  $sformatf("write %0d answered between frame %0d and the SNFR frame", w, snfr_idx[s] - 1));
          w++;
        end
      end
    end
    check(max_level > 8, $sformatf("traffic held in the FIFO (max level %0d)", max_level));
    check(axi_ok_count == 32'(n_pairs) && axi_err_count == 0, "AXI response counts");

    // 3. malformed SNFR frame: OFFSET beyond the end
    segs.delete();
    segs.push_back('{'{addr: 32'h0, data: 32'h1}});
    f = snfr_frame(segs, 64'd40, SNFR_IP_PROTO_DEFAULT);
    queue_frame(f, f);
    f = regular_frame(100, 9);
    queue_frame(f, f);
    while (n_rx < 46) @(posedge clk);
    #1;
    check(snfr_err_count == 1, "malformed SNFR frame counted");
    check(got_wr.size() == n_pairs, "no write from the malformed frame");
    check(reg_pkt_count == 20 + 20 + 1, "regular frame count");

    // 4. line rate with SNFR frames mixed in, no back-pressure: each SNFR
    //    frame may cost its beats twice (it is processed once it has been
    //    received completely) plus one cycle per pair and a fixed overhead;
    //    the last one is longer than a BRAM slot
    bp = 0;
    nbeats = 0;
    n_pairs = got_wr.size();
    for (int k = 0; k < 12; k++) begin
      if (k % 4 == 3) begin
        segs.delete(); mine.delete();
        for (int p = 0; p < 10; p++)
          mine.push_back('{addr: 32'(64 + 4 * p), data: $urandom});
        segs.push_back(mine);
        mine.delete();
        for (int p = 0; p < ((k == 11) ? 60 : 20); p++)
          mine.push_back('{addr: 32'(4 * p), data: 32'(p)});
        segs.push_back(mine);
        f = snfr_frame(segs, 64'd1, SNFR_IP_PROTO_DEFAULT);
        queue_frame(f, with_offset(f, 64'(12)));
        extra += (f.size() + 7) / 8 + 10 + 30;
      end else begin
        f = regular_frame(512, $urandom);
        queue_frame(f, f);
      end
      nbeats += (f.size() + 7) / 8;
    end
    t0 = cycle;
    while (n_rx < 58) @(posedge clk);
    check(cycle - t0 <= longint'(nbeats + extra),
          $sformatf("mixed traffic, %0d beats, in %0d cycles", nbeats, cycle - t0));
    check(got_wr.size() == n_pairs + 30, "30 more writes");
    check(truncated_count == 1, "SNFR frame longer than a slot handled");

    // 5. under load: frames are already buffered when they reach the FIFO
    //    head; the traffic is held only for the writes and their responses
    stop_out = 1;
    nbeats = 0;
    for (int k = 0; k < 8; k++) begin
      if (k == 1 || k == 7) begin
        segs.delete(); mine.delete();
        for (int p = 0; p < 10; p++)
          mine.push_back('{addr: 32'(128 + 4 * p), data: $urandom});
        segs.push_back(mine);
        segs.push_back('{'{addr: 32'h0, data: 32'h1}});
        f = snfr_frame(segs, 64'd1, SNFR_IP_PROTO_DEFAULT);
        queue_frame(f, with_offset(f, 64'(12)));
      end else begin
        f = regular_frame(128, $urandom);
        queue_frame(f, f);
      end
      nbeats += (f.size() + 7) / 8;
    end
    while (tx_q.size() > 0) @(posedge clk);
    repeat (20) @(posedge clk);
    #1 stop_out = 0;
    t0 = cycle;
    while (n_rx < 66) @(posedge clk);
    check(cycle - t0 <= longint'(nbeats + 2 * (10 + 8)),
          $sformatf("buffered mix, %0d beats, drained in %0d cycles", nbeats, cycle - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
