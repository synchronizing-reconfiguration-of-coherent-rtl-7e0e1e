// tb_snfr_fifo_ctrl: the FIFO controller with a traffic FIFO and a four-slot
// packet BRAM, the testbench standing in for the processing unit: on ppu_start
// it reads the slot back, waits for ppu_go, then answers with ppu_done and a
// random new OFFSET (or offset_ok low) after a random delay. Checks that SNFR frames are
// recognised (and look-alikes with another EtherType, IHL or protocol are
// not), that the slot holds the frame's first beats and the reported length is
// right, that ppu_go rises only when every earlier frame has left, that
// nothing leaves between ppu_go and ppu_done, that all frames
// leave in order, regular ones unchanged and SNFR ones with the new OFFSET
// (unchanged when offset_ok is low), that traffic arriving meanwhile is held
// in the FIFO, and that an SNFR frame longer than a slot is forwarded whole
// and counted.
module tb_snfr_fifo_ctrl;
  import snfr_pkg::*;
  import tb_pkt_pkg::*;
  localparam int BW = 16;
  logic clk = 0, rst_n = 0;
  logic s_tvalid, s_tready, m_tvalid, m_tready;
  axis_beat_t s_beat, m_beat;
  logic fifo_wr_en, fifo_full, fifo_rd_en, fifo_empty;
  axis_beat_t fifo_wr_data, fifo_rd_data;
  logic [$clog2(128+1):0] fifo_level;
  logic buf_wr_en, buf_rd_en;
  logic [$clog2(4*BW)-1:0] buf_wr_addr, buf_rd_addr;
  logic [DATA_W-1:0] buf_wr_data, buf_rd_data;
  logic [1:0] ppu_slot;
  logic ppu_start, ppu_go, ppu_done, ppu_offset_ok, holding;
  logic [63:0] ppu_new_offset;
  logic [15:0] ppu_pkt_bytes;
  logic [31:0] snfr_pkt_count, reg_pkt_count, truncated_count;
  int checks = 0, failures = 0;
  longint cycle = 0;

  sync_fifo #(.WIDTH($bits(axis_beat_t)), .DEPTH(128)) u_fifo (
    .clk, .rst_n, .wr_en(fifo_wr_en), .wr_data(fifo_wr_data), .full(fifo_full),
    .rd_en(fifo_rd_en), .rd_data(fifo_rd_data), .empty(fifo_empty), .level(fifo_level));
  snfr_pkt_buf #(.WORDS(4 * BW)) u_buf (
    .clk, .wr_en(buf_wr_en), .wr_addr(buf_wr_addr), .wr_data(buf_wr_data),
    .rd_en(buf_rd_en), .rd_addr(buf_rd_addr), .rd_data(buf_rd_data));
  snfr_fifo_ctrl #(.BUF_WORDS(BW), .CLASS_DEPTH(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bytes_t expected[$];
  beats_t rx;
  int n_rx = 0;

  // processing-unit stand-in
  bytes_t exp_frame[$];
  logic [63:0] exp_off[$];
  bit exp_ok[$];
  int exp_idx[$];
  int n_start = 0;
  initial begin
    ppu_done = 0; ppu_new_offset = '0; ppu_offset_ok = 0;
    buf_rd_en = 0; buf_rd_addr = '0;
  end
  always @(posedge clk) if (rst_n && ppu_start) begin
    n_start++;
    fork begin
      bytes_t f;
      beats_t q;
      int nb;
      int idx;
      f = exp_frame.pop_front();
      q = to_beats(f);
      nb = (q.size() > BW) ? BW : q.size();
      check(int'(ppu_pkt_bytes) == ((f.size() > BW * 8) ? BW * 8 : f.size()),
            $sformatf("pkt_bytes %0d", ppu_pkt_bytes));
      idx = exp_idx.pop_front();
      for (int i = 0; i < nb; i++) begin
        #1 buf_rd_en = 1; buf_rd_addr = {ppu_slot, 4'(i)};
        @(posedge clk); #1 buf_rd_en = 0;
        check(buf_rd_data == q[i].tdata, $sformatf("slot beat %0d", i));
      end
      // the writes may go out only once every earlier frame has left
      while (!ppu_go) @(posedge clk);
      #1 check(n_rx == idx && rx.size() == 0,
               $sformatf("go when the SNFR frame %0d is at the head (%0d left)", idx, n_rx));
      repeat ($urandom % 20) begin
        @(posedge clk);
        check(!m_tvalid, "no output while the processing unit works");
      end
      #1 ppu_done = 1; ppu_new_offset = exp_off.pop_front(); ppu_offset_ok = exp_ok.pop_front();
      @(posedge clk); #1 ppu_done = 0;
    end join_none
  end

  // sink
  always @(negedge clk) m_tready = ($urandom % 4 != 0);
  always @(posedge clk) if (rst_n && m_tvalid && m_tready) begin
    rx.push_back(m_beat);
    if (m_beat.tlast) begin
      bytes_t got;
      got = from_beats(rx);
      rx.delete();
      check(expected.size() > n_rx && same(got, expected[n_rx]), $sformatf("frame %0d", n_rx));
      n_rx++;
    end
  end

  // source
  beats_t tx_q;
  always @(negedge clk) begin
    s_tvalid = tx_q.size() > 0;
    s_beat   = (tx_q.size() > 0) ? tx_q[0] : '0;
  end
  always @(posedge clk) if (rst_n && s_tvalid && s_tready) void'(tx_q.pop_front());

  function automatic bytes_t with_offset(input bytes_t f, input logic [63:0] off);
    bytes_t g = f;
    for (int k = 0; k < 8; k++) g[SNFR_HDR_BYTES + k] = off[63 - 8*k -: 8];
    return g;
  endfunction

  task automatic queue_snfr(input bytes_t f);
    logic [63:0] off;
    bit ok;
    off = {$urandom, $urandom};
    ok  = ($urandom % 4 != 0);
    exp_frame.push_back(f);
    exp_off.push_back(off);
    exp_ok.push_back(ok);
    exp_idx.push_back(expected.size());
    queue_frame(f, ok ? with_offset(f, off) : f);
  endtask

  task automatic queue_frame(input bytes_t f, input bytes_t exp);
    beats_t q;
    q = to_beats(f);
    foreach (q[i]) tx_q.push_back(q[i]);
    expected.push_back(exp);
  endtask

  initial begin
    writes_t segs[$];
    bytes_t f;
    int max_level = 0;
    int n_snfr = 0;
    s_tvalid = 0; s_beat = '0; m_tready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int k = 0; k < 40; k++) begin
      case (k % 8)
        3: begin
          segs.delete();
          for (int p = 0; p < k % 5; p++) segs.push_back('{'{addr: 32'(p), data: 32'(k)}});
          if (segs.size() == 0) segs.push_back('{'{addr: 32'h8, data: 32'h9}});
          f = snfr_frame(segs, 64'd1, SNFR_IP_PROTO_DEFAULT);
          n_snfr++;
          queue_snfr(f);
        end
        5: begin            // look-alikes: wrong EtherType / IHL / protocol
          f = snfr_frame(segs, 64'd1, SNFR_IP_PROTO_DEFAULT);
          if (k % 3 == 0)      f[12] = 8'h86;
          else if (k % 3 == 1) f[14] = 8'h46;
          else                 f[23] = 8'd17;
          queue_frame(f, f);
        end
        default: begin
          f = regular_frame(40 + ($urandom % 200), $urandom);
          queue_frame(f, f);
        end
      endcase
    end
    // over-long SNFR frame: 200 bytes, a slot holds 16 beats = 128 bytes
    segs.delete();
    for (int p = 0; p < 18; p++) segs.push_back('{'{addr: 32'(p), data: 32'(p)}});
    f = snfr_frame(segs, 64'd1, SNFR_IP_PROTO_DEFAULT);
    n_snfr++;
    queue_snfr(f);
    f = regular_frame(70, 3);
    queue_frame(f, f);
    while (n_rx < 42) begin
      @(posedge clk);
      if (int'(fifo_level) > max_level) max_level = int'(fifo_level);
    end
    @(posedge clk); #1;
    check(n_start == n_snfr && snfr_pkt_count == 32'(n_snfr),
          $sformatf("%0d SNFR frames recognised (%0d)", n_snfr, n_start));
    check(reg_pkt_count == 32'(42 - n_snfr), "regular frame count");
    check(truncated_count == 1, "over-long SNFR frame counted");
    check(max_level > 4, "traffic held in the FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
