// tb_rr_region: sends regular and SNFR frames of random length through a
// region under random back-pressure. Regular payloads must come out XORed with
// the key from byte 34 on, headers and SNFR frames unchanged; the packet
// counter must count every frame; the first beat must appear two cycles after
// it is accepted.
module tb_rr_region;
  import snfr_pkg::*;
  import tb_pkt_pkg::*;
  localparam logic [63:0] KEY = 64'hDEAD_BEEF_0BAD_F00D;
  logic clk = 0, rst_n = 0;
  logic s_tvalid, s_tready, m_tvalid, m_tready;
  axis_beat_t s_beat, m_beat;
  logic [31:0] pkt_count;
  int checks = 0, failures = 0;
  bytes_t expected[$];
  beats_t rx;
  int n_rx = 0;
  bit bp = 1;

  rr_region #(.KEY(KEY)) dut (.*);
  always #5 clk = ~clk;

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

  always @(negedge clk) m_tready = !bp || ($urandom % 3 != 0);

  always @(posedge clk) if (rst_n && m_tvalid && m_tready) begin
    rx.push_back(m_beat);
    if (m_beat.tlast) begin
      bytes_t got;
      got = from_beats(rx);
      rx.delete();
      check(expected.size() > 0 && same(got, expected[0]), $sformatf("frame %0d contents", n_rx));
      if (expected.size() > 0) void'(expected.pop_front());
      n_rx++;
    end
  end

  task automatic send(input bytes_t f);
    beats_t q;
    q = to_beats(f);
    foreach (q[i]) begin
      s_beat = q[i]; s_tvalid = 1;
      do @(posedge clk); while (!s_tready);
      #1;
    end
    s_tvalid = 0;
  endtask

  initial begin
    writes_t segs[$];
    int t_acc, t_out;
    s_tvalid = 0; s_beat = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // latency with no back-pressure
    bp = 0;
    begin
      bytes_t f;
      f = regular_frame(64, 5);
      expected.push_back(xor_payload(f, KEY));
      fork
        send(f);
        begin
          do @(posedge clk); while (!(s_tvalid && s_tready)); t_acc = $time;
          do @(posedge clk); while (!(m_tvalid && m_tready)); t_out = $time;
        end
      join
      check((t_out - t_acc) / 10 == 2, $sformatf("latency %0d cycles", (t_out - t_acc) / 10));
    end
    bp = 1;
    for (int k = 0; k < 30; k++) begin
      if (k % 4 == 3) begin
        bytes_t f;
        segs.delete();
        segs.push_back('{'{addr: 32'h4, data: 32'(k)}});
        f = snfr_frame(segs, 64'd1, SNFR_IP_PROTO_DEFAULT);
        expected.push_back(f);
        send(f);
      end else begin
        bytes_t f;
        f = regular_frame(40 + ($urandom % 200), $urandom);
        expected.push_back(xor_payload(f, KEY));
        send(f);
      end
    end
    repeat (30) @(posedge clk); #1;
    check(n_rx == 31, $sformatf("31 frames out (%0d)", n_rx));
    check(pkt_count == 31, "packet counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
