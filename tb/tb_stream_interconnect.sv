// tb_stream_interconnect: drives three input streams into four outputs under
// random back-pressure. Checks the AXI4 port-map writes (OKAY/SLVERR), that
// two inputs sharing an output both get through with packets never
// interleaved and in per-input order, that a port-map change while a packet
// is in flight takes effect only at the next packet, and that an entry >= N_OUT
// discards that input's packets.
module tb_stream_interconnect;
  import snfr_pkg::*;
  localparam int NI = 3, NO = 4;
  logic clk = 0, rst_n = 0;
  logic       [NI-1:0] s_tvalid, s_tready;
  axis_beat_t [NI-1:0] s_beat;
  logic       [NO-1:0] m_tvalid, m_tready;
  axis_beat_t [NO-1:0] m_beat;
  logic [31:0] s_axi_awaddr, s_axi_wdata, map_updates;
  logic [7:0]  s_axi_awlen;
  logic [2:0]  s_axi_awsize;
  logic [1:0]  s_axi_awburst, s_axi_bresp;
  logic [3:0]  s_axi_wstrb;
  logic s_axi_awvalid, s_axi_awready, s_axi_wlast, s_axi_wvalid, s_axi_wready;
  logic s_axi_bvalid, s_axi_bready;
  logic [NI-1:0][7:0] port_map;
  int checks = 0, failures = 0;
  bit stall_all = 0;

  stream_interconnect #(.N_IN(NI), .N_OUT(NO), .RESET_MAP({8'd0, 8'd0, 8'd2})) dut (.*);
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

  // AXI4 single write; returns the response.
  task automatic axi_write(input logic [31:0] a, input logic [31:0] d, output logic [1:0] resp);
    s_axi_awaddr = a; s_axi_wdata = d; s_axi_awvalid = 1; s_axi_wvalid = 1;
    fork
      begin do @(posedge clk); while (!s_axi_awready); #1 s_axi_awvalid = 0; end
      begin do @(posedge clk); while (!s_axi_wready);  #1 s_axi_wvalid = 0; end
    join
    while (!s_axi_bvalid) begin @(posedge clk); #1; end
    resp = s_axi_bresp;
    @(posedge clk); #1;
  endtask

  // ---------------- sources: beat = {src, seq, beat number, filler}
  int seq_next [NI];
  task automatic send_pkt(input int src, input int len);
    for (int b = 0; b < len; b++) begin
      s_beat[src].tdata = {8'(src), 16'(seq_next[src]), 16'(b), 24'hA5A5A5};
      s_beat[src].tkeep = '1;
      s_beat[src].tlast = (b == len - 1);
      s_tvalid[src] = 1;
      do @(posedge clk); while (!s_tready[src]);
      #1;
    end
    s_tvalid[src] = 0;
    seq_next[src]++;
  endtask

  // ---------------- sinks
  int rx_pkts [NO][NI];        // packets per output per source
  int last_seq [NO][NI];
  int cur_src [NO], cur_seq [NO], cur_b [NO];
  always @(negedge clk) for (int o = 0; o < NO; o++) m_tready[o] = !stall_all && ($urandom % 4 != 0);

  always @(posedge clk) begin
    for (int o = 0; o < NO; o++) begin
      if (rst_n && m_tvalid[o] && m_tready[o]) begin
        int src, seq, b;
        src = int'(m_beat[o].tdata[63:56]);
        seq = int'(m_beat[o].tdata[55:40]);
        b   = int'(m_beat[o].tdata[39:24]);
        if (cur_b[o] == 0) begin
          cur_src[o] = src; cur_seq[o] = seq;
          check(seq > last_seq[o][src], $sformatf("out%0d: in-order from in%0d", o, src));
          last_seq[o][src] = seq;
        end else begin
          check(src == cur_src[o] && seq == cur_seq[o] && b == cur_b[o],
                $sformatf("out%0d: packet not interleaved", o));
        end
        cur_b[o] = m_beat[o].tlast ? 0 : cur_b[o] + 1;
        if (m_beat[o].tlast) rx_pkts[o][src]++;
      end
    end
  end

  initial begin
    logic [1:0] resp;
    s_tvalid = '0; s_beat = '0;
    s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_awaddr = 0; s_axi_wdata = 0;
    s_axi_awlen = 0; s_axi_awsize = 3'd2; s_axi_awburst = 2'b01; s_axi_wstrb = 4'hF;
    s_axi_wlast = 1; s_axi_bready = 1;
    foreach (seq_next[i]) seq_next[i] = 0;
    foreach (cur_b[o]) cur_b[o] = 0;
    foreach (last_seq[o, i]) last_seq[o][i] = -1;
    foreach (rx_pkts[o, i]) rx_pkts[o][i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(port_map == {8'd0, 8'd0, 8'd2}, "reset map");
    // phase A: in0 -> out0, in1 -> out0 (shared), in2 -> out1
    axi_write(32'h0, 32'd0, resp);  check(resp == AXI_RESP_OKAY, "write in0 OKAY");
    axi_write(32'h4, 32'd0, resp);  check(resp == AXI_RESP_OKAY, "write in1 OKAY");
    axi_write(32'h8, 32'd1, resp);  check(resp == AXI_RESP_OKAY, "write in2 OKAY");
    axi_write(32'h40, 32'd1, resp); check(resp == AXI_RESP_SLVERR, "out-of-range SLVERR");
    check(port_map == {8'd1, 8'd0, 8'd0}, "map after writes");
    check(map_updates == 3, "three map updates counted");
    fork
      for (int k = 0; k < 10; k++) send_pkt(0, 3 + k % 5);
      for (int k = 0; k < 10; k++) send_pkt(1, 2 + k % 7);
      for (int k = 0; k < 10; k++) send_pkt(2, 1 + k % 4);
    join
    repeat (20) @(posedge clk); #1;
    check(rx_pkts[0][0] == 10 && rx_pkts[0][1] == 10, "out0 got both inputs' packets");
    check(rx_pkts[1][2] == 10, "out1 got in2's packets");
    // phase B: change in0's entry while its packet is stalled mid-way
    fork
      send_pkt(0, 6);
      begin
        do @(posedge clk); while (!(s_tvalid[0] && s_tready[0]));
        #1 stall_all = 1;
        repeat (3) @(posedge clk); #1;
        check(!dut.in_sop[0], "packet is in flight during the update");
        axi_write(32'h0, 32'd3, resp);
        stall_all = 0;
      end
    join
    send_pkt(0, 4);
    repeat (20) @(posedge clk); #1;
    check(rx_pkts[0][0] == 11, "packet in flight finished on the old output");
    check(rx_pkts[3][0] == 1, "next packet took the new output");
    // phase C: discard
    axi_write(32'h4, 32'hFF, resp);
    for (int k = 0; k < 3; k++) send_pkt(1, 3);
    repeat (20) @(posedge clk); #1;
    check(rx_pkts[0][1] == 10 && rx_pkts[1][1] == 0 && rx_pkts[2][1] == 0 && rx_pkts[3][1] == 0,
          "discarded input reaches no output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
