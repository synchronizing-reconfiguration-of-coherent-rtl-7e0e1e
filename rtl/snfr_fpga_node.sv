// snfr_fpga_node: one network-attached FPGA of the SNFR system.
//
// A 10 Gbps Ethernet port feeds the SNFR protocol processor, whose output
// enters the on-chip interconnect. The interconnect chains N_REG
// reconfigurable regions and N_NET_OUT Ethernet transmit ports according to
// its port map, and the protocol processor rewrites that map, over AXI4, when
// an SNFR packet passes. Several such nodes on the path of one flow switch
// their functions at the same point of the flow.
//
// Interconnect numbering:
//   inputs : 0 = protocol processor, 1 + r = output of region r
//   outputs: o < N_NET_OUT = Ethernet transmit port o,
//            N_NET_OUT + r = input of region r
// The port-map entry of input i sits at AXI address 4*i. At reset the flow
// goes processor -> region 0 -> transmit port 0, and region 1 -> transmit
// port 0 (RESET_MAP).
//
// Interface: eth_rx_* is the receive stream of the Ethernet MAC, eth_tx_* the
// transmit streams (AXI4-Stream, 64-bit, 156.25 MHz for 10 Gbps); the MAC and
// PHY themselves are outside this module. Status outputs expose the packet
// counter of each region, the processing-unit state and the processor's
// counters. The composition (Ethernet, protocol processor, interconnect,
// regions) follows the source; the port counts and numbering are this
// design's choices.
module snfr_fpga_node
  import snfr_pkg::*;
#(
  parameter int unsigned N_REG      = 2,
  parameter int unsigned N_NET_OUT  = 2,
  parameter logic [N_REG-1:0][63:0] REGION_KEYS = {64'hC3C3_5A5A_0F0F_9696, 64'h0123_4567_89AB_CDEF},
  parameter logic [N_REG:0][7:0]    RESET_MAP   = {8'd0, 8'd0, 8'd2},
  parameter logic [7:0]  SNFR_PROTO = SNFR_IP_PROTO_DEFAULT,
  parameter int unsigned FIFO_DEPTH = 2048,
  parameter int unsigned BUF_WORDS  = 256,
  parameter int unsigned REQ_DEPTH  = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  // Ethernet receive stream
  input  logic        eth_rx_tvalid,
  output logic        eth_rx_tready,
  input  axis_beat_t  eth_rx_beat,
  // Ethernet transmit streams
  output logic       [N_NET_OUT-1:0] eth_tx_tvalid,
  input  logic       [N_NET_OUT-1:0] eth_tx_tready,
  output axis_beat_t [N_NET_OUT-1:0] eth_tx_beat,
  // status
  output logic [N_REG-1:0][31:0] region_pkt_count,
  output logic [N_REG:0][7:0]    port_map,
  output logic [31:0] map_updates,
  output logic        holding,
  output logic [3:0]  ppu_state,
  output logic [31:0] snfr_pkt_count,
  output logic [31:0] reg_pkt_count,
  output logic [31:0] snfr_err_count,
  output logic [31:0] axi_err_count,
  output logic [31:0] axi_ok_count,
  output logic [31:0] pairs_applied,
  output logic [31:0] truncated_count,
  output logic [$clog2(FIFO_DEPTH+1):0] fifo_level
);
  localparam int unsigned N_IN  = 1 + N_REG;
  localparam int unsigned N_OUT = N_NET_OUT + N_REG;

  // interconnect ports
  logic       [N_IN-1:0]  ic_s_tvalid, ic_s_tready;
  axis_beat_t [N_IN-1:0]  ic_s_beat;
  logic       [N_OUT-1:0] ic_m_tvalid, ic_m_tready;
  axis_beat_t [N_OUT-1:0] ic_m_beat;

  // AXI4 write channels processor -> interconnect
  logic [31:0] awaddr, wdata;
  logic [7:0]  awlen;
  logic [2:0]  awsize;
  logic [1:0]  awburst, bresp;
  logic [3:0]  wstrb;
  logic        awvalid, awready, wlast, wvalid, wready, bvalid, bready;


  snfr_processor #(
    .SNFR_PROTO(SNFR_PROTO), .FIFO_DEPTH(FIFO_DEPTH), .BUF_WORDS(BUF_WORDS),
    .REQ_DEPTH(REQ_DEPTH)
  ) u_proc (
    .clk, .rst_n,
    .s_tvalid(eth_rx_tvalid), .s_tready(eth_rx_tready), .s_beat(eth_rx_beat),
    .m_tvalid(ic_s_tvalid[0]), .m_tready(ic_s_tready[0]), .m_beat(ic_s_beat[0]),
    .m_axi_awaddr(awaddr), .m_axi_awlen(awlen), .m_axi_awsize(awsize),
    .m_axi_awburst(awburst), .m_axi_awvalid(awvalid), .m_axi_awready(awready),
    .m_axi_wdata(wdata), .m_axi_wstrb(wstrb), .m_axi_wlast(wlast),
    .m_axi_wvalid(wvalid), .m_axi_wready(wready),
    .m_axi_bresp(bresp), .m_axi_bvalid(bvalid), .m_axi_bready(bready),
    .holding, .ppu_state, .snfr_pkt_count, .reg_pkt_count, .pairs_applied,
    .snfr_err_count, .axi_ok_count, .axi_err_count, .fifo_level, .truncated_count
  );

  stream_interconnect #(.N_IN(N_IN), .N_OUT(N_OUT), .RESET_MAP(RESET_MAP)) u_ic (
    .clk, .rst_n,
    .s_tvalid(ic_s_tvalid), .s_tready(ic_s_tready), .s_beat(ic_s_beat),
    .m_tvalid(ic_m_tvalid), .m_tready(ic_m_tready), .m_beat(ic_m_beat),
    .s_axi_awaddr(awaddr), .s_axi_awlen(awlen), .s_axi_awsize(awsize),
    .s_axi_awburst(awburst), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wlast(wlast),
    .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .port_map, .map_updates
  );

  for (genvar r = 0; r < int'(N_REG); r++) begin : g_region
    rr_region #(.KEY(REGION_KEYS[r]), .SNFR_PROTO(SNFR_PROTO)) u_region (
      .clk, .rst_n,
      .s_tvalid(ic_m_tvalid[N_NET_OUT + r]), .s_tready(ic_m_tready[N_NET_OUT + r]),
      .s_beat(ic_m_beat[N_NET_OUT + r]),
      .m_tvalid(ic_s_tvalid[1 + r]), .m_tready(ic_s_tready[1 + r]),
      .m_beat(ic_s_beat[1 + r]),
      .pkt_count(region_pkt_count[r])
    );
  end

  for (genvar o = 0; o < int'(N_NET_OUT); o++) begin : g_net
    assign eth_tx_tvalid[o]  = ic_m_tvalid[o];
    assign eth_tx_beat[o]    = ic_m_beat[o];
    assign ic_m_tready[o]    = eth_tx_tready[o];
  end
endmodule
