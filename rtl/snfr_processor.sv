// snfr_processor: SNFR protocol processor.
//
// Sits between the 10 Gbps Ethernet receive stream and the on-chip
// interconnect. Regular packets pass through the traffic FIFO. An SNFR packet
// (an IPv4 packet with protocol SNFR_PROTO) carries, for every FPGA on the
// path of the flow, a list of address/data writes that reconfigures that FPGA
// (the port map of its interconnect). When one reaches the head of the FIFO,
// the traffic behind it is held, this node's writes are applied over AXI4, the
// packet's OFFSET is advanced to the next node's segment, and then the SNFR
// packet and the held traffic are released in their original order. All nodes
// on a path thus switch at the same point of the flow, whatever the network
// latency between them.
//
// Structure: traffic FIFO (sync_fifo, FIFO_DEPTH beats) + FIFO controller
// (snfr_fifo_ctrl) + packet BRAM (snfr_pkt_buf) + protocol processing unit
// (snfr_ppu) + AXI4 master (snfr_axi_master). The controller copies the
// head of every incoming packet into one of N_SLOTS BRAM slots while it enters the
// FIFO; the processing unit reads the slot of the SNFR packet at the head of
// the FIFO as soon as it is complete and queues the writes in the AXI4
// master, which issues them only once the SNFR packet is at the FIFO head
// with the later traffic held; the controller then patches the new OFFSET
// into the packet as it leaves the FIFO. Each SNFR packet therefore crosses
// the FIFO once.
//
// Interface: s_* input stream (AXI4-Stream, 64-bit, s_tready low when the
// FIFO is full or all BRAM slots hold SNFR packets not yet sent), m_* output
// stream, m_axi_* AXI4 write channels to the interconnect's configuration
// port, plus status counters. The four-part structure follows the source;
// the sizes are this design's choices except where a parameter says
// otherwise.
module snfr_processor
  import snfr_pkg::*;
#(
  parameter logic [7:0]  SNFR_PROTO      = SNFR_IP_PROTO_DEFAULT,
  parameter int unsigned FIFO_DEPTH      = 2048,
  parameter int unsigned BUF_WORDS       = 256,
  parameter int unsigned N_SLOTS         = 4,
  parameter int unsigned REQ_DEPTH       = 512,
  parameter int unsigned MAX_OUTSTANDING = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        s_tvalid,
  output logic        s_tready,
  input  axis_beat_t  s_beat,
  output logic        m_tvalid,
  input  logic        m_tready,
  output axis_beat_t  m_beat,
  // AXI4 write master
  output logic [31:0] m_axi_awaddr,
  output logic [7:0]  m_axi_awlen,
  output logic [2:0]  m_axi_awsize,
  output logic [1:0]  m_axi_awburst,
  output logic        m_axi_awvalid,
  input  logic        m_axi_awready,
  output logic [31:0] m_axi_wdata,
  output logic [3:0]  m_axi_wstrb,
  output logic        m_axi_wlast,
  output logic        m_axi_wvalid,
  input  logic        m_axi_wready,
  input  logic [1:0]  m_axi_bresp,
  input  logic        m_axi_bvalid,
  output logic        m_axi_bready,
  // status
  output logic        holding,
  output logic [3:0]  ppu_state,
  output logic [31:0] snfr_pkt_count,
  output logic [31:0] reg_pkt_count,
  output logic [31:0] pairs_applied,
  output logic [31:0] snfr_err_count,
  output logic [31:0] axi_ok_count,
  output logic [31:0] axi_err_count,
  output logic [$clog2(FIFO_DEPTH+1):0] fifo_level,
  output logic [31:0] truncated_count   // SNFR packets longer than a BRAM slot
);

  // traffic FIFO
  logic       fifo_wr_en, fifo_full, fifo_rd_en, fifo_empty;
  axis_beat_t fifo_wr_data, fifo_rd_data;

  sync_fifo #(.WIDTH($bits(axis_beat_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(fifo_wr_en), .wr_data(fifo_wr_data), .full(fifo_full),
    .rd_en(fifo_rd_en), .rd_data(fifo_rd_data), .empty(fifo_empty), .level(fifo_level)
  );

  // packet BRAM: written by the controller on the way in, read by the
  // processing unit; N_SLOTS slots of BUF_WORDS beats
  logic             b_wr_en, b_rd_en;
  logic [$clog2(N_SLOTS*BUF_WORDS)-1:0] b_wr_addr, b_rd_addr;
  logic [DATA_W-1:0] b_wr_data, b_rd_data;

  snfr_pkt_buf #(.WORDS(N_SLOTS * BUF_WORDS)) u_buf (
    .clk,
    .wr_en(b_wr_en), .wr_addr(b_wr_addr), .wr_data(b_wr_data),
    .rd_en(b_rd_en), .rd_addr(b_rd_addr), .rd_data(b_rd_data)
  );

  logic        ppu_start, ppu_go, ppu_done, ppu_offset_ok;
  logic [$clog2(N_SLOTS)-1:0] ppu_slot;
  logic        axi_idle, req_valid, req_ready;
  logic [15:0] ppu_pkt_bytes;
  logic [63:0] ppu_new_offset;
  cfg_write_t  req;

  snfr_fifo_ctrl #(.SNFR_PROTO(SNFR_PROTO), .BUF_WORDS(BUF_WORDS), .N_SLOTS(N_SLOTS),
                   .CLASS_DEPTH(FIFO_DEPTH / 8)) u_ctrl (
    .clk, .rst_n,
    .s_tvalid, .s_tready, .s_beat,
    .fifo_wr_en, .fifo_wr_data, .fifo_full,
    .fifo_rd_en, .fifo_rd_data, .fifo_empty,
    .m_tvalid, .m_tready, .m_beat,
    .buf_wr_en(b_wr_en), .buf_wr_addr(b_wr_addr), .buf_wr_data(b_wr_data),
    .ppu_start, .ppu_go, .ppu_slot, .ppu_pkt_bytes, .ppu_done, .ppu_new_offset, .ppu_offset_ok,
    .holding, .snfr_pkt_count, .reg_pkt_count, .truncated_count
  );

  snfr_ppu #(.BUF_WORDS(BUF_WORDS), .N_SLOTS(N_SLOTS)) u_ppu (
    .clk, .rst_n,
    .start(ppu_start), .go(ppu_go), .slot(ppu_slot), .pkt_bytes(ppu_pkt_bytes), .done(ppu_done),
    .new_offset(ppu_new_offset), .offset_ok(ppu_offset_ok),
    .buf_rd_en(b_rd_en), .buf_rd_addr(b_rd_addr), .buf_rd_data(b_rd_data),
    .req_valid, .req_ready, .req, .axi_idle,
    .state_dbg(ppu_state), .pairs_applied, .error_count(snfr_err_count)
  );

  snfr_axi_master #(.REQ_DEPTH(REQ_DEPTH), .MAX_OUTSTANDING(MAX_OUTSTANDING)) u_axi (
    .clk, .rst_n,
    .gate(ppu_go), .req_valid, .req_ready, .req, .idle(axi_idle),
    .m_axi_awaddr, .m_axi_awlen, .m_axi_awsize, .m_axi_awburst,
    .m_axi_awvalid, .m_axi_awready,
    .m_axi_wdata, .m_axi_wstrb, .m_axi_wlast, .m_axi_wvalid, .m_axi_wready,
    .m_axi_bresp, .m_axi_bvalid, .m_axi_bready,
    .ok_count(axi_ok_count), .err_count(axi_err_count)
  );
endmodule
