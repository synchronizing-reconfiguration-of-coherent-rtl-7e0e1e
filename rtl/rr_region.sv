// rr_region: reconfigurable region with its packet counter.
//
// A reconfigurable region is the slot in which a stream function f(x) is
// deployed; a flow passes through whichever regions the interconnect's port
// map chains together. Every region carries a counter of the packets it has
// received, which makes the switch-over of a flow from one region to another
// observable.
//
// The function deployed here stands in for the coherent encoder/decoder pairs
// the reconfiguration is meant for: the payload of every regular packet (bytes
// HDR_BYTES onward, after the Ethernet/IPv4 header) is XORed with the 64-bit
// KEY, byte lane by byte lane. A region with the same KEY on another FPGA
// undoes it, so the two form a coherent pair, while a mismatched pair
// garbles the data. SNFR packets (IPv4 protocol SNFR_PROTO) and headers pass
// unchanged, so the reconfiguration information reaches the next FPGA intact.
// The choice of XOR coding is this design's; the source leaves f(x) open.
//
// Interface: s_* input stream and m_* output stream (AXI4-Stream, 64-bit);
// s_tready comes from a register (a two-word FIFO sits at the output), so no
// combinational path runs from m_tready to s_tready. Latency: two cycles.
module rr_region
  import snfr_pkg::*;
#(
  parameter logic [63:0] KEY        = 64'h0123_4567_89AB_CDEF,
  parameter logic [7:0]  SNFR_PROTO = SNFR_IP_PROTO_DEFAULT,
  parameter int unsigned HDR_BYTES  = SNFR_HDR_BYTES
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        s_tvalid,
  output logic        s_tready,
  input  axis_beat_t  s_beat,
  output logic        m_tvalid,
  input  logic        m_tready,
  output axis_beat_t  m_beat,
  output logic [31:0] pkt_count
);
  logic       full, empty, acc;
  logic [2:0] idx;            // beat number within packet, saturates at 7
  logic       pkt_snfr;       // current packet is an SNFR packet
  logic       is_snfr_now;
  axis_beat_t coded;
  logic [2:0] lvl;

  assign s_tready = !full;
  assign m_tvalid = !empty;
  assign acc      = s_tvalid && s_tready;

  // SNFR detection: IPv4 protocol byte (byte 23 = beat 2, lane 7).
  assign is_snfr_now = (idx == 3'd2) ? (s_beat.tdata[8*(IP_PROTO_BYTE%8) +: 8] == SNFR_PROTO)
                                     : pkt_snfr;

  always_comb begin
    coded = s_beat;
    for (int l = 0; l < 8; l++) begin
      if (!is_snfr_now && (32'(idx) * 8 + 32'(l) >= HDR_BYTES))
        coded.tdata[8*l +: 8] = s_beat.tdata[8*l +: 8] ^ KEY[8*l +: 8];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx       <= '0;
      pkt_snfr  <= 1'b0;
      pkt_count <= '0;
    end else if (acc) begin
      if (idx == 3'd2) pkt_snfr <= is_snfr_now;
      if (s_beat.tlast) begin
        idx       <= '0;
        pkt_snfr  <= 1'b0;
        pkt_count <= pkt_count + 1;
      end else if (idx != 3'd7) begin
        idx <= idx + 3'd1;
      end
    end
  end

  sync_fifo #(.WIDTH($bits(axis_beat_t)), .DEPTH(2)) u_out (
    .clk, .rst_n,
    .wr_en(acc), .wr_data(coded), .full(full),
    .rd_en(m_tready), .rd_data(m_beat), .empty(empty), .level(lvl)
  );
endmodule
