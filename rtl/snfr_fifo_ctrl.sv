// snfr_fifo_ctrl: FIFO controller of the SNFR protocol processor.
//
// Write side: the data flow from the Ethernet side goes straight into the
// traffic FIFO. The controller classifies each packet as regular or SNFR from
// its Ethernet/IPv4 header (EtherType 0x0800, version/IHL 0x45, IPv4
// protocol = SNFR_PROTO) and queues one class bit per packet as soon as the
// protocol byte (byte 23, in beat 2) has been written. At the same time it
// copies the first BUF_WORDS beats of every packet into the current slot of
// the packet BRAM (N_SLOTS slots used in turn); when the packet was an SNFR
// packet the slot is kept (with the packet length) and the next packet goes
// to the next slot. If all slots hold SNFR packets not yet sent, input stops
// at the next packet start.
//
// Read side: the protocol processing unit is started on the next SNFR
// packet's BRAM slot as soon as that packet is complete and the unit is free
// (possibly while the SNFR packet before is still leaving), so it can parse the
// pairs and queue the writes while earlier traffic still leaves. Regular
// packets are forwarded unchanged. When the packet at the head of the FIFO is
// the SNFR packet the controller stops forwarding, so all later traffic stays
// buffered, raises ppu_go (which lets the AXI4 master issue the queued writes)
// and waits until the processing unit reports that every reconfiguration
// write has been answered. It then sends the SNFR packet out of the FIFO with
// the new OFFSET value written over bytes 34..41, frees the slot and resumes.
// Every packet ahead of the SNFR packet has therefore left before the first
// reconfiguration write, and every packet behind it leaves after the last
// write has been answered: the reconfiguration happens exactly at the place of
// the SNFR packet in the flow.
//
// Interface: s_* Ethernet-side stream (AXI4-Stream, 64 bits), fifo_* traffic
// FIFO ports, m_* stream toward the interconnect, buf_* packet BRAM write
// port, ppu_* handshake with the processing unit (start pulse, slot, length
// in bytes; done pulse with the new OFFSET and whether to write it).
// Timing: a regular packet waits for its class (beat 2 written) and the FIFO's
// two-cycle latency; regular traffic flows at one beat per cycle; an SNFR
// packet costs one cycle per beat plus the time from ppu_go to the last
// write response. SNFR packets longer than BUF_WORDS beats are processed on
// their first BUF_WORDS beats and forwarded whole. The FIFO and BRAM write
// data are the input beat itself, wired through without a register.
// The source gives the FIFO/FIFO controller/processing unit split and the
// detect, buffer, process, release order; the class queue, the copy into the
// BRAM on the write side, the slots, the early start of the processing
// unit and the header checks are this design's choices.
module snfr_fifo_ctrl
  import snfr_pkg::*;
#(
  parameter logic [7:0]  SNFR_PROTO  = SNFR_IP_PROTO_DEFAULT,
  parameter int unsigned BUF_WORDS   = 256,    // beats per slot
  parameter int unsigned N_SLOTS     = 4,      // packet BRAM slots, power of 2
  parameter int unsigned CLASS_DEPTH = 256,
  parameter int unsigned HDR_BYTES   = SNFR_HDR_BYTES
) (
  input  logic       clk,
  input  logic       rst_n,
  // Ethernet-side input stream
  input  logic       s_tvalid,
  output logic       s_tready,
  input  axis_beat_t s_beat,
  // traffic FIFO
  output logic       fifo_wr_en,
  output axis_beat_t fifo_wr_data,
  input  logic       fifo_full,
  output logic       fifo_rd_en,
  input  axis_beat_t fifo_rd_data,
  input  logic       fifo_empty,
  // output stream toward the interconnect
  output logic       m_tvalid,
  input  logic       m_tready,
  output axis_beat_t m_beat,
  // packet BRAM write port ({slot, beat})
  output logic                           buf_wr_en,
  output logic [$clog2(N_SLOTS*BUF_WORDS)-1:0] buf_wr_addr,
  output logic [DATA_W-1:0]              buf_wr_data,
  // processing unit handshake
  output logic        ppu_start,
  output logic        ppu_go,           // SNFR packet at the head, traffic held
  output logic [$clog2(N_SLOTS)-1:0] ppu_slot,
  output logic [15:0] ppu_pkt_bytes,
  input  logic        ppu_done,
  input  logic [63:0] ppu_new_offset,
  input  logic        ppu_offset_ok,
  // status
  output logic        holding,          // traffic is being held
  output logic [31:0] snfr_pkt_count,
  output logic [31:0] reg_pkt_count,
  output logic [31:0] truncated_count
);
  localparam int unsigned BAW = $clog2(BUF_WORDS);
  localparam int unsigned SW  = $clog2(N_SLOTS);

  function automatic logic [3:0] keep_bytes(input logic [KEEP_W-1:0] k);
    logic [3:0] n = '0;
    for (int i = 0; i < int'(KEEP_W); i++) n += 4'(k[i]);
    return n;
  endfunction

  // ---------------------------------------------------------------- write side
  logic        push, at_sop, in_buf;
  logic [15:0] in_beat;          // beat number within packet, saturating
  logic [15:0] in_bytes;         // bytes copied into the slot so far
  logic [15:0] hdr_etype;
  logic [7:0]  hdr_vihl;
  logic        pkt_snfr_q, this_snfr, commit;
  logic [SW-1:0] wr_slot, rd_slot;
  logic        release_slot;
  logic [N_SLOTS-1:0]       slot_busy;
  logic [N_SLOTS-1:0][15:0] slot_bytes;
  logic        cls_push, cls_full, cls_empty, cls_pop, cls_dout, cls_snfr;
  logic [$clog2(CLASS_DEPTH+1):0] cls_level;   // unused: occupancy of the class queue

  assign at_sop       = (in_beat == '0);
  assign in_buf       = (in_beat < 16'(BUF_WORDS));
  assign s_tready     = !fifo_full && !cls_full && !(at_sop && slot_busy[wr_slot]);
  assign push         = s_tvalid && s_tready;
  assign fifo_wr_en   = push;
  assign fifo_wr_data = s_beat;
  assign buf_wr_en    = push && in_buf;
  assign buf_wr_addr  = {wr_slot, in_beat[BAW-1:0]};
  assign buf_wr_data  = s_beat.tdata;

  // Class of the current packet: complete when beat 2 (holding byte 23) is
  // written, or at the end of a shorter packet (never SNFR).
  assign cls_push  = push && ((in_beat == 16'd2) || (s_beat.tlast && in_beat < 16'd2));
  assign cls_snfr  = (in_beat == 16'd2) && (hdr_etype == ETHERTYPE_IPV4) &&
                     (hdr_vihl == IPV4_VIHL) &&
                     (beat_byte(s_beat.tdata, IP_PROTO_BYTE % 8) == SNFR_PROTO);
  assign this_snfr = (in_beat == 16'd2) ? cls_snfr : pkt_snfr_q;
  assign commit    = push && s_beat.tlast && this_snfr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_beat    <= '0;
      in_bytes   <= '0;
      hdr_etype  <= '0;
      hdr_vihl   <= '0;
      pkt_snfr_q <= 1'b0;
      wr_slot    <= '0;
      slot_busy  <= '0;
      slot_bytes <= '0;
      truncated_count <= '0;
    end else begin
      if (push) begin
        if (s_beat.tlast) begin
          in_beat    <= '0;
          in_bytes   <= '0;
          pkt_snfr_q <= 1'b0;
        end else begin
          if (in_beat != 16'hFFFF) in_beat <= in_beat + 16'd1;
          if (in_buf) in_bytes <= in_bytes + 16'(keep_bytes(s_beat.tkeep));
          if (in_beat == 16'd2) pkt_snfr_q <= cls_snfr;
        end
        if (in_beat == 16'd1) begin
          hdr_etype <= {beat_byte(s_beat.tdata, ETHERTYPE_BYTE % 8),
                        beat_byte(s_beat.tdata, ETHERTYPE_BYTE % 8 + 1)};
          hdr_vihl  <= beat_byte(s_beat.tdata, IP_VIHL_BYTE % 8);
        end
      end
      if (commit) begin
        slot_busy[wr_slot]  <= 1'b1;
        slot_bytes[wr_slot] <= in_bytes + (in_buf ? 16'(keep_bytes(s_beat.tkeep)) : 16'd0);
        wr_slot             <= wr_slot + 1'b1;
        if (!in_buf) truncated_count <= truncated_count + 1;
      end
      if (release_slot) slot_busy[rd_slot] <= 1'b0;
    end
  end

  sync_fifo #(.WIDTH(1), .DEPTH(CLASS_DEPTH)) u_class_q (
    .clk, .rst_n,
    .wr_en(cls_push), .wr_data(cls_snfr), .full(cls_full),
    .rd_en(cls_pop), .rd_data(cls_dout), .empty(cls_empty), .level(cls_level)
  );

  // ---------------------------------------------------------------- read side
  typedef enum logic [1:0] {
    ST_HEAD,      // at a packet boundary, waiting for the head packet's class
    ST_FWD,       // forwarding a regular packet
    ST_PROCESS,   // processing unit at work, traffic held
    ST_EMIT       // sending the SNFR packet with its new OFFSET
  } state_t;

  state_t      state;
  logic [N_SLOTS-1:0] started;    // processing unit started on this slot
  logic [SW-1:0] p_slot;          // next slot to hand to the processing unit
  logic        ppu_busy;
  logic [15:0] ppu_bytes_q;
  logic [SW-1:0] ppu_slot_q;
  logic [2:0]  out_beat;          // beat number of the SNFR packet, saturating
  logic [63:0] new_offset;
  logic        offset_ok;
  logic        head_regular, head_snfr;
  axis_beat_t  patched;

  assign head_regular = (state == ST_HEAD) && !cls_empty && !cls_dout && !fifo_empty;
  assign head_snfr    = (state == ST_HEAD) && !cls_empty &&  cls_dout && !fifo_empty &&
                        slot_busy[rd_slot] && started[rd_slot];

  // OFFSET (bytes HDR_BYTES .. HDR_BYTES+7, big-endian) replaced on the way out.
  always_comb begin
    int unsigned p;
    patched = fifo_rd_data;
    for (int l = 0; l < int'(KEEP_W); l++) begin
      p = 32'(out_beat) * 8 + 32'(l);
      if (offset_ok && p >= HDR_BYTES && p < HDR_BYTES + 8)
        patched.tdata[8*l +: 8] = new_offset[63 - 8*(p - HDR_BYTES) -: 8];
    end
  end

  always_comb begin
    m_tvalid     = 1'b0;
    m_beat       = fifo_rd_data;
    fifo_rd_en   = 1'b0;
    cls_pop      = 1'b0;
    release_slot = 1'b0;
    unique case (state)
      ST_HEAD: begin
        m_tvalid   = head_regular;
        fifo_rd_en = head_regular && m_tready;
        cls_pop    = (head_regular && m_tready) || head_snfr;
      end
      ST_FWD: begin
        m_tvalid   = !fifo_empty;
        fifo_rd_en = !fifo_empty && m_tready;
      end
      ST_EMIT: begin
        m_tvalid     = !fifo_empty;
        m_beat       = patched;
        fifo_rd_en   = !fifo_empty && m_tready;
        release_slot = fifo_rd_en && fifo_rd_data.tlast;
      end
      default: ;
    endcase
  end

  assign holding       = (state == ST_PROCESS) || (state == ST_EMIT);
  assign ppu_go        = (state == ST_PROCESS);
  assign ppu_slot      = ppu_slot_q;
  assign ppu_pkt_bytes = ppu_bytes_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= ST_HEAD;
      rd_slot        <= '0;
      out_beat       <= '0;
      new_offset     <= '0;
      offset_ok      <= 1'b0;
      ppu_start      <= 1'b0;
      started        <= '0;
      p_slot         <= '0;
      ppu_busy       <= 1'b0;
      ppu_bytes_q    <= '0;
      ppu_slot_q     <= '0;
      snfr_pkt_count <= '0;
      reg_pkt_count  <= '0;
    end else begin
      // start the processing unit as soon as the next SNFR packet is complete
      // and the unit is free, even while the one before is still leaving
      ppu_start <= 1'b0;
      if (ppu_done) ppu_busy <= 1'b0;
      if (slot_busy[p_slot] && !started[p_slot] && !ppu_busy) begin
        ppu_start       <= 1'b1;
        ppu_slot_q      <= p_slot;
        ppu_bytes_q     <= slot_bytes[p_slot];
        started[p_slot] <= 1'b1;
        p_slot          <= p_slot + 1'b1;
        ppu_busy        <= 1'b1;
      end
      unique case (state)
        ST_HEAD: begin
          if (head_regular && m_tready) begin
            if (fifo_rd_data.tlast) reg_pkt_count <= reg_pkt_count + 1;
            else                    state <= ST_FWD;
          end else if (head_snfr) begin
            state <= ST_PROCESS;
          end
        end
        ST_FWD: begin
          if (fifo_rd_en && fifo_rd_data.tlast) begin
            reg_pkt_count <= reg_pkt_count + 1;
            state         <= ST_HEAD;
          end
        end
        ST_PROCESS: begin
          if (ppu_done) begin
            new_offset <= ppu_new_offset;
            offset_ok  <= ppu_offset_ok;
            out_beat   <= '0;
            state      <= ST_EMIT;
          end
        end
        ST_EMIT: begin
          if (fifo_rd_en) begin
            if (out_beat != 3'd7) out_beat <= out_beat + 3'd1;
            if (fifo_rd_data.tlast) begin
              snfr_pkt_count <= snfr_pkt_count + 1;
              rd_slot        <= rd_slot + 1'b1;
              started[rd_slot] <= 1'b0;
              offset_ok      <= 1'b0;
              state          <= ST_HEAD;
            end
          end
        end
        default: state <= ST_HEAD;
      endcase
    end
  end

endmodule
