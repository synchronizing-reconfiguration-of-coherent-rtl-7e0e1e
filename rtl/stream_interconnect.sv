// stream_interconnect: on-chip interconnect with a run-time port map.
//
// Connects N_IN input streams (the SNFR protocol processor's output and the
// outputs of the reconfigurable regions) to N_OUT output streams (the Ethernet
// transmit ports and the inputs of the regions). Each input has one port-map
// entry naming the output its packets go to; changing the entries re-wires the
// chain of functions a flow passes through, which is how a function is
// reconfigured. The entries are written through an AXI4 slave port: the
// write to address 4*i sets the entry of input i (bits [7:0] of the data are
// the output number, any value >= N_OUT discards that input's packets).
//
// How it works: an input samples its entry when a packet starts and keeps that
// route until the packet's last beat, so an update never splits a packet.
// Each output grants one input at a time for a whole packet, round-robin among
// the inputs that ask for it. Data, valid and ready pass through
// combinationally (no added latency), one beat per cycle per output.
//
// AXI4 slave: write-only, single-beat bursts (AWLEN must be 0); AW and W may
// come in any order; the B response is OKAY for an entry and SLVERR for an
// address beyond the table. The read channels are not provided.
// The source gives the dynamic port map updated over memory-mapped AXI; the
// register layout, the discard code, the arbitration and the packet-boundary
// rule are this design's choices.
module stream_interconnect
  import snfr_pkg::*;
#(
  parameter int unsigned N_IN  = 3,
  parameter int unsigned N_OUT = 4,
  parameter logic [N_IN-1:0][7:0] RESET_MAP = {8'd0, 8'd0, 8'd2}  // input0 -> 2
) (
  input  logic clk,
  input  logic rst_n,
  // input streams
  input  logic       [N_IN-1:0]  s_tvalid,
  output logic       [N_IN-1:0]  s_tready,
  input  axis_beat_t [N_IN-1:0]  s_beat,
  // output streams
  output logic       [N_OUT-1:0] m_tvalid,
  input  logic       [N_OUT-1:0] m_tready,
  output axis_beat_t [N_OUT-1:0] m_beat,
  // AXI4 slave, write channels
  input  logic [31:0] s_axi_awaddr,
  input  logic [7:0]  s_axi_awlen,
  input  logic [2:0]  s_axi_awsize,
  input  logic [1:0]  s_axi_awburst,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wlast,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  // current port map
  output logic [N_IN-1:0][7:0] port_map,
  output logic [31:0]          map_updates
);
  localparam int unsigned IW = (N_IN > 1) ? $clog2(N_IN) : 1;
  localparam int unsigned OW = (N_OUT > 1) ? $clog2(N_OUT) : 1;

  // ------------------------------------------------------------ AXI4 slave
  logic        aw_held, w_held;
  logic [31:0] aw_addr_q, w_data_q;
  logic [3:0]  w_strb_q;
  logic        do_write;
  logic [29:0] word_addr;

  assign s_axi_awready = !aw_held && !s_axi_bvalid;
  assign s_axi_wready  = !w_held  && !s_axi_bvalid;
  assign do_write      = aw_held && w_held && !s_axi_bvalid;
  assign word_addr     = aw_addr_q[31:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_held      <= 1'b0;
      w_held       <= 1'b0;
      aw_addr_q    <= '0;
      w_data_q     <= '0;
      w_strb_q     <= '0;
      s_axi_bvalid <= 1'b0;
      s_axi_bresp  <= AXI_RESP_OKAY;
      port_map     <= RESET_MAP;
      map_updates  <= '0;
    end else begin
      if (s_axi_awvalid && s_axi_awready) begin
        aw_held   <= 1'b1;
        aw_addr_q <= s_axi_awaddr;
      end
      if (s_axi_wvalid && s_axi_wready) begin
        w_held   <= 1'b1;
        w_data_q <= s_axi_wdata;
        w_strb_q <= s_axi_wstrb;
      end
      if (do_write) begin
        aw_held      <= 1'b0;
        w_held       <= 1'b0;
        s_axi_bvalid <= 1'b1;
        if (word_addr < 30'(N_IN)) begin
          if (w_strb_q[0]) port_map[IW'(word_addr)] <= w_data_q[7:0];
          s_axi_bresp <= AXI_RESP_OKAY;
          map_updates <= map_updates + 1;
        end else begin
          s_axi_bresp <= AXI_RESP_SLVERR;
        end
      end else if (s_axi_bvalid && s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
    end
  end

  // Only single-beat bursts are supported.
  a_single_beat: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_awvalid |-> s_axi_awlen == 8'd0);

  // ------------------------------------------------------------ switch
  logic [N_IN-1:0]       in_sop;     // next beat of input i starts a packet
  logic [N_IN-1:0][7:0]  held_dst;
  logic [N_IN-1:0][7:0]  dst;        // route of the current beat
  logic [N_OUT-1:0]          busy;   // output is in the middle of a packet
  logic [N_OUT-1:0][IW-1:0]  owner;
  logic [N_OUT-1:0][IW-1:0]  rr;     // round-robin start point
  logic [N_OUT-1:0][IW-1:0]  grant;
  logic [N_OUT-1:0]          grant_v;

  always_comb begin
    for (int i = 0; i < int'(N_IN); i++)
      dst[i] = in_sop[i] ? port_map[i] : held_dst[i];
  end

  // Arbitration
  always_comb begin
    int unsigned i;
    i = 0;
    for (int o = 0; o < int'(N_OUT); o++) begin
      grant[o]   = owner[o];
      grant_v[o] = busy[o];
      if (!busy[o]) begin
        for (int k = int'(N_IN) - 1; k >= 0; k--) begin
          i = (32'(rr[o]) + 32'(k)) % N_IN;
          if (s_tvalid[i] && dst[i] == 8'(o)) begin
            grant[o]   = IW'(i);
            grant_v[o] = 1'b1;
          end
        end
      end
    end
  end

  // Data path
  always_comb begin
    s_tready = '0;
    for (int o = 0; o < int'(N_OUT); o++) begin
      m_tvalid[o] = grant_v[o] && s_tvalid[grant[o]];
      m_beat[o]   = s_beat[grant[o]];
    end
    for (int i = 0; i < int'(N_IN); i++) begin
      if (dst[i] >= 8'(N_OUT)) s_tready[i] = 1'b1;       // discard
      else if (grant_v[dst[i][OW-1:0]] &&
               grant[dst[i][OW-1:0]] == IW'(i))
        s_tready[i] = m_tready[dst[i][OW-1:0]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_sop   <= '1;
      held_dst <= '0;
      busy     <= '0;
      owner    <= '0;
      rr       <= '0;
    end else begin
      for (int i = 0; i < int'(N_IN); i++) begin
        if (s_tvalid[i] && s_tready[i]) begin
          if (in_sop[i]) held_dst[i] <= port_map[i];
          in_sop[i] <= s_beat[i].tlast;
        end
      end
      for (int o = 0; o < int'(N_OUT); o++) begin
        if (m_tvalid[o] && m_tready[o]) begin
          if (s_beat[grant[o]].tlast) begin
            busy[o] <= 1'b0;
            rr[o]   <= IW'((32'(grant[o]) + 1) % N_IN);
          end else begin
            busy[o]  <= 1'b1;
            owner[o] <= grant[o];
          end
        end
      end
    end
  end
endmodule
