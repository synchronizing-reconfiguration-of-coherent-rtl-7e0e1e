// snfr_axi_master: AXI4 write master of the SNFR protocol processor.
//
// Turns each ADD/DATA pair extracted by the processing unit into one
// memory-mapped AXI4 write (the port-map update of the on-chip interconnect)
// and reports when every write has been answered, which is the condition for
// releasing the held traffic.
//
// How it works: requests enter a queue (REQ_DEPTH entries, one block RAM at the
// default size). The head of the queue is issued as a single-beat burst
// (AWLEN = 0, AWSIZE = 4 bytes, INCR, WSTRB = 0xF, WLAST = 1) with the address
// and data channels driven together; each channel drops its valid once
// accepted. Up to MAX_OUTSTANDING writes may wait for their B response.
// idle is high when the queue is empty, nothing is being issued and every
// response has come back. OKAY responses count in ok_count, any other
// response in err_count; an error does not stop the sequence.
// Requests may be queued early; they are issued only while gate is high,
// which the processor raises once the SNFR packet is at the head of the
// traffic FIFO, so no write is issued before the traffic ahead has left.
//
// Timing: a write can be issued every cycle while the slave accepts at once;
// a request reaches the AW/W channels two cycles after it is queued.
// The source specifies an AXI4 master and the wait for successful responses;
// the queue, the gate, the outstanding limit and the error policy are this
// design's choices.
module snfr_axi_master
  import snfr_pkg::*;
#(
  parameter int unsigned REQ_DEPTH       = 512,
  parameter int unsigned MAX_OUTSTANDING = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // request stream
  input  logic        gate,        // writes may be issued
  input  logic        req_valid,
  output logic        req_ready,
  input  cfg_write_t  req,
  output logic        idle,
  // AXI4 write channels
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
  output logic [31:0] ok_count,
  output logic [31:0] err_count
);
  localparam int unsigned OW = $clog2(MAX_OUTSTANDING + 1);

  logic       q_full, q_empty, q_pop;
  cfg_write_t q_head;
  logic [$clog2(REQ_DEPTH+1):0] q_level;
  logic       aw_pend, w_pend;          // channel still to be accepted
  logic [OW-1:0] outstanding;
  logic       issue, aw_done, w_done, b_done;

  assign req_ready = !q_full;

  sync_fifo #(.WIDTH($bits(cfg_write_t)), .DEPTH(REQ_DEPTH)) u_req_q (
    .clk, .rst_n,
    .wr_en(req_valid), .wr_data(req), .full(q_full),
    .rd_en(q_pop), .rd_data(q_head), .empty(q_empty), .level(q_level)
  );

  // Start a new write when both channels of the previous one are accepted,
  // at the latest in this cycle.
  assign issue = gate && !q_empty && (!aw_pend || aw_done) && (!w_pend || w_done) &&
                 (outstanding < OW'(MAX_OUTSTANDING));
  assign q_pop = issue;

  assign aw_done = m_axi_awvalid && m_axi_awready;
  assign w_done  = m_axi_wvalid && m_axi_wready;
  assign b_done  = m_axi_bvalid && m_axi_bready;

  assign m_axi_awvalid = aw_pend;
  assign m_axi_wvalid  = w_pend;
  assign m_axi_awlen   = 8'd0;
  assign m_axi_awsize  = 3'd2;
  assign m_axi_awburst = 2'b01;
  assign m_axi_wstrb   = 4'hF;
  assign m_axi_wlast   = 1'b1;
  assign m_axi_bready  = 1'b1;

  assign idle = q_empty && !aw_pend && !w_pend && (outstanding == '0) && (q_level == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_pend      <= 1'b0;
      w_pend       <= 1'b0;
      m_axi_awaddr <= '0;
      m_axi_wdata  <= '0;
      outstanding  <= '0;
      ok_count     <= '0;
      err_count    <= '0;
    end else begin
      if (issue) begin
        aw_pend      <= 1'b1;
        w_pend       <= 1'b1;
        m_axi_awaddr <= q_head.addr;
        m_axi_wdata  <= q_head.data;
      end else begin
        if (aw_done) aw_pend <= 1'b0;
        if (w_done)  w_pend  <= 1'b0;
      end
      // a write counts as outstanding from issue until its response
      outstanding <= outstanding + OW'(issue) - OW'(b_done);
      if (b_done) begin
        if (m_axi_bresp == AXI_RESP_OKAY) ok_count  <= ok_count + 1;
        else                              err_count <= err_count + 1;
      end
    end
  end

  // AXI rule: a valid, once raised, holds its payload until accepted.
  property p_aw_stable;
    @(posedge clk) disable iff (!rst_n)
      m_axi_awvalid && !m_axi_awready |=> m_axi_awvalid && $stable(m_axi_awaddr);
  endproperty
  property p_w_stable;
    @(posedge clk) disable iff (!rst_n)
      m_axi_wvalid && !m_axi_wready |=> m_axi_wvalid && $stable(m_axi_wdata);
  endproperty
  a_aw_stable: assert property (p_aw_stable);
  a_w_stable:  assert property (p_w_stable);
  // a response never arrives for a write that was not issued
  a_no_spurious_b: assert property (@(posedge clk) disable iff (!rst_n)
                                    m_axi_bvalid |-> outstanding != '0);
endmodule
