// snfr_ppu: protocol processing unit of the SNFR protocol processor.
//
// Started by the FIFO controller as soon as an SNFR packet is complete in a
// slot of the packet BRAM, possibly while earlier traffic is still leaving.
// It follows the state sequence of the SNFR processing unit:
//   1. read the 64-bit OFFSET field;
//   2. set the read address to OFFSET and read ADD/DATA pairs;
//   3. while ADD is not 0xFFFF_FFFF, hand each pair to the AXI4 master as one
//      memory-mapped write;
//   4. on ADD = 0xFFFF_FFFF, wait until the packet is at the head of the FIFO
//      with the traffic behind it held (go) and the AXI4 master has a response
//      for every write (the master issues nothing before go), then report
//      the new OFFSET (the word after the terminator, i.e. the first pair of
//      the next node's segment), and
//   5. signal done, upon which the controller releases the packet and traffic.
//
// Addressing: SNFR word w (w = 0 is OFFSET, w >= 1 are pairs) occupies bytes
// HDR_BYTES + 8w ... HDR_BYTES + 8w + 7 of the frame, big-endian. With the
// 34-byte Ethernet+IPv4 header a word straddles two 64-bit beats. The unit
// streams the beats out of the BRAM (registered read, one beat per cycle),
// keeps the previous beat and assembles one word per cycle from the tail of
// the previous beat and the head of the current one. A pair that the AXI4
// master cannot accept stalls the stream (the BRAM output is held).
//
// Malformed packets (OFFSET of 0 or past the end of the packet, or a segment
// that runs off the end without a terminator) stop extraction; the writes
// already issued complete, offset_ok is low so OFFSET stays as it was,
// error_count is incremented, and the packet is still released so that
// traffic never stays held.
//
// Interface: start (pulse) with slot and pkt_bytes (bytes of the packet held
// in the slot); go high from the moment the controller holds the traffic
// until done; done is a one-cycle pulse together with new_offset/offset_ok.
// new_offset never exceeds the slot size and state_dbg has a spare top bit,
// so their upper bits are constant zero.
// buf_rd_* is the packet BRAM read port ({slot, beat}), req_* the request
// stream into the AXI4 master, axi_idle is high when the master has no write
// outstanding. Timing: about 5 cycles to OFFSET and the jump, then one pair
// per cycle, then the wait for go and the last write response.
// The state sequence and the field semantics follow the SNFR definition; the
// word unit of OFFSET, the byte order, the streaming word assembly, the early
// start ahead of go and the error handling are this design's choices.
module snfr_ppu
  import snfr_pkg::*;
#(
  parameter int unsigned BUF_WORDS = 256,          // beats per slot
  parameter int unsigned N_SLOTS   = 4,            // slots in the packet BRAM
  parameter int unsigned HDR_BYTES = SNFR_HDR_BYTES
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        go,          // the SNFR packet is at the FIFO head
  input  logic [$clog2(N_SLOTS)-1:0] slot,
  input  logic [15:0] pkt_bytes,
  output logic        done,
  output logic [63:0] new_offset,
  output logic        offset_ok,
  // packet BRAM read port
  output logic                       buf_rd_en,
  output logic [$clog2(N_SLOTS*BUF_WORDS)-1:0] buf_rd_addr,
  input  logic [DATA_W-1:0]          buf_rd_data,
  // to the AXI4 master
  output logic        req_valid,
  input  logic        req_ready,
  output cfg_write_t  req,
  input  logic        axi_idle,
  // status
  output logic [3:0]  state_dbg,
  output logic [31:0] pairs_applied,
  output logic [31:0] error_count
);
  localparam int unsigned BAW   = $clog2(BUF_WORDS);
  localparam int unsigned BEAT0 = HDR_BYTES / 8;   // beat holding the start of word 0
  localparam int unsigned LANE  = HDR_BYTES % 8;   // byte lane of that start

  typedef enum logic [2:0] {
    ST_IDLE,
    ST_OFF,        // reading the OFFSET word
    ST_PAIRS,      // reading ADD/DATA pairs
    ST_WAIT_RESP,  // waiting for the last write response
    ST_RELEASE     // done pulse
  } state_t;

  state_t      state;
  logic [$clog2(N_SLOTS)-1:0] cur_slot;
  logic [15:0] bytes;
  logic [BAW:0] nb;                 // next beat to read
  logic [31:0] w_idx;               // index of the next word to assemble
  logic        cur_valid;           // buf_rd_data holds the beat nb-1
  logic        have_prev;
  logic [DATA_W-1:0] prev;
  logic        bad;

  // Word assembly: byte k of the word (k = 0 most significant) is wire byte
  // LANE + k counted from the start of the older beat.
  function automatic logic [63:0] assemble(input logic [DATA_W-1:0] lo,
                                           input logic [DATA_W-1:0] hi);
    logic [63:0] w;
    for (int k = 0; k < 8; k++) begin
      if (LANE + k < 8) w[63-8*k -: 8] = lo[8*(LANE+k) +: 8];
      else              w[63-8*k -: 8] = hi[8*(LANE+k-8) +: 8];
    end
    return w;
  endfunction

  logic        streaming, word_ok, in_range, is_end, off_ok;
  logic        want_push, stall, consume, restart, finish, fin_bad, issue;
  logic [63:0] word;

  assign streaming = (state == ST_OFF) || (state == ST_PAIRS);
  assign word      = assemble((LANE == 0) ? buf_rd_data : prev, buf_rd_data);
  assign word_ok   = cur_valid && ((LANE == 0) || have_prev);
  assign in_range  = (32'(HDR_BYTES) + 8 * w_idx + 8 <= 32'(bytes));
  assign is_end    = (word[63:32] == SNFR_ADDR_END);
  assign off_ok    = (word != '0) && (word < 64'(BUF_WORDS)) &&
                     (64'(HDR_BYTES) + 8 * word + 8 <= 64'(bytes));

  assign want_push = (state == ST_PAIRS) && in_range && word_ok && !is_end;
  assign stall     = want_push && !req_ready;
  assign consume   = cur_valid && !stall;
  assign restart   = (state == ST_OFF) && in_range && word_ok && off_ok;
  assign fin_bad   = streaming && (!in_range ||
                     ((state == ST_OFF) && word_ok && !off_ok));
  assign finish    = fin_bad || ((state == ST_PAIRS) && word_ok && is_end);
  assign issue     = streaming && !restart && !finish && (!cur_valid || consume) &&
                     (nb < (BAW+1)'(BUF_WORDS));

  assign buf_rd_en   = issue;
  assign buf_rd_addr = {cur_slot, nb[BAW-1:0]};
  assign req_valid   = want_push;
  assign req.addr    = word[63:32];
  assign req.data    = word[31:0];
  assign done        = (state == ST_RELEASE);
  assign offset_ok   = !bad;
  assign state_dbg   = {1'b0, state};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= ST_IDLE;
      cur_slot      <= '0;
      bytes         <= '0;
      nb            <= '0;
      w_idx         <= '0;
      cur_valid     <= 1'b0;
      have_prev     <= 1'b0;
      prev          <= '0;
      bad           <= 1'b0;
      new_offset    <= '0;
      pairs_applied <= '0;
      error_count   <= '0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          if (start) begin
            cur_slot  <= slot;
            bytes     <= (pkt_bytes > 16'(BUF_WORDS * 8)) ? 16'(BUF_WORDS * 8) : pkt_bytes;
            nb        <= (BAW+1)'(BEAT0);
            w_idx     <= '0;
            cur_valid <= 1'b0;
            have_prev <= 1'b0;
            bad       <= 1'b0;
            state     <= ST_OFF;
          end
        end
        ST_OFF, ST_PAIRS: begin
          if (issue) begin
            nb        <= nb + 1'b1;
            cur_valid <= 1'b1;
          end else if (consume) begin
            cur_valid <= 1'b0;
          end
          if (consume) begin
            prev      <= buf_rd_data;
            have_prev <= 1'b1;
            if (word_ok) w_idx <= w_idx + 1;
          end
          if (want_push && req_ready) pairs_applied <= pairs_applied + 1;
          if (restart) begin
            nb        <= (BAW+1)'(BEAT0) + word[BAW:0];
            w_idx     <= word[31:0];
            have_prev <= 1'b0;
            cur_valid <= 1'b0;
            state     <= ST_PAIRS;
          end else if (finish) begin
            cur_valid  <= 1'b0;
            bad        <= fin_bad;
            new_offset <= 64'(w_idx) + 64'd1;
            state      <= ST_WAIT_RESP;
          end
        end
        ST_WAIT_RESP: begin
          if (axi_idle && go) begin
            if (bad) error_count <= error_count + 1;
            state <= ST_RELEASE;
          end
        end
        ST_RELEASE: state <= ST_IDLE;
        default:    state <= ST_IDLE;
      endcase
    end
  end

  a_no_push_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid |-> state == ST_PAIRS);
endmodule
