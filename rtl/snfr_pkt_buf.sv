// snfr_pkt_buf: block RAM holding copies of SNFR packets for the protocol
// processing unit.
//
// The FIFO controller writes the leading beats of every incoming packet into
// the current slot, next to the copy it writes into the traffic FIFO; once a
// packet turns out to be an SNFR packet the slot is kept and the next packet
// uses the next one. The processing unit reads the slot, starting
// at OFFSET and then at the word OFFSET points to.
//
// How it works: a simple dual-port RAM of WORDS 64-bit words (four slots of
// WORDS/4 beats each; the slot is the top address bits), one write port and one
// registered read port: rd_data shows the word at rd_addr one cycle after
// rd_en and holds it while rd_en is low.
// The size (4 x 256 beats, 4 x 2048 bytes, each slot enough for a 1518-byte
// frame) and the four slots are this design's choices.
module snfr_pkt_buf
  import snfr_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(WORDS)-1:0] wr_addr,
  input  logic [DATA_W-1:0]        wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(WORDS)-1:0] rd_addr,
  output logic [DATA_W-1:0]        rd_data
);
  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
