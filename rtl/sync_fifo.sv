// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used as the traffic FIFO of the SNFR protocol processor (the data flow is
// written into it straight from the Ethernet side and held there while an
// SNFR packet is being processed), and, at other sizes, for the per-packet
// class queue and the AXI write request queue.
//
// How it works: the storage is an array read synchronously (one registered
// read port, one write port), so it maps onto block RAM. A one-entry output
// register in front of it makes the head visible as soon as it is present:
// rd_data/!empty show the oldest word, and rd_en pops it. A word written at
// cycle t can be popped at t+2 at the earliest. Both sides run at one word per
// cycle without bubbles. The FIFO holds DEPTH words in the array plus one in
// the output register.
//
// Interface: wr_en is ignored while full; rd_en is ignored while empty.
// level counts every word held (array plus output register).
// The depth of the traffic FIFO is not given in the source description; it is
// chosen by the instantiating module.
module sync_fifo #(
  parameter int unsigned WIDTH = 73,
  parameter int unsigned DEPTH = 2048   // power of two
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [$clog2(DEPTH+1):0] level
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      mem_cnt;      // words held in the array
  logic             out_valid;
  logic             push, pop, fetch;

  assign full  = (mem_cnt == (AW+1)'(DEPTH));
  assign empty = !out_valid;
  assign push  = wr_en && !full;
  assign pop   = rd_en && out_valid;
  assign fetch = (mem_cnt != '0) && (!out_valid || pop);
  assign level = ($clog2(DEPTH+1)+1)'(mem_cnt) + ($clog2(DEPTH+1)+1)'(out_valid);

  // Storage: write port and registered read port.
  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= wr_data;
    if (fetch) rd_data <= mem[rd_ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      mem_cnt   <= '0;
      out_valid <= 1'b0;
    end else begin
      if (push)  wr_ptr <= wr_ptr + AW'(1);
      if (fetch) rd_ptr <= rd_ptr + AW'(1);
      mem_cnt   <= mem_cnt + (AW+1)'(push) - (AW+1)'(fetch);
      out_valid <= fetch || (out_valid && !pop);
    end
  end

endmodule
