// tb_snfr_ppu: the protocol processing unit with a four-slot packet BRAM. The
// testbench loads SNFR frames into the slots in turn, plays the AXI4 master
// (random req_ready; axi_idle rises some cycles after the last request) and
// checks: the requests are exactly the pairs of the segment OFFSET points at;
// done comes only after axi_idle and go; new_offset points at the pair after the
// terminator; malformed frames (OFFSET 0, OFFSET past the end, no terminator)
// raise the error count and report offset_ok low; with req_ready always high
// a long segment streams at one pair per cycle.
module tb_snfr_ppu;
  import snfr_pkg::*;
  import tb_pkt_pkg::*;
  localparam int BW = 64;
  logic clk = 0, rst_n = 0;
  logic start, go, done, offset_ok;
  logic [1:0] slot;
  int go_delay = 0;
  logic [63:0] new_offset;
  logic [15:0] pkt_bytes;
  logic buf_rd_en;
  logic [$clog2(4*BW)-1:0] buf_rd_addr;
  logic [DATA_W-1:0] buf_rd_data;
  logic req_valid, req_ready, axi_idle;
  cfg_write_t req;
  logic [3:0] state_dbg;
  logic [31:0] pairs_applied, error_count;
  int checks = 0, failures = 0;
  bit fast = 0;

  // BRAM: the testbench writes, the unit reads
  logic tb_wr_en;
  logic [$clog2(4*BW)-1:0] tb_wr_addr;
  logic [DATA_W-1:0] tb_wr_data;
  snfr_pkt_buf #(.WORDS(4 * BW)) u_buf (
    .clk,
    .wr_en(tb_wr_en), .wr_addr(tb_wr_addr), .wr_data(tb_wr_data),
    .rd_en(buf_rd_en), .rd_addr(buf_rd_addr), .rd_data(buf_rd_data));

  snfr_ppu #(.BUF_WORDS(BW)) dut (.*);
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

  // AXI master stand-in
  cfg_write_t got[$];
  int idle_delay = 0;
  always @(negedge clk) req_ready = fast || ($urandom % 3 != 0);
  always @(posedge clk) begin
    if (rst_n && req_valid && req_ready) begin
      got.push_back(req);
      idle_delay = 4 + $urandom % 6;
    end else if (idle_delay > 0) idle_delay--;
  end
  assign axi_idle = (idle_delay == 0);

  task automatic load(input bytes_t f, input logic [1:0] sl);
    beats_t q;
    q = to_beats(f);
    foreach (q[i]) if (i < BW) begin
      tb_wr_en = 1; tb_wr_addr = {sl, 6'(i)}; tb_wr_data = q[i].tdata;
      @(posedge clk); #1;
    end
    tb_wr_en = 0;
  endtask

  // Run the unit on frame f; expect writes exp and new OFFSET new_off
  // (new_off = 0: malformed).
  logic [1:0] cur_slot = 0;
  task automatic run(input string name, input bytes_t f, input writes_t exp,
                     input logic [63:0] new_off, input int exp_cycles);
    int t, errs;
    errs = int'(error_count);
    load(f, cur_slot);
    got.delete();
    slot = cur_slot;
    pkt_bytes = 16'((f.size() > BW * 8) ? BW * 8 : f.size());
    start = 1;
    go = (go_delay == 0);
    @(posedge clk); #1 start = 0;
    t = 1;
    for (int i = 0; i < go_delay; i++) begin
      check(!done, {name, ": no done before go"});
      @(posedge clk); #1; t++;
    end
    go = 1;
    while (!done) begin
      @(posedge clk); #1; t++;
      if (done) check(axi_idle, {name, ": done only when the AXI master is idle"});
    end
    check(offset_ok == (new_off != 0), {name, ": offset_ok"});
    if (new_off != 0)
      check(new_offset == new_off, $sformatf("%s: new OFFSET %0d (%0d)", name, new_off, new_offset));
    else
      check(int'(error_count) == errs + 1, {name, ": error counted"});
    @(posedge clk); #1;
    check(got.size() == exp.size(), $sformatf("%s: %0d writes (%0d)", name, exp.size(), got.size()));
    foreach (exp[i]) if (i < got.size())
      check(got[i] == exp[i], $sformatf("%s: write %0d", name, i));
    if (exp_cycles > 0)
      check(t <= exp_cycles, $sformatf("%s: %0d cycles (<= %0d)", name, t, exp_cycles));
    cur_slot = cur_slot + 1;
  endtask

  initial begin
    writes_t segs[$], a, b, c, none;
    bytes_t f;
    start = 0; go = 1; slot = 0; pkt_bytes = 0; tb_wr_en = 0; tb_wr_addr = 0; tb_wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    a = '{'{addr: 32'h0000_0000, data: 32'h0000_0003}, '{addr: 32'h0000_0004, data: 32'h0000_0000}};
    b = '{'{addr: 32'h0000_0008, data: 32'hCAFE_0001}, '{addr: 32'h1234_5678, data: 32'h9ABC_DEF0},
          '{addr: 32'hFFFF_FFFE, data: 32'h5555_AAAA}};
    c = '{'{addr: 32'h0000_0004, data: 32'h0000_0001}};
    segs = '{a, b, c};
    f = snfr_frame(segs, 64'd1, SNFR_IP_PROTO_DEFAULT);
    // node 1: offset 1 -> pairs 1,2, terminator at 3 -> new offset 4.
    run("node 1", f, a, 64'd4, 0);
    // node 2 on the frame node 1 produced
    for (int k = 0; k < 8; k++) f[SNFR_HDR_BYTES + k] = (k == 7) ? 8'd4 : 8'd0;
    go_delay = 30;
    run("node 2 (go late)", f, b, 64'd8, 0);
    go_delay = 0;
    for (int k = 0; k < 8; k++) f[SNFR_HDR_BYTES + k] = (k == 7) ? 8'd8 : 8'd0;
    run("node 3", f, c, 64'd10, 0);
    // empty segment: only a terminator
    segs = '{none, a};
    f = snfr_frame(segs, 64'd1, SNFR_IP_PROTO_DEFAULT);
    run("empty segment", f, none, 64'd2, 0);
    // malformed frames
    f = snfr_frame(segs, 64'd0, SNFR_IP_PROTO_DEFAULT);
    run("offset 0", f, none, 64'd0, 0);
    f = snfr_frame(segs, 64'd99, SNFR_IP_PROTO_DEFAULT);
    run("offset past end", f, none, 64'd0, 0);
    f = snfr_frame('{a}, 64'd1, SNFR_IP_PROTO_DEFAULT);
    f = f[0:SNFR_HDR_BYTES + 8 + 16 - 1];      // cut before the terminator
    run("no terminator", f, a, 64'd0, 0);
    // long segment, AXI master always ready: one pair per cycle
    fast = 1;
    none.delete();
    for (int p = 0; p < 40; p++) none.push_back('{addr: 32'(4 * p), data: $urandom});
    segs = '{none, a};
    f = snfr_frame(segs, 64'd1, SNFR_IP_PROTO_DEFAULT);
    run("40 pairs", f, none, 64'd42, 40 + 10 + 10);
    // frame longer than a slot: the segment lies in the stored part
    for (int p = 0; p < 60; p++) a.push_back('{addr: 32'(p), data: 32'(p)});
    segs = '{c, a};
    f = snfr_frame(segs, 64'd1, SNFR_IP_PROTO_DEFAULT);
    run("long frame", f, c, 64'd3, 0);
    check(pairs_applied == 32'(2 + 3 + 1 + 2 + 40 + 1), "pairs_applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
