// tb_sync_fifo: random push/pop against a queue model; checks order, the
// full/empty flags, the level count and the two-cycle write-to-read latency.
module tb_sync_fifo;
  localparam int W = 16, D = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D+1):0] level;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // latency: write one word, it must appear after two edges
    #1 wr_en = 1; wr_data = 16'hBEEF;
    @(posedge clk); #1 wr_en = 0;
    check(empty, "not yet visible one cycle after write");
    @(posedge clk); #1;
    check(!empty && rd_data == 16'hBEEF, "visible two cycles after write");
    rd_en = 1; @(posedge clk); #1 rd_en = 0;
    check(empty, "empty after pop");
    // fill completely: D in array + 1 in output register
    for (int i = 0; i < D + 4; i++) begin
      wr_en = 1; wr_data = 16'(i);
      @(posedge clk); #1;
    end
    wr_en = 0;
    check(full, "full after overfilling");
    check(level == ($clog2(D+1)+1)'(D + 1), "level = D+1 when full");
    for (int i = 0; i < D + 1; i++) begin
      check(!empty && rd_data == 16'(i), $sformatf("drain order %0d", i));
      rd_en = 1; @(posedge clk); #1 rd_en = 0;
    end
    check(empty, "empty after drain");
    // random traffic against a model
    for (int c = 0; c < 5000; c++) begin
      wr_en   = ($urandom % 3) != 0;
      rd_en   = ($urandom % 2) != 0;
      wr_data = 16'($urandom);
      #1;
      if (rd_en && !empty) begin
        check(model.size() > 0 && rd_data == model[0], "random read data");
        void'(model.pop_front());
      end
      if (wr_en && !full) model.push_back(wr_data);
      @(posedge clk); #1;
      check(int'(level) == model.size(), "level matches model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
