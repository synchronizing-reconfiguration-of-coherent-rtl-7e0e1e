// tb_snfr_pkt_buf: fills the packet BRAM, overwrites random words, and reads
// everything back against a model, checking the one-cycle read latency, that
// the output holds while rd_en is low, and that a read and a write in the
// same cycle to different slots do not disturb each other.
module tb_snfr_pkt_buf;
  import snfr_pkg::*;
  localparam int WORDS = 32;
  logic clk = 0;
  logic wr_en, rd_en;
  logic [$clog2(WORDS)-1:0] wr_addr, rd_addr;
  logic [DATA_W-1:0] wr_data, rd_data;
  logic [DATA_W-1:0] model [WORDS];
  int checks = 0, failures = 0;

  snfr_pkt_buf #(.WORDS(WORDS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    @(posedge clk); #1;
    for (int i = 0; i < WORDS; i++) begin
      wr_en = 1; wr_addr = 5'(i); wr_data = {$urandom, $urandom};
      model[i] = wr_data;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 50; n++) begin
      int a;
      a = $urandom % WORDS;
      wr_en = 1; wr_addr = 5'(a); wr_data = {$urandom, $urandom};
      model[a] = wr_data;
      @(posedge clk); #1;
    end
    wr_en = 0;
    for (int i = 0; i < WORDS; i++) begin
      rd_en = 1; rd_addr = 5'(i);
      // simultaneous write into the other half
      wr_en = 1; wr_addr = 5'((i + WORDS / 2) % WORDS); wr_data = {$urandom, $urandom};
      @(posedge clk); #1;
      check(rd_data == model[i], $sformatf("word %0d", i));
      model[(i + WORDS / 2) % WORDS] = wr_data;
      rd_en = 0; wr_en = 0; rd_addr = 5'((i + 7) % WORDS);
      @(posedge clk); #1;
      check(rd_data == model[i], "output holds while rd_en is low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
