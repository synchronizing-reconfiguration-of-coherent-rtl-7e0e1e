// tb_snfr_axi_master: queues reconfiguration writes into the AXI4 master
// against a slave model with random ready and response delays. Checks every
// address/data pair arrives in order with the single-beat burst attributes,
// that OKAY and SLVERR responses are counted, that idle only rises after the
// last response, that with an always-ready slave one write leaves per
// cycle, and that queued writes wait while the gate is closed.
module tb_snfr_axi_master;
  import snfr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic gate, req_valid, req_ready, idle;
  cfg_write_t req;
  logic [31:0] m_axi_awaddr, m_axi_wdata, ok_count, err_count;
  logic [7:0]  m_axi_awlen;
  logic [2:0]  m_axi_awsize;
  logic [1:0]  m_axi_awburst, m_axi_bresp;
  logic [3:0]  m_axi_wstrb;
  logic m_axi_awvalid, m_axi_awready, m_axi_wlast, m_axi_wvalid, m_axi_wready;
  logic m_axi_bvalid, m_axi_bready;
  int checks = 0, failures = 0;
  bit random_slave;

  snfr_axi_master #(.REQ_DEPTH(16), .MAX_OUTSTANDING(4)) dut (.*);
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

  // ---------------- slave model
  logic [31:0] aw_q[$], w_q[$];
  int          b_pending = 0;
  int          b_total = 0;
  logic [31:0] got_addr[$], got_data[$];
  int          n_err_sent = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (m_axi_awvalid && m_axi_awready) begin
        aw_q.push_back(m_axi_awaddr);
        check(m_axi_awlen == 0 && m_axi_awsize == 3'd2 && m_axi_awburst == 2'b01,
              "single-beat INCR burst of 4 bytes");
      end
      if (m_axi_wvalid && m_axi_wready) begin
        w_q.push_back(m_axi_wdata);
        check(m_axi_wstrb == 4'hF && m_axi_wlast, "full strobe, wlast");
      end
      if (m_axi_bvalid && m_axi_bready) begin
        b_pending--;
        if (m_axi_bresp != AXI_RESP_OKAY) n_err_sent++;
      end
      while (aw_q.size() > 0 && w_q.size() > 0) begin
        got_addr.push_back(aw_q.pop_front());
        got_data.push_back(w_q.pop_front());
        b_pending++;
      end
    end
  end

  always @(negedge clk) begin
    m_axi_awready = random_slave ? ($urandom % 3 == 0) : 1'b1;
    m_axi_wready  = random_slave ? ($urandom % 3 == 0) : 1'b1;
    m_axi_bvalid  = (b_pending > 0) && (random_slave ? ($urandom % 4 == 0) : 1'b1);
    // every 5th response of the random phase is an error
    m_axi_bresp   = (random_slave && ((b_total + n_err_sent) % 5 == 4)) ? AXI_RESP_SLVERR
                                                                        : AXI_RESP_OKAY;
  end

  always @(posedge clk) if (m_axi_bvalid && m_axi_bready) b_total++;

  task automatic send(input int n, input int base);
    for (int i = 0; i < n; i++) begin
      req_valid = 1; req.addr = 32'(base + 4 * i); req.data = 32'(base * 7 + i);
      do @(posedge clk); while (!req_ready);
      #1;
    end
    req_valid = 0;
  endtask

  initial begin
    int t0, n, errs_before;
    req_valid = 0; req = '0; random_slave = 0; gate = 1;
    m_axi_awready = 1; m_axi_wready = 1; m_axi_bvalid = 0; m_axi_bresp = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(idle, "idle after reset");
    // phase 1: always-ready slave, rate
    t0 = $time;
    send(12, 32'h100);
    check(!idle, "busy while writes are queued");
    while (!idle) @(posedge clk);
    #1;
    n = ($time - t0) / 10;
    check(n <= 12 + 8, $sformatf("12 writes in %0d cycles (<= 20)", n));
    check(got_addr.size() == 12, "12 writes seen");
    for (int i = 0; i < 12; i++)
      check(got_addr[i] == 32'h100 + 4*i && got_data[i] == 32'h100*7 + i,
            $sformatf("write %0d address/data", i));
    check(ok_count == 12 && err_count == 0, "12 OKAY responses counted");
    check(b_pending == 0, "idle only after every response");
    // phase 2: random slave
    random_slave = 1;
    got_addr.delete(); got_data.delete();
    errs_before = n_err_sent;
    send(40, 32'h2000);
    while (!idle) begin
      @(posedge clk); #1;
      if (idle) check(b_pending == 0, "idle implies no response pending");
    end
    check(got_addr.size() == 40, $sformatf("40 writes seen (%0d)", got_addr.size()));
    for (int i = 0; i < 40 && i < got_addr.size(); i++)
      check(got_addr[i] == 32'h2000 + 4*i && got_data[i] == 32'h2000*7 + i,
            $sformatf("random write %0d", i));
    check(ok_count + err_count == 52, "every response counted");
    check(err_count == 32'(n_err_sent), "SLVERR responses counted");
    check(n_err_sent > errs_before, "some errors were injected");
    // phase 3: gate closed: requests wait in the queue, nothing is issued
    random_slave = 0;
    got_addr.delete(); got_data.delete();
    gate = 0;
    send(5, 32'h300);
    repeat (20) begin
      @(posedge clk); #1;
      check(!m_axi_awvalid && !m_axi_wvalid && !idle, "gate closed: nothing issued, not idle");
    end
    gate = 1;
    t0 = $time;
    while (!idle) @(posedge clk);
    #1;
    n = ($time - t0) / 10;
    check(got_addr.size() == 5 && got_addr[0] == 32'h300, "queued writes issued when the gate opens");
    check(n <= 5 + 4, $sformatf("5 queued writes answered %0d cycles after the gate opens (<= 9)", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
