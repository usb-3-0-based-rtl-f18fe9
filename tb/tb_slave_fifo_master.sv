// tb_slave_fifo_master: self-checking test of slave_fifo_master against a behavioural FX3 model.
// Phases: (1) writes with the host always draining: every word must go out on consecutive cycles;
// (2) writes with a slow, bursty host, so that the write watermark stops bursts and single words
// are moved on the settled full flag; (3) reads of a preloaded read thread, first in a burst, the
// tail as single words; (4) both directions at once with random host traffic. Every word the host
// receives must equal the words sent, in order, with PKTEND on exactly the words marked last;
// every word read must equal what the host sent. The model counts overflows, underflows and
// protocol errors (wrong thread, read too soon after an address change, strobes together), which
// must stay zero. Each mechanism (burst, watermark stop, single-word transfer, PKTEND, thread
// switch) must occur. Every word read must be in rx_data RD_DATA_LAT+1 edges after the FX3
// sampled its SLRD#; 200 back-to-back writes must take 200 cycles.
module tb_slave_fifo_master;
  import dpg_pkg::*;
  localparam int LINE = 7;
  logic clk = 0, rst_n = 0;
  logic wr_enable = 0, rd_enable = 0;
  logic tx_valid = 0, tx_last = 0, tx_ready;
  logic [DATA_W-1:0] tx_data = '0;
  logic rx_valid;
  logic [DATA_W-1:0] rx_data;
  logic slcs_n, slwr_n, slrd_n, sloe_n, pktend_n, dq_oe;
  logic [ADDR_W-1:0] fifo_addr;
  logic [DATA_W-1:0] dq_out, dq_in;
  logic flaga, flagb, flagc, flagd;
  sm_state_t state;
  logic host_drain = 0, host_rx_valid, host_rx_pktend, host_tx_valid = 0;
  logic [DATA_W-1:0] host_rx_data, host_tx_data = '0;
  int overflow_errs, underflow_errs, protocol_errs, host_tx_drops, words_written, words_read, pktends;
  int checks = 0, failures = 0;
  int cyc = 0;

  slave_fifo_master dut (.*);

  fx3_slave_fifo_model #(.WR_DEPTH(32), .RD_DEPTH(32)) fx3 (
    .clk, .slcs_n(slcs_n || !rst_n), .fifo_addr, .slwr_n, .slrd_n, .sloe_n, .pktend_n,
    .dq_from_fpga(dq_out), .dq_oe, .dq_to_fpga(dq_in),
    .flaga, .flagb, .flagc, .flagd,
    .host_drain, .host_rx_valid, .host_rx_data, .host_rx_pktend,
    .host_tx_valid, .host_tx_data,
    .overflow_errs, .underflow_errs, .protocol_errs, .host_tx_drops,
    .words_written, .words_read, .pktends);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- transmit source ----
  logic [DATA_W:0] txq[$];      // {last, data} still to offer
  logic [DATA_W:0] sent[$];     // words taken by the master, expected at the host
  int n_tx = 0;
  task automatic queue_tx(int n);
    for (int k = 0; k < n; k++) begin
      txq.push_back({(n_tx % LINE) == LINE - 1, DATA_W'($urandom)});
      n_tx++;
    end
  endtask
  always @(posedge clk) begin
    if (tx_valid && tx_ready) begin
      sent.push_back({tx_last, tx_data});
      void'(txq.pop_front());
    end
  end
  always @(negedge clk) begin
    tx_valid = txq.size() > 0;
    {tx_last, tx_data} = (txq.size() > 0) ? txq[0] : '0;
  end

  // ---- host receive check ----
  int host_got = 0;
  always @(posedge clk) if (rst_n && host_rx_valid) begin
    if (sent.size() == 0) check(0, "host got a word never sent");
    else begin
      logic [DATA_W:0] e;
      e = sent.pop_front();
      check(host_rx_data == e[DATA_W-1:0], "host data");
      check(host_rx_pktend == e[DATA_W], "PKTEND on line end");
    end
    host_got++;
  end

  // ---- host send / FPGA receive check ----
  logic [DATA_W-1:0] host_sent[$];
  int rx_got = 0;
  always @(posedge clk) if (rst_n && rx_valid) begin
    if (host_sent.size() == 0) check(0, "read a word never sent");
    else check(rx_data == host_sent.pop_front(), "read data");
    rx_got++;
  end
  task automatic host_send(int n, int gap_pct);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      if ($urandom_range(99) < gap_pct) begin host_tx_valid = 0; k--; continue; end
      host_tx_valid = 1;
      host_tx_data  = $urandom;
      host_sent.push_back(host_tx_data);
    end
    @(negedge clk);
    host_tx_valid = 0;
  endtask

  // ---- mechanism counters ----
  int n_burst_wr = 0, n_single_wr = 0, n_wm_stop = 0, n_single_rd = 0, n_burst_rd = 0, n_switch = 0;
  int n_pktend = 0;
  logic prev_slwr_n = 1, prev_slrd_n = 1, prev_flagb = 1, prev_flagd = 0;
  logic [ADDR_W-1:0] prev_addr = WR_THREAD;
  always @(posedge clk) if (rst_n) begin
    if (!slwr_n && !prev_slwr_n) n_burst_wr++;
    // a strobe seen now was decided on the flags sampled at the previous edge
    if (!slwr_n && !prev_flagb) n_single_wr++;
    if (state == SM_WRITE && !prev_flagb && slwr_n && tx_valid) n_wm_stop++;
    if (!slrd_n && !prev_slrd_n) n_burst_rd++;
    if (!slrd_n && !prev_flagd) n_single_rd++;
    prev_flagb = flagb;
    prev_flagd = flagd;
    if (fifo_addr != prev_addr) n_switch++;
    if (!pktend_n) n_pktend++;
    prev_slwr_n = slwr_n;
    prev_slrd_n = slrd_n;
    prev_addr   = fifo_addr;
  end

  // ---- read latency: a word whose SLRD# the FX3 samples at edge t is on DQ after edge
  // t+RD_DATA_LAT, in rx_data after edge t+RD_DATA_LAT+1, and seen here at edge t+RD_DATA_LAT+2 ----
  int rd_req_t[$];
  int n_lat = 0;
  always @(posedge clk) if (rst_n) begin
    if (rx_valid) begin
      if (rd_req_t.size() == 0) check(0, "rx word without a read");
      else begin
        check(cyc - rd_req_t.pop_front() == RD_DATA_LAT + 2, "read latency");
        n_lat++;
      end
    end
    if (!slcs_n && !slrd_n) rd_req_t.push_back(cyc);
  end

  // ---- back-to-back write timing ----
  int first_wr = -1, last_wr = -1, wr_cnt = 0;
  bit measure = 0;
  always @(posedge clk) if (measure && !slwr_n) begin
    if (first_wr < 0) first_wr = cyc;
    last_wr = cyc;
    wr_cnt++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // (1) full-rate writes, host always draining
    @(negedge clk);
    host_drain = 1; wr_enable = 1;
    queue_tx(200);
    measure = 1;
    while (txq.size() > 0) @(posedge clk);
    repeat (10) @(posedge clk);
    measure = 0;
    check(wr_cnt == 200, "phase 1 word count");
    check(last_wr - first_wr == 199, "phase 1 one word per cycle");
    // (2) slow bursty host: watermark and single-word writes
    queue_tx(600);
    while (txq.size() > 0) begin
      @(negedge clk);
      host_drain = ((cyc / 50) % 2 == 0) ? ($urandom_range(9) < 2) : ($urandom_range(9) < 9);
    end
    host_drain = 1;
    repeat (80) @(posedge clk);
    check(host_got == 800, "phase 2 all words delivered");
    // (3) reads from a preloaded read thread
    wr_enable = 0;
    host_send(30, 0);
    @(negedge clk); rd_enable = 1;
    repeat (200) @(posedge clk);
    check(rx_got == 30, "phase 3 all words read");
    // (4) both directions with random host traffic
    @(negedge clk); wr_enable = 1;
    queue_tx(700);
    fork
      host_send(400, 70);
      while (txq.size() > 0) begin
        @(negedge clk);
        host_drain = ($urandom_range(9) < 6);
      end
    join
    @(negedge clk); host_drain = 1;
    repeat (300) @(posedge clk);
    check(host_got == 1500, "phase 4 all words delivered");
    check(rx_got == 430, "phase 4 all words read");
    check(sent.size() == 0 && host_sent.size() == 0, "nothing left over");
    check(overflow_errs == 0, "no write overflow");
    check(underflow_errs == 0, "no read underflow");
    check(protocol_errs == 0, "no protocol errors");
    check(host_tx_drops == 0, "host never blocked");
    check(pktends == 1500 / LINE, "PKTEND count");
    $display("mechanisms: burst_wr=%0d single_wr=%0d wm_stop=%0d burst_rd=%0d single_rd=%0d switch=%0d pktend=%0d",
             n_burst_wr, n_single_wr, n_wm_stop, n_burst_rd, n_single_rd, n_switch, n_pktend);
    check(n_burst_wr > 0, "burst writes happened");
    check(n_single_wr > 0, "single-word writes happened");
    check(n_wm_stop > 0, "watermark stops happened");
    check(n_burst_rd > 0, "burst reads happened");
    check(n_single_rd > 0, "single-word reads happened");
    check(n_switch > 2, "thread switches happened");
    check(n_lat == 430, "read latency checked on every word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
