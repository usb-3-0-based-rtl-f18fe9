// tb_usb3_dpg_top: end-to-end test of usb3_dpg_top at its default sizes, with a behavioural FX3.
// 1. The host sends a pattern; the FPGA reads it over the Slave FIFO bus into the pattern buffer,
//    then plays it out: every channel word and the sample spacing are checked.
// 2. The data simulator runs at half the bus rate; the formatter's words reach the host through
//    the write thread. The host checks the packing ({chain 2g+1, chain 2g} for g = 0,1,...), the
//    chain tags, that every chain's count advances by one, and PKTEND at every line end.
// 3. The host stops draining long enough for the FX3 thread and the transmit FIFO to fill; the
//    formatter must then drop samples and report them, and the stream must resume cleanly.
// 4. A second pattern is loaded while the formatter streams, forcing thread switches.
// Counted mechanisms (each must occur): read bursts, single-word reads, write bursts, watermark
// stops, single-word writes, PKTEND, thread switches, pattern playback, formatter drops.
module tb_usb3_dpg_top;
  import dpg_pkg::*;
  localparam int NCH = 4, LINE = 16;
  logic clk = 0, rst_n = 0;
  logic sim_enable = 0, wr_enable = 0, rd_enable = 0, pg_load_start = 0, pg_run = 0;
  logic [NCH-1:0] sim_chain_en = '1;
  logic [15:0] sim_interval = 16'd3, line_words = 16'(LINE), pg_rate_div = 16'd2;
  logic [NCH-1:0] fmt_overflow;
  logic [31:0] fmt_drop_count;
  logic [9:0] tx_fifo_count;
  sm_state_t bus_state;
  logic [DATA_W-1:0] pg_ch_out;
  logic pg_sample_strobe, pg_load_overflow;
  logic [10:0] pg_pat_len;
  logic slcs_n, slwr_n, slrd_n, sloe_n, pktend_n, dq_oe;
  logic [ADDR_W-1:0] fifo_addr;
  logic [DATA_W-1:0] dq_out, dq_in;
  logic flaga, flagb, flagc, flagd;
  logic host_drain = 0, host_rx_valid, host_rx_pktend, host_tx_valid = 0;
  logic [DATA_W-1:0] host_rx_data, host_tx_data = '0;
  int overflow_errs, underflow_errs, protocol_errs, host_tx_drops, words_written, words_read, pktends;
  int checks = 0, failures = 0;
  int cyc = 0;

  usb3_dpg_top dut (.*);

  fx3_slave_fifo_model #(.WR_DEPTH(256), .RD_DEPTH(256)) fx3 (
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- host: unpack the formatter stream ----
  int host_words = 0, gaps = 0, grp = 0;
  int next_seq [NCH];
  bit seen [NCH];
  always @(posedge clk) if (rst_n && host_rx_valid) begin
    for (int j = 0; j < 2; j++) begin
      int ch;
      logic [15:0] smp;
      ch  = grp * 2 + j;
      smp = host_rx_data[j*16 +: 16];
      check(int'(smp[15:12]) == ch, "chain tag in its slot");
      if (seen[ch] && int'(smp[11:0]) != next_seq[ch]) gaps += (int'(smp[11:0]) - next_seq[ch]) & 12'hFFF;
      seen[ch] = 1;
      next_seq[ch] = (int'(smp[11:0]) + 1) & 12'hFFF;
    end
    grp = 1 - grp;
    host_words++;
    check(host_rx_pktend == (host_words % LINE == 0), "PKTEND at line end");
  end

  // ---- host: send a pattern ----
  logic [DATA_W-1:0] pattern [$];
  task automatic host_send_pattern(int n, int gap_pct);
    pattern.delete();
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      host_tx_valid = 0;
      while ($urandom_range(99) < gap_pct) @(negedge clk);
      host_tx_valid = 1;
      host_tx_data  = $urandom;
      pattern.push_back(host_tx_data);
    end
    @(negedge clk);
    host_tx_valid = 0;
  endtask

  task automatic load_pattern(int n, int gap_pct);
    @(negedge clk); pg_load_start = 1;
    @(negedge clk); pg_load_start = 0; rd_enable = 1;
    host_send_pattern(n, gap_pct);
    for (int t = 0; t < 20 * n && int'(pg_pat_len) < n; t++) @(posedge clk);
    repeat (20) @(posedge clk);
    check(int'(pg_pat_len) == n, "pattern length after load");
  endtask

  int n_play = 0;
  task automatic play_and_check(int nsamp);
    int got, t_last;
    @(negedge clk); pg_run = 1;
    got = 0; t_last = -1;
    while (got < nsamp) begin
      @(posedge clk); #1;
      if (pg_sample_strobe) begin
        check(pg_ch_out == pattern[got % pattern.size()], "pattern word on channels");
        if (t_last >= 0) check(cyc - t_last == int'(pg_rate_div) + 1, "sampling period");
        t_last = cyc;
        got++;
        n_play++;
      end
    end
    @(negedge clk); pg_run = 0;
  endtask

  // ---- mechanism counters (from the bus) ----
  int n_burst_wr = 0, n_single_wr = 0, n_wm_stop = 0, n_burst_rd = 0, n_single_rd = 0, n_switch = 0;
  logic prev_slwr_n = 1, prev_slrd_n = 1, prev_flagb = 1, prev_flagd = 0;
  logic [ADDR_W-1:0] prev_addr = WR_THREAD;
  always @(posedge clk) if (rst_n) begin
    if (!slwr_n && !prev_slwr_n) n_burst_wr++;
    if (!slwr_n && !prev_flagb) n_single_wr++;
    if (bus_state == SM_WRITE && !prev_flagb && slwr_n && tx_fifo_count != 0) n_wm_stop++;
    if (!slrd_n && !prev_slrd_n) n_burst_rd++;
    if (!slrd_n && !prev_flagd) n_single_rd++;
    if (fifo_addr != prev_addr) n_switch++;
    prev_slwr_n = slwr_n; prev_slrd_n = slrd_n;
    prev_flagb = flagb;   prev_flagd = flagd;
    prev_addr = fifo_addr;
  end

  initial begin
    for (int i = 0; i < NCH; i++) begin next_seq[i] = 0; seen[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // 1. pattern load over the read thread and playback
    load_pattern(300, 0);
    play_and_check(700);
    // 2. formatter stream at half the bus rate, host draining with random pauses
    @(negedge clk);
    wr_enable = 1; sim_enable = 1;
    for (int k = 0; k < 6000; k++) begin
      @(negedge clk);
      host_drain = ($urandom_range(9) < 7);
    end
    check(fmt_drop_count == 0 && fmt_overflow == '0, "no drops while the host keeps up");
    check(gaps == 0, "no gaps in chain counts");
    // 3. host stalls: FX3 thread, transmit FIFO and chain buffers fill, samples are dropped
    @(negedge clk); host_drain = 0;
    repeat (2000) @(posedge clk);
    check(fmt_drop_count > 0 && fmt_overflow != '0, "drops reported when the host stalls");
    @(negedge clk); host_drain = 1;
    repeat (3000) @(posedge clk);
    // 4. load a new pattern while the formatter keeps streaming
    rd_enable = 0;
    pg_rate_div = 16'd0;
    load_pattern(120, 60);
    play_and_check(250);
    // stop the source and drain
    @(negedge clk); sim_enable = 0;
    repeat (2000) @(posedge clk);
    check(tx_fifo_count == 0, "transmit FIFO drained");
    check(gaps > 0 && gaps <= int'(fmt_drop_count), "gaps match reported drops");
    check(overflow_errs == 0 && underflow_errs == 0, "FX3 buffers never over/underrun");
    check(protocol_errs == 0, "bus protocol kept");
    check(pktends == host_words / LINE, "one PKTEND per line");
    $display("words to host=%0d drops=%0d gaps=%0d played=%0d", host_words, fmt_drop_count, gaps, n_play);
    $display("mechanisms: burst_wr=%0d single_wr=%0d wm_stop=%0d burst_rd=%0d single_rd=%0d switch=%0d",
             n_burst_wr, n_single_wr, n_wm_stop, n_burst_rd, n_single_rd, n_switch);
    check(host_words > 3000, "formatter stream reached the host");
    check(n_burst_wr > 0, "write bursts happened");
    check(n_single_wr > 0, "single-word writes happened");
    check(n_wm_stop > 0, "watermark stops happened");
    check(n_burst_rd > 0, "read bursts happened");
    check(n_single_rd > 0, "single-word reads happened");
    check(n_switch >= 4, "thread switches happened");
    check(pktends > 0, "PKTEND happened");
    check(n_play > 0, "pattern playback happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
