// tb_stream_workload: streams data from the data simulator to the host through usb3_dpg_top at its
// default sizes, in lines of 4096 words (16 KiB, one bulk endpoint buffer), with the host always
// ready. Two runs: a 1 MiB transfer (262144 32-bit words), then a streaming session of 64 queued
// transfers of 16 x 16 KiB (16 MiB, 4194304 words). The four chains run at one sample every second
// cycle, which is exactly one formatted word per cycle. Checks: every word arrives, every chain
// count advances without a gap, a PKTEND# ends each line, nothing is dropped, and the bus carries
// each run in one cycle per word plus a small fixed overhead (one word per PCLK cycle).
module tb_stream_workload;
  import dpg_pkg::*;
  localparam int NCH = 4, LINE = 4096;
  logic clk = 0, rst_n = 0;
  logic sim_enable = 0, wr_enable = 0, rd_enable = 0, pg_load_start = 0, pg_run = 0;
  logic [NCH-1:0] sim_chain_en = '1;
  logic [15:0] sim_interval = 16'd1, line_words = 16'(LINE), pg_rate_div = 16'd0;
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
  logic host_drain = 1, host_rx_valid, host_rx_pktend, host_tx_valid = 0;
  logic [DATA_W-1:0] host_rx_data, host_tx_data = '0;
  int overflow_errs, underflow_errs, protocol_errs, host_tx_drops, words_written, words_read, pktends;
  int checks = 0, failures = 0;
  int cyc = 0;

  usb3_dpg_top dut (.*);

  fx3_slave_fifo_model #(.WR_DEPTH(4096), .RD_DEPTH(16)) fx3 (
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
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // host: unpack and check every word
  int host_words = 0, bad = 0, grp = 0, n_pkt = 0;
  int next_seq [NCH];
  always @(posedge clk) if (rst_n && host_rx_valid) begin
    for (int j = 0; j < 2; j++) begin
      int ch;
      logic [15:0] smp;
      ch  = grp * 2 + j;
      smp = host_rx_data[j*16 +: 16];
      if (int'(smp[15:12]) != ch || int'(smp[11:0]) != next_seq[ch]) bad++;
      next_seq[ch] = (next_seq[ch] + 1) & 12'hFFF;
    end
    grp = 1 - grp;
    host_words++;
    if (host_rx_pktend) begin
      n_pkt++;
      if (host_words % LINE != 0) bad++;
    end
  end

  // bus: first and last write of a run
  int first_wr = -1, last_wr = -1;
  always @(posedge clk) if (rst_n && !slwr_n) begin
    if (first_wr < 0) first_wr = cyc;
    last_wr = cyc;
  end

  task automatic run(int words);
    int w0, p0;
    w0 = host_words;
    p0 = n_pkt;
    first_wr = -1;
    @(negedge clk);
    wr_enable = 1;
    sim_enable = 1;
    // a sample tick on the first and then every second edge: words/2 ticks give that many words
    repeat (words - 1) @(posedge clk);
    @(negedge clk);
    sim_enable = 0;
    repeat (200) @(posedge clk);
    $display("words=%0d lines=%0d cycles=%0d drops=%0d", host_words - w0, n_pkt - p0,
             last_wr - first_wr + 1, fmt_drop_count);
    check(host_words - w0 == words, "all words at the host");
    check(bad == 0, "word contents and line ends");
    check(n_pkt - p0 == words / LINE, "one PKTEND per 16 KiB line");
    check(fmt_drop_count == 0, "no drops");
    check(last_wr - first_wr + 1 <= words + 8, "one word per PCLK cycle");
    check(overflow_errs == 0 && protocol_errs == 0, "bus rules kept");
  endtask

  initial begin
    for (int i = 0; i < NCH; i++) next_seq[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run(262144);              // USB Control Center transfer: 1048576 bytes
    run(64 * 16 * 16384 / 4); // streamer: 64 transfers of 16 packets of 16384 bytes
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
