// usb3_dpg_top: FPGA of a USB 3.0 digital data pattern generator and data formatter.
//
// The FPGA sits between an instrument's data chains and a Cypress EZ-USB FX3 USB 3.0 controller,
// which it drives over the 32-bit synchronous Slave FIFO bus; the FX3 moves the data to and from a
// host PC. The design has two directions that share that bus:
//   Formatter path (to the host): data_simulator (test chains) -> data_formatter (per-chain buffers,
//     packing into 32-bit words, line marks) -> transmit FIFO -> slave_fifo_master write thread.
//   Pattern path (from the host): slave_fifo_master read thread -> pattern_generator buffer memory,
//     played out on CHANNELS outputs at the programmed sampling rate.
// clk is the Slave FIFO clock PCLK; the same clock is forwarded to the FX3 by the board. Control
// inputs are plain ports (a register block or the FX3's serial ports could drive them): sim_* set
// the data simulator, line_words the line length (a line ends with PKTEND#), wr_enable/rd_enable
// allow the two transfer directions, pg_* load and run the pattern generator (pg_load_start before
// the host sends a new pattern). DQ is split into dq_out/dq_oe/dq_in for the pad's tri-state buffer.
// Reset is synchronous, active low. The split into simulator, formatter, FX3 interface and pattern
// buffer follows the described system; the sizes below, the transmit FIFO and the control ports are
// this design's choice.
module usb3_dpg_top
  import dpg_pkg::*;
#(
  parameter int unsigned NUM_CHAINS       = 4,
  parameter int unsigned CHAIN_W          = 16,
  parameter int unsigned CHAIN_FIFO_DEPTH = 16,
  parameter int unsigned TX_FIFO_DEPTH    = 512,
  parameter int unsigned PG_DEPTH         = 1024,
  parameter int unsigned CHANNELS         = DATA_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // data simulator and formatter control
  input  logic                       sim_enable,
  input  logic [NUM_CHAINS-1:0]      sim_chain_en,
  input  logic [15:0]                sim_interval,
  input  logic [15:0]                line_words,
  input  logic                       wr_enable,
  input  logic                       rd_enable,
  output logic [NUM_CHAINS-1:0]      fmt_overflow,
  output logic [31:0]                fmt_drop_count,
  output logic [$clog2(TX_FIFO_DEPTH):0] tx_fifo_count,
  output sm_state_t                  bus_state,
  // pattern generator
  input  logic                       pg_load_start,
  input  logic                       pg_run,
  input  logic [15:0]                pg_rate_div,
  output logic [CHANNELS-1:0]        pg_ch_out,
  output logic                       pg_sample_strobe,
  output logic [$clog2(PG_DEPTH):0]  pg_pat_len,
  output logic                       pg_load_overflow,
  // FX3 synchronous Slave FIFO bus
  output logic                       slcs_n,
  output logic [ADDR_W-1:0]          fifo_addr,
  output logic                       slwr_n,
  output logic                       slrd_n,
  output logic                       sloe_n,
  output logic                       pktend_n,
  output logic [DATA_W-1:0]          dq_out,
  output logic                       dq_oe,
  input  logic [DATA_W-1:0]          dq_in,
  input  logic                       flaga,
  input  logic                       flagb,
  input  logic                       flagc,
  input  logic                       flagd
);
  // ---- formatter path ----
  logic [NUM_CHAINS-1:0] ch_valid;
  logic [CHAIN_W-1:0]    ch_data [NUM_CHAINS];

  data_simulator #(.NUM_CHAINS(NUM_CHAINS), .CHAIN_W(CHAIN_W)) u_sim (
    .clk, .rst_n,
    .enable     (sim_enable),
    .chain_en   (sim_chain_en),
    .interval   (sim_interval),
    .chain_valid(ch_valid),
    .chain_data (ch_data)
  );

  logic              f_valid, f_last, f_ready;
  logic [DATA_W-1:0] f_data;

  data_formatter #(.NUM_CHAINS(NUM_CHAINS), .CHAIN_W(CHAIN_W), .DATA_W(DATA_W),
                   .CHAIN_FIFO_DEPTH(CHAIN_FIFO_DEPTH)) u_fmt (
    .clk, .rst_n,
    .chain_valid(ch_valid),
    .chain_data (ch_data),
    .line_words,
    .out_valid  (f_valid),
    .out_data   (f_data),
    .out_last   (f_last),
    .out_ready  (f_ready),
    .overflow   (fmt_overflow),
    .drop_count (fmt_drop_count)
  );

  logic              tx_full, tx_empty, tx_pop;
  logic [DATA_W:0]   tx_word;

  assign f_ready = !tx_full;

  sync_fifo #(.WIDTH(DATA_W + 1), .DEPTH(TX_FIFO_DEPTH)) u_txq (
    .clk, .rst_n,
    .wr_en  (f_valid && f_ready),
    .wr_data({f_last, f_data}),
    .rd_en  (tx_pop),
    .rd_data(tx_word),
    .full   (tx_full),
    .empty  (tx_empty),
    .count  (tx_fifo_count)
  );

  // ---- FX3 interface ----
  logic              rx_valid;
  logic [DATA_W-1:0] rx_data;

  slave_fifo_master u_bus (
    .clk, .rst_n,
    .wr_enable, .rd_enable,
    .tx_valid (!tx_empty),
    .tx_data  (tx_word[DATA_W-1:0]),
    .tx_last  (tx_word[DATA_W]),
    .tx_ready (tx_pop),
    .rx_valid,
    .rx_data,
    .slcs_n, .fifo_addr, .slwr_n, .slrd_n, .sloe_n, .pktend_n,
    .dq_out, .dq_oe, .dq_in,
    .flaga, .flagb, .flagc, .flagd,
    .state    (bus_state)
  );

  // ---- pattern path ----
  pattern_generator #(.CHANNELS(CHANNELS), .DEPTH(PG_DEPTH)) u_pg (
    .clk, .rst_n,
    .load_start   (pg_load_start),
    .load_valid   (rx_valid),
    .load_data    (CHANNELS'(rx_data)),
    .pat_len      (pg_pat_len),
    .load_overflow(pg_load_overflow),
    .run          (pg_run),
    .rate_div     (pg_rate_div),
    .ch_out       (pg_ch_out),
    .sample_strobe(pg_sample_strobe)
  );
endmodule
