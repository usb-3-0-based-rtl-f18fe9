// slave_fifo_master: FPGA-side master of the FX3 synchronous Slave FIFO interface.
//
// The FX3 exposes its USB endpoint buffers as FIFOs ("threads") selected by the address A[1:0];
// the FPGA is the bus master and everything is synchronous to PCLK (clk here).
// Write (FPGA -> host): with the write thread addressed and SLCS# low, the FPGA puts a word on DQ
// and drives SLWR# low; the FX3 stores it at the next rising edge. PKTEND# low together with SLWR#
// marks the last word of a packet (here: the last word of a formatter line).
// Read (host -> FPGA): with the read thread addressed, SLCS# and SLOE# low (SLOE# only enables the
// FX3's DQ drivers), each cycle with SLRD# low pops one word; it appears on DQ RD_DATA_LAT cycles
// after the edge that sampled SLRD#, and data of a newly addressed thread is valid ADDR_LAT cycles
// after the address change.
// The FX3's flags lag the transfers (they change WR_FLAG_LAT edges after the edge that took a
// write, RD_FLAG_LAT edges after the one that took a read), so
// a master that waits for "full" or "empty" overruns the buffer. This master therefore bursts, one
// word per cycle, only while the watermark flag (FLAGB for writes, FLAGD for reads) says there is
// room (data) beyond the words still in flight, and otherwise moves single words, each after the
// dedicated flag (FLAGA not full, FLAGC not empty) has settled from the previous transfer. The FX3
// must be set up so that the watermark flag drops while at least WR_FLAG_LAT+1 words are still
// free (write) or at least RD_FLAG_LAT+1 words are still stored (read): that many transfers can
// still be under way when the flag reaches the master. A single-word transfer waits LAT+1 cycles
// for its flag to settle.
// Data read at edge t is on DQ after edge t+RD_DATA_LAT and is taken into rx_data one edge later.
// Sessions: IDLE -> WR_SETUP (1 cycle) -> WRITE, or IDLE -> RD_SETUP (ADDR_LAT cycles) -> READ ->
// RD_DRAIN (until in-flight reads have arrived) -> IDLE. Pending host data (rd_enable and FLAGC) is
// served first; a write session ends when a read is pending or wr_enable drops.
// Interfaces: tx_* is a first-word-fall-through stream (tx_ready = word taken this cycle); rx_* is a
// valid-only stream with no back-pressure. All bus outputs are registered. The bus is split into
// dq_out/dq_oe/dq_in; the tri-state buffer belongs to the FPGA pad. Reset is synchronous, active low.
// The bus signals, their write and read sequences and the latencies follow the FX3 Slave FIFO
// description; the flag assignment, the watermark/single-word policy, thread numbers, session
// arbitration and PKTEND# use are this design's choice.
module slave_fifo_master
  import dpg_pkg::*;
#(
  parameter int unsigned DW          = DATA_W,
  parameter int unsigned AW          = ADDR_W,
  parameter int unsigned P_WR_FLAG_LAT = WR_FLAG_LAT,
  parameter int unsigned P_RD_FLAG_LAT = RD_FLAG_LAT,
  parameter int unsigned P_RD_DATA_LAT = RD_DATA_LAT,
  parameter int unsigned P_ADDR_LAT    = ADDR_LAT
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_enable,
  input  logic          rd_enable,
  // words to send to the host
  input  logic          tx_valid,
  input  logic [DW-1:0] tx_data,
  input  logic          tx_last,
  output logic          tx_ready,
  // words received from the host
  output logic          rx_valid,
  output logic [DW-1:0] rx_data,
  // FX3 Slave FIFO bus
  output logic          slcs_n,
  output logic [AW-1:0] fifo_addr,
  output logic          slwr_n,
  output logic          slrd_n,
  output logic          sloe_n,
  output logic          pktend_n,
  output logic [DW-1:0] dq_out,
  output logic          dq_oe,
  input  logic [DW-1:0] dq_in,
  input  logic          flaga,
  input  logic          flagb,
  input  logic          flagc,
  input  logic          flagd,
  // status
  output sm_state_t     state
);
  localparam int unsigned HW = 4;

  sm_state_t          nstate;
  logic [HW-1:0]      wait_cnt, wr_hold, rd_hold;
  logic [P_RD_DATA_LAT+1:0] rd_pipe;
  logic               rd_pending, rd_settled_empty, wr_go, rd_go;

  assign rd_pending       = rd_enable && flagc;
  assign rd_settled_empty = !flagc && !flagd && (rd_hold == '0);

  assign wr_go = (state == SM_WRITE) && wr_enable && !rd_pending && tx_valid &&
                 (flagb || (flaga && wr_hold == '0));
  assign rd_go = (state == SM_READ) && rd_enable && !rd_settled_empty &&
                 (flagd || (flagc && rd_hold == '0));
  assign tx_ready = wr_go;

  always_comb begin
    nstate = state;
    unique case (state)
      SM_IDLE:     if (rd_pending)                 nstate = SM_RD_SETUP;
                   else if (wr_enable && tx_valid) nstate = SM_WR_SETUP;
      SM_WR_SETUP: if (wait_cnt == '0)             nstate = SM_WRITE;
      SM_WRITE:    if (!wr_enable || rd_pending)   nstate = SM_IDLE;
      SM_RD_SETUP: if (wait_cnt == '0)             nstate = SM_READ;
      SM_READ:     if (!rd_enable || rd_settled_empty) nstate = SM_RD_DRAIN;
      SM_RD_DRAIN: if (rd_pipe == '0)              nstate = SM_IDLE;
      default:                                     nstate = SM_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= SM_IDLE;
      wait_cnt  <= '0;
      wr_hold   <= '0;
      rd_hold   <= '0;
      rd_pipe   <= '0;
      slcs_n    <= 1'b1;
      fifo_addr <= WR_THREAD;
      slwr_n    <= 1'b1;
      slrd_n    <= 1'b1;
      sloe_n    <= 1'b1;
      pktend_n  <= 1'b1;
      dq_out    <= '0;
      dq_oe     <= 1'b0;
      rx_valid  <= 1'b0;
      rx_data   <= '0;
    end else begin
      state <= nstate;

      // setup wait: loaded when a setup state is entered
      if (state == SM_IDLE && nstate == SM_WR_SETUP)      wait_cnt <= '0;
      else if (state == SM_IDLE && nstate == SM_RD_SETUP) wait_cnt <= HW'(P_ADDR_LAT - 1);
      else if (wait_cnt != '0)                            wait_cnt <= wait_cnt - 1'b1;

      // flag settling counters
      if (wr_go)               wr_hold <= HW'(P_WR_FLAG_LAT + 1);
      else if (wr_hold != '0)  wr_hold <= wr_hold - 1'b1;
      if (rd_go)               rd_hold <= HW'(P_RD_FLAG_LAT + 1);
      else if (rd_hold != '0)  rd_hold <= rd_hold - 1'b1;

      // bus control, registered from the next state
      slcs_n <= (nstate == SM_IDLE);
      if (nstate == SM_WR_SETUP) fifo_addr <= WR_THREAD;
      if (nstate == SM_RD_SETUP) fifo_addr <= RD_THREAD;
      sloe_n <= !(nstate == SM_RD_SETUP || nstate == SM_READ || nstate == SM_RD_DRAIN);
      dq_oe  <=  (nstate == SM_WR_SETUP || nstate == SM_WRITE);

      // write strobe, data and packet end
      slwr_n   <= !wr_go;
      pktend_n <= !(wr_go && tx_last);
      if (wr_go) dq_out <= tx_data;

      // read strobe and returning data
      slrd_n   <= !rd_go;
      rd_pipe  <= {rd_pipe[P_RD_DATA_LAT:0], rd_go};
      rx_valid <= rd_pipe[P_RD_DATA_LAT+1];
      if (rd_pipe[P_RD_DATA_LAT+1]) rx_data <= dq_in;
    end
  end

  // Bus rules
  a_not_both:    assert property (@(posedge clk) disable iff (!rst_n) !(!slwr_n && !slrd_n));
  a_no_contend:  assert property (@(posedge clk) disable iff (!rst_n) !(dq_oe && !sloe_n));
  a_wr_selected: assert property (@(posedge clk) disable iff (!rst_n)
                                  !slwr_n |-> !slcs_n && fifo_addr == WR_THREAD);
  a_rd_selected: assert property (@(posedge clk) disable iff (!rst_n)
                                  !slrd_n |-> !slcs_n && !sloe_n && fifo_addr == RD_THREAD);
  a_pktend_wr:   assert property (@(posedge clk) disable iff (!rst_n) !pktend_n |-> !slwr_n);
endmodule
