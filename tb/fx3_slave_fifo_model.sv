// fx3_slave_fifo_model: behavioural model (not synthesizable) of the FX3 side of the synchronous
// Slave FIFO bus, for testbenches.
//
// Two threads: the write thread (address WR_THREAD) takes words from the FPGA and the "host" drains
// it one word per cycle while host_drain is high; the read thread (address RD_THREAD) is filled by the
// host through host_tx_* and read by the FPGA. Flags change FLAG_LAT edges after the edge that moved
// data and read data is on DQ RD_DATA_LAT edges after the edge that sampled SLRD#:
//   FLAGA write thread not full        FLAGB write thread has more than WR_WMARK free words
//   FLAGC read thread not empty        FLAGD read thread holds more than RD_WMARK words
// Protocol violations are counted: a write into a full thread (overflow), a read from an empty one
// (underflow), a read within ADDR_LAT edges of an address change, a write while the FPGA is not
// driving DQ, a strobe with the wrong thread addressed.
module fx3_slave_fifo_model
  import dpg_pkg::*;
#(
  parameter int unsigned WR_DEPTH = 64,
  parameter int unsigned RD_DEPTH = 64,
  parameter int unsigned WR_WMARK = WR_FLAG_LAT + 1,
  parameter int unsigned RD_WMARK = RD_FLAG_LAT + 1
) (
  input  logic              clk,
  input  logic              slcs_n,
  input  logic [ADDR_W-1:0] fifo_addr,
  input  logic              slwr_n,
  input  logic              slrd_n,
  input  logic              sloe_n,
  input  logic              pktend_n,
  input  logic [DATA_W-1:0] dq_from_fpga,
  input  logic              dq_oe,
  output logic [DATA_W-1:0] dq_to_fpga,
  output logic              flaga,
  output logic              flagb,
  output logic              flagc,
  output logic              flagd,
  // host side
  input  logic              host_drain,
  output logic              host_rx_valid = 1'b0,
  output logic [DATA_W-1:0] host_rx_data = '0,
  output logic              host_rx_pktend = 1'b0,
  input  logic              host_tx_valid,
  input  logic [DATA_W-1:0] host_tx_data,
  // statistics
  output int                overflow_errs,
  output int                underflow_errs,
  output int                protocol_errs,
  output int                host_tx_drops,
  output int                words_written,
  output int                words_read,
  output int                pktends
);
  logic [DATA_W:0]   wq[$];   // {pktend, data}
  logic [DATA_W-1:0] rq[$];
  logic [3:0] fa_p = '1, fb_p = '1, fc_p = '0, fd_p = '0;
  logic [DATA_W-1:0] d_p [RD_DATA_LAT+1] = '{default: '0};
  int addr_age = 0;
  logic [ADDR_W-1:0] last_addr = '0;

  initial begin
    overflow_errs = 0; underflow_errs = 0; protocol_errs = 0; host_tx_drops = 0;
    words_written = 0; words_read = 0; pktends = 0;
  end

  assign flaga = fa_p[WR_FLAG_LAT];
  assign flagb = fb_p[WR_FLAG_LAT];
  assign flagc = fc_p[RD_FLAG_LAT];
  assign flagd = fd_p[RD_FLAG_LAT];
  assign dq_to_fpga = (!slcs_n && !sloe_n) ? d_p[RD_DATA_LAT] : '0;

  always @(posedge clk) begin
    logic [DATA_W-1:0] popped;
    popped = '0;
    // address age
    if (fifo_addr != last_addr) addr_age = 0;
    else if (addr_age < 100) addr_age++;
    last_addr = fifo_addr;
    // FPGA write
    if (!slcs_n && !slwr_n) begin
      if (fifo_addr != WR_THREAD || !dq_oe) begin
        protocol_errs++;
        $display("fx3 model: write with A=%0d dq_oe=%0b at %0t", fifo_addr, dq_oe, $time);
      end
      if (wq.size() >= WR_DEPTH) overflow_errs++;
      else begin
        wq.push_back({!pktend_n, dq_from_fpga});
        words_written++;
        if (!pktend_n) pktends++;
      end
    end else if (!slcs_n && !pktend_n) begin
      protocol_errs++;
      $display("fx3 model: PKTEND# without SLWR# at %0t", $time);
    end
    // FPGA read
    if (!slcs_n && !slrd_n) begin
      if (fifo_addr != RD_THREAD || sloe_n || addr_age < ADDR_LAT) begin
        protocol_errs++;
        $display("fx3 model: read with A=%0d SLOE#=%0b address age %0d at %0t",
                 fifo_addr, sloe_n, addr_age, $time);
      end
      if (rq.size() == 0) underflow_errs++;
      else begin
        popped = rq.pop_front();
        words_read++;
      end
    end
    if (!slcs_n && !slwr_n && !slrd_n) begin
      protocol_errs++;
      $display("fx3 model: SLWR# and SLRD# together at %0t", $time);
    end
    // host side
    host_rx_valid <= 1'b0;
    if (host_drain && wq.size() > 0) begin
      logic [DATA_W:0] w;
      w = wq.pop_front();
      host_rx_pktend <= w[DATA_W];
      host_rx_data   <= w[DATA_W-1:0];
      host_rx_valid  <= 1'b1;
    end
    if (host_tx_valid) begin
      if (rq.size() >= RD_DEPTH) host_tx_drops++;
      else rq.push_back(host_tx_data);
    end
    // delayed data and flags
    // (non-blocking: the FPGA samples the old values at this edge)
    for (int i = RD_DATA_LAT; i > 0; i--) d_p[i] <= d_p[i-1];
    d_p[0] <= popped;
    fa_p <= {fa_p[2:0], wq.size() < WR_DEPTH};
    fb_p <= {fb_p[2:0], (WR_DEPTH - wq.size()) > WR_WMARK};
    fc_p <= {fc_p[2:0], rq.size() > 0};
    fd_p <= {fd_p[2:0], rq.size() > RD_WMARK};
  end
endmodule
