// dpg_pkg: constants and types shared by the pattern generator / data formatter FPGA design.
//
// The FPGA talks to an EZ-USB FX3 over its synchronous Slave FIFO bus: a 32-bit data bus DQ,
// a 2-bit FIFO (thread) address A[1:0], the strobes SLCS#, SLWR#, SLRD#, SLOE#, PKTEND# and four
// status flags FLAGA..FLAGD. The bus width, the address width and the flag/data latencies below
// are the figures of the FX3 Slave FIFO timing (3 cycles from SLWR# to flag, 2 cycles from SLRD#
// to flag and to data, 3 cycles from an address change to data). The thread numbers and the
// assignment of the four flags are this design's own choice:
//   FLAGA  write thread, 1 = not full        FLAGB  write thread, 1 = above the write watermark
//   FLAGC  read thread,  1 = not empty       FLAGD  read thread,  1 = above the read watermark
package dpg_pkg;

  localparam int unsigned DATA_W = 32;   // DQ[31:0]
  localparam int unsigned ADDR_W = 2;    // A[1:0]

  // Thread (socket) addresses selected with A[1:0]
  localparam logic [ADDR_W-1:0] WR_THREAD = 2'd0;  // FPGA -> FX3 -> host
  localparam logic [ADDR_W-1:0] RD_THREAD = 2'd3;  // host -> FX3 -> FPGA

  // Bus latencies, in PCLK cycles
  localparam int unsigned WR_FLAG_LAT  = 3;  // SLWR# sampled -> flag updated
  localparam int unsigned RD_FLAG_LAT  = 2;  // SLRD# sampled -> flag updated
  localparam int unsigned RD_DATA_LAT  = 2;  // SLRD# sampled -> data on DQ
  localparam int unsigned ADDR_LAT     = 3;  // A[1:0] change -> data of new thread on DQ

  // States of the Slave FIFO master
  typedef enum logic [2:0] {
    SM_IDLE     = 3'd0,
    SM_WR_SETUP = 3'd1,
    SM_WRITE    = 3'd2,
    SM_RD_SETUP = 3'd3,
    SM_READ     = 3'd4,
    SM_RD_DRAIN = 3'd5
  } sm_state_t;

endpackage
