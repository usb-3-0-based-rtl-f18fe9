// pattern_generator: multi-channel digital pattern generator with a pattern buffer memory.
//
// A pattern is a sequence of CHANNELS-bit words, one bit per output channel, so every channel can
// carry its own waveform. The pattern arrives from the host over USB (through the Slave FIFO read
// path) and is written into the buffer memory (DEPTH words): load_start empties the buffer, each
// load_valid word is stored at the next address and pat_len counts the stored words. Words that do
// not fit are dropped and set load_overflow.
// While run is high and pat_len > 0 the buffer is played out in a loop, one word every
// (rate_div+1) clock cycles: ch_out takes the word and sample_strobe pulses for one cycle. The first
// word appears two cycles after run rises, as the memory read is synchronous. When run is low,
// playback restarts from word 0 at the next run and ch_out returns to all zeros.
// Reset is synchronous, active low. Buffer memory, per-channel programmability and the user-set
// sampling rate follow the described design; depth, channel count, loop mode and idle level are this
// design's choice.
module pattern_generator #(
  parameter int unsigned CHANNELS = dpg_pkg::DATA_W,
  parameter int unsigned DEPTH    = 1024,
  parameter int unsigned DIV_W    = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // loading
  input  logic                       load_start,
  input  logic                       load_valid,
  input  logic [CHANNELS-1:0]        load_data,
  output logic [$clog2(DEPTH):0]     pat_len,
  output logic                       load_overflow,
  // playback
  input  logic                       run,
  input  logic [DIV_W-1:0]           rate_div,     // sample period minus one, in clock cycles
  output logic [CHANNELS-1:0]        ch_out,
  output logic                       sample_strobe
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [CHANNELS-1:0] mem [DEPTH];
  logic [CHANNELS-1:0] rd_word;
  logic [AW-1:0]       rptr;
  logic [DIV_W-1:0]    div_cnt;
  logic                fire, fire_q;

  // ---- loading ----
  always_ff @(posedge clk) begin
    if (load_valid && !load_start && pat_len < (AW+1)'(DEPTH)) mem[pat_len[AW-1:0]] <= load_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pat_len       <= '0;
      load_overflow <= 1'b0;
    end else if (load_start) begin
      pat_len       <= '0;
      load_overflow <= 1'b0;
    end else if (load_valid) begin
      if (pat_len < (AW+1)'(DEPTH)) pat_len <= pat_len + 1'b1;
      else                          load_overflow <= 1'b1;
    end
  end

  // ---- playback ----
  assign fire = run && (pat_len != '0) && (div_cnt == '0);

  always_ff @(posedge clk) begin
    if (fire) rd_word <= mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !run) begin
      rptr          <= '0;
      div_cnt       <= '0;
      fire_q        <= 1'b0;
      ch_out        <= '0;
      sample_strobe <= 1'b0;
    end else begin
      fire_q        <= fire;
      sample_strobe <= fire_q;
      if (fire_q) ch_out <= rd_word;
      if (fire) begin
        div_cnt <= rate_div;
        rptr    <= ((AW+1)'(rptr) + 1'b1 >= pat_len) ? '0 : rptr + 1'b1;
      end else if (div_cnt != '0) begin
        div_cnt <= div_cnt - 1'b1;
      end
    end
  end
endmodule
