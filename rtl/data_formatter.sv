// data_formatter: merges several data chains into one 32-bit word stream for the USB link.
//
// Each of the NUM_CHAINS input chains delivers CHAIN_W-bit samples with a one-cycle valid. Every
// chain has its own FIFO (CHAIN_FIFO_DEPTH samples) so that chains may run at their own pace.
// The chains are taken in groups of PACK = DATA_W/CHAIN_W neighbours: group g packs one sample of
// chain g*PACK+j into bits [j*CHAIN_W +: CHAIN_W] of an output word. Groups are served strictly in
// turn (0,1,..,GROUPS-1,0,..), so the host can unpack the stream without headers. A word is built in
// the cycle in which every chain of the current group has a sample and the output register is free
// or being emptied, so the formatter sustains one output word per cycle.
// Output: a valid/ready stream. out_last marks the last word of every line of line_words words
// (line_words = 0 is treated as 1); the Slave FIFO master turns it into a PKTEND#.
// A sample arriving at a full chain FIFO is dropped: its chain's bit in overflow is set (sticky
// until reset) and drop_count counts it. Reset is synchronous, active low.
// Acquiring multiple chains and feeding the USB module is the described function; packing, group
// order, line marking and the overflow policy are this design's choice.
module data_formatter #(
  parameter int unsigned NUM_CHAINS       = 4,
  parameter int unsigned CHAIN_W          = 16,
  parameter int unsigned DATA_W           = dpg_pkg::DATA_W,
  parameter int unsigned CHAIN_FIFO_DEPTH = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_CHAINS-1:0] chain_valid,
  input  logic [CHAIN_W-1:0]    chain_data [NUM_CHAINS],
  input  logic [15:0]           line_words,
  output logic                  out_valid,
  output logic [DATA_W-1:0]     out_data,
  output logic                  out_last,
  input  logic                  out_ready,
  output logic [NUM_CHAINS-1:0] overflow,
  output logic [31:0]           drop_count
);
  localparam int unsigned PACK   = DATA_W / CHAIN_W;
  localparam int unsigned GROUPS = NUM_CHAINS / PACK;
  localparam int unsigned GW     = (GROUPS > 1) ? $clog2(GROUPS) : 1;

  logic [CHAIN_W-1:0]    q_data [NUM_CHAINS];
  logic [NUM_CHAINS-1:0] q_empty, q_full, q_pop;

  for (genvar i = 0; i < NUM_CHAINS; i++) begin : g_chain
    sync_fifo #(.WIDTH(CHAIN_W), .DEPTH(CHAIN_FIFO_DEPTH)) u_q (
      .clk, .rst_n,
      .wr_en  (chain_valid[i]),
      .wr_data(chain_data[i]),
      .rd_en  (q_pop[i]),
      .rd_data(q_data[i]),
      .full   (q_full[i]),
      .empty  (q_empty[i]),
      .count  ()
    );
  end

  logic [GW-1:0]     grp;
  logic [15:0]       word_cnt;
  logic              grp_ready, take;
  logic [DATA_W-1:0] packed_word;
  logic [NUM_CHAINS-1:0] drops;

  always_comb begin
    grp_ready   = 1'b1;
    packed_word = '0;
    for (int j = 0; j < PACK; j++) begin
      if (q_empty[int'(grp)*PACK + j]) grp_ready = 1'b0;
      packed_word[j*CHAIN_W +: CHAIN_W] = q_data[int'(grp)*PACK + j];
    end
  end

  assign take = grp_ready && (!out_valid || out_ready);

  always_comb begin
    for (int i = 0; i < NUM_CHAINS; i++) begin
      q_pop[i] = take && ((i / PACK) == int'(grp));
      drops[i] = chain_valid[i] && q_full[i] && !q_pop[i];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      grp        <= '0;
      word_cnt   <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_last   <= 1'b0;
      overflow   <= '0;
      drop_count <= '0;
    end else begin
      if (take) begin
        out_valid <= 1'b1;
        out_data  <= packed_word;
        out_last  <= (word_cnt + 16'd1 >= line_words);
        word_cnt  <= (word_cnt + 16'd1 >= line_words) ? 16'd0 : word_cnt + 16'd1;
        grp       <= (int'(grp) == GROUPS-1) ? '0 : grp + 1'b1;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
      overflow   <= overflow | drops;
      drop_count <= drop_count + 32'($countones(drops));
    end
  end

  initial assert (DATA_W % CHAIN_W == 0 && NUM_CHAINS % (DATA_W / CHAIN_W) == 0)
    else $error("data_formatter: chains must fill whole words");
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_data));
endmodule
