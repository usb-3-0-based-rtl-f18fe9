// data_simulator: test-data source standing in for the instrument's data chains.
//
// The system feeds the formatter from several parallel data chains; on the test bench these come
// from an FPGA data simulator. Each of the NUM_CHAINS chains here emits one CHAIN_W-bit sample
// every (interval+1) clock cycles while enable is high and its bit of chain_en is set. A sample is
// {chain number (TAG_W bits), running count (CHAIN_W-TAG_W bits)}: the tag lets the receiving
// software tell the chains apart after unpacking, the count lets it find lost or repeated samples.
// All chains sample on the same tick, so a tick gives a valid pulse (one cycle) on every enabled
// chain. Deasserting enable resets the tick timer but keeps the counts. Reset is synchronous,
// active low, and clears the counts.
// The existence of a simulator feeding multiple chains follows the described system; the sample
// format, the common tick and the per-chain enable are this design's choice (a 4-bit field above a
// 12-bit incrementing count is what the host-side data dump of the system shows).
module data_simulator #(
  parameter int unsigned NUM_CHAINS = 4,
  parameter int unsigned CHAIN_W    = 16,
  parameter int unsigned TAG_W      = 4,
  parameter int unsigned DIV_W      = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,
  input  logic [NUM_CHAINS-1:0] chain_en,
  input  logic [DIV_W-1:0]      interval,    // sample period minus one, in clock cycles
  output logic [NUM_CHAINS-1:0] chain_valid,
  output logic [CHAIN_W-1:0]    chain_data [NUM_CHAINS]
);
  localparam int unsigned CNT_W = CHAIN_W - TAG_W;

  logic [DIV_W-1:0] tick_cnt;
  logic             tick;
  logic [CNT_W-1:0] seq [NUM_CHAINS];

  assign tick = enable && (tick_cnt == '0);

  always_ff @(posedge clk) begin
    if (!rst_n || !enable) tick_cnt <= '0;
    else if (tick)         tick_cnt <= interval;
    else                   tick_cnt <= tick_cnt - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      chain_valid <= '0;
      for (int i = 0; i < NUM_CHAINS; i++) begin
        seq[i]        <= '0;
        chain_data[i] <= '0;
      end
    end else begin
      for (int i = 0; i < NUM_CHAINS; i++) begin
        chain_valid[i] <= tick && chain_en[i];
        if (tick && chain_en[i]) begin
          chain_data[i] <= {TAG_W'(i), seq[i]};
          seq[i]        <= seq[i] + 1'b1;
        end
      end
    end
  end

  initial assert (CHAIN_W > TAG_W && NUM_CHAINS <= (1 << TAG_W))
    else $error("data_simulator: tag field too narrow for NUM_CHAINS");
endmodule
