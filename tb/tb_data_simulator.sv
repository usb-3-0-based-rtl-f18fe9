// tb_data_simulator: self-checking test of data_simulator.
// Checks that every enabled chain gives one sample per (interval+1) cycles, that disabled chains
// stay silent, and that each sample carries the chain number and the chain's running count.
module tb_data_simulator;
  localparam int N = 4, CW = 16, TW = 4;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [N-1:0]  chain_en = '0;
  logic [15:0]   interval = '0;
  logic [N-1:0]  chain_valid;
  logic [CW-1:0] chain_data [N];
  int checks = 0, failures = 0;
  int exp_seq [N];
  int last_t [N];
  int cyc = 0;

  data_simulator #(.NUM_CHAINS(N), .CHAIN_W(CW), .TAG_W(TW)) dut (.*);

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
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  int cur_period = 1;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (chain_valid[i]) begin
        check(chain_en[i], "sample from a disabled chain");
        check(chain_data[i] == {TW'(i), 12'(exp_seq[i])}, "sample value");
        if (last_t[i] >= 0) check(cyc - last_t[i] == cur_period, "sample period");
        last_t[i] = cyc;
        exp_seq[i]++;
      end
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin exp_seq[i] = 0; last_t[i] = -1; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // phase 1: all chains, sample every cycle, long enough for the 12-bit count to wrap
    chain_en <= '1; interval <= 0; cur_period = 1; enable <= 1;
    repeat (4200) @(posedge clk);
    enable <= 0;
    repeat (3) @(posedge clk);
    // phase 2: every 7th cycle, chains 0 and 2 only
    for (int i = 0; i < N; i++) last_t[i] = -1;
    chain_en <= 4'b0101; interval <= 6; cur_period = 7; enable <= 1;
    repeat (700) @(posedge clk);
    enable <= 0;
    repeat (3) @(posedge clk);
    check(exp_seq[0] == 4200 + 100, "chain 0 sample count");
    check(exp_seq[1] == 4200, "chain 1 sample count");
    check(exp_seq[2] == 4200 + 100, "chain 2 sample count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
