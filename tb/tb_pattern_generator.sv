// tb_pattern_generator: self-checking test of pattern_generator (32 channels, 16-word buffer).
// Loads patterns, plays them at several sampling rates and checks every output word, the spacing
// of the sample strobes, the start latency (first word two cycles after run), the idle level after
// stop, and that an over-long pattern is cut at the buffer depth with load_overflow set.
module tb_pattern_generator;
  localparam int CH = 32, D = 16;
  logic clk = 0, rst_n = 0;
  logic load_start = 0, load_valid = 0, run = 0;
  logic [CH-1:0] load_data = '0;
  logic [15:0]   rate_div = '0;
  logic [$clog2(D):0] pat_len;
  logic load_overflow, sample_strobe;
  logic [CH-1:0] ch_out;
  int checks = 0, failures = 0;
  logic [CH-1:0] pat [$];
  int cyc = 0;

  pattern_generator #(.CHANNELS(CH), .DEPTH(D)) dut (.*);

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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(int n);
    @(negedge clk); load_start = 1;
    @(negedge clk); load_start = 0;
    pat.delete();
    for (int k = 0; k < n; k++) begin
      load_valid = 1;
      load_data  = $urandom;
      if (k < D) pat.push_back(load_data);
      @(negedge clk);
      load_valid = 0;
      if ($urandom_range(2) == 0) @(negedge clk);
    end
  endtask

  // run for nsamp samples at period div+1 and compare
  task automatic play(int div, int nsamp);
    int t_run, t_last, got;
    @(negedge clk);
    rate_div = 16'(div);
    run = 1;
    t_run = cyc;
    got = 0;
    t_last = -1;
    while (got < nsamp) begin
      @(posedge clk); #1;
      if (sample_strobe) begin
        check(ch_out == pat[got % pat.size()], "channel word");
        if (got == 0) check(cyc - t_run == 2, "start latency");
        else          check(cyc - t_last == div + 1, "sample period");
        t_last = cyc;
        got++;
      end
      if (cyc - t_run > (div + 1) * (nsamp + 4)) begin
        check(0, "samples missing");
        break;
      end
    end
    @(negedge clk); run = 0;
    @(posedge clk); #1;
    check(ch_out == '0 && !sample_strobe, "idle after stop");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    load(10);
    check(pat_len == 10 && !load_overflow, "pattern length");
    play(3, 25);
    play(0, 23);
    play(6, 12);
    load(D + 4);
    check(pat_len == D, "length capped at depth");
    check(load_overflow, "load overflow flag");
    play(1, 2 * D + 3);
    load(1);
    check(pat_len == 1 && !load_overflow, "reload clears overflow");
    play(0, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
