// tb_data_formatter: self-checking test of data_formatter (4 chains of 16 bits -> 32-bit words).
// A reference keeps one queue per chain. Every output word must be {sample of chain 2g+1, sample of
// chain 2g} for the groups g = 0,1,0,1,...; out_last must mark every line_words-th word.
// Phases: random chain traffic with random back-pressure; a burst from preloaded buffers that must
// come out at one word per cycle; an overflow of chain 0 that must drop exactly the excess samples
// and set only overflow[0]; then the stream must continue with the kept samples.
module tb_data_formatter;
  localparam int N = 4, CW = 16, DW = 32, QD = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0]  chain_valid = '0;
  logic [CW-1:0] chain_data [N];
  logic [15:0]   line_words = 16'd5;
  logic          out_valid, out_last, out_ready = 0;
  logic [DW-1:0] out_data;
  logic [N-1:0]  overflow;
  logic [31:0]   drop_count;
  int checks = 0, failures = 0;
  logic [CW-1:0] rq [N][$];
  int grp = 0, words = 0, seqn = 0;
  int out_cycles [$];
  int cyc = 0;

  data_formatter #(.NUM_CHAINS(N), .CHAIN_W(CW), .DATA_W(DW), .CHAIN_FIFO_DEPTH(QD)) dut (.*);

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

  // output monitor
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    logic [DW-1:0] exp;
    bit ok;
    ok = 1;
    for (int j = 0; j < 2; j++) begin
      if (rq[grp*2+j].size() == 0) ok = 0;
      else exp[j*CW +: CW] = rq[grp*2+j].pop_front();
    end
    check(ok, "word without reference samples");
    if (ok) check(out_data == exp, "packed word");
    words++;
    check(out_last == (words % int'(line_words) == 0), "line mark");
    grp = 1 - grp;
    out_cycles.push_back(cyc);
  end

  // drive one cycle of chain inputs; push to the reference only when the chain FIFO can take it
  task automatic drive(logic [N-1:0] v, bit keep_all);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      chain_data[i] = CW'({i[3:0], 12'(seqn)});
      if (v[i] && (keep_all || rq[i].size() < QD)) rq[i].push_back(chain_data[i]);
    end
    seqn++;
    chain_valid = v;
    @(posedge clk);
  endtask

  task automatic idle();
    @(negedge clk);
    chain_valid = '0;
  endtask

  initial begin
    for (int i = 0; i < N; i++) chain_data[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // phase 1: random traffic, random ready (average input below output rate)
    // all chains share one average rate (as the data simulator's chains do) but deliver with
    // random per-chain delays, so the chain buffers are unevenly filled
    begin
      int pend [N];
      logic [N-1:0] v;
      for (int i = 0; i < N; i++) pend[i] = 0;
      for (int k = 0; k < 3000; k++) begin
        out_ready <= ($urandom_range(9) < 8);
        if ($urandom_range(9) < 3) for (int i = 0; i < N; i++) pend[i]++;
        for (int i = 0; i < N; i++) begin
          v[i] = (pend[i] > 0) && ($urandom_range(1) == 1);
          if (v[i]) pend[i]--;
        end
        drive(v, 1);
      end
    end
    idle();
    out_ready <= 1;
    repeat (40) @(posedge clk);
    check(drop_count == 0 && overflow == '0, "no drops under light load");
    for (int i = 0; i < N; i++) check(rq[i].size() < QD, "chain buffers within depth");
    // drain leftovers of partially filled groups with extra samples
    begin
      int m;
      m = 0;
      for (int i = 0; i < N; i++) if (rq[i].size() > m) m = rq[i].size();
      for (int i = 0; i < N; i++)
        while (rq[i].size() < m) drive(N'(1) << i, 1);
      idle();
    end
    repeat (20) @(posedge clk);
    // phase 2: preload 8 samples per chain, then a burst at full rate
    while (out_valid) @(posedge clk);
    out_ready <= 0;
    begin
      int n_before, first;
      for (int k = 0; k < 8; k++) drive('1, 1);
      idle();
      repeat (2) @(posedge clk);
      n_before = out_cycles.size();
      out_ready <= 1;
      repeat (30) @(posedge clk);
      check(out_cycles.size() - n_before >= 16, "burst word count");
      first = out_cycles[n_before];
      for (int k = 1; k < 16 && n_before + k < out_cycles.size(); k++)
        check(out_cycles[n_before+k] == first + k, "one word per cycle");
    end
    // phase 3: overflow chain 0 while its group partner is empty
    for (int i = 0; i < N; i++) check(rq[i].size() == 0, "empty n_before overflow phase");
    out_ready <= 0;
    for (int k = 0; k < QD + 5; k++) drive(4'b0001, 0);
    idle();
    repeat (2) @(posedge clk);
    check(drop_count == 5, "drop count");
    check(overflow == 4'b0001, "overflow flag");
    // continue: the 16 kept chain-0 samples must pair with new chain-1 samples
    out_ready <= 1;
    for (int k = 0; k < QD; k++) drive(4'b1110, 0);
    for (int k = 0; k < 4; k++) drive('1, 0);
    idle();
    repeat (30) @(posedge clk);
    for (int i = 0; i < N; i++) check(rq[i].size() <= 4, "drained after overflow");
    check(words > 1500, "enough words seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
