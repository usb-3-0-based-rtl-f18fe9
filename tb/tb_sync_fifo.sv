// tb_sync_fifo: self-checking test of sync_fifo.
// Random pushes and pops (also while full and empty, and both at once) against a queue reference;
// checks rd_data, full, empty and count every cycle, and that a push into a full FIFO is dropped.
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] ref_q[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 4000; i++) begin
      // bias: phases of filling and draining
      int pw;
      pw = ((i / 200) % 2 == 0) ? 70 : 30;
      wr_en   <= ($urandom_range(99) < pw);
      wr_data <= W'($urandom);
      rd_en   <= 1'b0;
      #1;
      rd_en <= !empty && ($urandom_range(99) < 100 - pw);
      @(posedge clk);
      // reference update for what the DUT did at this edge
      begin
        bit pop, push;
        pop  = rd_en && ref_q.size() > 0;
        push = wr_en && (ref_q.size() < D || pop);
        if (pop) void'(ref_q.pop_front());
        if (push) ref_q.push_back(wr_data);
      end
      #1;
      check(count == ($clog2(D)+1)'(ref_q.size()), "count");
      check(empty == (ref_q.size() == 0), "empty");
      check(full == (ref_q.size() == D), "full");
      if (ref_q.size() > 0) check(rd_data == ref_q[0], "rd_data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
