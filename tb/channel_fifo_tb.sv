// channel_fifo_tb: random pushes and pops (never pushing when full or popping
// when empty) against a queue model; checks the head word, full, empty and
// count every cycle and that the channel fills and drains completely.
// Channels between the kernels come from the original pipeline; the depth
// under test and the random traffic are this testbench's own.
module channel_fifo_tb;
  localparam int W = 24, D = 5;
  logic clk = 0, rst_n = 1;
  logic push, pop, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, cycles = 0, n_full = 0, n_empty = 0;
  logic [W-1:0] q[$];

  channel_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; wr_data = '0;
    #2 rst_n = 0;  // a falling edge, so the asynchronous reset is applied
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // compare state
      checks++;
      if (count != $bits(count)'(q.size()) || full != (q.size() == D) || empty != (q.size() == 0)
          || (q.size() != 0 && rd_data != q[0])) begin
        failures++;
        $display("FAIL cycle %0d: count=%0d model=%0d full=%0d empty=%0d", i, count, q.size(), full, empty);
      end
      if (full) n_full++;
      if (empty) n_empty++;
      // phases: mostly-push, mostly-pop, random
      push = !full && ($urandom_range(0, 99) < ((i / 200) % 2 == 0 ? 80 : 25));
      pop  = !empty && ($urandom_range(0, 99) < ((i / 200) % 2 == 0 ? 25 : 80));
      wr_data = W'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wr_data);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin
      failures++;
      $display("FAIL never full (%0d) or never empty (%0d)", n_full, n_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
