// tb_sample_fifo - checks the music sample FIFO.
//
// Random push/pop traffic (a queue in the test bench is the reference)
// with phases that fill the FIFO to full and drain it to empty. Checks the
// head word, empty, full and level every clock, and that a push when full
// and a pop when empty change nothing.
`timescale 1ns/1ps
module tb_sample_fifo;
  localparam int DEPTH = 16, W = 16;
  logic clk = 0, rst = 1;
  always #10 clk = !clk;

  logic         push = 0, pop = 0, empty, full;
  logic [W-1:0] din = '0, dout;
  logic [4:0]   level;

  sample_fifo #(.DEPTH(DEPTH), .W(W)) dut (.*);

  int checks = 0, failures = 0, fulls = 0, empties = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [W-1:0] q [$];

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 20000; n++) begin
      int bias;
      bias = ((n / 500) % 2 != 0) ? 80 : 20;     // fill phases and drain phases
      push = ($urandom_range(0, 99) < bias);
      pop  = ($urandom_range(0, 99) < 100 - bias);
      din  = 16'($urandom);
      // state before the edge
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == DEPTH), "full");
      check(int'(level) == q.size(), "level");
      if (q.size() > 0) check(dout == q[0], "head");
      if (full) fulls++;
      if (empty) empties++;
      @(posedge clk);
      begin
        bit pushed, popped;
        pushed = push && q.size() < DEPTH;
        popped = pop && q.size() > 0;
        if (popped) void'(q.pop_front());
        if (pushed) q.push_back(din);
      end
      @(negedge clk);
    end
    check(fulls > 10 && empties > 10, "full and empty reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
