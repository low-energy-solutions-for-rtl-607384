// tb_mscs_queue: self-checking testbench of the MSCS FIFO.
//
// Random push/pop (never pushing a full queue without a pop, never popping an
// empty one) against a queue model for 5000 cycles. Checks both read ports
// (oldest and second oldest entry), the count, and the empty/two/full/on
// flags every cycle, including pushes into a full queue in the same cycle as
// a pop.
`timescale 1ns/1ps
module tb_mscs_queue;
  localparam int W = 12, D = 5;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [W-1:0] wdata = '0, rd0, rd1;
  logic empty, two, full, on;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  always #5 clk = ~clk;
  mscs_queue #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      #1;
      check(count == $bits(count)'(q.size()), "count");
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == D) && on == (q.size() < D), "full/on flags");
      check(two == (q.size() >= 2), "two flag");
      if (q.size() > 0) check(rd0 == q[0], "oldest entry");
      if (q.size() > 1) check(rd1 == q[1], "second entry");
      pop  = (q.size() > 0) && ($urandom_range(99) < 45);
      push = ((q.size() < D) || pop) && ($urandom_range(99) < 50);
      wdata = W'($urandom);
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    @(negedge clk); push = 0; pop = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
