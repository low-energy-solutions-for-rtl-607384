// tb_mscs_rr_arbiter: self-checking testbench of the round-robin arbiter.
//
// Drives random request vectors and compares the grant with a model that
// searches upwards from the position after the previous winner. Also checks
// that a requester that keeps asking is granted within N grants (fairness)
// and that with all lines high the grant rotates 0, 1, ..., N-1.
`timescale 1ns/1ps
module tb_mscs_rr_arbiter;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0, grant;
  logic valid;
  logic [$clog2(N)-1:0] winner;
  int checks = 0, failures = 0;
  int ptr = 0;

  always #5 clk = ~clk;
  mscs_rr_arbiter #(.N(N)) dut (.*);

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

  task automatic step(input logic [N-1:0] r);
    int exp_w;
    @(negedge clk);
    req = r;
    #1;
    exp_w = -1;
    for (int k = 0; k < N; k++)
      if (exp_w < 0 && r[(ptr + k) % N]) exp_w = (ptr + k) % N;
    check(valid == (exp_w >= 0), "valid");
    if (exp_w >= 0) begin
      check(int'(winner) == exp_w, $sformatf("winner %0d expected %0d", winner, exp_w));
      check(grant == (N'(1) << exp_w), "one-hot grant");
      ptr = (exp_w + 1) % N;
    end else begin
      check(grant == '0, "no grant");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin
      step('1);
      check(int'(winner) == k, "rotation with all requests");
    end
    for (int c = 0; c < 3000; c++) step(N'($urandom));
    @(negedge clk); req = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
