// tb_dwm_dual_fifo: self-checking testbench of the Dual racetrack FIFO
// (two half-length linear-buffer racetracks used alternately).
//
// Part 1 checks the alternation: from empty, two writes go to racetracks 0
// and 1, then two read+write pairs both complete in consecutive cycles, and
// the write/read owner bits flip on every accepted write/read. Part 2 runs
// random read/write traffic at 10 %, 50 % and 90 % load against a queue
// model, checking every flit, the count and the shift budget. Part 3 holds
// read and write requests high for 400 cycles: unlike a single linear
// buffer, the Dual buffer must read in more than three quarters of them.
`timescale 1ns/1ps
module tb_dwm_dual_fifo;
  import dwm_pkg::*;

  localparam int W = 16;
  localparam int L = 8;

  logic clk = 0, rst_n = 0;
  logic wr_req = 0, rd_req = 0;
  logic [W-1:0] wr_data = '0;
  logic wr_ack, rd_ack, rd_pending, wr_pending, empty, full;
  logic [W-1:0] rd_data;
  logic [$clog2(L+1)-1:0] count;
  lb_state_e state [2];
  logic [2:0] n_shifts;
  logic wr_owner, rd_owner;

  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  logic [W-1:0] next_val = 16'h100;

  always #5 clk = ~clk;

  dwm_dual_fifo #(.WIDTH(W), .L(L)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // one cycle: apply requests, sample acks, update the model
  task automatic cycle(input logic r, input logic w, output logic ra, output logic wa);
    @(negedge clk);
    rd_req = r;
    wr_req = w;
    if (w) wr_data = next_val;
    #1;
    ra = rd_ack;
    wa = wr_ack;
    check(count == $bits(count)'(q.size()), "count matches model");
    if (rd_ack) begin
      check(q.size() > 0, "read from empty model");
      if (q.size() > 0) begin
        check(rd_data == q[0], $sformatf("read data %h expected %h", rd_data, q[0]));
        void'(q.pop_front());
      end
    end
    if (wr_ack) begin
      check(q.size() < L, "write into full model");
      q.push_back(wr_data);
      next_val++;
    end
  endtask

  task automatic step2(input logic r, input logic w, input logic exp_ra, input logic exp_wa,
                       input string what);
    logic ra, wa;
    cycle(r, w, ra, wa);
    @(posedge clk); #1;
    check(ra == exp_ra && wa == exp_wa, $sformatf("%s: acks r%0d w%0d", what, ra, wa));
  endtask


  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ra, wa;
    int reads, busy_cycles;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---------- part 1: alternating racetracks ----------
    // writes go to racetracks 0,1,0,1..., reads likewise: from empty, two
    // writes and then two read+write pairs all complete in consecutive cycles
    step2(0, 1, 0, 1, "W into racetrack 0");
    check(wr_owner == 1'b1, "write owner flipped to 1");
    step2(0, 1, 0, 1, "W into racetrack 1");
    step2(1, 1, 1, 1, "R+W on racetrack 0");
    check(rd_owner == 1'b1 && wr_owner == 1'b1, "owners after R+W on 0");
    step2(1, 1, 1, 1, "R+W on racetrack 1");
    while (q.size() > 0) cycle(1, 0, ra, wa);
    // ---------- part 2: random traffic ----------
    for (int load = 10; load <= 90; load += 40) begin
      logic r, w;
      r = 0; w = 0;
      for (int c = 0; c < 1500; c++) begin
        if (!r) r = ($urandom_range(99) < load) && (q.size() > 0);
        if (!w) w = ($urandom_range(99) < load) && (q.size() < L);
        cycle(r, w, ra, wa);
        if (ra) r = 0;
        if (wa) w = 0;
        check(n_shifts <= 4, "at most two shifts per racetrack per cycle");
      end
      while (q.size() > 0) cycle(1, 0, ra, wa);
    end
    // ---------- part 3: saturation ----------
    while (q.size() < 4) cycle(0, 1, ra, wa);
    reads = 0;
    busy_cycles = 400;
    for (int c = 0; c < busy_cycles; c++) begin
      cycle(q.size() > 0, q.size() < L, ra, wa);
      if (ra) reads++;
    end
    $display("Dual: %0d reads in %0d cycles with both requests always high", reads, busy_cycles);
    check(reads > busy_cycles * 3 / 4, "Dual reads in well over half the cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
