// tb_dwm_lb_fifo: self-checking testbench of the linear-buffer racetrack FIFO.
//
// Part 1 walks the alignment machine through the transitions named for the
// linear buffer: RW_ALIGNED + read+write -> UNALIGNED, UNALIGNED + idle ->
// RW_ALIGNED, RW_ALIGNED + write -> W_ALIGNED, RW_ALIGNED + read ->
// W_ALIGNED, UNALIGNED + write -> R_ALIGNED, and checks the acks appear in
// the expected cycles. Part 2 runs random read/write traffic at 10 %, 50 %
// and 90 % load against a queue model and checks every flit and the count.
// Part 3 holds read and write requests high for 400 cycles: a single
// linear buffer cannot read and write in consecutive cycles, so it must
// complete at most about one read every two cycles.
`timescale 1ns/1ps
module tb_dwm_lb_fifo;
  import dwm_pkg::*;

  localparam int W = 16;
  localparam int L = 8;

  logic clk = 0, rst_n = 0;
  logic wr_req = 0, rd_req = 0;
  logic [W-1:0] wr_data = '0;
  logic wr_ack, rd_ack, rd_pending, wr_pending, empty, full;
  logic [W-1:0] rd_data;
  logic [$clog2(L+1)-1:0] count;
  lb_state_e state;
  logic [1:0] n_shifts;

  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  logic [W-1:0] next_val = 16'h100;

  always #5 clk = ~clk;

  dwm_lb_fifo #(.WIDTH(W), .L(L)) dut (.*);

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

  task automatic step(input logic r, input logic w, input logic chk_state, input lb_state_e s,
                      input logic exp_ra, input logic exp_wa, input string what);
    logic ra, wa;
    cycle(r, w, ra, wa);
    // the state is registered: it still shows the start of this cycle
    if (chk_state)
      check(state == s, $sformatf("%s: state %s expected %s", what, state.name(), s.name()));
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
    // ---------- part 1: alignment machine ----------
    // each step: state seen at the start of the cycle, requests, expected acks
    step(0, 1, 1'b0, LB_RW_ALIGNED, 0, 1, "empty + W");
    step(1, 1, 1'b1, LB_RW_ALIGNED, 1, 1, "RW_ALIGNED + R+W");
    step(0, 0, 1'b1, LB_UNALIGNED,  0, 0, "UNALIGNED + idle");
    step(0, 1, 1'b1, LB_RW_ALIGNED, 0, 1, "RW_ALIGNED + W");
    step(0, 1, 1'b1, LB_W_ALIGNED,  0, 1, "W_ALIGNED + W");
    step(1, 0, 1'b1, LB_RW_ALIGNED, 1, 0, "RW_ALIGNED + R");
    step(1, 0, 1'b1, LB_W_ALIGNED,  0, 0, "W_ALIGNED + R (read waits for a shift)");
    step(1, 0, 1'b1, LB_R_ALIGNED,  1, 0, "R_ALIGNED + R");
    step(0, 1, 1'b1, LB_UNALIGNED,  0, 1, "UNALIGNED + W");
    step(0, 0, 1'b1, LB_R_ALIGNED,  0, 0, "after UNALIGNED + W");
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
        check(n_shifts <= 2, "at most two shifts per cycle");
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
    $display("LB: %0d reads in %0d cycles with both requests always high", reads, busy_cycles);
    check(reads <= busy_cycles / 2 + 2, "LB reads at most about every other cycle");
    check(reads >= busy_cycles / 4, "LB still makes progress");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
