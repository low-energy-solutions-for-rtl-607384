// tb_dwm_cb_fifo: self-checking testbench of the circular-buffer racetrack FIFO.
//
// Part 1 walks the head/tail pointers and the wire offset by hand: after
// reset slot 0 sits under the centre port, so a write and a read complete
// without shifting; each further write shifts the wire one domain to bring
// the next tail slot to the centre (offset 7 -> 6 -> 5); a read of a head
// slot that lies between read heads waits one cycle while the wire shifts
// under a read head (offset 4), then completes. The acks are checked in
// the cycle they are expected. Part 2 runs random read/write traffic at
// 10 %, 50 % and 90 % load against a queue model, checking every flit, the
// count and the two-shifts-per-cycle budget. Part 3 holds read and write
// requests high for 400 cycles and reports the read rate, which must stay
// above one read in eight cycles.
`timescale 1ns/1ps
module tb_dwm_cb_fifo;
  import dwm_pkg::*;

  localparam int W = 16;
  localparam int L = 8;

  logic clk = 0, rst_n = 0;
  logic wr_req = 0, rd_req = 0;
  logic [W-1:0] wr_data = '0;
  logic wr_ack, rd_ack, rd_pending, wr_pending, empty, full;
  logic [W-1:0] rd_data;
  logic [$clog2(L+1)-1:0] count;
  logic [$clog2(L)-1:0] offset;
  logic [1:0] n_shifts;

  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  logic [W-1:0] next_val = 16'h100;

  always #5 clk = ~clk;

  dwm_cb_fifo #(.WIDTH(W), .L(L)) dut (.*);

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
    // ---------- part 1: pointer/offset walk ----------
    // after reset slot 0 is under the centre read/write port
    step2(0, 1, 0, 1, "W slot 0, already aligned");
    step2(1, 0, 1, 0, "R slot 0 at the centre port");
    check(offset == 3'd7, "no shift after an aligned read");
    step2(0, 1, 0, 1, "W slot 1: one shift left, then write");
    check(offset == 3'd6, "offset 6 after W slot 1");
    step2(0, 1, 0, 1, "W slot 2: one shift left, then write");
    check(offset == 3'd5, "offset 5 after W slot 2");
    step2(1, 0, 0, 0, "R slot 1 between read heads waits");
    check(offset == 3'd4, "shift-to-read moved the head under a read head");
    step2(1, 0, 1, 0, "R slot 1 after the shift");
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
    $display("CB: %0d reads in %0d cycles with both requests always high", reads, busy_cycles);
    check(reads >= busy_cycles / 8, "CB makes progress under saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
