// tb_mscs_line: self-checking testbench of one MSCS row.
//
// Part 1 (idle line): a one-flit packet from router 0 to router 7 is offered
// in cycle t, reserved in cycle t, and must come out of router 7 in cycle
// t+1 after crossing all seven links in one cycle; a five-flit packet from
// router 6 to router 1 must deliver its flits in five consecutive cycles
// starting one cycle after its request.
// Part 2: every router sends random packets (1 to 5 flits) to random other
// routers while the ejection ports are randomly throttled. Each flit is
// checked against the order its source sent it in (per source/destination
// pair), and each mechanism of the line must be seen at least once:
// reservation, arbitration conflict, flow-control hold-back of a request,
// multi-hop pass, stop short of the destination, resume from a buffer,
// wait for an off buffer and wait for the ejection port. Small buffers and
// reservation queues (2 entries) make the back-pressure cases frequent.
`timescale 1ns/1ps
module tb_mscs_line;
  import mscs_pkg::*;

  localparam int N = 8;

  logic  clk = 0, rst_n = 0;
  logic  inj_valid [N];
  flit_t inj_flit  [N];
  logic  inj_pop   [N];
  logic  ej_valid  [N];
  flit_t ej_flit   [N];
  logic  ej_ready  [N];
  logic  ev_resv, ev_arb_conflict, ev_fc_block, ev_multihop, ev_stop_short;
  logic  ev_resume, ev_off_stall, ev_eject_wait;

  int checks = 0, failures = 0;
  flit_t src_q [N][$];        // flits each router still has to send
  flit_t exp_q [N][N][$];     // expected flits per (src, dst)
  int    ev_cnt [8];
  int    delivered = 0, cyc = 0;
  int    ej_cycle [N];
  logic  throttle = 0;

  always #5 clk = ~clk;

  mscs_line #(.N(N), .DIM(0), .BUF_DEPTH(2), .RESV_DEPTH(2), .HPC_MAX(8)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // payload: [15:8] source, [7:0] running number
  int seqno = 0;
  task automatic add_packet(input int s, input int d, input int len);
    flit_t f;
    for (int k = 0; k < len; k++) begin
      f = '0;
      f.head  = (k == 0);
      f.tail  = (k == len - 1);
      f.dst_x = COORD_W'(d);
      f.dst_y = '0;
      f.data[15:8] = 8'(s);
      f.data[7:0]  = 8'(seqno);
      f.data[PAYLOAD_W-1:PAYLOAD_W-32] = 32'(k);
      seqno++;
      src_q[s].push_back(f);
      exp_q[s][d].push_back(f);
    end
  endtask

  // drive the offers at the negedge, observe at negedge + 1
  always @(negedge clk) begin
    for (int i = 0; i < N; i++) begin
      inj_valid[i] = (src_q[i].size() > 0);
      inj_flit[i]  = (src_q[i].size() > 0) ? src_q[i][0] : '0;
      ej_ready[i]  = throttle ? ($urandom_range(3) != 0) : 1'b1;
    end
    #1;
    if (rst_n) begin
      cyc++;
      if (ev_resv)         ev_cnt[0]++;
      if (ev_arb_conflict) ev_cnt[1]++;
      if (ev_fc_block)     ev_cnt[2]++;
      if (ev_multihop)     ev_cnt[3]++;
      if (ev_stop_short)   ev_cnt[4]++;
      if (ev_resume)       ev_cnt[5]++;
      if (ev_off_stall)    ev_cnt[6]++;
      if (ev_eject_wait)   ev_cnt[7]++;
      for (int i = 0; i < N; i++) begin
        if (inj_pop[i]) begin
          check(inj_valid[i], "pop without an offer");
          void'(src_q[i].pop_front());
        end
        if (ej_valid[i]) begin
          int s;
          s = int'(ej_flit[i].data[15:8]);
          check(ej_ready[i], "ejected while not ready");
          check(int'(ej_flit[i].dst_x) == i, "flit ejected at the wrong router");
          if (s < N && exp_q[s][i].size() > 0) begin
            check(ej_flit[i] == exp_q[s][i][0],
                  $sformatf("router %0d: flit %h out of order", i, ej_flit[i].data[15:0]));
            void'(exp_q[s][i].pop_front());
          end else begin
            check(1'b0, "unexpected flit");
          end
          delivered++;
          ej_cycle[i] = cyc;
        end
      end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pending();
    int n = 0;
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++) n += exp_q[s][d].size();
    return n;
  endfunction

  initial begin
    int t0;
    for (int i = 0; i < N; i++) begin
      inj_valid[i] = 0; inj_flit[i] = '0; ej_ready[i] = 1; ej_cycle[i] = -1;
    end
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // ---------- part 1: zero-load latency ----------
    @(posedge clk); #2;
    add_packet(0, 7, 1);
    t0 = cyc + 1;                       // first cycle the offer is seen
    while (pending() != 0) @(posedge clk);
    check(ej_cycle[7] == t0 + 1,
          $sformatf("0->7 one-flit packet out in cycle %0d, expected %0d", ej_cycle[7], t0 + 1));
    repeat (3) @(posedge clk); #2;
    add_packet(6, 1, 5);
    t0 = cyc + 1;
    while (pending() != 0) @(posedge clk);
    check(ej_cycle[1] == t0 + 5,
          $sformatf("6->1 five-flit packet tail out in cycle %0d, expected %0d", ej_cycle[1], t0 + 5));
    repeat (3) @(posedge clk);
    // ---------- part 2: random traffic ----------
    throttle = 1;
    for (int p = 0; p < 600; p++) begin
      int s, d;
      s = $urandom_range(N - 1);
      do d = $urandom_range(N - 1); while (d == s);
      add_packet(s, d, $urandom_range(1, 5));
    end
    while (pending() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    check(delivered == seqno, $sformatf("delivered %0d of %0d flits", delivered, seqno));
    for (int k = 0; k < 8; k++) begin
      $display("event %0d seen in %0d cycles", k, ev_cnt[k]);
      check(ev_cnt[k] > 0, $sformatf("event %0d never happened", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
