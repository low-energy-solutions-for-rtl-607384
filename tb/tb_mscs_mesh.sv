// tb_mscs_mesh: self-checking testbench of the MSCS mesh (4 x 4 here).
//
// Part 1: on an idle mesh, a one-flit packet from (0,0) to (3,0) (X only)
// must arrive two cycles after the core offers it (one cycle into the node's
// injection queue, one cycle of reservation), and one from (0,0) to (3,3)
// (X then Y) four cycles after: the same two, then one cycle into the relay
// buffer and one cycle of column reservation. Reservation queues of two
// entries make the flow-control bus busy.
// Part 2: uniform random packets of 1 to 5 flits from every node, then a
// hot-spot phase in which every node sends to (N-1, N-1) while that node's
// core accepts flits only one cycle in four. Every flit is checked against
// its source's order per source/destination pair, and every row/column event
// (reservation, arbitration conflict, flow-control hold-back, multi-hop
// pass, stop short, resume, off stall, ejection wait) and the node events
// (relay turn, central/relay contention) must each occur.
`timescale 1ns/1ps
module tb_mscs_mesh;
  import mscs_pkg::*;
  localparam int N = 4;
  localparam int NN = N * N;

  logic       clk = 0, rst_n = 0;
  logic       core_inj_valid [N][N], core_inj_ready [N][N];
  flit_t      core_inj_flit  [N][N];
  logic       core_ej_x_valid [N][N], core_ej_y_valid [N][N], core_ej_ready [N][N];
  flit_t      core_ej_x_flit [N][N], core_ej_y_flit [N][N];
  logic [7:0] ev_row [N], ev_col [N];
  logic       ev_relay [N][N], ev_relay_contend [N][N];

  int checks = 0, failures = 0, cyc = 0, seqno = 0, delivered = 0;
  flit_t src_q [NN][$];
  flit_t exp_q [NN][NN][$];
  int    ev_cnt [10];
  int    last_arrival [NN];
  int    hot = -1;

  always #5 clk = ~clk;
  mscs_mesh #(.N(N), .RESV_DEPTH(2)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic add_packet(input int s, input int d, input int len);
    flit_t f;
    for (int k = 0; k < len; k++) begin
      f = '0; f.head = (k == 0); f.tail = (k == len - 1);
      f.dst_x = COORD_W'(d % N); f.dst_y = COORD_W'(d / N);
      f.data[15:0] = 16'(seqno++); f.data[23:16] = 8'(s); f.data[31:24] = 8'(k);
      src_q[s].push_back(f);
      exp_q[s][d].push_back(f);
    end
  endtask

  function automatic int pending();
    int n = 0;
    for (int s = 0; s < NN; s++) for (int d = 0; d < NN; d++) n += exp_q[s][d].size();
    return n;
  endfunction

  task automatic receive(input int d, input flit_t f);
    int s;
    s = int'(f.data[23:16]);
    check(int'(f.dst_x) + N * int'(f.dst_y) == d, "flit delivered to the wrong node");
    if (s < NN && exp_q[s][d].size() > 0) begin
      check(f == exp_q[s][d][0], $sformatf("node %0d: flit %0d out of order", d, f.data[15:0]));
      void'(exp_q[s][d].pop_front());
    end else check(1'b0, "unexpected flit");
    delivered++;
    last_arrival[d] = cyc;
  endtask

  always @(negedge clk) begin
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        core_inj_valid[y][x] = src_q[y*N+x].size() > 0;
        core_inj_flit[y][x]  = core_inj_valid[y][x] ? src_q[y*N+x][0] : '0;
        core_ej_ready[y][x]  = (y*N+x == hot) ? ($urandom_range(3) == 0) : 1'b1;
      end
    #1;
    if (rst_n) begin
      cyc++;
      for (int l = 0; l < N; l++)
        for (int b = 0; b < 8; b++)
          if (ev_row[l][b] || ev_col[l][b]) ev_cnt[7-b]++;
      for (int y = 0; y < N; y++)
        for (int x = 0; x < N; x++) begin
          if (ev_relay[y][x]) ev_cnt[8]++;
          if (ev_relay_contend[y][x]) ev_cnt[9]++;
          if (core_inj_valid[y][x] && core_inj_ready[y][x]) void'(src_q[y*N+x].pop_front());
          if (core_ej_x_valid[y][x]) begin
            check(core_ej_ready[y][x], "delivery while the core is not ready");
            receive(y*N+x, core_ej_x_flit[y][x]);
          end
          if (core_ej_y_valid[y][x]) begin
            check(core_ej_ready[y][x], "delivery while the core is not ready");
            receive(y*N+x, core_ej_y_flit[y][x]);
          end
        end
    end
  end

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) begin
      core_inj_valid[y][x] = 0; core_inj_flit[y][x] = '0; core_ej_ready[y][x] = 1;
    end
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // ---------- part 1: idle-mesh latency ----------
    @(posedge clk); #2;
    add_packet(0, N - 1, 1);
    t0 = cyc + 1;
    while (pending() != 0) @(posedge clk);
    check(last_arrival[N-1] == t0 + 2,
          $sformatf("X-only packet arrived in cycle %0d, expected %0d", last_arrival[N-1], t0 + 2));
    repeat (3) @(posedge clk); #2;
    add_packet(0, NN - 1, 1);
    t0 = cyc + 1;
    while (pending() != 0) @(posedge clk);
    check(last_arrival[NN-1] == t0 + 4,
          $sformatf("X-Y packet arrived in cycle %0d, expected %0d", last_arrival[NN-1], t0 + 4));
    $display("X-Y packet latency %0d cycles", last_arrival[NN-1] - t0);
    // ---------- part 2: uniform random, then hot spot ----------
    for (int p = 0; p < 400; p++) begin
      int s, d;
      s = $urandom_range(NN - 1);
      do d = $urandom_range(NN - 1); while (d == s);
      add_packet(s, d, $urandom_range(1, 5));
    end
    while (pending() != 0) @(posedge clk);
    hot = NN - 1;
    for (int r = 0; r < 6; r++)
      for (int s = 0; s < NN - 1; s++) add_packet(s, NN - 1, 5);
    while (pending() != 0) @(posedge clk);
    hot = -1;
    repeat (5) @(posedge clk);
    check(delivered == seqno, $sformatf("delivered %0d of %0d flits", delivered, seqno));
    for (int k = 0; k < 10; k++) begin
      $display("event %0d seen %0d times", k, ev_cnt[k]);
      check(ev_cnt[k] > 0, $sformatf("event %0d never happened", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
