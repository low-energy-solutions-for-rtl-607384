// tb_noc_fifo_top: end-to-end, full-size testbench of noc_fifo_top.
//
// The top is instantiated at its default parameters: an 8 x 8 MSCS mesh
// with 8-flit buffers, and 128-bit, 8-flit Dual, linear and circular
// racetrack FIFOs. Everything runs at once from one clocked process.
//
// Mesh: on the idle mesh, an X-only one-flit packet must arrive two cycles
// after its core offers it and an X-then-Y packet four cycles after. Then
// uniform random packets of 1 to 5 flits from every node, then a hot-spot
// phase in which all nodes send 5-flit packets to (7,7) while that core
// accepts a flit only one cycle in four. Every flit is checked for
// destination and per-source/destination order, and all are delivered.
//
// FIFOs: each of the three FIFOs gets its own random read/write traffic
// (load changing every 500 cycles between 10 % and 95 %) checked against a
// queue model, and its shift count is checked against the two-shifts-per-
// cycle budget (four for the Dual pair).
//
// Mechanisms counted (each must happen at least once, else a failure):
// mesh reservation, arbitration conflict, flow-control hold-back, multi-hop
// pass, stop short, resume from an input buffer, off-signal stall, ejection
// wait, relay turn, central/relay contention; per FIFO: read and write in
// the same cycle, read held back by alignment, write held back by
// alignment, FIFO full, shifting.
`timescale 1ns/1ps
module tb_noc_fifo_top;
  import mscs_pkg::*;
  import dwm_pkg::*;
  localparam int N  = 8;
  localparam int NN = N * N;
  localparam int W  = 128;
  localparam int L  = 8;

  logic       clk = 0, rst_n = 0;
  logic       mesh_inj_valid [N][N], mesh_inj_ready [N][N];
  flit_t      mesh_inj_flit  [N][N];
  logic       mesh_ej_x_valid [N][N], mesh_ej_y_valid [N][N], mesh_ej_ready [N][N];
  flit_t      mesh_ej_x_flit [N][N], mesh_ej_y_flit [N][N];
  logic [7:0] mesh_ev_row [N], mesh_ev_col [N];
  logic       mesh_ev_relay [N][N], mesh_ev_relay_contend [N][N];

  logic         dual_wr_req, dual_rd_req, dual_wr_ack, dual_rd_ack;
  logic [W-1:0] dual_wr_data, dual_rd_data;
  logic [3:0]   dual_count;
  logic [2:0]   dual_n_shifts;
  logic         lb_wr_req, lb_rd_req, lb_wr_ack, lb_rd_ack;
  logic [W-1:0] lb_wr_data, lb_rd_data;
  logic [3:0]   lb_count;
  lb_state_e    lb_state;
  logic [1:0]   lb_n_shifts;
  logic         cb_wr_req, cb_rd_req, cb_wr_ack, cb_rd_ack;
  logic [W-1:0] cb_wr_data, cb_rd_data;
  logic [3:0]   cb_count;
  logic [1:0]   cb_n_shifts;

  int checks = 0, failures = 0, cyc = 0, seqno = 0, delivered = 0;
  flit_t src_q [NN][$];
  flit_t exp_q [NN][NN][$];
  int    ev_cnt [10];
  int    last_arrival [NN];
  int    hot = -1;
  bit    fifo_run = 0;
  int    fifo_load = 50;

  // per FIFO (0 Dual, 1 LB, 2 CB): model, request registers, mechanism counts
  logic [W-1:0] fq [3][$];
  logic         f_rd [3], f_wr [3];
  logic [W-1:0] f_wdata [3];
  int           f_ev [3][5];
  const string  ev_name [10] = '{"reservation", "arbitration conflict", "flow-control hold-back",
                                 "multi-hop pass", "stop short", "resume", "off stall",
                                 "ejection wait", "relay turn", "central/relay contention"};
  const string  fev_name [5] = '{"read+write in one cycle", "read held back", "write held back",
                                 "full", "shift"};
  const string  fifo_name [3] = '{"Dual", "LB", "CB"};

  always #5 clk = ~clk;
  noc_fifo_top dut (.*);

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
      f.data[127:96] = $urandom;
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

  // sample one FIFO's outputs after the request was applied
  task automatic fifo_sample(input int i, input logic ra, input logic wa, input logic [W-1:0] rdat,
                             input int cnt, input int nsh, input int max_sh);
    check(cnt == fq[i].size(), $sformatf("%s count %0d, model %0d", fifo_name[i], cnt, fq[i].size()));
    check(nsh <= max_sh, $sformatf("%s shifted %0d times in a cycle", fifo_name[i], nsh));
    if (ra && wa) f_ev[i][0]++;
    if (f_rd[i] && !ra && fq[i].size() > 0) f_ev[i][1]++;
    if (f_wr[i] && !wa && fq[i].size() < L) f_ev[i][2]++;
    if (fq[i].size() == L) f_ev[i][3]++;
    if (nsh > 0) f_ev[i][4]++;
    if (ra) begin
      check(f_rd[i], $sformatf("%s read ack without a request", fifo_name[i]));
      if (fq[i].size() > 0) begin
        check(rdat == fq[i][0], $sformatf("%s read %h expected %h", fifo_name[i], rdat, fq[i][0]));
        void'(fq[i].pop_front());
      end else check(1'b0, $sformatf("%s read from an empty model", fifo_name[i]));
      f_rd[i] = 0;
    end
    if (wa) begin
      check(f_wr[i] && fq[i].size() < L, $sformatf("%s bad write ack", fifo_name[i]));
      fq[i].push_back(f_wdata[i]);
      f_wr[i] = 0;
    end
  endtask

  always @(negedge clk) begin
    // drive: mesh
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        mesh_inj_valid[y][x] = src_q[y*N+x].size() > 0;
        mesh_inj_flit[y][x]  = mesh_inj_valid[y][x] ? src_q[y*N+x][0] : '0;
        mesh_ej_ready[y][x]  = (y*N+x == hot) ? ($urandom_range(3) == 0) : 1'b1;
      end
    // drive: FIFOs; a request stays up until it is acknowledged
    for (int i = 0; i < 3; i++) begin
      if (fifo_run && !f_rd[i]) f_rd[i] = ($urandom_range(99) < fifo_load) && (fq[i].size() > 0);
      if (fifo_run && !f_wr[i]) begin
        f_wr[i] = ($urandom_range(99) < fifo_load);
        if (f_wr[i]) f_wdata[i] = {$urandom, $urandom, $urandom, $urandom};
      end
    end
    dual_rd_req = f_rd[0]; dual_wr_req = f_wr[0]; dual_wr_data = f_wdata[0];
    lb_rd_req   = f_rd[1]; lb_wr_req   = f_wr[1]; lb_wr_data   = f_wdata[1];
    cb_rd_req   = f_rd[2]; cb_wr_req   = f_wr[2]; cb_wr_data   = f_wdata[2];
    #1;
    if (rst_n) begin
      cyc++;
      for (int l = 0; l < N; l++)
        for (int b = 0; b < 8; b++)
          if (mesh_ev_row[l][b] || mesh_ev_col[l][b]) ev_cnt[7-b]++;
      for (int y = 0; y < N; y++)
        for (int x = 0; x < N; x++) begin
          if (mesh_ev_relay[y][x]) ev_cnt[8]++;
          if (mesh_ev_relay_contend[y][x]) ev_cnt[9]++;
          if (mesh_inj_valid[y][x] && mesh_inj_ready[y][x]) void'(src_q[y*N+x].pop_front());
          if (mesh_ej_x_valid[y][x]) begin
            check(mesh_ej_ready[y][x], "delivery while the core is not ready");
            receive(y*N+x, mesh_ej_x_flit[y][x]);
          end
          if (mesh_ej_y_valid[y][x]) begin
            check(mesh_ej_ready[y][x], "delivery while the core is not ready");
            receive(y*N+x, mesh_ej_y_flit[y][x]);
          end
        end
      fifo_sample(0, dual_rd_ack, dual_wr_ack, dual_rd_data, int'(dual_count), int'(dual_n_shifts), 4);
      fifo_sample(1, lb_rd_ack, lb_wr_ack, lb_rd_data, int'(lb_count), int'(lb_n_shifts), 2);
      fifo_sample(2, cb_rd_ack, cb_wr_ack, cb_rd_data, int'(cb_count), int'(cb_n_shifts), 2);
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) begin
      mesh_inj_valid[y][x] = 0; mesh_inj_flit[y][x] = '0; mesh_ej_ready[y][x] = 1;
    end
    for (int i = 0; i < 3; i++) begin f_rd[i] = 0; f_wr[i] = 0; f_wdata[i] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // ---------- idle-mesh latency ----------
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
    // ---------- random mesh traffic with FIFO traffic alongside ----------
    fifo_run = 1;
    for (int p = 0; p < 2000; p++) begin
      int s, d;
      s = $urandom_range(NN - 1);
      do d = $urandom_range(NN - 1); while (d == s);
      add_packet(s, d, ($urandom_range(1) == 0) ? 1 : 5);
    end
    while (pending() != 0) begin
      if (cyc % 500 == 0) fifo_load = $urandom_range(10, 95);
      @(posedge clk);
    end
    // ---------- hot spot ----------
    hot = NN - 1;
    for (int r = 0; r < 3; r++)
      for (int s = 0; s < NN - 1; s++) add_packet(s, NN - 1, 5);
    while (pending() != 0) begin
      if (cyc % 500 == 0) fifo_load = $urandom_range(10, 95);
      @(posedge clk);
    end
    hot = -1;
    fifo_run = 0;
    repeat (40) @(posedge clk);
    check(delivered == seqno, $sformatf("delivered %0d of %0d flits", delivered, seqno));
    for (int i = 0; i < 3; i++)
      check(f_rd[i] == 0 || fq[i].size() > 0, $sformatf("%s read stuck", fifo_name[i]));
    for (int k = 0; k < 10; k++) begin
      $display("mesh %-26s %0d", ev_name[k], ev_cnt[k]);
      check(ev_cnt[k] > 0, $sformatf("mesh mechanism '%s' never happened", ev_name[k]));
    end
    for (int i = 0; i < 3; i++)
      for (int k = 0; k < 5; k++) begin
        $display("%-4s %-26s %0d", fifo_name[i], fev_name[k], f_ev[i][k]);
        check(f_ev[i][k] > 0, $sformatf("%s mechanism '%s' never happened", fifo_name[i], fev_name[k]));
      end
    $display("cycles %0d, flits delivered %0d", cyc, delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
