// tb_mscs_node: self-checking testbench of the per-node MSCS logic.
//
// The node sits at (2, 3). The core offers random packets to random
// destinations; flits for another column must appear, in order, on the row
// injection port, the others on the column injection port. The row network
// delivers random packets here: those for row 3 must go to the core (X-side
// port), the rest through the relay buffer to the column injection port.
// The column network pops the offered flit at random. Checks: every flit
// arrives where it should and in order per source queue, packets are never
// interleaved on the column port, a relay turn and a central/relay contention
// both happen, and the node refuses nothing it has room for.
`timescale 1ns/1ps
module tb_mscs_node;
  import mscs_pkg::*;
  localparam int MX = 2, MY = 3;

  logic  clk = 0, rst_n = 0;
  logic  core_inj_valid = 0, core_inj_ready, core_ej_x_valid, core_ej_y_valid, core_ej_ready = 1;
  flit_t core_inj_flit = '0, core_ej_x_flit, core_ej_y_flit;
  logic  row_inj_valid, row_inj_pop = 0, row_ej_valid = 0, row_ej_ready;
  flit_t row_inj_flit, row_ej_flit = '0;
  logic  col_inj_valid, col_inj_pop = 0, col_ej_valid = 0, col_ej_ready;
  flit_t col_inj_flit, col_ej_flit = '0;
  logic  ev_relay, ev_relay_contend;

  int checks = 0, failures = 0, n_relay = 0, n_contend = 0;
  flit_t core_src[$], rowin_src[$];          // what the tb still has to offer
  flit_t exp_row[$], exp_central[$], exp_relay[$], exp_corex[$];
  int    col_owner = -1;                     // 0 central, 1 relay, -1 none
  int    seqno = 0;

  always #5 clk = ~clk;
  mscs_node #(.MY_X(MX), .MY_Y(MY), .DEPTH(4)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic void make_packet(input int dx, input int dy, input int len, input bit from_row);
    flit_t f;
    for (int k = 0; k < len; k++) begin
      f = '0; f.head = (k == 0); f.tail = (k == len - 1);
      f.dst_x = COORD_W'(dx); f.dst_y = COORD_W'(dy); f.data[15:0] = 16'(seqno++);
      if (from_row) begin
        rowin_src.push_back(f);
        if (dy == MY) exp_corex.push_back(f); else exp_relay.push_back(f);
      end else begin
        core_src.push_back(f);
        if (dx != MX) exp_row.push_back(f); else exp_central.push_back(f);
      end
    end
  endfunction

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dx, dy;
    for (int p = 0; p < 300; p++) begin
      do begin dx = $urandom_range(7); dy = $urandom_range(7); end while (dx == MX && dy == MY);
      if ($urandom_range(1)) dx = MX;                      // many Y-only packets
      if (dx == MX && dy == MY) dy = (MY + 1) % 8;
      make_packet(dx, dy, $urandom_range(1, 4), 1'b0);
      // the row delivers packets whose column is this node's column
      dy = $urandom_range(7);
      make_packet(MX, dy, $urandom_range(1, 4), 1'b1);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 20000 && (exp_row.size() + exp_central.size() + exp_relay.size() +
                                   exp_corex.size()) > 0; c++) begin
      @(negedge clk);
      core_inj_valid = core_src.size() > 0;
      core_inj_flit  = core_inj_valid ? core_src[0] : '0;
      row_ej_valid   = 0;
      row_ej_flit    = rowin_src.size() > 0 ? rowin_src[0] : '0;
      row_inj_pop    = 0;
      col_inj_pop    = 0;
      #1;
      // the row network only ejects when the node is ready
      row_ej_valid = rowin_src.size() > 0 && ($urandom_range(3) != 0) && row_ej_ready;
      // network side pops at random (pop is a response to the offer)
      row_inj_pop = row_inj_valid && ($urandom_range(1) == 0);
      col_inj_pop = col_inj_valid && ($urandom_range(2) == 0);
      #1;
      if (ev_relay) n_relay++;
      if (ev_relay_contend) n_contend++;
      if (core_inj_valid && core_inj_ready) void'(core_src.pop_front());
      if (row_ej_valid) begin
        begin
          void'(rowin_src.pop_front());
          if (row_ej_flit.dst_y == COORD_W'(MY)) begin
            check(core_ej_x_valid && core_ej_x_flit == exp_corex[0], "row flit for this node to core");
            void'(exp_corex.pop_front());
          end else check(!core_ej_x_valid, "relay flit must not reach the core");
        end
      end
      if (row_inj_pop) begin
        check(exp_row.size() > 0 && row_inj_flit == exp_row[0], "row injection order");
        if (exp_row.size() > 0) void'(exp_row.pop_front());
      end
      if (col_inj_pop) begin
        int who;
        who = (exp_central.size() > 0 && col_inj_flit == exp_central[0]) ? 0 :
              (exp_relay.size() > 0 && col_inj_flit == exp_relay[0]) ? 1 : -1;
        check(who >= 0, "column flit is the next of central-in or relay");
        if (col_owner >= 0) check(who == col_owner, "packets interleaved on the column port");
        else check(col_inj_flit.head, "column packet starts with its head");
        if (who == 0) void'(exp_central.pop_front());
        if (who == 1) void'(exp_relay.pop_front());
        col_owner = col_inj_flit.tail ? -1 : who;
      end
    end
    check(exp_row.size() == 0 && exp_central.size() == 0 && exp_relay.size() == 0 &&
          exp_corex.size() == 0, "everything delivered");
    check(n_relay > 0, "relay turn happened");
    check(n_contend > 0, "central/relay contention happened");
    $display("relay pushes %0d, contentions %0d", n_relay, n_contend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
