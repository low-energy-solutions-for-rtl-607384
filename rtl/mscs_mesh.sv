// mscs_mesh: N x N mesh of MSCS routers with X-Y routing.
//
// Each row is one mscs_line working on the X coordinate and each column one
// mscs_line working on the Y coordinate, so every router takes part in one
// row and one column network (its row crossbar and its column crossbar).
// An mscs_node per position holds the core-side queues, the relay buffer
// that moves packets from the row to the column, and the arbiter that shares
// the column injection between the core's Y-only packets and the relay
// buffer. Network control is therefore done at most once per dimension: a
// reservation in the row, and one in the column if the packet turns.
//
// Node (x, y) is index [y][x] in every array port. The core of each node can
// offer one flit per cycle (core_inj_valid/flit, taken when core_inj_ready)
// and receives up to two per cycle, one from the row (core_ej_x_*) and one
// from the column (core_ej_y_*), as long as core_ej_ready is high. ev_row
// and ev_col give each line's event pulses (see mscs_line; bit order
// resv, arb_conflict, fc_block, multihop, stop_short, resume, off_stall,
// eject_wait from bit 7 down to bit 0); ev_relay and ev_relay_contend come
// from the nodes.
//
// Timing on an idle mesh, from the cycle the core offers a one-flit packet:
// a packet that only moves in X is delivered two cycles later (one cycle
// into the node's row queue, one cycle of reservation, traversal in the
// cycle it leaves); a packet that turns is delivered four cycles later
// (two more: into the relay buffer, then the column reservation).
//
// X-Y routing, one input buffer per port and one relay buffer per node, and
// 8-flit buffers in an 8 x 8 mesh follow the document. The reservation
// queue depth (4) and the hop limit per cycle (8, a whole line) are not
// given there and are this design's choices.
module mscs_mesh
  import mscs_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter int unsigned BUF_DEPTH  = 8,
  parameter int unsigned RESV_DEPTH = 4,
  parameter int unsigned HPC_MAX    = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       core_inj_valid  [N][N],
  input  flit_t      core_inj_flit   [N][N],
  output logic       core_inj_ready  [N][N],
  output logic       core_ej_x_valid [N][N],
  output flit_t      core_ej_x_flit  [N][N],
  output logic       core_ej_y_valid [N][N],
  output flit_t      core_ej_y_flit  [N][N],
  input  logic       core_ej_ready   [N][N],
  output logic [7:0] ev_row          [N],
  output logic [7:0] ev_col          [N],
  output logic       ev_relay         [N][N],
  output logic       ev_relay_contend [N][N]
);

  // row-side and column-side signals of every node, [y][x]
  logic  r_inj_v [N][N], r_inj_pop [N][N], r_ej_v [N][N], r_ej_rdy [N][N];
  flit_t r_inj_f [N][N], r_ej_f [N][N];
  logic  c_inj_v [N][N], c_inj_pop [N][N], c_ej_v [N][N], c_ej_rdy [N][N];
  flit_t c_inj_f [N][N], c_ej_f [N][N];

  for (genvar y = 0; y < N; y++) begin : g_y
    for (genvar x = 0; x < N; x++) begin : g_x
      mscs_node #(.MY_X(x), .MY_Y(y), .DEPTH(BUF_DEPTH)) u_node (
        .clk(clk), .rst_n(rst_n),
        .core_inj_valid(core_inj_valid[y][x]), .core_inj_flit(core_inj_flit[y][x]),
        .core_inj_ready(core_inj_ready[y][x]),
        .core_ej_x_valid(core_ej_x_valid[y][x]), .core_ej_x_flit(core_ej_x_flit[y][x]),
        .core_ej_y_valid(core_ej_y_valid[y][x]), .core_ej_y_flit(core_ej_y_flit[y][x]),
        .core_ej_ready(core_ej_ready[y][x]),
        .row_inj_valid(r_inj_v[y][x]), .row_inj_flit(r_inj_f[y][x]),
        .row_inj_pop(r_inj_pop[y][x]),
        .row_ej_valid(r_ej_v[y][x]), .row_ej_flit(r_ej_f[y][x]),
        .row_ej_ready(r_ej_rdy[y][x]),
        .col_inj_valid(c_inj_v[y][x]), .col_inj_flit(c_inj_f[y][x]),
        .col_inj_pop(c_inj_pop[y][x]),
        .col_ej_valid(c_ej_v[y][x]), .col_ej_flit(c_ej_f[y][x]),
        .col_ej_ready(c_ej_rdy[y][x]),
        .ev_relay(ev_relay[y][x]), .ev_relay_contend(ev_relay_contend[y][x])
      );
    end
  end

  // rows: position along the line is x
  for (genvar y = 0; y < N; y++) begin : g_row
    mscs_line #(.N(N), .DIM(0), .BUF_DEPTH(BUF_DEPTH), .RESV_DEPTH(RESV_DEPTH),
                .HPC_MAX(HPC_MAX)) u_line (
      .clk(clk), .rst_n(rst_n),
      .inj_valid(r_inj_v[y]), .inj_flit(r_inj_f[y]), .inj_pop(r_inj_pop[y]),
      .ej_valid(r_ej_v[y]), .ej_flit(r_ej_f[y]), .ej_ready(r_ej_rdy[y]),
      .ev_resv(ev_row[y][7]), .ev_arb_conflict(ev_row[y][6]), .ev_fc_block(ev_row[y][5]),
      .ev_multihop(ev_row[y][4]), .ev_stop_short(ev_row[y][3]), .ev_resume(ev_row[y][2]),
      .ev_off_stall(ev_row[y][1]), .ev_eject_wait(ev_row[y][0])
    );
  end

  // columns: position along the line is y; transpose the node arrays
  for (genvar x = 0; x < N; x++) begin : g_col
    logic  ci_v [N], ci_pop [N], ce_v [N], ce_rdy [N];
    flit_t ci_f [N], ce_f [N];
    for (genvar y = 0; y < N; y++) begin : g_t
      assign ci_v[y]         = c_inj_v[y][x];
      assign ci_f[y]         = c_inj_f[y][x];
      assign c_inj_pop[y][x] = ci_pop[y];
      assign c_ej_v[y][x]    = ce_v[y];
      assign c_ej_f[y][x]    = ce_f[y];
      assign ce_rdy[y]       = c_ej_rdy[y][x];
    end
    mscs_line #(.N(N), .DIM(1), .BUF_DEPTH(BUF_DEPTH), .RESV_DEPTH(RESV_DEPTH),
                .HPC_MAX(HPC_MAX)) u_line (
      .clk(clk), .rst_n(rst_n),
      .inj_valid(ci_v), .inj_flit(ci_f), .inj_pop(ci_pop),
      .ej_valid(ce_v), .ej_flit(ce_f), .ej_ready(ce_rdy),
      .ev_resv(ev_col[x][7]), .ev_arb_conflict(ev_col[x][6]), .ev_fc_block(ev_col[x][5]),
      .ev_multihop(ev_col[x][4]), .ev_stop_short(ev_col[x][3]), .ev_resume(ev_col[x][2]),
      .ev_off_stall(ev_col[x][1]), .ev_eject_wait(ev_col[x][0])
    );
  end

endmodule
