// noc_fifo_top: the two low-energy NoC buffering schemes side by side.
//
// The first is an N x N MSCS mesh (mscs_mesh): reservation-based,
// multi-hop segmented circuit switching with one data buffer per input
// port and one relay buffer per node. The second is a set of racetrack
// (domain-wall memory) FIFOs meant to replace the SRAM virtual-channel
// buffers of a router: the Dual buffer, which is the recommended one, and
// the linear (LB) and circular (CB) buffers it is built from or compared
// with. The two schemes are independent, so they share only clock and
// reset; each brings out its own ports (mesh_*, dual_*, lb_*, cb_*). See
// the submodules for interfaces and timing.
module noc_fifo_top
  import mscs_pkg::*;
  import dwm_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter int unsigned BUF_DEPTH  = 8,
  parameter int unsigned RESV_DEPTH = 4,
  parameter int unsigned FIFO_W     = 128,
  parameter int unsigned FIFO_L     = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  // MSCS mesh, node (x, y) at [y][x]
  input  logic       mesh_inj_valid  [N][N],
  input  flit_t      mesh_inj_flit   [N][N],
  output logic       mesh_inj_ready  [N][N],
  output logic       mesh_ej_x_valid [N][N],
  output flit_t      mesh_ej_x_flit  [N][N],
  output logic       mesh_ej_y_valid [N][N],
  output flit_t      mesh_ej_y_flit  [N][N],
  input  logic       mesh_ej_ready   [N][N],
  output logic [7:0] mesh_ev_row     [N],
  output logic [7:0] mesh_ev_col     [N],
  output logic       mesh_ev_relay         [N][N],
  output logic       mesh_ev_relay_contend [N][N],
  // Dual racetrack FIFO
  input  logic                        dual_wr_req,
  input  logic [FIFO_W-1:0]           dual_wr_data,
  output logic                        dual_wr_ack,
  input  logic                        dual_rd_req,
  output logic                        dual_rd_ack,
  output logic [FIFO_W-1:0]           dual_rd_data,
  output logic [$clog2(FIFO_L+1)-1:0] dual_count,
  output logic [2:0]                  dual_n_shifts,
  // linear-buffer racetrack FIFO
  input  logic                        lb_wr_req,
  input  logic [FIFO_W-1:0]           lb_wr_data,
  output logic                        lb_wr_ack,
  input  logic                        lb_rd_req,
  output logic                        lb_rd_ack,
  output logic [FIFO_W-1:0]           lb_rd_data,
  output logic [$clog2(FIFO_L+1)-1:0] lb_count,
  output lb_state_e                   lb_state,
  output logic [1:0]                  lb_n_shifts,
  // circular-buffer racetrack FIFO
  input  logic                        cb_wr_req,
  input  logic [FIFO_W-1:0]           cb_wr_data,
  output logic                        cb_wr_ack,
  input  logic                        cb_rd_req,
  output logic                        cb_rd_ack,
  output logic [FIFO_W-1:0]           cb_rd_data,
  output logic [$clog2(FIFO_L+1)-1:0] cb_count,
  output logic [1:0]                  cb_n_shifts
);

  mscs_mesh #(.N(N), .BUF_DEPTH(BUF_DEPTH), .RESV_DEPTH(RESV_DEPTH)) u_mesh (
    .clk(clk), .rst_n(rst_n),
    .core_inj_valid(mesh_inj_valid), .core_inj_flit(mesh_inj_flit),
    .core_inj_ready(mesh_inj_ready),
    .core_ej_x_valid(mesh_ej_x_valid), .core_ej_x_flit(mesh_ej_x_flit),
    .core_ej_y_valid(mesh_ej_y_valid), .core_ej_y_flit(mesh_ej_y_flit),
    .core_ej_ready(mesh_ej_ready),
    .ev_row(mesh_ev_row), .ev_col(mesh_ev_col),
    .ev_relay(mesh_ev_relay), .ev_relay_contend(mesh_ev_relay_contend)
  );

  dwm_dual_fifo #(.WIDTH(FIFO_W), .L(FIFO_L)) u_dual (
    .clk(clk), .rst_n(rst_n),
    .wr_req(dual_wr_req), .wr_data(dual_wr_data), .wr_ack(dual_wr_ack),
    .rd_req(dual_rd_req), .rd_ack(dual_rd_ack), .rd_data(dual_rd_data),
    .rd_pending(), .wr_pending(), .count(dual_count), .empty(), .full(),
    .wr_owner(), .rd_owner(), .state(), .n_shifts(dual_n_shifts)
  );

  dwm_lb_fifo #(.WIDTH(FIFO_W), .L(FIFO_L)) u_lb (
    .clk(clk), .rst_n(rst_n),
    .wr_req(lb_wr_req), .wr_data(lb_wr_data), .wr_ack(lb_wr_ack),
    .rd_req(lb_rd_req), .rd_ack(lb_rd_ack), .rd_data(lb_rd_data),
    .rd_pending(), .wr_pending(), .count(lb_count), .empty(), .full(),
    .state(lb_state), .n_shifts(lb_n_shifts)
  );

  dwm_cb_fifo #(.WIDTH(FIFO_W), .L(FIFO_L)) u_cb (
    .clk(clk), .rst_n(rst_n),
    .wr_req(cb_wr_req), .wr_data(cb_wr_data), .wr_ack(cb_wr_ack),
    .rd_req(cb_rd_req), .rd_ack(cb_rd_ack), .rd_data(cb_rd_data),
    .rd_pending(), .wr_pending(), .count(cb_count), .empty(), .full(),
    .offset(), .n_shifts(cb_n_shifts)
  );

endmodule
