// dwm_dual_fifo: Dual racetrack FIFO, two half-length linear buffers.
//
// One NoC buffer of L flits is split over two racetrack groups of L/2
// domains, each run by its own linear-buffer controller (dwm_lb_fifo) with
// two read heads (positions 1 and 3 for L = 8). Writes alternate between the
// two racetracks and so do reads: the "write owner" bit names the racetrack
// that takes the next write, the "read owner" bit the one that gives the
// next read, and each flips when its access is done. Flits therefore come
// out in the order they went in, while the racetrack that is not being
// accessed uses the cycle to shift into position for its next access; this
// is what lets the Dual buffer read and write in most consecutive cycles,
// which a single linear buffer cannot.
//
// Both racetracks follow the shift-to-read-back home policy of dwm_lb_fifo.
// Interface and timing are those of dwm_lb_fifo: requests held until the
// combinational ack, data valid with rd_ack, state updated at the clock
// edge. full is the write owner's racetrack being full; empty is the read
// owner's racetrack being empty.
module dwm_dual_fifo
  import dwm_pkg::*;
#(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned L     = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_req,
  input  logic [WIDTH-1:0]       wr_data,
  output logic                   wr_ack,
  input  logic                   rd_req,
  output logic                   rd_ack,
  output logic [WIDTH-1:0]       rd_data,
  output logic                   rd_pending,
  output logic                   wr_pending,
  output logic [$clog2(L+1)-1:0] count,
  output logic                   empty,
  output logic                   full,
  output logic                   wr_owner,
  output logic                   rd_owner,
  output lb_state_e              state   [2],
  output logic [2:0]             n_shifts
);

  localparam int unsigned H  = L / 2;
  localparam int unsigned HW = $clog2(H + 1);

  logic             wown_q, rown_q;
  logic             h_wr_req [2], h_wr_ack [2], h_rd_req [2], h_rd_ack [2];
  logic [WIDTH-1:0] h_rd_data [2];
  logic [HW-1:0]    h_count [2];
  logic             h_empty [2], h_full [2];
  logic [1:0]       h_shifts [2];

  for (genvar i = 0; i < 2; i++) begin : g_half
    assign h_wr_req[i] = wr_req && (wown_q == 1'(i));
    assign h_rd_req[i] = rd_req && (rown_q == 1'(i));
    dwm_lb_fifo #(.WIDTH(WIDTH), .L(H)) u_lb (
      .clk       (clk),
      .rst_n     (rst_n),
      .wr_req    (h_wr_req[i]),
      .wr_data   (wr_data),
      .wr_ack    (h_wr_ack[i]),
      .rd_req    (h_rd_req[i]),
      .rd_ack    (h_rd_ack[i]),
      .rd_data   (h_rd_data[i]),
      .rd_pending(),
      .wr_pending(),
      .count     (h_count[i]),
      .empty     (h_empty[i]),
      .full      (h_full[i]),
      .state     (state[i]),
      .n_shifts  (h_shifts[i])
    );
  end

  assign wr_ack     = h_wr_ack[wown_q];
  assign rd_ack     = h_rd_ack[rown_q];
  assign rd_data    = h_rd_data[rown_q];
  assign full       = h_full[wown_q];
  assign empty      = h_empty[rown_q];
  assign count      = $bits(count)'(h_count[0]) + $bits(count)'(h_count[1]);
  assign n_shifts   = 3'(h_shifts[0]) + 3'(h_shifts[1]);
  assign wr_owner   = wown_q;
  assign rd_owner   = rown_q;
  assign rd_pending = rd_req && !rd_ack;
  assign wr_pending = wr_req && !wr_ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wown_q <= 1'b0;
      rown_q <= 1'b0;
    end else begin
      if (wr_ack) wown_q <= !wown_q;
      if (rd_ack) rown_q <= !rown_q;
    end
  end

  // the two halves never differ by more than one flit
  assert property (@(posedge clk) disable iff (!rst_n)
    (h_count[0] == h_count[1]) || (h_count[0] == h_count[1] + 1'b1) ||
    (h_count[1] == h_count[0] + 1'b1));

endmodule
