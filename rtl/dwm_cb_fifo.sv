// dwm_cb_fifo: circular-buffer (CB) FIFO built on one racetrack group.
//
// This is the head/tail-pointer FIFO of an SRAM array carried over to
// racetrack memory. The L logical slots are domains of a wire of 2L-1
// domains; slot i sits at physical position i + off, where off (0..L-1) is
// how far the wire has been shifted. The extra L-1 domains let any slot be
// brought under the single read/write port in the centre (position L-1)
// without pushing data off either end. Read-only heads sit at every second
// domain on both sides of the centre, NSIDE per side (read offset F = 1 and
// one domain between read heads, so four read-only heads for NSIDE = 2); the
// centre port reads as well.
//
// State: head slot, flit count and the offset off (the document's stored
// current offset), with the tail slot (head + count) mod L. Each cycle:
//   1. read: rd_req and the head slot is under a port. No shift in that
//      cycle; a waiting write is done too if the tail slot is already under
//      the centre port (shift-based writes move nothing along the wire).
//   2. write: wr_req and not full. Shift towards the offset that puts the
//      tail slot under the centre port, at most two micro-operations, the
//      write being one of them; a slot left over goes to the home shift.
//   3. home (shift-to-read): shift up to two positions towards the nearest
//      offset at which the head slot lies under a read-capable port; an empty
//      queue shifts towards write alignment instead.
// The three-step priority and the empty-queue home are this design's
// choices; the pointers, offset, wire length, port placement and
// shift-to-read policy follow the document.
//
// Interface and timing as dwm_lb_fifo: requests held until the
// combinational ack, rd_data valid with rd_ack.
module dwm_cb_fifo
  import dwm_pkg::*;
#(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned L     = 8,
  parameter int unsigned NSIDE = 2
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
  output logic [$clog2(L)-1:0]   offset,
  output logic [1:0]             n_shifts
);

  localparam int unsigned DOM   = 2 * L - 1;
  localparam int unsigned CTR   = L - 1;            // read/write port
  localparam int unsigned NP    = 2 * NSIDE + 1;    // read-capable ports
  localparam int unsigned FIRST = CTR - 2 * NSIDE;  // leftmost read head
  localparam int unsigned CW    = $clog2(L + 1);
  localparam int unsigned SW    = $clog2(L);
  localparam int unsigned PW    = $clog2(DOM);

  logic [SW-1:0] hd_q, hd_d, off_q, off_d, tl;
  logic [CW-1:0] cnt_q, cnt_d;
  logic [PW-1:0] p_head;
  logic          r_al, w_al;
  logic [SW-1:0] w_tgt;
  rt_op_e        op [OPS_PER_CYCLE];
  logic [WIDTH-1:0] rh [NP];

  function automatic logic is_port(int p);
    return (p >= int'(FIRST)) && (p <= int'(CTR + 2 * NSIDE)) &&
           (((p - int'(FIRST)) % 2) == 0);
  endfunction

  // nearest offset (ties towards the smaller) that puts slot s under a port
  function automatic logic [SW-1:0] read_target(logic [SW-1:0] s, logic [SW-1:0] o);
    int best, bd, d;
    best = int'(o);
    bd   = 2 * int'(L);
    for (int c = 0; c < int'(L); c++) begin
      if (is_port(int'(s) + c)) begin
        d = (c > int'(o)) ? c - int'(o) : int'(o) - c;
        if (d < bd) begin
          bd   = d;
          best = c;
        end
      end
    end
    return SW'(best);
  endfunction

  function automatic logic [SW-1:0] wrap(int v);
    return SW'((v >= int'(L)) ? v - int'(L) : v);
  endfunction

  assign empty  = (cnt_q == '0);
  assign full   = (cnt_q == CW'(L));
  assign tl     = wrap(int'(hd_q) + int'(cnt_q));
  assign p_head = PW'(hd_q) + PW'(off_q);
  assign r_al   = !empty && is_port(int'(p_head));
  assign w_tgt  = SW'(CTR) - tl;
  assign w_al   = (off_q == w_tgt);
  assign count  = cnt_q;
  assign offset = off_q;

  always_comb begin
    logic [SW-1:0] o;
    logic [SW-1:0] t;
    int k;
    op[0] = RT_NOP;
    op[1] = RT_NOP;
    hd_d  = hd_q;
    cnt_d = cnt_q;
    off_d = off_q;
    rd_ack = 1'b0;
    wr_ack = 1'b0;
    o = off_q;
    t = off_q;
    k = 0;
    if (rd_req && r_al) begin
      rd_ack = 1'b1;
      hd_d   = wrap(int'(hd_q) + 1);
      cnt_d  = cnt_q - 1'b1;
      if (wr_req && w_al) begin
        wr_ack = 1'b1;
        op[0]  = RT_WR;
        cnt_d  = cnt_q;
      end
    end else begin
      if (wr_req && !full) begin
        // walk towards write alignment, write when there
        for (int s = 0; s < int'(OPS_PER_CYCLE); s++) begin
          if (!wr_ack && k == s) begin
            if (o == w_tgt) begin
              op[s]  = RT_WR;
              wr_ack = 1'b1;
            end else if (o < w_tgt) begin
              op[s] = RT_SHR;
              o     = o + 1'b1;
            end else begin
              op[s] = RT_SHL;
              o     = o - 1'b1;
            end
            k = k + 1;
          end
        end
        if (wr_ack) cnt_d = cnt_q + 1'b1;
      end
      // remaining micro-operations: home shifts
      t = empty && !wr_ack ? w_tgt : read_target(hd_q, o);
      for (int s = 0; s < int'(OPS_PER_CYCLE); s++) begin
        if (s >= k && (!empty || wr_ack || !wr_req)) begin
          if (o < t) begin
            op[s] = RT_SHR;
            o     = o + 1'b1;
          end else if (o > t) begin
            op[s] = RT_SHL;
            o     = o - 1'b1;
          end
        end
      end
      off_d = o;
    end
  end

  always_comb begin
    n_shifts = '0;
    for (int k2 = 0; k2 < OPS_PER_CYCLE; k2++)
      if (op[k2] == RT_SHL || op[k2] == RT_SHR) n_shifts = n_shifts + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hd_q  <= '0;
      cnt_q <= '0;
      off_q <= SW'(CTR);
    end else begin
      hd_q  <= hd_d;
      cnt_q <= cnt_d;
      off_q <= off_d;
    end
  end

  dwm_racetrack #(
    .WIDTH(WIDTH), .DOMAINS(DOM), .WPOS(CTR),
    .NRH(NP), .RH_FIRST(FIRST), .RH_STEP(2), .OPS(OPS_PER_CYCLE)
  ) u_rt (
    .clk    (clk),
    .op     (op),
    .wdata  (wr_data),
    .rd_head(rh)
  );

  assign rd_data    = rh[$clog2(NP)'((p_head - PW'(FIRST)) >> 1)];
  assign rd_pending = rd_req && !rd_ack;
  assign wr_pending = wr_req && !wr_ack;

  assert property (@(posedge clk) disable iff (!rst_n) int'(off_q) < int'(L));
  assert property (@(posedge clk) disable iff (!rst_n) cnt_q <= CW'(L));

  initial assert (NSIDE >= 1 && 2 * NSIDE <= CTR)
    else $error("dwm_cb_fifo: read heads do not fit on the wire");

endmodule
