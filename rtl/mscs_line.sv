// mscs_line: one dimension (a row or a column) of the MSCS network.
//
// N routers on a line, each with, per direction of travel (0: towards
// higher index, east/south; 1: towards lower index, west/north):
//   - a FIFO reservation queue of the output port in that direction,
//   - one data buffer at the input port the direction arrives on,
// plus one injection port and one ejection port towards the node.
//
// Circuit request network. A node whose offered flit is the head of a
// packet, and that holds no reservation yet, raises its line of the N-bit
// arbitration bus unless a router on the packet's path shows a full
// reservation queue on the N-bit flow-control bus. Each router has its own
// copy of a round-robin arbiter; all copies see the same bus and grant the
// same source. The winner's destination goes on the log2(N)-bit request bus
// and every router on the path, source included, destination excluded,
// appends {src, dst} to the reservation queue of the output it will use.
// Broadcasting makes the order of reservations the same in every router.
//
// Traversal. The head of each reservation queue is that output's current
// circuit. Each cycle, a router whose current circuit starts here sends the
// node's flit; otherwise it sends the flit at the head of its input buffer.
// The flit crosses the link, and at the next router goes straight on
// (multi-hop, in the same cycle) if that router's current circuit is the
// same reservation, its input buffer holds nothing older, fewer than HPC_MAX
// hops have been made, and the buffer after it is on. Otherwise it stops and
// is written into that router's input buffer, to resume as soon as the
// circuit there comes up. A flit is only sent towards a buffer that is on
// (on/off flow control: not full). The tail flit pops the reservation at
// every output it leaves through, so the next circuit is set up for the
// following cycle. A flit at its destination leaves through the ejection
// port; the port stays with one packet from head to tail, direction 0
// taking it first when both compete.
//
// Timing: a reservation won in cycle t is at the queue heads in cycle t+1,
// so a flit can leave the source one cycle after its request (one-cycle
// request overhead per dimension). inj_pop, ej_valid and ej_flit are
// combinational; everything else is registered.
//
// The data buffer is written directly at the end of a traversal; the
// document places a latch in front of it from which a flit can also leave
// again at once, which this design folds into the buffer.
module mscs_line
  import mscs_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter int unsigned DIM        = 0,  // 0: use dst_x, 1: use dst_y
  parameter int unsigned BUF_DEPTH  = 8,
  parameter int unsigned RESV_DEPTH = 4,
  parameter int unsigned HPC_MAX    = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  inj_valid [N],
  input  flit_t inj_flit  [N],
  output logic  inj_pop   [N],
  output logic  ej_valid  [N],
  output flit_t ej_flit   [N],
  input  logic  ej_ready  [N],
  // event pulses, one per cycle in which the event happened on this line
  output logic  ev_resv,        // a reservation was made
  output logic  ev_arb_conflict,// more than one source asked at once
  output logic  ev_fc_block,    // a request was held back by the flow-control bus
  output logic  ev_multihop,    // a flit passed a router without stopping
  output logic  ev_stop_short,  // a flit was buffered short of its destination
  output logic  ev_resume,      // a buffered flit left again on its circuit
  output logic  ev_off_stall,   // a flit waited for an off buffer
  output logic  ev_eject_wait   // a flit at its destination waited for the port
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  // ------------------------------------------------------------ queues
  logic  rq_push [2][N], rq_pop [2][N], rq_empty [2][N], rq_full [2][N];
  resv_t rq_wdata;
  logic [RESV_W-1:0] rq_rd0 [2][N];

  logic  bf_push [2][N], bf_pop [2][N], bf_empty [2][N], bf_on [2][N];
  flit_t bf_wdata [2][N];
  logic [FLIT_W-1:0] bf_rd0 [2][N];

  for (genvar d = 0; d < 2; d++) begin : g_dir
    for (genvar i = 0; i < N; i++) begin : g_node
      mscs_queue #(.WIDTH(RESV_W), .DEPTH(RESV_DEPTH)) u_resv (
        .clk(clk), .rst_n(rst_n),
        .push(rq_push[d][i]), .wdata(rq_wdata), .pop(rq_pop[d][i]),
        .rd0(rq_rd0[d][i]), .rd1(), .empty(rq_empty[d][i]), .two(),
        .full(rq_full[d][i]), .on(), .count()
      );
      mscs_queue #(.WIDTH(FLIT_W), .DEPTH(BUF_DEPTH)) u_buf (
        .clk(clk), .rst_n(rst_n),
        .push(bf_push[d][i]), .wdata(bf_wdata[d][i]), .pop(bf_pop[d][i]),
        .rd0(bf_rd0[d][i]), .rd1(), .empty(bf_empty[d][i]), .two(),
        .full(), .on(bf_on[d][i]), .count()
      );
    end
  end

  function automatic logic [COORD_W-1:0] coord(flit_t f);
    return (DIM == 0) ? f.dst_x : f.dst_y;
  endfunction

  // ------------------------------------------------------------ requests
  logic          reserved_q [N];
  logic [N-1:0]  arb_req, fc_bus;
  logic          want [N];
  logic [N-1:0]  grant [N];
  logic          gvalid [N];
  logic [IW-1:0] winner [N];

  always_comb begin
    int unsigned dc;
    logic blk;
    for (int k = 0; k < N; k++) fc_bus[k] = rq_full[0][k] || rq_full[1][k];
    ev_fc_block = 1'b0;
    for (int i = 0; i < N; i++) begin
      want[i] = inj_valid[i] && inj_flit[i].head && !reserved_q[i];
      dc  = int'(coord(inj_flit[i]));
      blk = 1'b0;
      for (int k = 0; k < N; k++) begin
        if (dc > i && k >= i && k < int'(dc)) blk |= fc_bus[k];
        if (dc < i && k <= i && k > int'(dc)) blk |= fc_bus[k];
      end
      arb_req[i] = want[i] && !blk;
      if (want[i] && blk) ev_fc_block = 1'b1;
    end
    ev_arb_conflict = ((arb_req & (arb_req - 1'b1)) != '0);
  end

  for (genvar k = 0; k < N; k++) begin : g_arb
    mscs_rr_arbiter #(.N(N)) u_arb (
      .clk(clk), .rst_n(rst_n), .req(arb_req),
      .grant(grant[k]), .valid(gvalid[k]), .winner(winner[k])
    );
  end

  // request bus: the winner's source and destination
  always_comb begin
    rq_wdata.src = COORD_W'(winner[0]);
    rq_wdata.dst = coord(inj_flit[winner[0]]);
    ev_resv = gvalid[0];
    for (int k = 0; k < N; k++) begin
      int unsigned s, t;
      s = int'(winner[k]);
      t = int'(coord(inj_flit[winner[k]]));
      rq_push[0][k] = gvalid[k] && (t > s) && (k >= s) && (k < t);
      rq_push[1][k] = gvalid[k] && (t < s) && (k <= s) && (k > t);
    end
  end

  // ------------------------------------------------------------ traversal
  logic [1:0] lock_q [N], lock_d [N];   // {busy, direction} of each ejection port
  logic       res_clr [N];

  always_comb begin
    logic  fv;                 // flit on the link into the current router
    flit_t ff;
    resv_t fr;
    int    hops;
    int    j, nx;
    logic  next_on;
    logic  arr_v [2][N];       // a flit ended its traversal here
    flit_t arr_f [2][N];
    logic  own_v;
    flit_t own_f;
    logic  own_local;
    resv_t hd;
    flit_t bh;
    logic  ej_c_v [2];
    flit_t ej_c_f [2];
    logic  ej_c_buf [2];
    logic  taken;

    j = 0; nx = 0; next_on = 1'b0; hd = '0; bh = '0;
    own_v = 1'b0; own_f = '0; own_local = 1'b0; taken = 1'b0;
    ej_c_v = '{default: 1'b0};
    ej_c_buf = '{default: 1'b0};
    ej_c_f = '{default: '0};
    for (int d = 0; d < 2; d++)
      for (int i = 0; i < N; i++) begin
        bf_push[d][i]  = 1'b0;
        bf_pop[d][i]   = 1'b0;
        bf_wdata[d][i] = '0;
        rq_pop[d][i]   = 1'b0;
        arr_v[d][i]    = 1'b0;
        arr_f[d][i]    = '0;
      end
    for (int i = 0; i < N; i++) begin
      inj_pop[i]  = 1'b0;
      res_clr[i]  = 1'b0;
      ej_valid[i] = 1'b0;
      ej_flit[i]  = '0;
    end
    ev_multihop   = 1'b0;
    ev_stop_short = 1'b0;
    ev_resume     = 1'b0;
    ev_off_stall  = 1'b0;
    ev_eject_wait = 1'b0;
    for (int i = 0; i < N; i++) lock_d[i] = lock_q[i];

    for (int d = 0; d < 2; d++) begin
      fv = 1'b0; ff = '0; fr = '0; hops = 0;
      for (int s = 0; s < N; s++) begin
        j  = (d == 0) ? s : N - 1 - s;
        nx = (d == 0) ? j + 1 : j - 1;
        next_on = (nx >= 0 && nx < N) ? bf_on[d][nx] : 1'b0;
        hd = resv_t'(rq_rd0[d][j]);
        bh = flit_t'(bf_rd0[d][j]);
        // --- the flit arriving from the previous router
        if (fv) begin
          if (int'(coord(ff)) == j) begin
            arr_v[d][j] = 1'b1;
            arr_f[d][j] = ff;
            fv = 1'b0;
          end else if (!rq_empty[d][j] && hd == fr && bf_empty[d][j] &&
                       hops < int'(HPC_MAX) && next_on) begin
            hops = hops + 1;        // goes straight on
            ev_multihop = 1'b1;
            if (ff.tail) rq_pop[d][j] = 1'b1;
          end else begin
            bf_push[d][j]  = 1'b1;  // stops short of its destination
            bf_wdata[d][j] = ff;
            ev_stop_short  = 1'b1;
            fv = 1'b0;
          end
        end
        // --- this router's own flit, when the output is free
        if (!fv && !rq_empty[d][j]) begin
          own_local = (int'(hd.src) == j);
          own_v     = own_local ? (inj_valid[j] && reserved_q[j])
                                : (!bf_empty[d][j] && int'(coord(bh)) != j);
          own_f     = own_local ? inj_flit[j] : bh;
          if (own_v && !next_on) ev_off_stall = 1'b1;
          if (own_v && next_on) begin
            fv = 1'b1; ff = own_f; fr = hd; hops = 1;
            if (own_local) begin
              inj_pop[j] = 1'b1;
              if (own_f.tail) res_clr[j] = 1'b1;
            end else begin
              bf_pop[d][j] = 1'b1;
              ev_resume = 1'b1;
            end
            if (own_f.tail) rq_pop[d][j] = 1'b1;
          end
        end
      end
    end

    // --- ejection: one packet at a time per node
    for (int i = 0; i < N; i++) begin
      for (int d = 0; d < 2; d++) begin
        bh = flit_t'(bf_rd0[d][i]);
        ej_c_buf[d] = !bf_empty[d][i];
        ej_c_v[d]   = bf_empty[d][i] ? arr_v[d][i] : (int'(coord(bh)) == i);
        ej_c_f[d]   = bf_empty[d][i] ? arr_f[d][i] : bh;
      end
      taken = 1'b0;
      for (int d = 0; d < 2; d++) begin
        if (ej_c_v[d] && !taken && ej_ready[i] &&
            (lock_q[i][1] ? (lock_q[i][0] == 1'(d)) : ej_c_f[d].head)) begin
          taken       = 1'b1;
          ej_valid[i] = 1'b1;
          ej_flit[i]  = ej_c_f[d];
          if (ej_c_buf[d]) bf_pop[d][i] = 1'b1;
          else arr_v[d][i] = 1'b0;                // consumed directly
          lock_d[i] = ej_c_f[d].tail ? 2'b00 : {1'b1, 1'(d)};
        end else if (ej_c_v[d]) begin
          ev_eject_wait = 1'b1;
        end
      end
      // arrivals not ejected are written into the input buffer
      for (int d = 0; d < 2; d++) begin
        if (arr_v[d][i]) begin
          bf_push[d][i]  = 1'b1;
          bf_wdata[d][i] = arr_f[d][i];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        lock_q[i]     <= 2'b00;
        reserved_q[i] <= 1'b0;
      end
    end else begin
      for (int i = 0; i < N; i++) begin
        lock_q[i] <= lock_d[i];
        if (gvalid[i] && grant[i][i]) reserved_q[i] <= 1'b1;
        else if (res_clr[i])          reserved_q[i] <= 1'b0;
      end
    end
  end

  // every router's arbiter copy agrees with the others
  for (genvar k = 1; k < N; k++) begin : g_agree
    assert property (@(posedge clk) disable iff (!rst_n)
      gvalid[k] == gvalid[0] && (!gvalid[0] || winner[k] == winner[0]));
  end
  // a node only injects towards another position on the line
  for (genvar i = 0; i < N; i++) begin : g_inj_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      !inj_valid[i] || int'(coord(inj_flit[i])) != i);
  end

endmodule
