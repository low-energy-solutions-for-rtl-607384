// mscs_node: the per-node part of an MSCS router outside the two lines.
//
// With X-Y routing a packet crosses its row first and its column second.
// The node sorts the core's flits by destination: a flit for another column
// goes into the row injection queue, a flit for this column (Y only) into
// the central-in queue. A packet leaving the row network here either
// belongs to this node (delivered to the core on the X-side ejection port)
// or turns into the column: it is then written into the relay buffer, which
// takes it out of the row so that it no longer holds the row's circuits
// while it waits for its column reservation. The column injection port is
// shared by the central-in queue and the relay buffer; a small arbiter picks
// one of them whenever a packet can start, alternating priority, and keeps
// that choice until the packet's tail flit has left, so the column network
// always sees whole packets and the head flit it reserved for.
//
// Together with mscs_line this forms the document's pair of small crossbars:
// {west, east, core} -> {east, west, relay, core} for the row and
// {north, south, core, relay} -> {north, south, core} for the column.
//
// Timing: core_inj_ready and the *_inj_valid/_flit offers are
// combinational from registered queue state; pops and pushes act at the
// clock edge. Queue depths are 8 flits. row_ej_ready is the conservative
// AND of the core port being ready and the relay buffer having room.
// Deliveries to the core are not buffered here: core_ej_x_* and
// core_ej_y_* are the row and column ejection ports passed straight
// through, since the lines already hold the flit in their input buffers.
// Which queue a flit enters, the relay buffer and the central-in/relay
// arbitration follow the document; the alternating priority, held per
// packet, is this design's choice.
module mscs_node
  import mscs_pkg::*;
#(
  parameter int unsigned MY_X  = 0,
  parameter int unsigned MY_Y  = 0,
  parameter int unsigned DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  // core
  input  logic  core_inj_valid,
  input  flit_t core_inj_flit,
  output logic  core_inj_ready,
  output logic  core_ej_x_valid,
  output flit_t core_ej_x_flit,
  output logic  core_ej_y_valid,
  output flit_t core_ej_y_flit,
  input  logic  core_ej_ready,
  // row line
  output logic  row_inj_valid,
  output flit_t row_inj_flit,
  input  logic  row_inj_pop,
  input  logic  row_ej_valid,
  input  flit_t row_ej_flit,
  output logic  row_ej_ready,
  // column line
  output logic  col_inj_valid,
  output flit_t col_inj_flit,
  input  logic  col_inj_pop,
  input  logic  col_ej_valid,
  input  flit_t col_ej_flit,
  output logic  col_ej_ready,
  // events
  output logic  ev_relay,        // a flit turned from the row into the relay buffer
  output logic  ev_relay_contend // central-in and relay both had a packet to start
);

  logic to_row;
  logic rq_push, rq_empty, rq_on;
  logic cq_push, cq_pop, cq_empty, cq_on;
  logic yq_push, yq_pop, yq_empty, yq_on;
  logic [FLIT_W-1:0] rq_rd, cq_rd, yq_rd;
  flit_t cq_f, yq_f;

  // ---------------------------------------------------------- core side
  assign to_row         = (core_inj_flit.dst_x != COORD_W'(MY_X));
  assign core_inj_ready = to_row ? rq_on : cq_on;
  assign rq_push        = core_inj_valid && to_row && rq_on;
  assign cq_push        = core_inj_valid && !to_row && cq_on;

  mscs_queue #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_row_q (
    .clk(clk), .rst_n(rst_n), .push(rq_push), .wdata(core_inj_flit),
    .pop(row_inj_pop), .rd0(rq_rd), .rd1(), .empty(rq_empty), .two(),
    .full(), .on(rq_on), .count()
  );
  assign row_inj_valid = !rq_empty;
  assign row_inj_flit  = flit_t'(rq_rd);

  mscs_queue #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_central_q (
    .clk(clk), .rst_n(rst_n), .push(cq_push), .wdata(core_inj_flit),
    .pop(cq_pop), .rd0(cq_rd), .rd1(), .empty(cq_empty), .two(),
    .full(), .on(cq_on), .count()
  );

  // ---------------------------------------------------------- row ejection
  logic row_here;
  assign row_here        = (row_ej_flit.dst_y == COORD_W'(MY_Y));
  assign row_ej_ready    = core_ej_ready && yq_on;
  assign core_ej_x_valid = row_ej_valid && row_here;
  assign core_ej_x_flit  = row_ej_flit;
  assign yq_push         = row_ej_valid && !row_here;
  assign ev_relay        = yq_push;

  mscs_queue #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_relay_q (
    .clk(clk), .rst_n(rst_n), .push(yq_push), .wdata(row_ej_flit),
    .pop(yq_pop), .rd0(yq_rd), .rd1(), .empty(yq_empty), .two(),
    .full(), .on(yq_on), .count()
  );

  // ---------------------------------------------------------- column injection
  typedef enum logic [1:0] {SEL_NONE, SEL_CENTRAL, SEL_RELAY} sel_e;
  sel_e sel_q, sel_d;
  logic prio_relay_q, prio_relay_d;
  logic c_rdy, y_rdy;

  assign cq_f  = flit_t'(cq_rd);
  assign yq_f  = flit_t'(yq_rd);
  assign c_rdy = !cq_empty && cq_f.head;
  assign y_rdy = !yq_empty && yq_f.head;
  assign ev_relay_contend = (sel_q == SEL_NONE) && c_rdy && y_rdy;

  sel_e cur;
  always_comb begin
    cur = sel_q;
    if (sel_q == SEL_NONE) begin
      if (c_rdy && y_rdy) cur = prio_relay_q ? SEL_RELAY : SEL_CENTRAL;
      else if (c_rdy)     cur = SEL_CENTRAL;
      else if (y_rdy)     cur = SEL_RELAY;
    end
    unique case (cur)
      SEL_CENTRAL: begin col_inj_valid = !cq_empty; col_inj_flit = cq_f; end
      SEL_RELAY:   begin col_inj_valid = !yq_empty; col_inj_flit = yq_f; end
      default:     begin col_inj_valid = 1'b0;      col_inj_flit = cq_f; end
    endcase
  end

  always_comb begin
    cq_pop = col_inj_pop && (cur == SEL_CENTRAL);
    yq_pop = col_inj_pop && (cur == SEL_RELAY);
    sel_d        = cur;
    prio_relay_d = prio_relay_q;
    if (sel_q == SEL_NONE && cur != SEL_NONE)
      prio_relay_d = (cur == SEL_CENTRAL);          // the other one next time
    if (col_inj_pop && col_inj_flit.tail) sel_d = SEL_NONE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q        <= SEL_NONE;
      prio_relay_q <= 1'b0;
    end else begin
      sel_q        <= sel_d;
      prio_relay_q <= prio_relay_d;
    end
  end

  // ---------------------------------------------------------- column ejection
  assign col_ej_ready    = core_ej_ready;
  assign core_ej_y_valid = col_ej_valid;
  assign core_ej_y_flit  = col_ej_flit;

  assert property (@(posedge clk) disable iff (!rst_n)
    !core_inj_valid || core_inj_flit.dst_x != COORD_W'(MY_X) ||
    core_inj_flit.dst_y != COORD_W'(MY_Y))
    else $error("mscs_node: packet addressed to its own node");
  assert property (@(posedge clk) disable iff (!rst_n)
    !col_ej_valid || col_ej_flit.dst_x == COORD_W'(MY_X));

endmodule
