// dwm_lb_fifo: linear-buffer (LB) FIFO built on one racetrack group.
//
// The queue lives in a nanowire group of L domains (positions 0..L-1) with
// no padding. The write port is at position 0: a flit is written into
// domain 0 and the data is kept contiguous, the newest flit (tail) at a low
// position and the oldest (head) at position tail+count-1. Read heads sit at
// every other domain, positions 1, 3, ..., L-1 (read offset F = 0, one
// domain between read heads, so L/2 heads: four for L = 8).
//
// Control is the four-state alignment machine of the linear buffer:
//   RW_ALIGNED  head under a read head, domain 0 free and tail at 1
//   R_ALIGNED   head under a read head only
//   W_ALIGNED   tail at 1 (or queue empty), head between read heads
//   UNALIGNED   neither
// The state is decoded from the tail position and the head parity rather
// than stored; the current read head is the head position halved (the
// document keeps it as a one-hot "RC" shift register that shifts with the
// data, which carries the same information).
//
// Each cycle one of three things happens, in this priority:
//   1. read: the head is under a read head and rd_req is high. The read takes
//      the cycle, so nothing shifts; if the tail is at 1 a pending write is
//      written into domain 0 in the same cycle (read+write).
//   2. write: wr_req is high and the queue is not full. Up to two
//      micro-operations: align the tail to 1 (one shift), write, and if a
//      slot is left shift right so the tail returns to 1.
//   3. home (shift-to-read-back): if the head is between read heads, shift
//      left when the tail is at 2 or more (this never blocks the write
//      port), otherwise shift right.
// Two shifts per cycle and no shift in a read cycle follow the document;
// the priority of a ready read over a write, and what the machine does in
// states whose transitions the document does not spell out, are this
// design's choices.
//
// Interface: request/acknowledge. rd_req / wr_req stay high until the
// matching ack. rd_ack, rd_data, wr_ack are combinational in the cycle the
// operation is done; the FIFO state updates at that clock edge. rd_pending
// and wr_pending flag a request that had to wait.
module dwm_lb_fifo
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
  output lb_state_e              state,
  output logic [1:0]             n_shifts   // shifts done this cycle
);

  localparam int unsigned CW  = $clog2(L + 1);
  localparam int unsigned PW  = $clog2(L) + 1;
  localparam int unsigned NRH = L / 2;

  logic [PW-1:0] tail_q, tail_d;     // position of the newest flit
  logic [CW-1:0] cnt_q, cnt_d;
  logic [PW-1:0] head;
  logic          r_al, w_al;
  rt_op_e        op [OPS_PER_CYCLE];
  logic [WIDTH-1:0] rh [NRH];

  assign head  = PW'(tail_q + PW'(cnt_q) - 1'b1);
  assign empty = (cnt_q == '0);
  assign full  = (cnt_q == CW'(L));
  assign r_al  = !empty && head[0];
  assign w_al  = empty || (tail_q == PW'(1));
  assign count = cnt_q;

  always_comb begin
    unique case ({r_al, w_al})
      2'b11:   state = LB_RW_ALIGNED;
      2'b10:   state = LB_R_ALIGNED;
      2'b01:   state = LB_W_ALIGNED;
      default: state = LB_UNALIGNED;
    endcase
  end

  always_comb begin
    op[0]  = RT_NOP;
    op[1]  = RT_NOP;
    tail_d = tail_q;
    cnt_d  = cnt_q;
    rd_ack = 1'b0;
    wr_ack = 1'b0;
    if (rd_req && r_al) begin
      rd_ack = 1'b1;
      if (wr_req && tail_q == PW'(1)) begin
        wr_ack = 1'b1;
        op[0]  = RT_WR;
        tail_d = '0;
        cnt_d  = cnt_q;
      end else begin
        cnt_d  = cnt_q - 1'b1;
      end
    end else if (wr_req && !full) begin
      wr_ack = 1'b1;
      cnt_d  = cnt_q + 1'b1;
      if (empty) begin
        op[0]  = RT_WR;
        op[1]  = RT_SHR;
        tail_d = PW'(1);
      end else if (tail_q == PW'(1)) begin
        op[0]  = RT_WR;
        // head stays where it was; shift right unless it is at the far end
        if (head != PW'(L - 1)) begin
          op[1]  = RT_SHR;
          tail_d = PW'(1);
        end else begin
          tail_d = '0;
        end
      end else begin
        op[0]  = (tail_q == '0) ? RT_SHR : RT_SHL;
        op[1]  = RT_WR;
        tail_d = '0;
      end
    end else if (!empty && !r_al) begin
      if (tail_q >= PW'(2)) begin
        op[0]  = RT_SHL;
        tail_d = tail_q - 1'b1;
      end else begin
        op[0]  = RT_SHR;
        tail_d = tail_q + 1'b1;
      end
    end
  end

  always_comb begin
    n_shifts = '0;
    for (int k = 0; k < OPS_PER_CYCLE; k++)
      if (op[k] == RT_SHL || op[k] == RT_SHR) n_shifts = n_shifts + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tail_q <= PW'(1);
      cnt_q  <= '0;
    end else begin
      tail_q <= tail_d;
      cnt_q  <= cnt_d;
    end
  end

  dwm_racetrack #(
    .WIDTH(WIDTH), .DOMAINS(L), .WPOS(0),
    .NRH(NRH), .RH_FIRST(1), .RH_STEP(2), .OPS(OPS_PER_CYCLE)
  ) u_rt (
    .clk    (clk),
    .op     (op),
    .wdata  (wr_data),
    .rd_head(rh)
  );

  assign rd_data    = rh[$clog2(NRH)'(head >> 1)];
  assign rd_pending = rd_req && !rd_ack;
  assign wr_pending = wr_req && !wr_ack;

  // the data never leaves the wire: head within the last domain
  assert property (@(posedge clk) disable iff (!rst_n) empty || head < PW'(L));
  assert property (@(posedge clk) disable iff (!rst_n) tail_q <= PW'(2));
  assert property (@(posedge clk) disable iff (!rst_n) cnt_q <= CW'(L));

endmodule
