// mscs_queue: synchronous FIFO used for every queue of the MSCS router.
//
// It serves as the reservation queue of each output direction, the data
// buffer of each input port, the relay buffer and the core-side injection
// queues. Entries live in a register array indexed by read and write
// pointers. Two read ports show the oldest entry (rd0) and the one behind it
// (rd1): the reservation queue is read two deep so that the circuit after
// the current one is known before the current one is torn down.
//
// Timing: push and pop act at the clock edge; both may happen in the same
// cycle, also when full (the popped slot is reused). rd0/rd1 and the
// count are registered state, valid from the cycle after a push. Pushing
// into a full queue without popping, or popping an empty one, is an error
// (asserted). on is the on/off flow-control line: room for one more entry.
module mscs_queue #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rd0,
  output logic [WIDTH-1:0]         rd1,
  output logic                     empty,
  output logic                     two,     // at least two entries
  output logic                     full,
  output logic                     on,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rp, wp;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp  <= '0;
      wp  <= '0;
      cnt <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      cnt <= cnt + $bits(cnt)'(push) - $bits(cnt)'(pop);
    end
  end

  assign rd0   = mem[rp];
  assign rd1   = mem[inc(rp)];
  assign empty = (cnt == '0);
  assign two   = (cnt >= 2);
  assign full  = (cnt == ($clog2(DEPTH+1))'(DEPTH));
  assign on    = !full;
  assign count = cnt;

  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("mscs_queue: pop from empty queue");
  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("mscs_queue: push into full queue");

endmodule
