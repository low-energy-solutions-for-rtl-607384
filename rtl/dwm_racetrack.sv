// dwm_racetrack: behavioural model of a group of domain-wall nanowires.
//
// Behavioural model (kind: behavioural_model). It stands for the magnetic
// part of a racetrack FIFO: WIDTH nanowires that always shift together, so
// that each domain position holds one flit. It is written as plain registers
// so that the controllers around it can be simulated and synthesised, but the
// real part is a spintronic device, not CMOS.
//
// Operation: every clock edge applies up to OPS micro-operations in order
// (see dwm_pkg::rt_op_e). RT_SHR moves the content of position i to i+1,
// RT_SHL moves i+1 to i; the domain pushed off one end is lost and the
// domain left behind at the other end keeps its old (stale) value, which the
// controller never reads. RT_WR is the shift-based write into the domain
// under the write port at WPOS. Read heads sit at positions
// RH_FIRST + k*RH_STEP, k = 0..NRH-1, and show the domain under them
// combinationally (rd_head[k]); a read head sensing is the whole-cycle read.
// The domains are not reset: the medium is non-volatile and the controller
// keeps track of which domains hold valid flits.
module dwm_racetrack
  import dwm_pkg::*;
#(
  parameter int unsigned WIDTH    = 128,
  parameter int unsigned DOMAINS  = 8,
  parameter int unsigned WPOS     = 0,
  parameter int unsigned NRH      = 4,
  parameter int unsigned RH_FIRST = 1,
  parameter int unsigned RH_STEP  = 2,
  parameter int unsigned OPS      = OPS_PER_CYCLE
) (
  input  logic             clk,
  input  rt_op_e           op      [OPS],
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rd_head [NRH]
);

  logic [WIDTH-1:0] dom   [DOMAINS];
  logic [WIDTH-1:0] dom_n [DOMAINS];

  always_comb begin
    dom_n = dom;
    for (int unsigned k = 0; k < OPS; k++) begin
      unique case (op[k])
        RT_SHR: for (int i = DOMAINS - 1; i > 0; i--) dom_n[i] = dom_n[i-1];
        RT_SHL: for (int i = 0; i < DOMAINS - 1; i++) dom_n[i] = dom_n[i+1];
        RT_WR:  dom_n[WPOS] = wdata;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) dom <= dom_n;

  for (genvar k = 0; k < NRH; k++) begin : g_rh
    assign rd_head[k] = dom[RH_FIRST + k*RH_STEP];
  end

  initial begin
    assert (RH_FIRST + (NRH - 1) * RH_STEP < DOMAINS)
      else $error("dwm_racetrack: read head outside the wire");
    assert (WPOS < DOMAINS) else $error("dwm_racetrack: write port outside the wire");
  end

endmodule
