// dwm_pkg: shared types for the domain-wall-memory (racetrack) FIFOs.
//
// A racetrack group is driven by a short list of micro-operations per clock
// cycle. With a racetrack shift or a shift-based write taking half a cycle,
// two of them fit in one cycle (OPS_PER_CYCLE). A read takes the whole cycle,
// so a cycle that reads performs no shift; a shift-based write at the write
// port moves nothing along the wire and may share a cycle with a read.
package dwm_pkg;

  // Micro-operations of the racetrack group, applied in order within a cycle.
  typedef enum logic [1:0] {
    RT_NOP = 2'd0,  // nothing
    RT_SHL = 2'd1,  // shift every domain one position towards position 0
    RT_SHR = 2'd2,  // shift every domain one position away from position 0
    RT_WR  = 2'd3   // shift-based write of the input flit at the write port
  } rt_op_e;

  // Shifts (or writes) that fit in one cycle: 1 GHz clock, 0.5-cycle shift.
  localparam int unsigned OPS_PER_CYCLE = 2;

  // Alignment state of a linear-buffer racetrack (head at a read head and/or
  // newest flit next to the write head).
  typedef enum logic [1:0] {
    LB_RW_ALIGNED = 2'd0,
    LB_R_ALIGNED  = 2'd1,
    LB_W_ALIGNED  = 2'd2,
    LB_UNALIGNED  = 2'd3
  } lb_state_e;

endpackage
