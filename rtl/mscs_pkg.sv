// mscs_pkg: flit and reservation types of the MSCS (multi-hop segmented
// circuit switching) network.
//
// A packet is a train of flits; every flit carries its destination so that
// routers, the relay buffer and the core interface can route it on its own,
// and head/tail marks so that reservations can be made on the head and
// released on the tail. The payload width is this design's choice.
package mscs_pkg;

  localparam int unsigned COORD_W   = 3;    // mesh side up to 8
  localparam int unsigned PAYLOAD_W = 128;  // bits of data per flit

  typedef struct packed {
    logic                 head;
    logic                 tail;
    logic [COORD_W-1:0]   dst_x;
    logic [COORD_W-1:0]   dst_y;
    logic [PAYLOAD_W-1:0] data;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  // One circuit reservation in one dimension: source and destination
  // position along the row or column.
  typedef struct packed {
    logic [COORD_W-1:0] src;
    logic [COORD_W-1:0] dst;
  } resv_t;

  localparam int unsigned RESV_W = $bits(resv_t);

endpackage
