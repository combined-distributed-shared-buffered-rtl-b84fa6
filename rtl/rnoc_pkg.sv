// rnoc_pkg: types, constants and routing functions shared by the R-NoC
// (Roundabout NoC) router blocks.
//
// A flit is 32 data bits (the flit size used for the evaluation) plus two
// framing bits, head and tail. A single-flit packet has both set. The header
// flit carries the destination coordinates in its low half; the input
// controller of each router overwrites the top nibble with the output port it
// computed, so the controllers further down a lane only compare that nibble
// with their own port. The 32-bit flit and wormhole framing follow the
// document; the bit positions of the header fields are this design's choice.
//
// Coordinates: x grows to the East, y grows to the North.
//
// Lint: a module that uses this package but not every item in it gets
// unused-parameter warnings for the port indices, and the header field
// functions take the whole 32-bit data word and read only their own field, so
// the other bits are reported as unused. Both are expected.
package rnoc_pkg;

  localparam int unsigned DATA_W  = 32;  // flit payload width
  localparam int unsigned COORD_W = 8;   // width of one coordinate in the header

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [DATA_W-1:0] data;
  } flit_t;

  // Router ports. Only the first five are used by the mesh router.
  typedef enum logic [3:0] {
    PORT_N = 4'd0,
    PORT_E = 4'd1,
    PORT_S = 4'd2,
    PORT_W = 4'd3,
    PORT_L = 4'd4
  } port_e;

  // The same ports as integer indices for arrays of per-port signals.
  localparam int PN = 0, PE = 1, PS = 2, PW = 3, PL = 4;

  // Header field positions.
  localparam int unsigned OUTP_LSB = 28;  // data[31:28]: output port in this router
  localparam int unsigned DSTX_LSB = 8;   // data[15:8]: destination x
  localparam int unsigned DSTY_LSB = 0;   // data[7:0]:  destination y

  // Per-cycle event flags a router reports, for observation and performance counting.
  typedef struct packed {
    logic deflect;   // a head flit found its output busy and went on along the lane
    logic lane_sw;   // a path controller switched a head flit onto a secondary lane
    logic sec_exit;  // a head flit left the router from a secondary lane
    logic in_stall;  // an input port held a valid flit it could not accept
  } rnoc_events_t;

  function automatic logic [3:0] hdr_outport(input logic [DATA_W-1:0] d);
    return d[OUTP_LSB +: 4];
  endfunction

  function automatic logic [COORD_W-1:0] hdr_dst_x(input logic [DATA_W-1:0] d);
    return d[DSTX_LSB +: COORD_W];
  endfunction

  function automatic logic [COORD_W-1:0] hdr_dst_y(input logic [DATA_W-1:0] d);
    return d[DSTY_LSB +: COORD_W];
  endfunction

  // Dimension-order (XY) routing: travel along x first, then along y.
  function automatic port_e xy_route(input logic [COORD_W-1:0] cur_x,
                                     input logic [COORD_W-1:0] cur_y,
                                     input logic [COORD_W-1:0] dst_x,
                                     input logic [COORD_W-1:0] dst_y);
    if (dst_x > cur_x)      return PORT_E;
    else if (dst_x < cur_x) return PORT_W;
    else if (dst_y > cur_y) return PORT_N;
    else if (dst_y < cur_y) return PORT_S;
    else                    return PORT_L;
  endfunction

  // Build a header flit for a packet going to (dst_x, dst_y).
  function automatic flit_t make_head(input logic [COORD_W-1:0] dst_x,
                                      input logic [COORD_W-1:0] dst_y,
                                      input logic [11:0]        tag,
                                      input logic               single);
    flit_t f;
    f.head = 1'b1;
    f.tail = single;
    f.data = '0;
    f.data[DSTX_LSB +: COORD_W] = dst_x;
    f.data[DSTY_LSB +: COORD_W] = dst_y;
    f.data[27:16] = tag;
    return f;
  endfunction

endpackage
