// bios_pkg: types and constants shared by the BIOS router and mesh.
//
// The router has five ports: the local port to its resource and one port to
// each mesh neighbour. North is the y+1 neighbour and east the x+1 neighbour,
// with column x counted from 0 at the west edge; the odd-even turn rules test
// the parity of x. Flits are 32 bits wide, as in the document's prototype. The
// two most significant bits of every flit mark head and tail (a one-flit packet
// sets both). A head flit carries the destination and source coordinates below
// them; the odd-even route function needs the source column. The flit layout
// and the 3-bit coordinate fields (enough for the 6 x 6 mesh) are this
// design's choice. The congestion flag uses the document's three values:
// 0 = not congested, 1 = occupancy at or above the threshold, 2 = buffer full.
package bios_pkg;

  localparam int FLIT_W  = 32;  // flit and link width
  localparam int COORD_W = 3;   // width of one coordinate field in a head flit
  localparam int NPORT   = 5;   // local + four mesh directions
  localparam int CL_W    = 3;   // contention level: 0 .. NPORT requests

  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    CF_FREE = 2'd0,  // congestion is no issue: deterministic routing
    CF_CONG = 2'd1,  // occupancy reached the threshold: adaptive routing
    CF_FULL = 2'd2   // buffer full: no flit can be accepted
  } cflag_e;

  typedef logic [FLIT_W-1:0] flit_t;

  // Head flit layout: [31] head, [30] tail, then dst_x, dst_y, src_x, src_y.
  localparam int HEAD_BIT  = FLIT_W - 1;
  localparam int TAIL_BIT  = FLIT_W - 2;
  localparam int DX_LSB    = FLIT_W - 2 - COORD_W;
  localparam int DY_LSB    = DX_LSB - COORD_W;
  localparam int SX_LSB    = DY_LSB - COORD_W;
  localparam int SY_LSB    = SX_LSB - COORD_W;

  typedef struct packed {
    logic               head;
    logic               tail;
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    logic [SY_LSB-1:0]  payload;
  } head_flit_t;

  function automatic logic flit_is_head(flit_t f);
    return f[HEAD_BIT];
  endfunction

  function automatic logic flit_is_tail(flit_t f);
    return f[TAIL_BIT];
  endfunction

  function automatic logic [NPORT-1:0] port_onehot(port_e p);
    return NPORT'(1) << p;
  endfunction

endpackage
