// fra_pkg: types and constants shared by the flexible router (FRA-CSLA).
//
// The router has five ports, East, West, North, South and Local, in that
// index order. A packet travels as one flit that carries its destination
// mesh coordinates and a payload. The port set follows the router
// description; the flit layout, the coordinate width and the payload width
// are this design's own choices.
package fra_pkg;

  localparam int NPORTS    = 5;   // E, W, N, S, L
  localparam int COORD_W   = 4;   // mesh coordinate width (up to 16x16 mesh)
  localparam int PAYLOAD_W = 24;  // payload bits carried with each flit

  typedef enum logic [2:0] {
    PORT_E = 3'd0,
    PORT_W = 3'd1,
    PORT_N = 3'd2,
    PORT_S = 3'd3,
    PORT_L = 3'd4
  } port_e;

  // One flit = one packet: destination (x, y) and payload.
  typedef struct packed {
    logic [COORD_W-1:0]   dst_x;
    logic [COORD_W-1:0]   dst_y;
    logic [PAYLOAD_W-1:0] payload;
  } flit_t;

  localparam int FLIT_W = $bits(flit_t);

  // Ports whose FIFOs take part in sharing: the four mesh directions.
  // Bit i set = port i may borrow from / lend to the other set ports.
  localparam logic [NPORTS-1:0] FLEX_PORTS = 5'b01111;

endpackage
