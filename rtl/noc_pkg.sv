// noc_pkg: types and constants shared by the mesh network-on-chip.
//
// The network is a 2-D mesh of wormhole switching elements. A packet is a
// sequence of fixed-size flits: a header flit that carries the destination
// and opens the path, data flits that follow it, and a tail flit that closes
// the path. Each physical channel is time-shared by several virtual channels;
// every flit on a link names the virtual channel it belongs to, and the
// receiver returns one credit per flit it removes from that channel's buffer.
//
// Port numbering, flit encoding and field widths are this design's choices:
//   port 0 local processor, 1 north (y+1), 2 east (x+1), 3 south (y-1),
//   4 west (x-1). A header flit keeps the destination x in data[3:0] and the
//   destination y in data[7:4]; the rest of its data field is free.
package noc_pkg;

  localparam int NUM_PORTS = 5;   // four neighbours and the local processor
  localparam int PORT_W    = 3;
  localparam int COORD_W   = 4;   // mesh side up to 16 nodes
  localparam int VC_ID_W   = 3;   // up to 8 virtual channels per link
  localparam int DATA_W    = 32;  // payload bits per flit

  typedef enum logic [PORT_W-1:0] {
    PORT_LOCAL = 3'd0,
    PORT_NORTH = 3'd1,
    PORT_EAST  = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_WEST  = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    FLIT_BODY     = 2'd0,
    FLIT_HEAD     = 2'd1,
    FLIT_TAIL     = 2'd2,
    FLIT_HEADTAIL = 2'd3   // single-flit packet
  } flit_type_e;

  typedef struct packed {
    flit_type_e           ftype;
    logic [VC_ID_W-1:0]   vc;
    logic [DATA_W-1:0]    data;
  } flit_t;

  function automatic logic is_head(flit_t f);
    return (f.ftype == FLIT_HEAD) || (f.ftype == FLIT_HEADTAIL);
  endfunction

  function automatic logic is_tail(flit_t f);
    return (f.ftype == FLIT_TAIL) || (f.ftype == FLIT_HEADTAIL);
  endfunction

  function automatic logic [COORD_W-1:0] dest_x(flit_t f);
    return f.data[COORD_W-1:0];
  endfunction

  function automatic logic [COORD_W-1:0] dest_y(flit_t f);
    return f.data[2*COORD_W-1:COORD_W];
  endfunction

endpackage
