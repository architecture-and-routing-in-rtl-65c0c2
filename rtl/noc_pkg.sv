// noc_pkg: types and constants shared by the mesh network-on-chip.
//
// The network is an N x N mesh of hard wormhole routers with two virtual
// channels. A packet is a head flit (destination, source, XY/YX route bit)
// followed by BODY_FLITS data flits, the last one marked tail. The VC a
// packet travels on equals its route bit: VC 1 carries XY-routed packets,
// VC 0 YX-routed ones, which keeps the two dimension orders apart and the
// network free of deadlock. Node IDs are y*N + x; 5-bit IDs cover the 5x5
// grid. The flit and packet sizes are this design's own choice.
package noc_pkg;

  localparam int unsigned N          = 5;   // mesh is N x N
  localparam int unsigned ID_W       = 5;   // node ID width
  localparam int unsigned DATA_W     = 32;  // flit payload width
  localparam int unsigned BODY_FLITS = 3;   // data flits per packet
  localparam int unsigned NUM_VC     = 2;
  localparam int unsigned NUM_PORTS  = 5;
  localparam int unsigned RNG_W      = 16;  // WTXY random number width

  // Router port numbering. Directions: north = y+1, east = x+1.
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  // Routing scheme loaded into the CNIs at configuration time.
  typedef enum logic [2:0] {
    RM_XY   = 3'd0,  // always XY
    RM_YX   = 3'd1,  // always YX
    RM_TXY  = 3'd2,  // toggle per packet
    RM_WTXY = 3'd3,  // LFSR compared with a threshold
    RM_STXY = 3'd4,  // parity of source and destination IDs
    RM_WOT  = 3'd5   // per-destination bit vector
  } route_mode_e;

  typedef enum logic [1:0] {
    FT_HEAD = 2'd0,
    FT_BODY = 2'd1,
    FT_TAIL = 2'd2
  } flit_type_e;

  // Head flits use the header fields; body and tail flits carry data.
  typedef struct packed {
    logic [ID_W-1:0] dst;
    logic [ID_W-1:0] src;
    logic            xy;      // 1: route XY, 0: route YX
    logic [DATA_W-2*ID_W-2:0] pad;
  } header_t;

  typedef struct packed {
    flit_type_e        ftype;
    logic [DATA_W-1:0] data;
  } flit_t;

  // One direction of a link: a flit, its VC and a valid bit.
  // Flow control runs the other way as one ready bit per VC.
  typedef struct packed {
    logic  valid;
    logic  vc;
    flit_t flit;
  } link_t;

endpackage
