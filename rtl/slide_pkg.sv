// slide_pkg -- shared types and constants of the SlideAcross wireline NoC.
//
// The network is a 2-D mesh of 5-port routers (Local, North, East, South,
// West).  East is increasing x, North is increasing y; "left of the source"
// means a smaller x.  Every input port holds NUM_VC ordinary virtual channels
// (VC0 and VC1, the minimum the deadlock-avoidance scheme needs) plus one
// slide virtual channel (SVC) reserved for the single-cycle bypass.
//
// A flit is a 128-bit data word (the bypass datapath width used in the
// design) plus a sideband header: head/tail marks, the SVC tag bit, the
// packet's VC (fixed at injection) and the destination coordinates.  Carrying
// the destination with every flit and the buffer depth of 4 flits per VC are
// choices of this implementation; the published design gives neither.
package slide_pkg;

  // Mesh size of the evaluated system: 64 cores.
  parameter int unsigned MESH_X    = 8;
  parameter int unsigned MESH_Y    = 8;
  parameter int unsigned XW        = 3;      // coordinate width, holds 0..7
  parameter int unsigned YW        = 3;
  parameter int unsigned DATA_W    = 128;    // bypass datapath width
  parameter int unsigned NUM_VC    = 2;      // VC0, VC1
  parameter int unsigned NUM_BUF   = NUM_VC + 1;  // + SVC
  parameter int unsigned SVC_IDX   = NUM_VC;      // buffer index of the SVC
  parameter int unsigned VCW       = 1;      // width of the VC id field
  parameter int unsigned BUF_DEPTH = 4;      // flits per VC buffer
  parameter int unsigned CRW       = 3;      // credit counter width, holds 0..BUF_DEPTH
  parameter int unsigned NPORT     = 5;

  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic              svc;     // flit travels in the slide virtual channel
    logic [VCW-1:0]    vc;      // VC0 / VC1, never changed after injection
    logic [XW-1:0]     dst_x;
    logic [YW-1:0]     dst_y;
    logic [DATA_W-1:0] data;
  } flit_t;

  typedef struct packed {
    logic  valid;
    flit_t flit;
  } link_t;

  // One credit bit per input buffer (VC0, VC1, SVC); several may be set.
  typedef logic [NUM_BUF-1:0] credit_t;

  // Per-router event pulses, used for statistics.
  typedef struct packed {
    logic bypass;      // a flit took the single-cycle bypass datapath
    logic svc_tag;     // a head flit was assigned the downstream SVC
    logic buffered;    // a flit left through the buffered (adaptive) datapath
    logic detour;      // the selection unit masked the X port and chose Y
    logic sa_stall;    // a buffered flit was ready but lost switch allocation
  } router_ev_t;

  function automatic port_e opposite(port_e p);
    case (p)
      P_NORTH: return P_SOUTH;
      P_SOUTH: return P_NORTH;
      P_EAST:  return P_WEST;
      P_WEST:  return P_EAST;
      default: return P_LOCAL;
    endcase
  endfunction

endpackage
