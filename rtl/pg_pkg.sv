// pg_pkg: types and constants shared by the fine-grained power-gated router.
//
// The network is a 2-D mesh of 5-port routers (local, north, east, south, west)
// with four virtual channels per port. A flit is 128 bits wide, as in the
// FIFO the design gates. A message keeps its VC end to end: the VC is its
// coherence message class (VC0 L1<->L2 request, VC1 L2<->memory request,
// VC2 reply, VC3 persistent request), so the router never reassigns VCs.
//
// Head flit payload layout (this design's choice): data[1:0] destination x,
// data[3:2] destination y, data[6:4] look-ahead port, which is the output
// port the head will take at the router that receives it. Coordinates are
// two bits wide, so a mesh is at most 4x4, the size the design targets.
//
// Besides the flit, every link carries two side bundles:
//   * wake (upstream -> downstream): wakeup requests. 'hop1' names the VC
//     buffers of the receiving input port and the crossbar/output-latch
//     ports of the receiving router that a coming packet will use. 'hop2[d]'
//     is a request the receiver must pass on, unregistered, out of its port
//     d: it reaches the router two hops away (look-ahead wakeup).
//   * cred (downstream -> upstream): one credit pulse per VC when a buffer
//     entry is freed, and per VC a mask slot_ready[k] that says whether the
//     k-th free entry from the write pointer is powered and can be written.
package pg_pkg;

  localparam int unsigned FLIT_W    = 128;  // flit width (FIFO listing, [127:0])
  localparam int unsigned NUM_VC    = 4;    // VC0..VC3, token coherence classes
  localparam int unsigned NUM_PORTS = 5;    // 5-port router
  localparam int unsigned VC_W      = $clog2(NUM_VC);
  localparam int unsigned PORT_W    = 3;
  localparam int unsigned COORD_W   = 2;
  localparam int unsigned MAX_DEPTH = 8;    // widest slot_ready mask a link carries

  // Port numbering.
  localparam logic [PORT_W-1:0] P_LOCAL = 3'd0;
  localparam logic [PORT_W-1:0] P_NORTH = 3'd1;  // y - 1
  localparam logic [PORT_W-1:0] P_EAST  = 3'd2;  // x + 1
  localparam logic [PORT_W-1:0] P_SOUTH = 3'd3;  // y + 1
  localparam logic [PORT_W-1:0] P_WEST  = 3'd4;  // x - 1

  // Early wakeup method.
  typedef enum logic [1:0] {
    EW_NONE       = 2'd0,  // wake a domain only when the packet reaches the previous router
    EW_LOOKAHEAD  = 2'd1,  // also wake the router two hops ahead
    EW_LA_EVERON  = 2'd2,  // look-ahead, plus CPU-side VC0/VC2 buffers never sleep
    EW_LA_WINDOW  = 2'd3   // look-ahead, plus an always-on window in every VC buffer
  } early_wakeup_e;

  typedef logic [FLIT_W-1:0] flit_data_t;

  typedef struct packed {
    logic             valid;
    logic [VC_W-1:0]  vc;
    logic             head;
    logic             tail;
    flit_data_t       data;
  } flit_t;

  typedef struct packed {
    logic [NUM_VC-1:0]    vc;    // wake these VC buffers of the receiving input port
    logic [NUM_PORTS-1:0] port;  // wake crossbar mux / output latch of these ports
  } wake_t;

  typedef struct packed {
    wake_t                  hop1;
    wake_t [NUM_PORTS-1:0]  hop2;  // hop2[d]: pass on out of port d
  } link_wake_t;

  typedef struct packed {
    logic [NUM_VC-1:0]                 credit;
    logic [NUM_VC-1:0][MAX_DEPTH-1:0]  slot_ready;
  } link_cred_t;

  // Header field access.
  function automatic logic [COORD_W-1:0] hdr_dst_x(flit_data_t d);
    return d[1:0];
  endfunction

  function automatic logic [COORD_W-1:0] hdr_dst_y(flit_data_t d);
    return d[3:2];
  endfunction

  function automatic logic [PORT_W-1:0] hdr_la_port(flit_data_t d);
    return d[6:4];
  endfunction

  function automatic flit_data_t hdr_set_la_port(flit_data_t d, logic [PORT_W-1:0] p);
    flit_data_t r;
    r      = d;
    r[6:4] = p;
    return r;
  endfunction

  // Dimension-order (X first, then Y) routing.
  function automatic logic [PORT_W-1:0] xy_route(logic [COORD_W-1:0] cx, logic [COORD_W-1:0] cy,
                                                  logic [COORD_W-1:0] dx, logic [COORD_W-1:0] dy);
    if (dx > cx)      return P_EAST;
    else if (dx < cx) return P_WEST;
    else if (dy > cy) return P_SOUTH;
    else if (dy < cy) return P_NORTH;
    else              return P_LOCAL;
  endfunction

  // The port through which a flit leaving on port p enters the neighbour.
  function automatic logic [PORT_W-1:0] opposite(logic [PORT_W-1:0] p);
    case (p)
      P_NORTH: return P_SOUTH;
      P_EAST:  return P_WEST;
      P_SOUTH: return P_NORTH;
      P_WEST:  return P_EAST;
      default: return P_LOCAL;
    endcase
  endfunction

endpackage
