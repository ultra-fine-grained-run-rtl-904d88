// pg_mesh: on-chip network of a chip multiprocessor built from fine-grained
// power-gated routers.
//
// A MESH_X x MESH_Y mesh (4x4 by default) of pg_router instances. In the
// target chip, 8 processors (each with private L1 caches) and 64 shared L2
// cache banks hang off the 16 routers; every router's local port is brought
// out here so that network interfaces, processors and caches can be
// attached. CPU_MASK marks the routers that have a processor attached (bit
// y*MESH_X + x); with the look-ahead + CPU ever-on wakeup method, the
// local-port VC0 and VC2 buffers of those routers never sleep. The default
// mask follows the floorplan of the target chip: CPUs at (0,0), (1,0),
// (3,0), (3,1), (0,2), (0,3), (2,3) and (3,3), x to the east, y to the south.
//
// Links between neighbours carry the flit, the wakeup bundle (including the
// two-hop look-ahead requests, which each router passes on unregistered) and
// the credit/slot-ready bundle back. Ports at the mesh edge are tied off.
//
// Local-port interface per node n (all arrays indexed by n):
//   ni_in_flit  flit injected into the router (VC = message class)
//   ni_in_wake  wakeup request for the local input VC buffers (vc field);
//               the sender must raise it and wait for ni_out_cred.slot_ready
//               before writing into a buffer that may be asleep
//   ni_out_cred credits and powered-entry mask of the local input buffers
//   ni_out_flit flit ejected by the router
//   ni_in_cred  credits returned by the receiver; its slot_ready must be all
//               ones for the entries it can take
// Status: dom_on / dom_waking per router (35 domains, see pg_router) and
// pg_stall (a flit in that router waits only for a sleeping domain).
// Latency per hop is 4 cycles without wakeup waits (3 router stages + link).
//
// A lint tool that treats r_out_wake as one signal reports a combinational
// loop through it: router A's out_wake feeds router B's in_wake, and B
// passes A's two-hop requests on, unregistered, in its own out_wake. The
// path is only A.hop2[d] -> B.hop1 on port d, and B never sends anything
// it received back through the link it came from, nor does any router
// relay hop1 bits, so there is no real loop; it stays because the
// look-ahead wakeup needs the request two routers ahead in the same cycle.
// This file follows the design's mesh of 16 routers with CPUs and L2 banks
// at the local ports; the edge tie-offs and the side-band links are this
// design's own.
module pg_mesh
  import pg_pkg::*;
#(
  parameter int unsigned    MESH_X       = 4,
  parameter int unsigned    MESH_Y       = 4,
  parameter int unsigned    DEPTH        = 4,
  parameter int unsigned    WAKEUP_LAT   = 3,
  parameter int unsigned    PG_LEVEL     = 3,
  parameter early_wakeup_e  EARLY_WAKEUP = EW_LA_EVERON,
  parameter int unsigned    WINDOW       = 2,
  parameter logic [MESH_X*MESH_Y-1:0] CPU_MASK = 16'hD18B
) (
  input  logic        clk,
  input  logic        rst_n,
  input  flit_t       ni_in_flit  [MESH_X*MESH_Y],
  input  wake_t       ni_in_wake  [MESH_X*MESH_Y],
  output link_cred_t  ni_out_cred [MESH_X*MESH_Y],
  output flit_t       ni_out_flit [MESH_X*MESH_Y],
  input  link_cred_t  ni_in_cred  [MESH_X*MESH_Y],
  output logic [34:0] dom_on      [MESH_X*MESH_Y],
  output logic [34:0] dom_waking  [MESH_X*MESH_Y],
  output logic        pg_stall    [MESH_X*MESH_Y]
);

  localparam int unsigned N = MESH_X * MESH_Y;

  flit_t       r_in_flit  [N][NUM_PORTS];
  link_wake_t  r_in_wake  [N][NUM_PORTS];
  link_cred_t  r_out_cred [N][NUM_PORTS];
  flit_t       r_out_flit [N][NUM_PORTS];
  link_wake_t  r_out_wake [N][NUM_PORTS];
  link_cred_t  r_in_cred  [N][NUM_PORTS];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned n = y * MESH_X + x;

      pg_router #(
        .X(x), .Y(y), .DEPTH(DEPTH), .WAKEUP_LAT(WAKEUP_LAT), .PG_LEVEL(PG_LEVEL),
        .EARLY_WAKEUP(EARLY_WAKEUP), .WINDOW(WINDOW), .CPU_ATTACHED(CPU_MASK[n])
      ) u_router (
        .clk, .rst_n,
        .in_flit(r_in_flit[n]), .in_wake(r_in_wake[n]), .out_cred(r_out_cred[n]),
        .out_flit(r_out_flit[n]), .out_wake(r_out_wake[n]), .in_cred(r_in_cred[n]),
        .dom_on(dom_on[n]), .dom_waking(dom_waking[n]), .pg_stall(pg_stall[n])
      );

      // local port
      always_comb begin
        r_in_flit[n][P_LOCAL]      = ni_in_flit[n];
        r_in_wake[n][P_LOCAL]      = '0;
        r_in_wake[n][P_LOCAL].hop1 = ni_in_wake[n];
        r_in_cred[n][P_LOCAL]      = ni_in_cred[n];
        ni_out_cred[n]             = r_out_cred[n][P_LOCAL];
        ni_out_flit[n]             = r_out_flit[n][P_LOCAL];
      end

      // north neighbour (y-1): its south port faces this north port
      if (y > 0) begin : g_n
        assign r_in_flit[n][P_NORTH] = r_out_flit[n-MESH_X][P_SOUTH];
        assign r_in_wake[n][P_NORTH] = r_out_wake[n-MESH_X][P_SOUTH];
        assign r_in_cred[n][P_NORTH] = r_out_cred[n-MESH_X][P_SOUTH];
      end else begin : g_n_edge
        assign r_in_flit[n][P_NORTH] = '0;
        assign r_in_wake[n][P_NORTH] = '0;
        assign r_in_cred[n][P_NORTH] = '0;
      end
      if (y < MESH_Y - 1) begin : g_s
        assign r_in_flit[n][P_SOUTH] = r_out_flit[n+MESH_X][P_NORTH];
        assign r_in_wake[n][P_SOUTH] = r_out_wake[n+MESH_X][P_NORTH];
        assign r_in_cred[n][P_SOUTH] = r_out_cred[n+MESH_X][P_NORTH];
      end else begin : g_s_edge
        assign r_in_flit[n][P_SOUTH] = '0;
        assign r_in_wake[n][P_SOUTH] = '0;
        assign r_in_cred[n][P_SOUTH] = '0;
      end
      if (x < MESH_X - 1) begin : g_e
        assign r_in_flit[n][P_EAST] = r_out_flit[n+1][P_WEST];
        assign r_in_wake[n][P_EAST] = r_out_wake[n+1][P_WEST];
        assign r_in_cred[n][P_EAST] = r_out_cred[n+1][P_WEST];
      end else begin : g_e_edge
        assign r_in_flit[n][P_EAST] = '0;
        assign r_in_wake[n][P_EAST] = '0;
        assign r_in_cred[n][P_EAST] = '0;
      end
      if (x > 0) begin : g_w
        assign r_in_flit[n][P_WEST] = r_out_flit[n-1][P_EAST];
        assign r_in_wake[n][P_WEST] = r_out_wake[n-1][P_EAST];
        assign r_in_cred[n][P_WEST] = r_out_cred[n-1][P_EAST];
      end else begin : g_w_edge
        assign r_in_flit[n][P_WEST] = '0;
        assign r_in_wake[n][P_WEST] = '0;
        assign r_in_cred[n][P_WEST] = '0;
      end
    end
  end

endmodule
