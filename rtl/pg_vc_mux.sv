// pg_vc_mux: VC multiplexer of one input port, in a power domain of its own.
//
// Each input port has one VC multiplexer that passes the flit of the VC
// granted by the switch allocator on to the crossbar. It is combinational
// logic, but it leaks, so it is gated: it wakes when any VC buffer of its
// port is announced a packet or holds one, and sleeps when they are all
// idle. While asleep its output is clamped to an invalid flit by hold cells.
// The router sets wake_req and busy; the gating follows the design, the
// select interface is this design's choice.
//
// Timing: out is combinational from in[sel]; pwr_on follows pg_domain_ctrl.
module pg_vc_mux
  import pg_pkg::*;
#(
  parameter int unsigned WAKEUP_LAT = 3,
  parameter bit          GATED      = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wake_req,
  input  logic             busy,
  input  flit_t            in [NUM_VC],
  input  logic [VC_W-1:0]  sel,
  output flit_t            out,
  output logic             pwr_on,
  output logic             waking
);

  pg_domain_ctrl #(.WAKEUP_LAT(WAKEUP_LAT), .GATED(GATED), .EVER_ON(1'b0)) u_ctrl (
    .clk, .rst_n, .req(wake_req), .busy, .sw_en(), .on(pwr_on), .waking
  );

  flit_t muxed;
  always_comb muxed = in[sel];

  pg_hold #(.W($bits(flit_t))) u_hold (.on(pwr_on), .d(muxed), .q(out));

endmodule
