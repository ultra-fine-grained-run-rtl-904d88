// pg_xbar_mux: one output column of the crossbar, in a power domain of its own.
//
// The 5x5 crossbar is built as one NUM_PORTS-to-1 multiplexer per output
// port, and each multiplexer is a separate power domain. It wakes when a
// packet that will leave through its port is announced (by the look-ahead
// wakeup of an upstream router or by this router's own routing) and sleeps
// when no packet holds or wants the port. While asleep its output is clamped
// to an invalid flit. The gating follows the design; the select interface is
// this design's choice.
//
// Timing: out is combinational from in[sel]; pwr_on follows pg_domain_ctrl.
module pg_xbar_mux
  import pg_pkg::*;
#(
  parameter int unsigned WAKEUP_LAT = 3,
  parameter bit          GATED      = 1'b1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wake_req,
  input  logic               busy,
  input  flit_t              in [NUM_PORTS],
  input  logic [PORT_W-1:0]  sel,
  output flit_t              out,
  output logic               pwr_on,
  output logic               waking
);

  pg_domain_ctrl #(.WAKEUP_LAT(WAKEUP_LAT), .GATED(GATED), .EVER_ON(1'b0)) u_ctrl (
    .clk, .rst_n, .req(wake_req), .busy, .sw_en(), .on(pwr_on), .waking
  );

  flit_t muxed;
  always_comb begin
    muxed = '0;
    for (int unsigned p = 0; p < NUM_PORTS; p++)
      if (sel == PORT_W'(p)) muxed = in[p];
  end

  pg_hold #(.W($bits(flit_t))) u_hold (.on(pwr_on), .d(muxed), .q(out));

endmodule
