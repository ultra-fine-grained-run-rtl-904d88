// pg_out_latch: output latch of one router port, in a power domain of its own.
//
// The register at the end of the switch-traversal stage that drives the link
// to the next router. A head flit gets the look-ahead port (its output port
// at the next router) written into its header here. The latch is gated like
// the crossbar column in front of it (level-3 power gating): it wakes when a
// packet for its port is announced, stays on while it holds a flit, and
// sleeps after that; a sleeping latch loses its flit and drives an idle link
// through its hold cells. The gating follows the design; the header rewrite
// at this point is this design's choice.
//
// Timing: a valid flit at d is captured at the clock edge and shown on q for
// one cycle (the link cycle); the next router writes it at the following edge.
module pg_out_latch
  import pg_pkg::*;
#(
  parameter int unsigned WAKEUP_LAT = 3,
  parameter bit          GATED      = 1'b1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wake_req,
  input  flit_t              d,
  input  logic [PORT_W-1:0]  la_port,   // header's port at the next router
  output flit_t              q,
  output logic               pwr_on,
  output logic               waking
);

  flit_t q_q;

  pg_domain_ctrl #(.WAKEUP_LAT(WAKEUP_LAT), .GATED(GATED), .EVER_ON(1'b0)) u_ctrl (
    .clk, .rst_n, .req(wake_req), .busy(q_q.valid), .sw_en(), .on(pwr_on), .waking
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_q <= '0;
    end else if (!pwr_on) begin
      q_q <= '0;
    end else begin
      q_q <= d;
      if (d.valid && d.head) q_q.data <= hdr_set_la_port(d.data, la_port);
    end
  end

  pg_hold #(.W($bits(flit_t))) u_hold (.on(pwr_on), .d(q_q), .q(q));

  // A flit may only arrive at a powered latch.
  always_ff @(posedge clk) begin
    if (rst_n && d.valid) assert (pwr_on) else $error("flit sent to a sleeping output latch");
  end

endmodule
