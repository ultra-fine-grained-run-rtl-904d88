// pg_hold: hold (isolation) cells on the outputs of a power domain.
//
// When a domain sleeps its outputs float; the design inserts hold cells so
// that no undefined value reaches the powered logic around it. Here a
// sleeping domain's outputs are clamped to zero, so a sleeping buffer shows
// an invalid flit and a sleeping output latch drives an idle link. The clamp
// value (all zeros) is this design's choice. Purely combinational.
module pg_hold #(
  parameter int unsigned W = 1
) (
  input  logic         on,  // source domain is powered and settled
  input  logic [W-1:0] d,   // output of the domain
  output logic [W-1:0] q    // value seen by the rest of the router
);

  always_comb q = on ? d : '0;

endmodule
