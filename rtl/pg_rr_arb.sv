// pg_rr_arb: round-robin arbiter (the router's ARB, used by the VC and
// switch allocator).
//
// Grants one of N requesters per cycle, one-hot. The search starts just
// after the last requester granted (when 'update' is high), so every
// requester is served within N grants. The arbiter is not power gated: it is
// the always-on control that decides which domains are used. Round-robin is
// this design's choice of policy.
//
// Timing: grant is combinational from req and the priority pointer; the
// pointer moves at the clock edge after a cycle with update and a grant.
module pg_rr_arb #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         update,  // the grant was used: rotate priority
  output logic [N-1:0] grant
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr_q;   // highest-priority requester

  always_comb begin
    grant = '0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned idx;
      idx = (int'(ptr_q) + k) % N;
      if (req[idx] && grant == '0) grant[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q <= '0;
    end else if (update && grant != '0) begin
      for (int unsigned k = 0; k < N; k++)
        if (grant[k]) ptr_q <= IW'((k + 1) % N);
    end
  end

endmodule
