// pg_domain_ctrl: on/off controller of one fine-grained power domain.
//
// A domain is a group of standard cells sharing one virtual ground, tied to
// real ground through a power switch. This controller drives that switch:
// the domain is switched on when a packet is coming (req) and switched off
// as soon as the packet has left (neither req nor busy). After the switch
// closes, the virtual ground needs WAKEUP_LAT cycles to settle (3 cycles at
// 1 GHz in the design); only then does 'on' rise and may the domain's logic
// be used. The wakeup latency and the on-when-it-comes / off-when-it-leaves
// policy follow the design; the three-state machine is this design's own.
//
// GATED = 0 turns the domain into an ordinary always-powered block (used for
// the components a given power-gating level leaves alone). EVER_ON = 1 keeps
// a gateable domain powered for good (CPU-side ever-on VC buffers).
//
// Timing: a req sampled at edge t with the domain off closes the switch
// (sw_en) from edge t; the domain then settles for WAKEUP_LAT cycles and
// 'on' is high from edge t + WAKEUP_LAT, i.e. a flit that asked for the
// domain in cycle c can use it in cycle c + WAKEUP_LAT + 1. With on high and
// req, busy both low at an edge, the domain is off after that edge. Reset
// puts gated domains to sleep.
module pg_domain_ctrl #(
  parameter int unsigned WAKEUP_LAT = 3,
  parameter bit          GATED      = 1'b1,
  parameter bit          EVER_ON    = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req,     // a packet is coming: wake up / stay on
  input  logic busy,    // the domain holds a flit or state: stay on
  output logic sw_en,   // power switch gate
  output logic on,      // powered and settled
  output logic waking   // switch closed, virtual ground still settling
);

  typedef enum logic [1:0] {S_OFF, S_WAKE, S_ON} state_e;

  localparam int unsigned CNT_W = (WAKEUP_LAT > 1) ? $clog2(WAKEUP_LAT) : 1;
  localparam bit ALWAYS = !GATED || EVER_ON;

  state_e             state_q;
  logic [CNT_W-1:0]   cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ALWAYS ? S_ON : S_OFF;
      cnt_q   <= '0;
    end else if (ALWAYS) begin
      state_q <= S_ON;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        S_OFF: if (req) begin
          if (WAKEUP_LAT == 0) begin
            state_q <= S_ON;
          end else begin
            state_q <= S_WAKE;
            cnt_q   <= CNT_W'(WAKEUP_LAT - 1);
          end
        end
        S_WAKE: begin
          if (cnt_q == '0) state_q <= S_ON;
          else             cnt_q   <= cnt_q - 1'b1;
        end
        S_ON: if (!req && !busy) state_q <= S_OFF;
        default: state_q <= S_OFF;
      endcase
    end
  end

  assign on     = (state_q == S_ON);
  assign waking = (state_q == S_WAKE);
  assign sw_en  = (state_q != S_OFF);

endmodule
