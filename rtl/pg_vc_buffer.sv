// pg_vc_buffer: input virtual-channel buffer with run-time power gating.
//
// A DEPTH-entry FIFO of flits (4 entries of 128 bits by default, as drawn in
// the design) that forms its own power domain. It wakes when the upstream
// router announces a packet for it (wake_req) and sleeps again as soon as it
// is empty and nothing is announced; its contents are lost while it sleeps
// (the pointers restart at zero). Upstream routers only send into entries
// that are powered: slot_ready[k] tells whether the k-th free entry counted
// from the write pointer can be written.
//
// With WINDOW > 0 the buffer uses an active buffer window instead: every
// entry is a domain of its own, the WINDOW free entries just ahead of the
// write pointer are kept powered at all times, and the window moves along as
// flits are written and read. A packet no longer than the window is then
// accepted without waiting even if no wakeup came early; entries beyond the
// window are woken by wake_req or when the window reaches them. The pointers
// and the output register are then always-on control.
//
// EVER_ON keeps the buffer powered for good (the CPU-side ever-on VC buffers);
// GATED = 0 makes it an ordinary buffer.
//
// Timing: a write (wr.valid) is stored at the clock edge. The front entry is
// visible combinationally (front, front_valid). 'pop' at an edge moves the
// front flit into the output register dout, valid for the following cycle,
// and sends a one-cycle credit pulse in that same following cycle.
// The domain policy and the window follow the design; the FIFO organisation,
// output register and slot_ready handshake are this design's choices.
module pg_vc_buffer
  import pg_pkg::*;
#(
  parameter int unsigned      DEPTH      = 4,
  parameter int unsigned      WAKEUP_LAT = 3,
  parameter int unsigned      WINDOW     = 0,
  parameter bit               GATED      = 1'b1,
  parameter bit               EVER_ON    = 1'b0,
  parameter logic [VC_W-1:0]  VC_ID      = '0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  flit_t                 wr,          // flit written when wr.valid
  input  logic                  wake_req,    // a packet is coming
  input  logic                  pop,         // move the front flit to dout
  output logic                  front_valid, // buffer holds a flit
  output flit_t                 front,       // the front flit (unregistered)
  output flit_t                 dout,        // flit popped at the last edge
  output logic                  credit,      // an entry was freed at the last edge
  output logic [MAX_DEPTH-1:0]  slot_ready,  // k-th free entry is powered
  output logic                  pwr_on,      // some part of the buffer is powered
  output logic                  waking,      // some part of the buffer is waking up
  output logic [$clog2(DEPTH+1)-1:0] entries_on  // powered entries
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam bit          WIN = (WINDOW > 0) && GATED && !EVER_ON;

  typedef struct packed {
    logic       head;
    logic       tail;
    flit_data_t data;
  } entry_t;

  entry_t          mem_q [DEPTH];
  logic [PW-1:0]   wr_ptr_q, rd_ptr_q;
  logic [CW-1:0]   count_q;
  flit_t           dout_q;
  logic            credit_q;

  logic [DEPTH-1:0] ent_on, ent_waking, ent_req, ent_busy;
  logic             all_on;   // whole-buffer domain (no window)
  logic             all_waking;

  function automatic logic [PW-1:0] wrap(int unsigned i);
    return PW'(i % DEPTH);
  endfunction

  // ---------------------------------------------------------------- domains
  if (WIN) begin : g_window
    always_comb begin
      for (int unsigned k = 0; k < DEPTH; k++) begin
        int unsigned from_wr, from_rd;
        from_wr     = (k + DEPTH - int'(wr_ptr_q)) % DEPTH;
        from_rd     = (k + DEPTH - int'(rd_ptr_q)) % DEPTH;
        ent_busy[k] = from_rd < int'(count_q);
        ent_req[k]  = wake_req || ent_busy[k] ||
                      (from_wr < WINDOW && from_wr < (DEPTH - int'(count_q)));
      end
    end
    for (genvar k = 0; k < DEPTH; k++) begin : g_ent
      pg_domain_ctrl #(.WAKEUP_LAT(WAKEUP_LAT), .GATED(1'b1), .EVER_ON(1'b0)) u_ctrl (
        .clk, .rst_n, .req(ent_req[k]), .busy(ent_busy[k]),
        .sw_en(), .on(ent_on[k]), .waking(ent_waking[k])
      );
    end
    assign all_on     = 1'b1;   // control part is always on
    assign all_waking = 1'b0;
  end else begin : g_whole
    pg_domain_ctrl #(.WAKEUP_LAT(WAKEUP_LAT), .GATED(GATED), .EVER_ON(EVER_ON)) u_ctrl (
      .clk, .rst_n, .req(wake_req), .busy((count_q != '0) || dout_q.valid),
      .sw_en(), .on(all_on), .waking(all_waking)
    );
    assign ent_on     = {DEPTH{all_on}};
    assign ent_waking = {DEPTH{all_waking}};
    assign ent_req    = {DEPTH{wake_req}};
    assign ent_busy   = '0;
  end

  always_comb begin
    pwr_on     = (ent_on != '0);
    waking     = (ent_waking != '0);
    entries_on = '0;
    for (int unsigned k = 0; k < DEPTH; k++) entries_on += CW'(ent_on[k]);
    slot_ready = '0;
    for (int unsigned k = 0; k < DEPTH; k++)
      slot_ready[k] = ent_on[wrap(int'(wr_ptr_q) + k)] && (k < DEPTH - int'(count_q));
  end

  // --------------------------------------------------------------- datapath
  logic do_wr, do_pop;
  assign do_wr  = wr.valid;
  assign do_pop = pop && (count_q != '0);

  always_ff @(posedge clk) begin
    if (do_wr) mem_q[wr_ptr_q] <= '{head: wr.head, tail: wr.tail, data: wr.data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr_q <= '0;
      rd_ptr_q <= '0;
      count_q  <= '0;
      dout_q   <= '0;
      credit_q <= 1'b0;
    end else if (!WIN && !all_on) begin
      // Sleeping: the state is gone.
      wr_ptr_q <= '0;
      rd_ptr_q <= '0;
      count_q  <= '0;
      dout_q   <= '0;
      credit_q <= 1'b0;
    end else begin
      if (do_wr) wr_ptr_q <= wrap(int'(wr_ptr_q) + 1);
      if (do_pop) rd_ptr_q <= wrap(int'(rd_ptr_q) + 1);
      count_q  <= count_q + CW'(do_wr) - CW'(do_pop);
      credit_q <= do_pop;
      dout_q   <= '0;
      if (do_pop) begin
        dout_q.valid <= 1'b1;
        dout_q.vc    <= VC_ID;
        dout_q.head  <= mem_q[rd_ptr_q].head;
        dout_q.tail  <= mem_q[rd_ptr_q].tail;
        dout_q.data  <= mem_q[rd_ptr_q].data;
      end
    end
  end

  // ----------------------------------------------------------- hold cells
  flit_t front_raw;
  always_comb begin
    front_raw       = '0;
    front_raw.valid = (count_q != '0);
    front_raw.vc    = VC_ID;
    front_raw.head  = mem_q[rd_ptr_q].head;
    front_raw.tail  = mem_q[rd_ptr_q].tail;
    front_raw.data  = mem_q[rd_ptr_q].data;
  end

  pg_hold #(.W($bits(flit_t))) u_hold_front (.on(ent_on[rd_ptr_q]), .d(front_raw), .q(front));
  pg_hold #(.W($bits(flit_t))) u_hold_dout  (.on(all_on),           .d(dout_q),    .q(dout));

  assign front_valid = front.valid;
  assign credit      = credit_q;

  // A flit may only be written into a powered, free entry.
  always_ff @(posedge clk) begin
    if (rst_n && do_wr) begin
      assert (ent_on[wr_ptr_q]) else $error("write into a sleeping buffer entry");
      assert (int'(count_q) < DEPTH || do_pop) else $error("write into a full buffer");
    end
  end

endmodule
