// pg_router: 5-port virtual-channel router with ultra fine-grained run-time
// power gating.
//
// The router is cut into 35 power domains that sleep and wake on their own:
// 20 input VC buffers (5 ports x 4 VCs), 5 VC multiplexers (one per input
// port), 5 crossbar multiplexers and 5 output latches (one each per output
// port). A domain is powered only while a packet really uses it: it is
// woken when a packet is announced and switched off as soon as the packet
// has left. Waking takes WAKEUP_LAT cycles, and a flit that needs a sleeping
// domain waits; early wakeup hides that wait:
//   EW_NONE       each router wakes the domains of the next router that its
//                 packet will use, as soon as the head is routed;
//   EW_LOOKAHEAD  as well, using look-ahead routing, the domains of the
//                 router two hops ahead (the request is passed on through
//                 the next router, unregistered);
//   EW_LA_EVERON  look-ahead, plus the local-port VC0 and VC2 buffers of a
//                 router with a CPU attached never sleep (no first-hop wait
//                 for the heavily loaded request and reply classes);
//   EW_LA_WINDOW  look-ahead, plus an always-powered window of WINDOW entries
//                 in every VC buffer.
// PG_LEVEL selects which components are gated: 1 input buffers, 2 also the
// VC and crossbar multiplexers, 3 also the output latches; 0 none.
//
// Pipeline (3 router stages and a link cycle): RC, routing of a head flit
// at the front of its VC buffer (look-ahead: the port here comes with the
// header, the unit computes the ports one and two hops further); VSA, a
// separable allocator (round-robin per input port over its VCs, then per
// output port over the input ports) grants a flit and pops it into the
// buffer's output register; ST, the flit passes the VC and crossbar
// multiplexers into the output latch, which drives the link; the next router
// writes it at the following edge. Body flits skip RC. A flit is granted only
// if every domain on its path is on, its output VC is free (head) and the
// downstream buffer has a credit and a powered entry for it.
//
// Flow control is credit based, one credit per buffer entry. VCs are not
// reassigned: a packet keeps its VC (its message class) on every hop, and
// an output VC is held by one packet from head to tail (wormhole).
//
// Follows the design: the 35 domains, the 3-cycle pipeline, on-when-it-comes
// and off-when-it-leaves control, the three early-wakeup methods, the
// ever-on VC0/VC2 CPU buffers, the gating levels, 4 VCs, 4-flit buffers,
// 128-bit flits, 3-cycle wakeup. This design's own choices: the allocator,
// XY routing, the wakeup and credit side channels (pg_pkg) and the rule that
// a downstream buffer is kept awake while a packet for it is routed or in
// flight.
module pg_router
  import pg_pkg::*;
#(
  parameter int unsigned    X            = 0,
  parameter int unsigned    Y            = 0,
  parameter int unsigned    DEPTH        = 4,
  parameter int unsigned    WAKEUP_LAT   = 3,
  parameter int unsigned    PG_LEVEL     = 3,
  parameter early_wakeup_e  EARLY_WAKEUP = EW_LA_EVERON,
  parameter int unsigned    WINDOW       = 2,
  parameter bit             CPU_ATTACHED = 1'b0,
  parameter logic [NUM_VC-1:0] EVER_ON_VCS = 4'b0101
) (
  input  logic        clk,
  input  logic        rst_n,
  // input side of each port
  input  flit_t       in_flit  [NUM_PORTS],
  input  link_wake_t  in_wake  [NUM_PORTS],
  output link_cred_t  out_cred [NUM_PORTS],
  // output side of each port
  output flit_t       out_flit [NUM_PORTS],
  output link_wake_t  out_wake [NUM_PORTS],
  input  link_cred_t  in_cred  [NUM_PORTS],
  // power state: [p*4+v] VC buffer, [20+p] VC mux, [25+o] crossbar mux,
  // [30+o] output latch
  output logic [34:0] dom_on,
  output logic [34:0] dom_waking,
  output logic        pg_stall      // a flit waits only for a sleeping domain
);

  localparam int unsigned NP = NUM_PORTS;
  localparam int unsigned NV = NUM_VC;
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam bit LA       = (EARLY_WAKEUP != EW_NONE);
  localparam bit GATE_BUF = (PG_LEVEL >= 1);
  localparam bit GATE_MUX = (PG_LEVEL >= 2);
  localparam bit GATE_OL  = (PG_LEVEL >= 3);
  localparam int unsigned WIN = (EARLY_WAKEUP == EW_LA_WINDOW) ? WINDOW : 0;

  // ------------------------------------------------------------ VC buffers
  flit_t                 front   [NP][NV];
  flit_t                 dout    [NP][NV];
  logic [NV-1:0]         front_v [NP];
  logic [NV-1:0]         buf_on  [NP];
  logic [NV-1:0]         buf_wk  [NP];
  logic [NV-1:0]         pop     [NP];

  for (genvar p = 0; p < NP; p++) begin : g_in
    for (genvar v = 0; v < NV; v++) begin : g_vc
      localparam bit EVER = (EARLY_WAKEUP == EW_LA_EVERON) && CPU_ATTACHED &&
                            (p == 0) && EVER_ON_VCS[v];
      flit_t wr;
      logic  cred;
      logic [MAX_DEPTH-1:0] sready;
      always_comb begin
        wr       = in_flit[p];
        wr.valid = in_flit[p].valid && (in_flit[p].vc == VC_W'(v));
      end
      pg_vc_buffer #(
        .DEPTH(DEPTH), .WAKEUP_LAT(WAKEUP_LAT), .WINDOW(WIN),
        .GATED(GATE_BUF), .EVER_ON(EVER), .VC_ID(VC_W'(v))
      ) u_buf (
        .clk, .rst_n, .wr,
        .wake_req(in_wake[p].hop1.vc[v]),
        .pop(pop[p][v]),
        .front_valid(front_v[p][v]), .front(front[p][v]), .dout(dout[p][v]),
        .credit(cred), .slot_ready(sready),
        .pwr_on(buf_on[p][v]), .waking(buf_wk[p][v]), .entries_on()
      );
      assign out_cred[p].credit[v]     = cred;
      assign out_cred[p].slot_ready[v] = sready;
    end
  end

  // ------------------------------------------------------------ RC stage
  logic [NV-1:0]      act_q  [NP];        // packet routed, holds this VC
  logic [PORT_W-1:0]  r_out_q[NP][NV], r_nx_q[NP][NV], r_nx2_q[NP][NV];
  logic [PORT_W-1:0]  c_out  [NP][NV], c_nx  [NP][NV], c_nx2  [NP][NV];
  // route in use: registered once routed, else that of a head at the front
  logic [NV-1:0]      rt_v   [NP];
  logic [PORT_W-1:0]  rt_out [NP][NV], rt_nx [NP][NV], rt_nx2 [NP][NV];

  for (genvar p = 0; p < NP; p++) begin : g_rc
    for (genvar v = 0; v < NV; v++) begin : g_vc
      pg_la_route u_rt (
        .cur_x(COORD_W'(X)), .cur_y(COORD_W'(Y)), .in_port(PORT_W'(p)),
        .hdr(front[p][v].data),
        .out_port(c_out[p][v]), .next_port(c_nx[p][v]), .next2_port(c_nx2[p][v])
      );
      always_comb begin
        rt_v[p][v]   = act_q[p][v] || (front_v[p][v] && front[p][v].head);
        rt_out[p][v] = act_q[p][v] ? r_out_q[p][v] : c_out[p][v];
        rt_nx[p][v]  = act_q[p][v] ? r_nx_q[p][v]  : c_nx[p][v];
        rt_nx2[p][v] = act_q[p][v] ? r_nx2_q[p][v] : c_nx2[p][v];
      end
    end
  end

  // ------------------------------------------------------------ VSA stage
  logic [CW-1:0]      cred_q   [NP][NV];   // credits per output VC
  logic [NV-1:0]      ovc_busy_q[NP];      // output VC held by a packet
  logic               st_v_q   [NP];       // ST stage holds a flit for output o
  logic [VC_W-1:0]    st_vc_q  [NP];
  logic [PORT_W-1:0]  st_in_q  [NP];       // crossbar select
  logic [PORT_W-1:0]  st_la_q  [NP];       // look-ahead port for the header
  logic [PORT_W-1:0]  st_nx2_q [NP];       // port two routers ahead
  logic [PORT_W-1:0]  ol_la_q  [NP];       // the same for the flit in the output latch
  logic [PORT_W-1:0]  ol_nx2_q [NP];
  logic [VC_W-1:0]    vsel_q   [NP];       // VC mux select per input port
  logic [NP-1:0]      xb_on, ol_on, xb_wk, ol_wk;
  logic [NP-1:0]      vm_on, vm_wk;

  logic [NV-1:0]      elig     [NP];
  logic [NV-1:0]      wait_pwr [NP];
  logic [1:0]         inflight [NP][NV];

  always_comb begin
    for (int o = 0; o < NP; o++)
      for (int v = 0; v < NV; v++)
        inflight[o][v] = 2'(st_v_q[o] && st_vc_q[o] == VC_W'(v)) +
                         2'(out_flit[o].valid && out_flit[o].vc == VC_W'(v));
  end

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      for (int v = 0; v < NV; v++) begin
        logic [PORT_W-1:0] o;
        logic flow_ok, pwr_ok;
        o       = r_out_q[p][v];
        flow_ok = (front[p][v].head ? !ovc_busy_q[o][v] : 1'b1) && (cred_q[o][v] != '0);
        pwr_ok  = vm_on[p] && xb_on[o] && ol_on[o] &&
                  in_cred[o].slot_ready[v][3'(inflight[o][v])];
        elig[p][v]     = act_q[p][v] && front_v[p][v] && flow_ok && pwr_ok;
        wait_pwr[p][v] = act_q[p][v] && front_v[p][v] && flow_ok && !pwr_ok;
      end
    end
  end

  // input-port arbitration over VCs, then output-port arbitration over inputs
  logic [NV-1:0]      in_gnt   [NP];
  logic [PORT_W-1:0]  in_port_req [NP];
  logic [NP-1:0]      in_won;
  logic [NP-1:0]      out_req  [NP];
  logic [NP-1:0]      out_gnt  [NP];

  for (genvar p = 0; p < NP; p++) begin : g_iarb
    pg_rr_arb #(.N(NV)) u_arb (
      .clk, .rst_n, .req(elig[p]), .update(in_won[p]), .grant(in_gnt[p])
    );
    always_comb begin
      in_port_req[p] = '0;
      for (int v = 0; v < NV; v++)
        if (in_gnt[p][v]) in_port_req[p] = r_out_q[p][v];
    end
  end

  for (genvar o = 0; o < NP; o++) begin : g_oarb
    always_comb
      for (int p = 0; p < NP; p++)
        out_req[o][p] = (in_gnt[p] != '0) && (in_port_req[p] == PORT_W'(o));
    pg_rr_arb #(.N(NP)) u_arb (
      .clk, .rst_n, .req(out_req[o]), .update(1'b1), .grant(out_gnt[o])
    );
  end

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      in_won[p] = 1'b0;
      for (int o = 0; o < NP; o++) in_won[p] |= out_gnt[o][p];
      pop[p] = in_won[p] ? in_gnt[p] : '0;
    end
  end

  // a credit of output VC v of port o is spent when a flit is granted to it
  logic [NV-1:0] cred_use [NP];
  always_comb begin
    for (int o = 0; o < NP; o++) begin
      cred_use[o] = '0;
      for (int p = 0; p < NP; p++)
        if (out_gnt[o][p]) cred_use[o] |= in_gnt[p];
    end
  end

  // RC, VSA and ST registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) begin
        act_q[p]      <= '0;
        ovc_busy_q[p] <= '0;
        st_v_q[p]     <= 1'b0;
        st_vc_q[p]    <= '0;
        st_in_q[p]    <= '0;
        st_la_q[p]    <= '0;
        st_nx2_q[p]   <= '0;
        ol_la_q[p]    <= '0;
        ol_nx2_q[p]   <= '0;
        vsel_q[p]     <= '0;
        for (int v = 0; v < NV; v++) begin
          r_out_q[p][v] <= '0;
          r_nx_q[p][v]  <= '0;
          r_nx2_q[p][v] <= '0;
          cred_q[p][v]  <= CW'(DEPTH);
        end
      end
    end else begin
      for (int p = 0; p < NP; p++) begin
        for (int v = 0; v < NV; v++) begin
          // RC
          if (!act_q[p][v] && front_v[p][v] && front[p][v].head) begin
            act_q[p][v]   <= 1'b1;
            r_out_q[p][v] <= c_out[p][v];
            r_nx_q[p][v]  <= c_nx[p][v];
            r_nx2_q[p][v] <= c_nx2[p][v];
          end
          // VSA: the tail releases the VC state
          if (pop[p][v] && front[p][v].tail) act_q[p][v] <= 1'b0;
        end
        if (in_won[p])
          for (int v = 0; v < NV; v++)
            if (in_gnt[p][v]) vsel_q[p] <= VC_W'(v);
      end
      for (int o = 0; o < NP; o++) begin
        st_v_q[o] <= 1'b0;
        if (st_v_q[o]) begin
          ol_la_q[o]  <= st_la_q[o];
          ol_nx2_q[o] <= st_nx2_q[o];
        end
        for (int p = 0; p < NP; p++) begin
          if (out_gnt[o][p]) begin
            for (int v = 0; v < NV; v++) begin
              if (in_gnt[p][v]) begin
                st_v_q[o]  <= 1'b1;
                st_vc_q[o] <= VC_W'(v);
                st_in_q[o] <= PORT_W'(p);
                st_la_q[o] <= r_nx_q[p][v];
                st_nx2_q[o] <= r_nx2_q[p][v];
                if (front[p][v].head && !front[p][v].tail) ovc_busy_q[o][v] <= 1'b1;
                if (front[p][v].tail)                      ovc_busy_q[o][v] <= 1'b0;
              end
            end
          end
        end
        for (int v = 0; v < NV; v++)
          cred_q[o][v] <= cred_q[o][v] - CW'(cred_use[o][v]) + CW'(in_cred[o].credit[v]);
      end
    end
  end

  // ------------------------------------------------------------ ST stage
  flit_t vm_out [NP];
  flit_t xb_out [NP];

  for (genvar p = 0; p < NP; p++) begin : g_vm
    logic req, busy;
    always_comb begin
      req  = (in_wake[p].hop1.vc != '0) || (front_v[p] != '0) || (act_q[p] != '0);
      busy = 1'b0;
      for (int v = 0; v < NV; v++) busy |= dout[p][v].valid;
    end
    pg_vc_mux #(.WAKEUP_LAT(WAKEUP_LAT), .GATED(GATE_MUX)) u_vm (
      .clk, .rst_n, .wake_req(req), .busy, .in(dout[p]), .sel(vsel_q[p]),
      .out(vm_out[p]), .pwr_on(vm_on[p]), .waking(vm_wk[p])
    );
  end

  for (genvar o = 0; o < NP; o++) begin : g_out
    logic  req;
    flit_t ol_d;
    always_comb begin
      req = st_v_q[o] || (ovc_busy_q[o] != '0);
      for (int p = 0; p < NP; p++) begin
        req |= in_wake[p].hop1.port[o];
        for (int v = 0; v < NV; v++)
          if (rt_v[p][v] && rt_out[p][v] == PORT_W'(o)) req = 1'b1;
      end
      ol_d = st_v_q[o] ? xb_out[o] : '0;
    end
    pg_xbar_mux #(.WAKEUP_LAT(WAKEUP_LAT), .GATED(GATE_MUX)) u_xb (
      .clk, .rst_n, .wake_req(req), .busy(st_v_q[o]), .in(vm_out), .sel(st_in_q[o]),
      .out(xb_out[o]), .pwr_on(xb_on[o]), .waking(xb_wk[o])
    );
    pg_out_latch #(.WAKEUP_LAT(WAKEUP_LAT), .GATED(GATE_OL)) u_ol (
      .clk, .rst_n, .wake_req(req), .d(ol_d), .la_port(st_la_q[o]),
      .q(out_flit[o]), .pwr_on(ol_on[o]), .waking(ol_wk[o])
    );
  end

  // ------------------------------------------------------------ wakeups out
  always_comb begin
    for (int o = 0; o < NP; o++) begin
      out_wake[o] = '0;
      if (o != int'(P_LOCAL)) begin
        // packets routed to o, in ST or in the output latch
        for (int p = 0; p < NP; p++) begin
          for (int v = 0; v < NV; v++) begin
            if (rt_v[p][v] && rt_out[p][v] == PORT_W'(o)) begin
              out_wake[o].hop1.vc[v]          = 1'b1;
              out_wake[o].hop1.port[rt_nx[p][v]] = 1'b1;
              if (LA && rt_nx[p][v] != P_LOCAL) begin
                out_wake[o].hop2[rt_nx[p][v]].vc[v]             = 1'b1;
                out_wake[o].hop2[rt_nx[p][v]].port[rt_nx2[p][v]] = 1'b1;
              end
            end
          end
          // pass on requests from two hops back
          out_wake[o].hop1.vc   |= in_wake[p].hop2[o].vc;
          out_wake[o].hop1.port |= in_wake[p].hop2[o].port;
        end
        // flits on their way to the next router keep its domains requested
        if (st_v_q[o]) begin
          out_wake[o].hop1.vc[st_vc_q[o]]   = 1'b1;
          out_wake[o].hop1.port[st_la_q[o]] = 1'b1;
          if (LA && st_la_q[o] != P_LOCAL) begin
            out_wake[o].hop2[st_la_q[o]].vc[st_vc_q[o]]    = 1'b1;
            out_wake[o].hop2[st_la_q[o]].port[st_nx2_q[o]] = 1'b1;
          end
        end
        if (out_flit[o].valid) begin
          out_wake[o].hop1.vc[out_flit[o].vc] = 1'b1;
          out_wake[o].hop1.port[ol_la_q[o]]   = 1'b1;
          if (LA && ol_la_q[o] != P_LOCAL) begin
            out_wake[o].hop2[ol_la_q[o]].vc[out_flit[o].vc] = 1'b1;
            out_wake[o].hop2[ol_la_q[o]].port[ol_nx2_q[o]]  = 1'b1;
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ status
  always_comb begin
    pg_stall = 1'b0;
    for (int p = 0; p < NP; p++) begin
      pg_stall |= (wait_pwr[p] != '0);
      for (int v = 0; v < NV; v++) begin
        dom_on[p*NV+v]     = buf_on[p][v];
        dom_waking[p*NV+v] = buf_wk[p][v];
      end
      dom_on[20+p]     = vm_on[p];
      dom_waking[20+p] = vm_wk[p];
      dom_on[25+p]     = xb_on[p];
      dom_waking[25+p] = xb_wk[p];
      dom_on[30+p]     = ol_on[p];
      dom_waking[30+p] = ol_wk[p];
    end
  end

endmodule
