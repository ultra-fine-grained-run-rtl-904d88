// tb_pg_router: one power-gated router at (1,1) of a 4x4 mesh, surrounded
// by models of its neighbours.
//
// Each input port gets a sender that announces its packet with a wakeup
// request (as the upstream router would), waits for a credit and a powered
// buffer entry, and writes one flit per cycle. Every output port has a sink
// that takes every flit and returns a credit. The test checks:
//   * latency: a single-flit packet through a warm router leaves 3 cycles
//     after it was written (RC, VSA, ST), and waits longer through a cold one;
//   * routing: every packet leaves through the X-then-Y port, keeps its VC,
//     and its head carries the port it must take at the next router;
//   * wormhole: flits of one packet arrive in order and are not interleaved
//     with another packet on the same output VC; no flit is lost;
//   * power: after the traffic drains every gated domain is asleep except the
//     CPU-side ever-on buffers (local VC0 and VC2); wakeups, sleeps and
//     power stalls each happen.
module tb_pg_router;
  import pg_pkg::*;

  localparam int RX = 1, RY = 1;
  localparam int D  = 4;
  localparam int LAT = 3;
  localparam int PKTS_PER_PORT = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  flit_t       in_flit  [NUM_PORTS];
  link_wake_t  in_wake  [NUM_PORTS];
  link_cred_t  out_cred [NUM_PORTS];
  flit_t       out_flit [NUM_PORTS];
  link_wake_t  out_wake [NUM_PORTS];
  link_cred_t  in_cred  [NUM_PORTS];
  logic [34:0] dom_on, dom_waking;
  logic        pg_stall;

  pg_router #(.X(RX), .Y(RY), .DEPTH(D), .WAKEUP_LAT(LAT), .CPU_ATTACHED(1'b1)) dut (
    .clk, .rst_n, .in_flit, .in_wake, .out_cred, .out_flit, .out_wake, .in_cred,
    .dom_on, .dom_waking, .pg_stall
  );

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------------------------------------------------- reference
  function automatic int ref_port(int x, int y, int dx, int dy);
    if (dx != x) return (dx > x) ? 2 : 4;
    if (dy != y) return (dy > y) ? 3 : 1;
    return 0;
  endfunction

  function automatic int ref_next(int p, int dx, int dy);
    int x, y;
    x = RX; y = RY;
    case (p)
      1: y--;
      2: x++;
      3: y++;
      4: x--;
      default: return 0;
    endcase
    return ref_port(x, y, dx, dy);
  endfunction

  // packet table
  int pkt_port [int];
  int pkt_len  [int];
  int pkt_vc   [int];
  int pkt_next [int];
  int pkt_seen [int];
  int next_pid = 1;

  // ---------------------------------------------------------- senders
  int   credits [NUM_PORTS][NUM_VC];

  always @(posedge clk)
    for (int p = 0; p < NUM_PORTS; p++)
      for (int v = 0; v < NUM_VC; v++)
        if (out_cred[p].credit[v]) credits[p][v]++;

  function automatic flit_t mkflit(int pid, int seq, int len, int v, int dx, int dy, int la);
    flit_t f;
    f       = '0;
    f.valid = 1'b1;
    f.vc    = VC_W'(v);
    f.head  = (seq == 0);
    f.tail  = (seq == len - 1);
    f.data  = flit_data_t'({$urandom, $urandom, $urandom, $urandom});
    f.data[127:96] = pid;
    f.data[95:64]  = seq;
    f.data[1:0]    = 2'(dx);
    f.data[3:2]    = 2'(dy);
    f.data[6:4]    = 3'(la);
    return f;
  endfunction

  task automatic send_packet(int p, int v, int dx, int dy, int len, bit announce);
    int pid, op;
    pid = next_pid++;
    op  = ref_port(RX, RY, dx, dy);
    pkt_port[pid] = op;
    pkt_len[pid]  = len;
    pkt_vc[pid]   = v;
    pkt_next[pid] = ref_next(op, dx, dy);
    pkt_seen[pid] = 0;
    if (announce) begin
      in_wake[p].hop1.vc[v]    = 1'b1;
      in_wake[p].hop1.port[op] = 1'b1;
    end
    for (int s = 0; s < len; s++) begin
      while (!(credits[p][v] > 0 && out_cred[p].slot_ready[v][0])) @(negedge clk);
      in_flit[p] = mkflit(pid, s, len, v, dx, dy, op);
      credits[p][v]--;
      @(negedge clk);
      in_flit[p] = '0;
    end
    in_wake[p].hop1.vc[v]    = 1'b0;
    in_wake[p].hop1.port[op] = 1'b0;
  endtask

  task automatic sender(int p);
    for (int i = 0; i < PKTS_PER_PORT; i++) begin
      int v, dx, dy, len;
      v   = $urandom % NUM_VC;
      dx  = $urandom % 4;
      dy  = $urandom % 4;
      len = 1 + $urandom % 5;
      // the local port of a CPU router: only VC0/VC2 are ever-on; others announce
      send_packet(p, v, dx, dy, len, 1'b1);
      repeat ($urandom % 6) @(negedge clk);
    end
  endtask

  // ---------------------------------------------------------- sinks
  int cur_pid [NUM_PORTS][NUM_VC];
  int flits_out = 0;

  always @(posedge clk) begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      in_cred[o].credit <= '0;
      if (rst_n && out_flit[o].valid) begin
        flit_t f;
        int pid, seq, v;
        f   = out_flit[o];
        v   = int'(f.vc);
        pid = int'(f.data[127:96]);
        seq = int'(f.data[95:64]);
        in_cred[o].credit[v] <= 1'b1;
        flits_out++;
        check(pkt_port.exists(pid), "flit of a known packet");
        if (pkt_port.exists(pid)) begin
          check(pkt_port[pid] == o, $sformatf("pkt %0d left on port %0d, expected %0d", pid, o, pkt_port[pid]));
          check(pkt_vc[pid] == v, "VC kept");
          check(seq == pkt_seen[pid], "flits in order");
          pkt_seen[pid]++;
          if (f.head) begin
            check(cur_pid[o][v] == 0, "no interleaving on an output VC");
            check(int'(f.data[6:4]) == pkt_next[pid], "look-ahead port in the header");
            cur_pid[o][v] = pid;
          end else begin
            check(cur_pid[o][v] == pid, "body follows its head");
          end
          check(f.tail == (seq == pkt_len[pid] - 1), "tail marks the last flit");
          if (f.tail) cur_pid[o][v] = 0;
        end
      end
    end
  end

  // ---------------------------------------------------------- mechanism counters
  int n_wakeups = 0, n_sleeps = 0, n_stall = 0;
  logic [34:0] dom_prev;
  always @(posedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < 35; k++) begin
        if (dom_on[k] && !dom_prev[k]) n_wakeups++;
        if (!dom_on[k] && dom_prev[k]) n_sleeps++;
      end
      if (pg_stall) n_stall++;
    end
    dom_prev <= dom_on;
  end

  // ---------------------------------------------------------- latency probe
  task automatic latency(input bit warm, output int cyc);
    int pid;
    pid = next_pid;
    // local VC0 is ever-on: write straight away
    if (warm) begin
      in_wake[P_EAST].hop1.vc   = '0;
    end
    in_flit[P_LOCAL] = mkflit(pid, 0, 1, 0, 3, 1, 0);
    pkt_port[pid] = ref_port(RX, RY, 3, 1);
    pkt_len[pid]  = 1;
    pkt_vc[pid]   = 0;
    pkt_next[pid] = ref_next(pkt_port[pid], 3, 1);
    pkt_seen[pid] = 0;
    next_pid++;
    credits[P_LOCAL][0]--;
    @(negedge clk);
    in_flit[P_LOCAL] = '0;
    cyc = 1;
    while (!out_flit[P_EAST].valid && cyc < 50) begin
      @(negedge clk);
      cyc++;
    end
  endtask

  initial begin
    int c_cold, c_warm;
    for (int p = 0; p < NUM_PORTS; p++) begin
      in_flit[p] = '0;
      in_wake[p] = '0;
      in_cred[p] = '0;
      for (int v = 0; v < NUM_VC; v++) begin
        in_cred[p].slot_ready[v] = '1;
        credits[p][v] = D;
        cur_pid[p][v] = 0;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(dom_on == 35'b101, $sformatf("after reset only ever-on buffers powered: %b", dom_on));

    // cold: crossbar, VC mux and output latch of the path are asleep
    latency(1'b0, c_cold);
    check(c_cold == 4 + LAT, $sformatf("cold single-flit latency %0d cycles, expected 3 + WAKEUP_LAT", c_cold - 1));
    repeat (10) @(negedge clk);
    // warm: announce the output port first (as a look-ahead wakeup would)
    in_wake[P_WEST].hop1.port[P_EAST] = 1'b1;
    in_wake[P_WEST].hop1.port[P_LOCAL] = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    // VC mux of the local port is woken by the write itself; pre-wake it via
    // an ever-on buffer announcement
    in_wake[P_LOCAL].hop1.vc[0] = 1'b1;
    repeat (LAT + 3) @(negedge clk);
    latency(1'b1, c_warm);
    check(c_warm == 4, $sformatf("warm single-flit latency %0d cycles, expected 3 router cycles", c_warm - 1));
    in_wake[P_WEST].hop1.port[P_EAST] = 1'b0;
    in_wake[P_LOCAL].hop1.vc[0] = 1'b0;
    repeat (10) @(negedge clk);

    // random traffic from all five ports
    fork
      sender(0);
      sender(1);
      sender(2);
      sender(3);
      sender(4);
    join
    repeat (60) @(negedge clk);
    foreach (pkt_len[pid]) check(pkt_seen[pid] == pkt_len[pid], $sformatf("packet %0d complete", pid));
    check(dom_on == 35'b101, $sformatf("drained router asleep except ever-on buffers: %b", dom_on));
    check(n_wakeups > 0, "domains woke up");
    check(n_sleeps > 0, "domains went to sleep");
    check(n_stall > 0, "a flit waited for a waking domain");
    $display("router: %0d flits, %0d domain wakeups, %0d sleeps, %0d power-stall cycles, latency cold %0d warm %0d",
             flits_out, n_wakeups, n_sleeps, n_stall, c_cold - 1, c_warm - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
