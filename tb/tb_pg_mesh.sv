// tb_pg_mesh: end-to-end test of the 4x4 mesh of power-gated routers at its
// default configuration (look-ahead wakeup with CPU ever-on buffers, level-3
// gating, 3-cycle wakeup, 4 VCs of 4 flits, 128-bit flits).
//
// Every node gets a network-interface model. It injects packets (VC0, VC1
// and VC3 messages of one flit, VC2 replies of five flits: a head and a
// 64-byte line), asks for a wakeup of its local input buffer, and writes a
// flit whenever it has a credit and the buffer entry is powered. Ejected
// flits are taken at once and their credits returned.
//
// Phases:
//   1. an isolated packet from a CPU node across the mesh through a cold
//      network: with look-ahead wakeup only its first router makes it wait
//      (WAKEUP_LAT cycles); every router after that is woken in time, so the
//      latency is 4 cycles per router plus that one wait;
//   2. uniform random traffic from all 16 nodes;
//   3. a hot spot (all nodes to one L2 node), which runs out of credits.
// Checks: every packet reaches its destination intact, in order and not
// interleaved with another on its VC; the head arrives with the local port
// as look-ahead port; once drained, every gated domain sleeps except the
// ever-on VC0/VC2 local buffers of the 8 CPU routers. Counted, each must
// happen: domain wakeups and sleeps, flits waiting for a waking domain,
// two-hop look-ahead wakeup requests, writes into ever-on buffers that
// needed no wakeup, and injections held back for lack of credits.
module tb_pg_mesh;
  import pg_pkg::*;

  localparam int MX = 4, MY = 4, N = MX * MY;
  localparam int D = 4;
  localparam logic [N-1:0] CPUS = 16'hD18B;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  flit_t       ni_in_flit  [N];
  wake_t       ni_in_wake  [N];
  link_cred_t  ni_out_cred [N];
  flit_t       ni_out_flit [N];
  link_cred_t  ni_in_cred  [N];
  logic [34:0] dom_on      [N];
  logic [34:0] dom_waking  [N];
  logic        pg_stall    [N];

  pg_mesh dut (
    .clk, .rst_n, .ni_in_flit, .ni_in_wake, .ni_out_cred, .ni_out_flit, .ni_in_cred,
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

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------ packets
  int  pkt_dst [int];
  int  pkt_len [int];
  int  pkt_vc  [int];
  int  pkt_seen[int];
  longint pkt_t0 [int];
  longint pkt_lat[int];
  int  next_pid = 1;

  // ------------------------------------------------------------ counters
  int n_wake = 0, n_sleep = 0, n_pstall = 0, n_la2 = 0, n_everon = 0, n_credstall = 0;
  int n_flits = 0;

  // ------------------------------------------------------------ NI senders
  int credits [N][NUM_VC];
  always @(posedge clk)
    for (int n = 0; n < N; n++)
      for (int v = 0; v < NUM_VC; v++)
        if (ni_out_cred[n].credit[v]) credits[n][v]++;

  // one injection at a time per node
  semaphore lock [N];

  task automatic send_packet(int src, int dst, int v, output int pid_o);
    int pid, len;
    bit asked;
    lock[src].get(1);
    pid = next_pid++;
    len = (v == 2) ? 5 : 1;
    pkt_dst[pid] = dst;
    pkt_len[pid] = len;
    pkt_vc[pid]  = v;
    pkt_seen[pid] = 0;
    asked = 1'b0;
    for (int s = 0; s < len; s++) begin
      flit_t f;
      // a flit that finds its entry powered before any request counts as an
      // ever-on (no first-hop wait) injection
      if (s == 0 && CPUS[src] && (v == 0 || v == 2)) begin
        if (ni_out_cred[src].slot_ready[v][0]) n_everon++;
      end
      ni_in_wake[src].vc[v] = 1'b1;
      while (!(credits[src][v] > 0 && ni_out_cred[src].slot_ready[v][0])) begin
        if (credits[src][v] == 0) n_credstall++;
        @(negedge clk);
      end
      f       = '0;
      f.valid = 1'b1;
      f.vc    = VC_W'(v);
      f.head  = (s == 0);
      f.tail  = (s == len - 1);
      f.data  = flit_data_t'({$urandom, $urandom, $urandom, $urandom});
      f.data[127:96] = pid;
      f.data[95:64]  = s;
      f.data[1:0]    = 2'(dst % MX);
      f.data[3:2]    = 2'(dst / MX);
      f.data[6:4]    = 3'($urandom);    // ignored at the local port
      ni_in_flit[src] = f;
      credits[src][v]--;
      if (s == 0) pkt_t0[pid] = cycle + 1;  // written at the coming edge
      @(negedge clk);
      ni_in_flit[src] = '0;
    end
    ni_in_wake[src].vc[v] = 1'b0;
    lock[src].put(1);
    pid_o = pid;
  endtask

  // ------------------------------------------------------------ NI sinks
  int cur_pid [N][NUM_VC];
  always @(posedge clk) begin
    for (int n = 0; n < N; n++) begin
      ni_in_cred[n].credit <= '0;
      if (rst_n && ni_out_flit[n].valid) begin
        flit_t f;
        int pid, seq, v;
        f   = ni_out_flit[n];
        v   = int'(f.vc);
        pid = int'(f.data[127:96]);
        seq = int'(f.data[95:64]);
        ni_in_cred[n].credit[v] <= 1'b1;
        n_flits++;
        check(pkt_dst.exists(pid), "flit of a known packet");
        if (pkt_dst.exists(pid)) begin
          check(pkt_dst[pid] == n, $sformatf("packet %0d ejected at node %0d, expected %0d", pid, n, pkt_dst[pid]));
          check(pkt_vc[pid] == v, "VC kept end to end");
          check(seq == pkt_seen[pid], "flits in order");
          check(f.data[1:0] == 2'(n % MX) || !f.head, "header destination intact");
          pkt_seen[pid]++;
          if (f.head) begin
            check(cur_pid[n][v] == 0, "no interleaving on a VC");
            check(f.data[6:4] == P_LOCAL, "look-ahead port at the last hop is local");
            cur_pid[n][v] = pid;
            pkt_lat[pid] = cycle - pkt_t0[pid];
          end else begin
            check(cur_pid[n][v] == pid, "body follows its head");
          end
          if (f.tail) cur_pid[n][v] = 0;
        end
      end
    end
  end

  // ------------------------------------------------------------ mechanisms
  logic [34:0] dom_prev [N];
  always @(posedge clk) begin
    if (rst_n) begin
      for (int n = 0; n < N; n++) begin
        for (int k = 0; k < 35; k++) begin
          if (dom_on[n][k] && !dom_prev[n][k]) n_wake++;
          if (!dom_on[n][k] && dom_prev[n][k]) n_sleep++;
        end
        if (pg_stall[n]) n_pstall++;
      end
    end
    dom_prev <= dom_on;
  end

  // two-hop look-ahead requests seen on the links
  always @(posedge clk) begin
    if (rst_n) begin
      for (int n = 0; n < N; n++)
        for (int p = 1; p < NUM_PORTS; p++)
          for (int d = 1; d < NUM_PORTS; d++)
            if (dut.r_out_wake[n][p].hop2[d] != '0) n_la2++;
    end
  end

  function automatic int hops(int s, int d);
    int dx, dy;
    dx = (s % MX > d % MX) ? s % MX - d % MX : d % MX - s % MX;
    dy = (s / MX > d / MX) ? s / MX - d / MX : d / MX - s / MX;
    return dx + dy;
  endfunction

  task automatic wait_drained();
    bit done;
    int guard;
    guard = 0;
    do begin
      @(negedge clk);
      done = 1'b1;
      foreach (pkt_len[pid]) if (pkt_seen[pid] != pkt_len[pid]) done = 1'b0;
      guard++;
    end while (!done && guard < 20000);
    repeat (30) @(negedge clk);
  endtask

  task automatic traffic(int src, int npk, int hot);
    if (src == hot) return;
    for (int i = 0; i < npk; i++) begin
      int dst, v, pid;
      do dst = (hot >= 0) ? hot : int'($urandom % N); while (dst == src);
      v = $urandom % NUM_VC;
      send_packet(src, dst, v, pid);
      repeat ((hot >= 0) ? 0 : $urandom % 12) @(negedge clk);
    end
  endtask

  initial begin
    int pid_cold;
    longint h;
    for (int n = 0; n < N; n++) begin
      lock[n] = new(1);
      ni_in_flit[n] = '0;
      ni_in_wake[n] = '0;
      ni_in_cred[n] = '0;
      for (int v = 0; v < NUM_VC; v++) begin
        ni_in_cred[n].slot_ready[v] = '1;
        credits[n][v] = D;
        cur_pid[n][v] = 0;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    for (int n = 0; n < N; n++)
      check(dom_on[n] == (CPUS[n] ? 35'b101 : 35'b0), "after reset only ever-on buffers are powered");

    // phase 1: one request from the CPU at (0,0) to the L2 node at (3,3)
    h = longint'(hops(0, 15));
    send_packet(0, 15, 0, pid_cold);
    wait_drained();
    $display("isolated packet over %0d hops: %0d cycles through a cold network, no-wait latency %0d",
             h, pkt_lat[pid_cold], 4 * (h + 1));
    check(pkt_lat[pid_cold] >= 4 * (h + 1), "latency not below 4 cycles per router");
    check(pkt_lat[pid_cold] <= 4 * (h + 1) + 3, "look-ahead hides all but the first-hop wakeup");

    $display("phase 1 done at cycle %0d", cycle);
    // phase 2: uniform random traffic
    fork
      begin
        for (int n = 0; n < N; n++) begin
          automatic int nn = n;
          fork
            traffic(nn, 25, -1);
          join_none
        end
        wait fork;
      end
    join
    wait_drained();

    $display("phase 2 done at cycle %0d", cycle);
    // phase 3: hot spot towards the L2 node at (1,2)
    fork
      begin
        for (int n = 0; n < N; n++) begin
          automatic int nn = n;
          fork
            traffic(nn, 6, 9);
          join_none
        end
        wait fork;
      end
    join
    wait_drained();

    foreach (pkt_len[pid]) check(pkt_seen[pid] == pkt_len[pid], $sformatf("packet %0d delivered", pid));
    for (int n = 0; n < N; n++)
      check(dom_on[n] == (CPUS[n] ? 35'b101 : 35'b0),
            $sformatf("node %0d drained: domains %b", n, dom_on[n]));
    check(n_wake > 0,      "domains woke up");
    check(n_sleep > 0,     "domains went to sleep");
    check(n_pstall > 0,    "a flit waited for a waking domain");
    check(n_la2 > 0,       "two-hop look-ahead wakeups were sent");
    check(n_everon > 0,    "ever-on buffers took flits without a wakeup");
    check(n_credstall > 0, "injection waited for credits");
    $display("mesh: %0d packets, %0d flits; wakeups %0d, sleeps %0d, power-stall cycles %0d, look-ahead requests %0d, ever-on injections %0d, credit waits %0d",
             next_pid - 1, n_flits, n_wake, n_sleep, n_pstall, n_la2, n_everon, n_credstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
