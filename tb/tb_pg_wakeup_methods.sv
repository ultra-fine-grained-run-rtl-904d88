// tb_pg_wakeup_methods: compares the three early-wakeup methods on the same
// traffic.
//
// Three 2x2 meshes are built side by side, identical except for
// EARLY_WAKEUP: look-ahead, look-ahead with CPU ever-on buffers, and
// look-ahead with an active buffer window. CPUs sit at (0,0) and (1,0).
// Every node runs the same precomputed packet list in all three meshes:
// - VC0 requests of one flit from the CPU nodes;
// - VC2 replies of five flits from the cache nodes;
// - a few VC1 and VC3 messages of one flit.
// Packets are released at random gaps that are long enough for the network
// to go back to sleep between many of them.
//
// Checks per mesh: every packet arrives at its destination, complete and in
// order. Latency runs from the cycle a packet is ready to go (its network
// interface raises the wakeup of the local buffer) to the arrival of its
// head, so the first-hop wait for a sleeping local buffer is part of it.
// Across the meshes, the trends this design is built to show:
// - the ever-on buffers (VC0 and VC2 at the CPUs) remove that first-hop
//   wait for the CPUs' requests, so the wait and the mean latency fall
//   compared with plain look-ahead;
// - the buffer window does the same for every short packet;
// - both pay for it with more powered domain-cycles (leakage).
// The printed numbers per mesh are mean head latency, first-hop wait cycles
// (a packet ready but its local buffer entry still asleep), router
// power-stall cycles and powered domain-cycles.
module tb_pg_wakeup_methods;
  import pg_pkg::*;

  localparam int MX = 2, MY = 2, N = MX * MY;
  localparam int NM = 3;                 // meshes: LA, LA + ever-on, LA + window
  localparam int PK = 40;                // packets per node
  localparam int D = 4;
  localparam logic [N-1:0] CPUS = 4'b0011;
  localparam early_wakeup_e EW [NM] = '{EW_LOOKAHEAD, EW_LA_EVERON, EW_LA_WINDOW};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // --------------------------------------------------------- packet list
  int pk_rel [N][PK];   // release cycle
  int pk_dst [N][PK];
  int pk_vc  [N][PK];
  int pk_len [N][PK];

  initial begin
    for (int n = 0; n < N; n++) begin
      int t;
      t = 20;
      for (int i = 0; i < PK; i++) begin
        int r;
        t += 2 + int'($urandom % 30);
        pk_rel[n][i] = t;
        do pk_dst[n][i] = int'($urandom % N); while (pk_dst[n][i] == n);
        r = int'($urandom % 8);
        if (r == 0)          pk_vc[n][i] = 1;
        else if (r == 1)     pk_vc[n][i] = 3;
        else if (CPUS[n])    pk_vc[n][i] = 0;
        else                 pk_vc[n][i] = 2;
        pk_len[n][i] = (pk_vc[n][i] == 2) ? 5 : 1;
      end
    end
  end

  // --------------------------------------------------------- per-mesh results
  longint lat_sum [NM];
  longint heads   [NM];
  int     flits   [NM];
  longint stalls  [NM];
  longint ni_wait [NM];
  longint on_cyc  [NM];
  int     bad     [NM];
  bit     sent_all[NM];

  for (genvar k = 0; k < NM; k++) begin : g_m
    flit_t       ni_in_flit  [N];
    wake_t       ni_in_wake  [N];
    link_cred_t  ni_out_cred [N];
    flit_t       ni_out_flit [N];
    link_cred_t  ni_in_cred  [N];
    logic [34:0] dom_on      [N];
    logic [34:0] dom_waking  [N];
    logic        pg_stall    [N];

    pg_mesh #(.MESH_X(MX), .MESH_Y(MY), .EARLY_WAKEUP(EW[k]), .CPU_MASK(CPUS)) u_mesh (
      .clk, .rst_n, .ni_in_flit, .ni_in_wake, .ni_out_cred, .ni_out_flit, .ni_in_cred,
      .dom_on, .dom_waking, .pg_stall
    );

    int     credits [N][NUM_VC];
    int     pi      [N];   // next packet of each node
    int     si      [N];   // next flit of that packet
    bit     started [N];   // the current packet is ready to go
    longint t0      [N][PK];
    int     rx_pi   [N][NUM_VC];   // packet being received per node and VC: src*PK+idx
    int     rx_seq  [N][NUM_VC];

    // senders
    initial begin
      for (int n = 0; n < N; n++) begin
        ni_in_flit[n] = '0;
        ni_in_wake[n] = '0;
        ni_in_cred[n] = '0;
        pi[n] = 0;
        si[n] = 0;
        started[n] = 1'b0;
        for (int v = 0; v < NUM_VC; v++) begin
          credits[n][v] = D;
          ni_in_cred[n].slot_ready[v] = '1;
          rx_pi[n][v] = -1;
          rx_seq[n][v] = 0;
        end
      end
      lat_sum[k] = 0; heads[k] = 0; flits[k] = 0; stalls[k] = 0; ni_wait[k] = 0; on_cyc[k] = 0; bad[k] = 0;
      sent_all[k] = 1'b0;
    end

    always @(posedge clk)
      for (int n = 0; n < N; n++)
        for (int v = 0; v < NUM_VC; v++)
          if (ni_out_cred[n].credit[v]) credits[n][v]++;

    always @(negedge clk) begin
      if (rst_n) begin
        bit all;
        all = 1'b1;
        for (int n = 0; n < N; n++) begin
          ni_in_flit[n] = '0;
          ni_in_wake[n] = '0;
          if (pi[n] < PK) begin
            all = 1'b0;
            if (cycle >= longint'(pk_rel[n][pi[n]])) begin
              int i, v;
              i = pi[n];
              v = pk_vc[n][i];
              ni_in_wake[n].vc[v] = 1'b1;
              if (!started[n]) begin
                t0[n][i]   = cycle + 1;
                started[n] = 1'b1;
              end
              if (credits[n][v] > 0 && !ni_out_cred[n].slot_ready[v][0]) ni_wait[k]++;
              if (credits[n][v] > 0 && ni_out_cred[n].slot_ready[v][0]) begin
                flit_t f;
                f       = '0;
                f.valid = 1'b1;
                f.vc    = VC_W'(v);
                f.head  = (si[n] == 0);
                f.tail  = (si[n] == pk_len[n][i] - 1);
                f.data  = flit_data_t'({$urandom, $urandom, $urandom, $urandom});
                f.data[127:96] = n * PK + i;
                f.data[95:64]  = si[n];
                f.data[1:0]    = 2'(pk_dst[n][i] % MX);
                f.data[3:2]    = 2'(pk_dst[n][i] / MX);
                ni_in_flit[n] = f;
                credits[n][v]--;
                if (si[n] == pk_len[n][i] - 1) begin
                  si[n] = 0;
                  pi[n]++;
                  started[n] = 1'b0;
                end else begin
                  si[n]++;
                end
              end
            end
          end
        end
        sent_all[k] = all;
      end
    end

    // sinks and meters
    always @(posedge clk) begin
      for (int n = 0; n < N; n++) begin
        ni_in_cred[n].credit <= '0;
        if (rst_n) begin
          for (int b = 0; b < 35; b++) on_cyc[k] += longint'(dom_on[n][b]);
          if (pg_stall[n]) stalls[k]++;
        end
        if (rst_n && ni_out_flit[n].valid) begin
          int id, src, idx, seq, v;
          v   = int'(ni_out_flit[n].vc);
          id  = int'(ni_out_flit[n].data[127:96]);
          seq = int'(ni_out_flit[n].data[95:64]);
          src = id / PK;
          idx = id % PK;
          ni_in_cred[n].credit[v] <= 1'b1;
          flits[k]++;
          if (src >= N || pk_dst[src][idx] != n || pk_vc[src][idx] != v) begin
            bad[k]++;
          end else begin
            if (ni_out_flit[n].head) begin
              if (rx_pi[n][v] != -1 || seq != 0) bad[k]++;
              rx_pi[n][v] = id;
              rx_seq[n][v] = 0;
              lat_sum[k] += cycle - t0[src][idx];
              heads[k]++;
            end else if (rx_pi[n][v] != id || seq != rx_seq[n][v]) begin
              bad[k]++;
            end
            rx_seq[n][v]++;
            if (ni_out_flit[n].tail) begin
              if (rx_seq[n][v] != pk_len[src][idx]) bad[k]++;
              rx_pi[n][v] = -1;
            end
          end
        end
      end
    end
  end

  int total_flits;
  initial begin
    total_flits = 0;
    repeat (3) @(negedge clk);
    for (int n = 0; n < N; n++)
      for (int i = 0; i < PK; i++) total_flits += pk_len[n][i];
    rst_n = 1'b1;
    wait (sent_all[0] && sent_all[1] && sent_all[2]);
    repeat (200) @(negedge clk);
    for (int k = 0; k < NM; k++) begin
      check(bad[k] == 0, $sformatf("mesh %0d: packets delivered correctly (%0d errors)", k, bad[k]));
      check(flits[k] == total_flits, $sformatf("mesh %0d: %0d of %0d flits delivered", k, flits[k], total_flits));
      check(heads[k] == N * PK, $sformatf("mesh %0d: all packets delivered", k));
      $display("%-24s mean head latency %0d.%02d cycles, first-hop wait cycles %0d, router power-stall cycles %0d, powered domain-cycles %0d",
               EW[k].name(), lat_sum[k] / heads[k], (lat_sum[k] * 100 / heads[k]) % 100, ni_wait[k], stalls[k], on_cyc[k]);
    end
    check(stalls[0] > 0, "plain look-ahead: flits wait in the routers for waking domains");
    check(ni_wait[1] < ni_wait[0], "ever-on buffers cut the first-hop wait of plain look-ahead");
    check(lat_sum[1] < lat_sum[0], "ever-on buffers cut the mean latency of plain look-ahead");
    check(ni_wait[2] < ni_wait[0], "the buffer window cuts the first-hop wait of plain look-ahead");
    check(lat_sum[2] < lat_sum[0], "the buffer window cuts the mean latency of plain look-ahead");
    check(on_cyc[1] > on_cyc[0], "ever-on buffers cost powered domain-cycles");
    check(on_cyc[2] > on_cyc[0], "the buffer window costs powered domain-cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
