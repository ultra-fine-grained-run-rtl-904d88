// tb_pg_vc_buffer: checks the power-gated VC buffer in its three forms.
//   u_whole : one domain for the buffer. It must sleep after reset, wake
//             WAKEUP_LAT+1 cycles after wake_req, keep FIFO order against a
//             queue model with random writes and pops, return one credit per
//             pop, and go back to sleep once empty and unrequested.
//   u_win   : active buffer window of 2. The two entries ahead of the write
//             pointer are powered without any request and the others sleep;
//             after writing, the window moves on and the newly entered entry
//             needs WAKEUP_LAT+1 cycles before it is ready.
//   u_ever  : ever-on buffer, powered from reset.
module tb_pg_vc_buffer;
  import pg_pkg::*;
  localparam int LAT = 3;
  localparam int D   = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  flit_t wr_a, wr_b;
  logic  wake_a = 1'b0, wake_b = 1'b0, pop_a = 1'b0, pop_b = 1'b0;
  logic  fv_a, fv_b, cred_a, cred_b, on_a, on_b, wk_a, wk_b, on_e;
  flit_t front_a, dout_a, front_b, dout_b;
  logic [MAX_DEPTH-1:0] sr_a, sr_b;
  logic [2:0] eon_a, eon_b;

  pg_vc_buffer #(.DEPTH(D), .WAKEUP_LAT(LAT), .WINDOW(0), .VC_ID(2'd1)) u_whole (
    .clk, .rst_n, .wr(wr_a), .wake_req(wake_a), .pop(pop_a), .front_valid(fv_a),
    .front(front_a), .dout(dout_a), .credit(cred_a), .slot_ready(sr_a),
    .pwr_on(on_a), .waking(wk_a), .entries_on(eon_a));
  pg_vc_buffer #(.DEPTH(D), .WAKEUP_LAT(LAT), .WINDOW(2), .VC_ID(2'd2)) u_win (
    .clk, .rst_n, .wr(wr_b), .wake_req(wake_b), .pop(pop_b), .front_valid(fv_b),
    .front(front_b), .dout(dout_b), .credit(cred_b), .slot_ready(sr_b),
    .pwr_on(on_b), .waking(wk_b), .entries_on(eon_b));
  pg_vc_buffer #(.DEPTH(D), .WAKEUP_LAT(LAT), .EVER_ON(1'b1)) u_ever (
    .clk, .rst_n, .wr('0), .wake_req(1'b0), .pop(1'b0), .front_valid(), .front(),
    .dout(), .credit(), .slot_ready(), .pwr_on(on_e), .waking(), .entries_on());

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic flit_t mk(input logic h, input logic t);
    flit_t f;
    f       = '0;
    f.valid = 1'b1;
    f.head  = h;
    f.tail  = t;
    f.data  = flit_data_t'({$urandom, $urandom, $urandom, $urandom});
    return f;
  endfunction

  flit_t q[$];

  initial begin
    int n, cnt, pend_pop;
    flit_t exp, last_pop;
    wr_a = '0;
    wr_b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!on_a && sr_a == '0, "whole buffer asleep after reset");
    check(on_e, "ever-on buffer powered");

    // wake the whole buffer: ready WAKEUP_LAT+1 cycles after the request
    wake_a = 1'b1;
    n = 0;
    do begin
      @(negedge clk);
      n++;
    end while (!on_a && n < 20);
    check(n == LAT + 1, $sformatf("whole buffer woke in %0d cycles", n));
    check(sr_a[D-1:0] == '1 && eon_a == 3'(D), "all entries ready");

    // random traffic against a queue model
    cnt = 0;
    pend_pop = 0;
    for (int i = 0; i < 400; i++) begin
      logic do_w, do_p;
      do_w = ($urandom % 3 != 0) && (q.size() < D);
      do_p = ($urandom % 2 == 0) && (q.size() > 0);
      check(fv_a == (q.size() > 0), "front_valid matches occupancy");
      if (q.size() > 0) begin
        check(front_a.data == q[0].data && front_a.head == q[0].head &&
              front_a.tail == q[0].tail && front_a.vc == 2'd1, "front flit in order");
      end
      wr_a = do_w ? mk(1'($urandom), 1'($urandom)) : '0;
      pop_a = do_p;
      if (do_p) last_pop = q.pop_front();
      if (do_w) q.push_back(wr_a);
      @(negedge clk);
      check(cred_a == do_p, "credit pulse after pop");
      if (do_p) check(dout_a.valid && dout_a.data == last_pop.data, "popped flit in dout");
      else      check(!dout_a.valid, "dout idle without pop");
    end
    wr_a = '0;
    pop_a = 1'b0;
    // drain and let it sleep
    while (q.size() > 0) begin
      pop_a = 1'b1;
      void'(q.pop_front());
      @(negedge clk);
    end
    pop_a = 1'b0;
    wake_a = 1'b0;
    repeat (2) @(negedge clk);
    check(!on_a && !fv_a, "whole buffer asleep once empty");

    // ------------------------------------------------ active buffer window
    check(eon_b == 3'd2, $sformatf("window: %0d entries powered, expected 2", eon_b));
    check(sr_b[1:0] == 2'b11 && sr_b[3:2] == 2'b00, "window: two slots ready");
    // a two-flit packet goes in with no wakeup request and no wait
    wr_b = mk(1'b1, 1'b0);
    @(negedge clk);
    wr_b = mk(1'b0, 1'b1);
    @(negedge clk);
    wr_b = '0;
    check(fv_b && front_b.head, "window: packet stored without waiting");
    check(sr_b[0] == 1'b0, "window: entry newly in the window is still waking");
    n = 0;
    while (!sr_b[0] && n < 20) begin
      @(negedge clk);
      n++;
    end
    check(n == LAT, $sformatf("window: next entry ready after %0d more cycles", n));
    // read the packet out; occupied entries free up and the window follows
    pop_b = 1'b1;
    @(negedge clk);
    check(dout_b.valid && dout_b.head, "window: head popped");
    @(negedge clk);
    pop_b = 1'b0;
    check(dout_b.valid && dout_b.tail, "window: tail popped");
    repeat (LAT + 3) @(negedge clk);
    check(eon_b == 3'd2, $sformatf("window: back to 2 entries powered (%0d)", eon_b));
    // explicit wakeup powers the whole buffer
    wake_b = 1'b1;
    repeat (LAT + 2) @(negedge clk);
    check(eon_b == 3'(D), "window: wake request powers every entry");
    wake_b = 1'b0;
    repeat (2) @(negedge clk);
    check(eon_b == 3'd2, "window: back to the window after the request");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
