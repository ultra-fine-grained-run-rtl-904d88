// tb_pg_out_latch: the output latch captures a flit at the clock edge and
// shows it for one cycle, writes the look-ahead port into head flits only,
// is clamped while asleep, wakes WAKEUP_LAT+1 cycles after a request, stays
// on while it holds a flit and sleeps afterwards.
module tb_pg_out_latch;
  import pg_pkg::*;
  localparam int LAT = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic wake = 1'b0, on, wk;
  flit_t d, q;
  logic [PORT_W-1:0] la;
  int checks = 0, failures = 0;

  pg_out_latch #(.WAKEUP_LAT(LAT)) dut (.clk, .rst_n, .wake_req(wake), .d, .la_port(la),
                                        .q, .pwr_on(on), .waking(wk));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int n;
    flit_t exp;
    d = '0;
    la = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!on && q == '0, "asleep after reset");
    wake = 1'b1;
    n = 0;
    do begin
      @(negedge clk);
      n++;
    end while (!on && n < 20);
    check(n == LAT + 1, $sformatf("woke in %0d cycles", n));
    for (int i = 0; i < 200; i++) begin
      d       = '0;
      d.valid = 1'($urandom);
      d.vc    = VC_W'($urandom);
      d.head  = 1'($urandom);
      d.tail  = 1'($urandom);
      d.data  = flit_data_t'({$urandom, $urandom, $urandom, $urandom});
      la      = PORT_W'($urandom % 5);
      exp     = d;
      if (d.valid && d.head) exp.data[6:4] = la;
      @(negedge clk);
      check(q == exp, "latched flit, look-ahead port in head");
    end
    d = '0;
    wake = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check(!on && q == '0, "asleep after the last flit left");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
