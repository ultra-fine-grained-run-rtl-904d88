// tb_pg_xbar_mux: the crossbar multiplexer of one output port passes in[sel] while powered, shows an
// invalid flit while asleep, wakes WAKEUP_LAT+1 cycles after a request and
// sleeps when neither requested nor busy.
module tb_pg_xbar_mux;
  import pg_pkg::*;
  localparam int LAT = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic wake = 1'b0, busy = 1'b0, on, wk;
  flit_t in [NUM_PORTS];
  logic [PORT_W-1:0] sel;
  flit_t out;
  int checks = 0, failures = 0;

  pg_xbar_mux #(.WAKEUP_LAT(LAT)) dut (.clk, .rst_n, .wake_req(wake), .busy, .in, .sel,
                                     .out, .pwr_on(on), .waking(wk));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic randomize_inputs();
    for (int v = 0; v < NUM_PORTS; v++) begin
      in[v]       = '0;
      in[v].valid = 1'b1;
      in[v].vc    = VC_W'(v % NUM_VC);
      in[v].data  = flit_data_t'({$urandom, $urandom, $urandom, $urandom});
    end
    sel = PORT_W'($urandom % NUM_PORTS);
  endtask

  initial begin
    int n;
    randomize_inputs();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!on && out == '0, "asleep after reset, output clamped");
    wake = 1'b1;
    n = 0;
    do begin
      @(negedge clk);
      n++;
      if (!on) check(out == '0, "clamped while waking");
    end while (!on && n < 20);
    check(n == LAT + 1, $sformatf("woke in %0d cycles", n));
    for (int i = 0; i < 100; i++) begin
      randomize_inputs();
      #1;
      check(out == in[sel], "out = in[sel] while powered");
      @(negedge clk);
    end
    wake = 1'b0;
    busy = 1'b1;
    @(negedge clk);
    check(on, "on while busy");
    busy = 1'b0;
    @(negedge clk);
    check(!on && out == '0, "asleep and clamped after use");
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
