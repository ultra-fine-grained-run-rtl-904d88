// tb_pg_domain_ctrl: checks the power-domain controller.
// A request must give 'on' exactly WAKEUP_LAT + 1 cycles later, the domain
// must stay on while requested or busy and go off the cycle after both drop.
// Ungated and ever-on domains must be on from reset. Two more controllers
// check the exact timing for 2- and 4-cycle wakeup latencies as well.
module tb_pg_domain_ctrl;
  localparam int LAT = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0, busy = 1'b0;
  logic sw_en, on, waking;
  logic on_ug, on_eo;
  logic req_x = 1'b0;
  logic on_2, on_4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pg_domain_ctrl #(.WAKEUP_LAT(LAT)) dut (.clk, .rst_n, .req, .busy, .sw_en, .on, .waking);
  pg_domain_ctrl #(.WAKEUP_LAT(LAT), .GATED(1'b0)) dut_ug
    (.clk, .rst_n, .req(1'b0), .busy(1'b0), .sw_en(), .on(on_ug), .waking());
  pg_domain_ctrl #(.WAKEUP_LAT(LAT), .EVER_ON(1'b1)) dut_eo
    (.clk, .rst_n, .req(1'b0), .busy(1'b0), .sw_en(), .on(on_eo), .waking());

  pg_domain_ctrl #(.WAKEUP_LAT(2)) dut_2
    (.clk, .rst_n, .req(req_x), .busy(1'b0), .sw_en(), .on(on_2), .waking());
  pg_domain_ctrl #(.WAKEUP_LAT(4)) dut_4
    (.clk, .rst_n, .req(req_x), .busy(1'b0), .sw_en(), .on(on_4), .waking());

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Request for one cycle, then count cycles until 'on'.
  task automatic wake_and_measure(output int cycles);
    @(negedge clk);
    req = 1'b1;
    @(negedge clk);
    req = 1'b0;
    cycles = 1;
    while (!on && cycles < 20) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    int c;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!on && !sw_en, "gated domain asleep after reset");
    check(on_ug, "ungated domain on");
    check(on_eo, "ever-on domain on");

    // Wakeup latency: req in cycle c -> on in cycle c + LAT + 1.
    wake_and_measure(c);
    check(c == LAT + 1, $sformatf("wakeup took %0d cycles, expected %0d", c, LAT + 1));
    // req gone, not busy: domain goes off after one on cycle.
    @(negedge clk);
    check(!on && !sw_en, "off after the packet left");

    // Stay on while busy.
    busy = 1'b1;
    wake_and_measure(c);
    check(c == LAT + 1, "second wakeup latency");
    repeat (5) begin
      @(negedge clk);
      check(on, "stays on while busy");
    end
    busy = 1'b0;
    @(negedge clk);
    check(!on, "off when busy drops");

    // Waking is visible, sw_en closed during waking.
    @(negedge clk);
    req = 1'b1;
    @(negedge clk);
    check(waking && sw_en && !on, "waking with switch closed");
    // held request keeps it on
    repeat (LAT + 4) @(negedge clk);
    check(on, "on while requested");
    req = 1'b0;
    @(negedge clk);
    check(!on, "off after request drop");
    check(on_ug && on_eo, "always-on domains still on");

    // Other wakeup latencies: a one-cycle request, then the cycle each
    // controller turns on.
    begin
      int c2, c4;
      c2 = 0;
      c4 = 0;
      check(!on_2 && !on_4, "2- and 4-cycle domains asleep");
      @(negedge clk);
      req_x = 1'b1;
      @(negedge clk);
      req_x = 1'b0;
      for (int i = 1; i <= 8; i++) begin
        if (on_2 && c2 == 0) c2 = i;
        if (on_4 && c4 == 0) c4 = i;
        @(negedge clk);
      end
      check(c2 == 3, $sformatf("2-cycle wakeup took %0d cycles, expected 3", c2));
      check(c4 == 5, $sformatf("4-cycle wakeup took %0d cycles, expected 5", c4));
      check(!on_2 && !on_4, "both back asleep");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
