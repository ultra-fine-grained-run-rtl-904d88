// tb_pg_rr_arb: the arbiter grants one requester, the first one at or after
// the priority pointer, and the pointer moves past the winner.
module tb_pg_rr_arb;
  localparam int N = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req, grant;
  logic update;
  int checks = 0, failures = 0;
  int ptr = 0;

  always #5 clk = ~clk;

  pg_rr_arb #(.N(N)) dut (.clk, .rst_n, .req, .update, .grant);

  initial begin
    req = '0;
    update = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      logic [N-1:0] exp;
      req    = N'($urandom);
      update = ($urandom % 4) != 0;
      #1;
      exp = '0;
      for (int k = 0; k < N; k++)
        if (exp == '0 && req[(ptr + k) % N]) exp[(ptr + k) % N] = 1'b1;
      checks++;
      if (grant !== exp) begin
        failures++;
        $display("FAIL: req=%b ptr=%0d grant=%b exp=%b", req, ptr, grant, exp);
      end
      @(negedge clk);
      if (update && exp != '0)
        for (int k = 0; k < N; k++) if (exp[k]) ptr = (k + 1) % N;
    end
    // fairness: all requesting, every one served in N grants
    req = '1;
    update = 1'b1;
    begin
      logic [N-1:0] seen = '0;
      for (int i = 0; i < N; i++) begin
        #1 seen |= grant;
        @(negedge clk);
      end
      checks++;
      if (seen != '1) begin
        failures++;
        $display("FAIL: not every requester served: %b", seen);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
