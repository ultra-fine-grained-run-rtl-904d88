// tb_pg_hold: the hold cells pass data while the domain is on and clamp it
// to zero while it sleeps.
module tb_pg_hold;
  logic        on;
  logic [15:0] d, q;
  int checks = 0, failures = 0;

  pg_hold #(.W(16)) dut (.on, .d, .q);

  initial begin
    for (int i = 0; i < 200; i++) begin
      d  = 16'($urandom);
      on = 1'($urandom);
      #1;
      checks++;
      if (q !== (on ? d : 16'h0)) begin
        failures++;
        $display("FAIL: on=%0b d=%h q=%h", on, d, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
