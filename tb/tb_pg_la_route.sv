// tb_pg_la_route: the look-ahead routing unit against a reference walk of
// X-then-Y routing over a 4x4 mesh, for local and look-ahead headers.
module tb_pg_la_route;
  import pg_pkg::*;
  logic [1:0] cx, cy;
  logic [2:0] in_port, o0, o1, o2;
  flit_data_t hdr;
  int checks = 0, failures = 0;

  pg_la_route dut (.cur_x(cx), .cur_y(cy), .in_port, .hdr,
                   .out_port(o0), .next_port(o1), .next2_port(o2));

  // independent reference: port to take at (x,y) for destination (dx,dy)
  function automatic int ref_port(int x, int y, int dx, int dy);
    if (dx != x) return (dx > x) ? 2 : 4;
    if (dy != y) return (dy > y) ? 3 : 1;
    return 0;
  endfunction

  function automatic void ref_step(inout int x, inout int y, input int p);
    case (p)
      1: y--;
      2: x++;
      3: y++;
      4: x--;
      default: ;
    endcase
  endfunction

  initial begin
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++)
        for (int dx = 0; dx < 4; dx++)
          for (int dy = 0; dy < 4; dy++)
            for (int loc = 0; loc < 2; loc++) begin
              int e0, e1, e2, ax, ay;
              e0 = ref_port(x, y, dx, dy);
              ax = x; ay = y;
              ref_step(ax, ay, e0);
              e1 = (e0 == 0) ? 0 : ref_port(ax, ay, dx, dy);
              ref_step(ax, ay, e1);
              e2 = (e1 == 0) ? 0 : ref_port(ax, ay, dx, dy);
              cx = 2'(x); cy = 2'(y);
              hdr = flit_data_t'({$urandom, $urandom, $urandom, $urandom});
              hdr[1:0] = 2'(dx);
              hdr[3:2] = 2'(dy);
              if (loc == 1) begin
                in_port = 3'd0;        // local: port computed here
                hdr[6:4] = 3'($urandom % 5);
              end else begin
                in_port = 3'(1 + $urandom % 4);
                hdr[6:4] = 3'(e0);     // look-ahead port from upstream
              end
              #1;
              checks++;
              if (o0 != 3'(e0) || o1 != 3'(e1) || o2 != 3'(e2)) begin
                failures++;
                $display("FAIL: (%0d,%0d)->(%0d,%0d) got %0d %0d %0d exp %0d %0d %0d",
                         x, y, dx, dy, o0, o1, o2, e0, e1, e2);
              end
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
