// tb_baba_xy_route: exhaustive check of the XY routing decision for every
// router and destination address of a 4x4 address space, against a
// reference written from the rule (X first, East for larger X, North for
// larger Y), plus the example of a router 11 sending to itself (Local).
module tb_baba_xy_route;
  import noc_pkg::*;
  logic [3:0] router_addr, dest_addr;
  port_e port;
  int checks = 0, failures = 0;

  baba_xy_route #(.ADDR_W(4)) dut (.*);

  function automatic port_e ref_route(int rx, int ry, int dx, int dy);
    if (dx != rx) return (dx > rx) ? EAST : WEST;
    if (dy != ry) return (dy > ry) ? NORTH : SOUTH;
    return LOCAL;
  endfunction

  initial begin
    #100000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++)
      for (int d = 0; d < 16; d++) begin
        router_addr = 4'(r); dest_addr = 4'(d);
        #1;
        checks++;
        if (port != ref_route(r >> 2, r & 3, d >> 2, d & 3)) begin
          failures++;
          $display("FAIL router %0h dest %0h got %0d", r, d, port);
        end
      end
    router_addr = 4'h5; dest_addr = 4'h5; #1;
    checks++; if (port != LOCAL) failures++;
    router_addr = 4'h5; dest_addr = 4'h1; #1;    // 11 -> 01: West
    checks++; if (port != WEST) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
