// tb_hermes_aa_wf_route: exhaustive test of the west-first adaptive route.
//
// Every offset pair (dx, dy) in -16..15 and every pattern of busy outputs is
// applied. Checks: the chosen port is always productive (a minimal route);
// West is chosen whenever the target is to the west, and only then, so no
// turn into West can happen later; Local only at the target; among the
// productive ports a free one is taken when one exists (E before N before S);
// when all productive ports are busy the first productive one is kept.
module tb_hermes_aa_wf_route;
  import noc_pkg::*;
  logic signed [4:0] dx, dy;
  logic [NPORTS-1:0] out_busy;
  port_e port;
  hermes_aa_wf_route dut (.*);

  int checks = 0, failures = 0, n_adaptive = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s dx=%0d dy=%0d busy=%b port=%0d", what, dx, dy, out_busy, port); end
  endtask

  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int x = -16; x < 16; x++)
      for (int y = -16; y < 16; y++)
        for (int b = 0; b < 32; b++) begin
          bit prod [NPORTS];
          port_e first, free;
          bit have_free;
          dx = 5'(x); dy = 5'(y); out_busy = 5'(b);
          #1;
          prod[EAST] = x > 0; prod[WEST] = x < 0; prod[NORTH] = y > 0; prod[SOUTH] = y < 0;
          prod[LOCAL] = (x == 0 && y == 0);
          check(prod[port], "port is productive");
          check((port == WEST) == (x < 0), "West exactly when the target is west");
          if (x >= 0) begin
            have_free = 0; first = LOCAL; free = LOCAL;
            for (int k = 0; k < 4; k++) begin
              port_e p; p = (k == 0) ? EAST : (k == 1) ? NORTH : (k == 2) ? SOUTH : LOCAL;
              if (k < 3 && prod[p]) begin
                if (first == LOCAL) first = p;
                if (!out_busy[p] && !have_free) begin have_free = 1; free = p; end
              end
            end
            if (prod[LOCAL])    check(port == LOCAL, "Local at the target");
            else if (have_free) check(port == free, "free productive port preferred");
            else                check(port == first, "first productive port when all busy");
            if (have_free && free != first) n_adaptive++;
          end
        end
    check(n_adaptive > 0, "adaptive choice exercised");
    $display("adaptive choices=%0d", n_adaptive);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
