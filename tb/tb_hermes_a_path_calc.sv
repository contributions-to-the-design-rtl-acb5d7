// tb_hermes_a_path_calc: test of the Hermes-A path calculation.
//
// One instance per input side with XY routing and one west-first instance
// (Local input). For every target byte and a sweep of router positions the
// test checks the four-wire dual-rail destination: exactly one true rail and
// three false rails, pointing at the XY output in the input's own numbering
// of the other four sides; no rail at all while the flit is a spacer or only
// partly valid; and the flit passed on unchanged. Cases whose XY route would
// turn back through the input side are not applied (they cannot occur in a
// mesh with minimal routing).
module tb_hermes_a_path_calc;
  import noc_pkg::*;
  import hermes_a_pkg::*;
  dr_tok_t flit;
  logic [3:0] router_x, router_y;
  logic [NPORTS-1:0] out_busy;
  dr_tok_t flit_fwd [NPORTS+1];
  dr4_t    dest [NPORTS+1];
  logic    dest_valid [NPORTS+1];
  port_e   port [NPORTS+1];

  for (genvar g = 0; g < NPORTS; g++) begin : g_xy
    hermes_a_path_calc #(.IN_PORT(port_e'(g)), .ROUTING(1'b0)) u (
      .flit(flit_in[g]), .router_x, .router_y, .out_busy,
      .flit_fwd(flit_fwd[g]), .dest(dest[g]), .dest_valid(dest_valid[g]), .port(port[g]));
  end
  hermes_a_path_calc #(.IN_PORT(LOCAL), .ROUTING(1'b1)) u_wf (
    .flit(flit_wf), .router_x, .router_y, .out_busy,
    .flit_fwd(flit_fwd[NPORTS]), .dest(dest[NPORTS]), .dest_valid(dest_valid[NPORTS]),
    .port(port[NPORTS]));

  // each instance only sees flits that are legal for it; the others get a spacer
  dr_tok_t flit_wf;
  int      active;            // which instance gets the flit
  dr_tok_t flit_in [NPORTS];
  assign flit_wf = (active == NPORTS) ? flit : SPACER;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int xy(logic [3:0] tx, logic [3:0] ty, logic [3:0] rx, logic [3:0] ry);
    if (tx > rx) return EAST;
    if (tx < rx) return WEST;
    if (ty > ry) return NORTH;
    if (ty < ry) return SOUTH;
    return LOCAL;
  endfunction

  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    out_busy = '0; flit = SPACER; active = -1;
    for (int r = 0; r < 64; r++) begin
      router_x = 4'($urandom); router_y = 4'($urandom);
      for (int t = 0; t < 256; t++) begin
        int want;
        want = xy(4'(t), 4'(t >> 4), router_x, router_y);
        for (int g = 0; g <= NPORTS; g++) begin
          if (g < NPORTS && want == g) continue;
          if (g == NPORTS && (4'(t) < router_x || want == LOCAL)) continue;
          active = g;
          // partly valid token first: low byte driven, EOP/BOP still spacer
          flit = encode(1'b0, 1'b0, 8'(t));
          flit.t[BOP_B] = 0; flit.f[BOP_B] = 0;
          drive();
          check(!dest_valid[g] && dest[g] == '0, "no route before the flit is complete");
          flit = encode(1'($urandom), 1'($urandom), 8'(t));
          drive();
          check(dest_valid[g], "route once the flit is complete");
          check(flit_fwd[g] == flit, "flit forwarded unchanged");
          if (g < NPORTS) begin
            check(port[g] == port_e'(want), "XY port");
            for (int k = 0; k < 4; k++) begin
              bit sel; sel = (want == ((k < g) ? k : k + 1));
              check(dest[g].t[k] == sel && dest[g].f[k] == !sel, "dual-rail one-hot destination");
            end
          end else begin
            check(port[g] == port_e'(want), "west-first equals XY when nothing is busy");
          end
          flit = SPACER;
          drive();
          check(!dest_valid[g] && dest[g] == '0, "spacer clears the route");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive();
    for (int g = 0; g < NPORTS; g++) flit_in[g] = (g == active) ? flit : SPACER;
    #1;
  endtask
endmodule
