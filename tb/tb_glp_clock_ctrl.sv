// tb_glp_clock_ctrl: clock gating and frequency selection of the Hermes-GLP
// clock control.
//
// Checks that: the router clock runs during reset; it stops when every port
// is idle and restarts when any port becomes active; the fast clock is used
// only while an active port carries a high-priority packet (a priority bit on
// an idle port is ignored); the slow clock is used otherwise. Pulse widths of
// router_clk are watched throughout for glitches.
module tb_glp_clock_ctrl;
  import noc_pkg::*;
  logic clk_fast = 0, clk_slow = 0, rst_n = 1;
  logic [NPORTS-1:0] port_state = '0, port_prio = '0;
  logic router_clk, fast_on, clk_on;
  always #5 clk_fast = ~clk_fast;
  initial begin #4; forever #10 clk_slow = ~clk_slow; end

  glp_clock_ctrl dut (.*);

  int checks = 0, failures = 0, n_gated = 0, n_fast = 0, n_slow = 0, edges = 0;
  realtime t_rise = 0, t_fall = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #300000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Reset falls at t=1 so that asynchronous resets see an edge; the output is
  // not judged before that.
  initial #1 rst_n = 0;

  always @(posedge router_clk) begin
    edges++;
    if (t_fall > 1) check($realtime - t_fall >= 5, "no runt low phase");
    t_rise = $realtime;
  end
  always @(negedge router_clk) begin
    if (t_rise > 1) check(($realtime - t_rise == 5) || ($realtime - t_rise == 10), "no runt high phase");
    t_fall = $realtime;
  end

  // expect: 0 = stopped, 10 = fast, 20 = slow
  task automatic expect_clock(input int period, input string what);
    int e0; realtime a, b;
    #300;
    if (period == 0) begin
      e0 = edges; #400;
      check(edges == e0, {what, ": clock stopped"});
      check(!clk_on, {what, ": clk_on low"});
      n_gated++;
    end else begin
      @(posedge router_clk); a = $realtime;
      @(posedge router_clk); b = $realtime;
      check(b - a == period, {what, ": period"});
      check(clk_on && fast_on == (period == 10), {what, ": status"});
      if (period == 10) n_fast++; else n_slow++;
    end
  endtask

  initial begin
    #200;
    check(edges > 3, "clock runs during reset");
    rst_n = 1;
    expect_clock(0,  "all idle");
    port_state = 5'b00100;                 expect_clock(20, "one port, low priority");
    port_prio  = 5'b00001;                 expect_clock(20, "priority on an idle port");
    port_prio  = 5'b00100;                 expect_clock(10, "priority on an active port");
    port_state = 5'b00110;                 expect_clock(10, "two active ports, one high");
    port_prio  = 5'b00000;                 expect_clock(20, "priority dropped");
    port_state = 5'b00000;                 expect_clock(0,  "all idle again");
    port_state = 5'b10000; port_prio = 5'b10000; expect_clock(10, "wake up straight to fast");
    port_state = 5'b00000;                 expect_clock(0,  "gated from fast");
    for (int n = 0; n < 30; n++) begin
      port_state = NPORTS'($urandom); port_prio = NPORTS'($urandom);
      expect_clock(port_state == 0 ? 0 : ((port_state & port_prio) != 0 ? 10 : 20), "random");
    end
    check(n_gated > 0 && n_fast > 0 && n_slow > 0, "gated, fast and slow all seen");
    $display("gated=%0d fast=%0d slow=%0d", n_gated, n_fast, n_slow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
