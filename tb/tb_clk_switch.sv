// tb_clk_switch: glitch and function test of the two-clock switch.
//
// clk_fast has period 10 and clk_slow period 20, with an unrelated phase.
// sel_fast is changed at random times, including mid-pulse. Every high pulse
// of clk_out must be a whole high phase of one source (5 or 10) and every
// low phase at least 5 long, so no glitch or runt pulse ever appears. After
// each change settles, the output period must match the selected source and
// fast_on must agree with sel_fast.
module tb_clk_switch;
  logic clk_fast = 0, clk_slow = 0, rst_n = 1, sel_fast = 0;
  logic clk_out, fast_on;
  always #5 clk_fast = ~clk_fast;
  initial begin #3; forever #10 clk_slow = ~clk_slow; end

  clk_switch dut (.*);

  int checks = 0, failures = 0, n_up = 0, n_down = 0;
  realtime t_rise = 0, t_fall = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // pulse-width monitor
  // Reset falls at t=1 so that asynchronous resets see an edge; the output is
  // not judged before that.
  initial #1 rst_n = 0;

  always @(posedge clk_out) begin
    if (t_fall > 1) check($realtime - t_fall >= 5, "low phase not shorter than a source half period");
    t_rise = $realtime;
  end
  always @(negedge clk_out) begin
    if (rst_n && t_rise > 1) check(($realtime - t_rise == 5) || ($realtime - t_rise == 10),
                     "high pulse is a whole source high phase");
    t_fall = $realtime;
  end

  task automatic check_period(input bit fast);
    realtime a, b;
    @(posedge clk_out); a = $realtime;
    @(posedge clk_out); b = $realtime;
    check(b - a == (fast ? 10 : 20), "output period matches the selection");
    check(fast_on == fast, "fast_on reports the selection");
  endtask

  initial begin
    #37 rst_n = 1;
    #200 check_period(0);
    for (int n = 0; n < 60; n++) begin
      #($urandom_range(1, 97));
      sel_fast = ~sel_fast;
      if (sel_fast) n_up++; else n_down++;
      #200 check_period(sel_fast);
    end
    // a change that is undone before it completes must also be clean
    for (int n = 0; n < 20; n++) begin
      sel_fast = ~sel_fast; #($urandom_range(1, 30)); sel_fast = ~sel_fast;
      #200 check_period(sel_fast);
    end
    check(n_up > 0 && n_down > 0, "switched in both directions");
    $display("switches up=%0d down=%0d", n_up, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
