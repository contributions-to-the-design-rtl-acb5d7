// tb_ascend_mutex: test of the behavioural mutual-exclusion element.
//
// Two clients raise and drop their requests at random times, each obeying the
// four-phase rule (a request only falls after its acknowledge, and only rises
// again after its acknowledge fell). Checks at every step: the acknowledges
// are never both high; an acknowledge only rises while its request is high; an
// acknowledge once given stays while its request is held; every request is
// eventually acknowledged. Simultaneous requests are applied on purpose and
// must also resolve to exactly one winner.
module tb_ascend_mutex;
  logic ra = 0, rb = 0, aa, ab;
  ascend_mutex dut (.*);

  int checks = 0, failures = 0, n_a = 0, n_b = 0, n_tie = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // safety monitor
  always @(aa or ab or ra or rb) begin
    #0;
    check(!(aa && ab), "acknowledges mutually exclusive");
  end
  always @(posedge aa) check(ra, "aa only rises with ra");
  always @(posedge ab) check(rb, "ab only rises with rb");

  task automatic client_a();
    forever begin
      #($urandom_range(0, 9));
      ra = 1;
      wait (aa); n_a++;
      #($urandom_range(1, 9));
      check(aa && !ab, "A keeps the grant while requesting");
      ra = 0;
      wait (!aa);
    end
  endtask
  task automatic client_b();
    forever begin
      #($urandom_range(0, 9));
      rb = 1;
      wait (ab); n_b++;
      #($urandom_range(1, 9));
      check(ab && !aa, "B keeps the grant while requesting");
      rb = 0;
      wait (!ab);
    end
  endtask

  initial begin
    // simultaneous requests
    for (int n = 0; n < 50; n++) begin
      #10 ra = 1; rb = 1; n_tie++;
      #5 check(aa ^ ab, "a tie resolves to exactly one winner");
      if (aa) begin ra = 0; wait (!aa); wait (ab); #2 rb = 0; end
      else    begin rb = 0; wait (!ab); wait (aa); #2 ra = 0; end
      wait (!aa && !ab);
    end
    // random traffic
    fork client_a(); client_b(); join_none
    #200000;
    check(n_a > 100 && n_b > 100, "both clients served repeatedly");
    $display("ties=%0d grants A=%0d B=%0d", n_tie, n_a, n_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
