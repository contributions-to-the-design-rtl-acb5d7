// tb_hermes_a_out_arbiter: first-come first-served test of the four-way
// output arbiter.
//
// Four requesters raise their request at random times, keep it until they
// have been granted and have used the output for a random time, then drop
// it. The test keeps the arrival cycle of every pending request. Each time a
// new grant appears it must go to the request that arrived first (equal
// arrivals: the lower index). The grant must be one-hot, must stay on its
// owner while the request is held, and must never go to an idle requester.
module tb_hermes_a_out_arbiter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req = '0, gnt;
  hermes_a_out_arbiter #(.N(N)) dut (.*);

  int checks = 0, failures = 0, n_grants = 0, n_contended = 0;
  int cycle = 0, arrived [N];
  int hold [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [N-1:0] g_prev, r_prev;
    repeat (3) @(posedge clk); rst_n = 1;
    g_prev = '0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (!req[i] && $urandom_range(0, 5) == 0) begin
          req[i] = 1; arrived[i] = cycle; hold[i] = $urandom_range(1, 6);
        end else if (req[i] && gnt[i]) begin
          if (hold[i] == 0) req[i] = 0; else hold[i]--;
        end
      end
      r_prev = req;
      @(posedge clk); #1; cycle++;
      check($onehot0(gnt), "grant one-hot");
      check((gnt & ~r_prev) == '0, "grant only to a requester");
      if ((g_prev & r_prev) != '0) check(gnt == g_prev, "grant held while requested");
      else if (gnt != '0) begin
        int w; w = $clog2(gnt);
        n_grants++;
        if ($countones(r_prev) > 1) n_contended++;
        for (int j = 0; j < N; j++)
          if (j != w && r_prev[j])
            check(arrived[w] < arrived[j] || (arrived[w] == arrived[j] && w < j),
                  "grant goes to the earliest request");
      end
      g_prev = gnt;
    end
    check(n_contended > 0, "contended grants exercised");
    $display("grants=%0d contended=%0d", n_grants, n_contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
