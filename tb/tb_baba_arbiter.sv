// tb_baba_arbiter: self-checking test of the switch-control arbiter.
// Random request patterns; checks the grant is one-hot, only to a requester,
// never zero when someone requests, and that a port that keeps requesting is
// served within N grants (no starvation); also the round-robin order when
// all five request.
module tb_baba_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req, gnt;
  logic advance;
  int checks = 0, failures = 0;
  int wait_grants [N];
  logic [N-1:0] g;

  baba_arbiter #(.N(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0; advance = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // all request: expect 0,1,2,3,4,0,...
    for (int k = 0; k < 10; k++) begin
      @(negedge clk); req = '1; advance = 1;
      #1 check(gnt == N'(1 << (k % N)), "round-robin order with all requesting");
    end
    foreach (wait_grants[i]) wait_grants[i] = 0;
    @(negedge clk); req = 0; advance = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // requests stay up until served, as IN CTRL holds its address
      req = req | N'($urandom); advance = $urandom_range(0, 1);
      #1;
      check($countones(gnt) == ((req != 0) ? 1 : 0), "exactly one grant when requested");
      check((gnt & ~req) == 0, "grant only to a requester");
      g = gnt;
      @(posedge clk);
      #1;
      if (advance && g != 0) begin
        for (int i = 0; i < N; i++) begin
          if (g[i]) wait_grants[i] = 0;
          else if (req[i]) begin
            wait_grants[i]++;
            check(wait_grants[i] < N, "requester served within N grants");
          end
        end
        req = req & ~g;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
