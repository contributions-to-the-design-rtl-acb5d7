// tb_hermes_a_output_ctrl: test of one Hermes-A output control.
//
// The test plays the input port (four-phase dual-rail sender plus the
// dual-rail routing bit), the output arbiter (grant follows the request
// after a random delay) and the downstream receiver (four-phase acknowledge
// after a random delay). Packets are a BOP flit, body flits, an EOP flit and
// then the kill token. Checks: the request rises only when the routing bit is
// true and not for a false routing bit; nothing leaves before the grant;
// every flit arrives downstream in order and unchanged; the kill token is
// never forwarded, is acknowledged locally, is reported on kill_seen and
// withdraws the request.
module tb_hermes_a_output_ctrl;
  import hermes_a_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic route_t = 0, route_f = 0, ack_in, arb_req, grant = 0, ack_out = 0, kill_seen;
  dr_tok_t din = SPACER, dout;
  hermes_a_output_ctrl dut (.*);

  int checks = 0, failures = 0, n_kill = 0, n_flits = 0, n_pkts = 0;
  dr_tok_t expect_q[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // arbiter model and receiver, acting on the falling edge
  initial forever begin
    @(negedge clk);
    if (!rst_n) continue;
    if (!arb_req) grant = 0;
    else if (!grant && $urandom_range(0, 2) == 0) grant = 1;
    check(grant || dout == SPACER, "nothing leaves without the grant");
    check(!(dout.t[BOP_B] && dout.t[EOP_B]), "kill token never forwarded");
    if (!ack_out && complete(dout) && $urandom_range(0, 1) == 0) begin
      check(expect_q.size() > 0, "downstream flit was expected");
      if (expect_q.size() > 0) check(dout == expect_q.pop_front(), "flit order and value");
      n_flits++;
      ack_out = 1;
    end else if (ack_out && is_spacer(dout) && $urandom_range(0, 1) == 0) ack_out = 0;
    if (kill_seen) n_kill++;
  end

  task automatic send(input dr_tok_t tok);
    @(negedge clk); din = tok;
    while (!ack_in) @(negedge clk);
    din = SPACER;
    while (ack_in) @(negedge clk);
  endtask

  initial begin
    int kills0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      int len; len = $urandom_range(0, 6);
      // a packet for some other output: the false rail must not request
      @(negedge clk); route_f = 1;
      repeat (5) @(negedge clk);
      check(!arb_req, "false routing rail does not request");
      route_f = 0;
      // a packet for this output
      @(negedge clk); route_t = 1;
      repeat (2) @(negedge clk);
      check(arb_req, "true routing rail requests the output");
      for (int k = 0; k <= len + 1; k++) begin
        dr_tok_t tok;
        tok = encode(k == 0, k == len + 1, 8'($urandom));
        expect_q.push_back(tok);
        send(tok);
      end
      kills0 = n_kill;
      send(kill_token());
      repeat (2) @(negedge clk);
      check(n_kill > kills0, "kill token detected");
      check(!arb_req, "kill token withdraws the request");
      route_t = 0;
      repeat (4) @(negedge clk);
      check(expect_q.size() == 0, "all flits of the packet delivered");
      check(!arb_req && !ack_out, "idle after the packet");
      n_pkts++;
    end
    $display("packets=%0d flits=%0d kill_cycles=%0d", n_pkts, n_flits, n_kill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
