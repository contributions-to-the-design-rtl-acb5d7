// tb_hermes_a_output_port: four input ports competing for one Hermes-A
// output port.
//
// Each of the four input channels is played by a sender that routes a packet
// here (true routing rail), sends BOP flit, body, EOP flit and then the kill
// token over a four-phase dual-rail channel, drops the routing rail and waits
// a random time. The downstream side acknowledges with random delay.
// Checks: flits of different packets never interleave on the output, each
// packet arrives whole, in order and from a single source, kill tokens never
// leave the port, the grant is one-hot and moves on only after a kill token.
// Contention (several requests pending at once) must occur.
module tb_hermes_a_output_port;
  import hermes_a_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] route_t = '0, route_f = '0, ack_in, gnt, kill_seen;
  dr_tok_t [3:0] din = '0;
  dr_tok_t dout;
  logic ack_out = 0;
  hermes_a_output_port dut (.*);

  int checks = 0, failures = 0, n_pkts = 0, n_contend = 0, n_kill = 0;
  localparam int NPK = 40;
  dr_tok_t sent [4][$];     // flits sent per source, in order
  dr_tok_t cur[$];          // packet being received

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  for (genvar s = 0; s < 4; s++) begin : g_src
    initial begin
      wait (rst_n);
      for (int n = 0; n < NPK; n++) begin
        int len;
        repeat ($urandom_range(0, 20)) @(negedge clk);
        len = $urandom_range(0, 5);
        route_t[s] = 1;
        for (int k = 0; k <= len + 2; k++) begin
          dr_tok_t tok;
          if (k == len + 2) tok = kill_token();
          else begin
            // first payload byte names the source
            tok = encode(k == 0, k == len + 1, (k == 1) ? 8'(s) : 8'($urandom));
            sent[s].push_back(tok);
          end
          @(negedge clk); din[s] = tok;
          while (!ack_in[s]) @(negedge clk);
          din[s] = SPACER;
          while (ack_in[s]) @(negedge clk);
        end
        // the routing rail returns to null before the next decision
        route_t[s] = 0;
        @(negedge clk);
      end
    end
  end

  // receiver
  initial forever begin
    @(negedge clk);
    if ($countones(dut.req) > 1) n_contend++;
    if (kill_seen != 0) n_kill++;
    check($onehot0(gnt), "one grant at a time");
    check(!(dout.t[BOP_B] && dout.t[EOP_B]), "kill token never leaves");
    if (!ack_out && complete(dout) && $urandom_range(0, 1) == 0) begin
      ack_out = 1;
      cur.push_back(dout);
      if (dout.t[EOP_B]) begin
        int s;
        s = (cur.size() >= 2) ? int'(cur[1].t[1:0]) : 0;
        check(cur[0].t[BOP_B], "packet starts with BOP");
        foreach (cur[k]) begin
          check(sent[s].size() > 0 && cur[k] == sent[s][0], "packet flits whole and in order");
          if (sent[s].size() > 0) void'(sent[s].pop_front());
        end
        cur.delete();
        n_pkts++;
      end
    end else if (ack_out && is_spacer(dout) && $urandom_range(0, 1) == 0) ack_out = 0;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (n_pkts == 4 * NPK);
    repeat (10) @(negedge clk);
    for (int s = 0; s < 4; s++) check(sent[s].size() == 0, "every flit delivered");
    check(n_contend > 0, "several inputs requested the output at once");
    check(n_kill > 0, "kill tokens consumed");
    $display("packets=%0d contention_cycles=%0d", n_pkts, n_contend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
