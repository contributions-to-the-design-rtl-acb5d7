// tb_hermes_a_input_port: routing and end-of-packet test of a Hermes-A input
// port (the North input of router (1,1), XY routing).
//
// A four-phase dual-rail sender feeds packets with random targets; four
// receivers, one per output channel, acknowledge every token with random
// delay. Checks: all flits of a packet appear, in order, on the channel of
// the XY output only; the routing rails name that channel (true) and the
// other three (false) for the whole packet; after the EOP flit the same
// channel receives a kill token, after which the routing rails are released;
// nothing ever appears on another channel.
module tb_hermes_a_input_port;
  import noc_pkg::*;
  import hermes_a_pkg::*;
  localparam port_e ME = NORTH;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] router_x = 4'd1, router_y = 4'd1;
  logic [NPORTS-1:0] out_busy = '0;
  dr_tok_t din = SPACER;
  logic ack_in;
  dr_tok_t [3:0] dout;
  logic [3:0] ack_out = '0, route_t, route_f;
  hermes_a_input_port #(.IN_PORT(ME), .ROUTING(1'b0)) dut (.*);

  int checks = 0, failures = 0, n_pkts = 0, n_kills = 0;
  dr_tok_t expect_q[$];
  int exp_ch = -1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #3000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial forever begin
    @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      if (k != exp_ch) check(dout[k] == SPACER, "nothing on other channels");
      if (!ack_out[k] && complete(dout[k]) && $urandom_range(0, 1) == 0) begin
        ack_out[k] = 1;
        if (dout[k].t[BOP_B] && dout[k].t[EOP_B]) begin
          check(expect_q.size() == 0, "kill token only after the whole packet");
          n_kills++;
        end else begin
          check(expect_q.size() > 0 && dout[k] == expect_q[0], "flit order and value");
          if (expect_q.size() > 0) void'(expect_q.pop_front());
        end
      end else if (ack_out[k] && is_spacer(dout[k]) && $urandom_range(0, 1) == 0) ack_out[k] = 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int len, want, kills0;
      logic [3:0] tx, ty;
      do begin tx = 4'($urandom_range(0, 3)); ty = 4'($urandom_range(0, 3)); end
      while (tx == 1 && ty > 1);            // never back through North
      want = (tx > 1) ? EAST : (tx < 1) ? WEST : (ty < 1) ? SOUTH : LOCAL;
      exp_ch = (want < ME) ? want : want - 1;
      len = $urandom_range(1, 6);
      kills0 = n_kills;
      for (int k = 0; k <= len; k++) begin
        dr_tok_t tok;
        tok = encode(k == 0, k == len, (k == 0) ? {ty, tx} : 8'($urandom));
        expect_q.push_back(tok);
        @(negedge clk); din = tok;
        while (!ack_in) @(negedge clk);
        din = SPACER;
        if (k == 0 || k == len) begin
          check(route_t == 4'(1 << exp_ch) && route_f == ~route_t, "routing rails name the output");
        end
        while (ack_in) @(negedge clk);
      end
      repeat (3) @(negedge clk);
      check(n_kills == kills0 + 1, "one kill token after the packet");
      check(route_t == '0 && route_f == '0, "routing rails released after the kill token");
      n_pkts++;
    end
    $display("packets=%0d kills=%0d", n_pkts, n_kills);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
