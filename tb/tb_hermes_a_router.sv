// tb_hermes_a_router: end-to-end test of the asynchronous five-port router,
// once with XY routing (Hermes-A) and once with west-first adaptive routing
// (Hermes-AA), both at mesh node (1,1).
//
// For each router five four-phase dual-rail senders inject packets
// (header = target {y,x}, a payload byte naming the source, random payload,
// EOP on the last flit) and five receivers acknowledge with random delay.
// Targets never require a packet to leave through the side it entered. A
// scoreboard per output rebuilds packets from BOP to EOP and checks: no
// interleaving, contents and per-source order, XY output for Hermes-A, and a
// minimal west-first output for Hermes-AA (West exactly when the target is
// west). Counted and required: output contention, kill tokens consumed,
// several flows at once, and (Hermes-AA) packets sent on a non-XY output.
module tb_hermes_a_router;
  import noc_pkg::*;
  import hermes_a_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int NPK = 60;
  int checks = 0, failures = 0;
  int n_pkts [2], n_contend [2], n_kill [2], n_multi [2], n_adapt [2];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic bit productive(int p, logic [3:0] tx, logic [3:0] ty);
    case (p)
      EAST:  return tx > 1;
      WEST:  return tx < 1;
      NORTH: return ty > 1;
      SOUTH: return ty < 1;
      default: return tx == 1 && ty == 1;
    endcase
  endfunction
  function automatic int xy(logic [3:0] tx, logic [3:0] ty);
    for (int p = 0; p < NPORTS; p++) if (productive(p, tx, ty)) return p;
    return LOCAL;
  endfunction

  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  for (genvar r = 0; r < 2; r++) begin : g_r
    dr_tok_t [NPORTS-1:0] in_tok = '0, out_tok;
    logic    [NPORTS-1:0] in_ack, out_ack = '0, out_busy;
    hermes_a_router #(.ROUTING(r[0]), .ROUTER_X(4'd1), .ROUTER_Y(4'd1)) dut (
      .clk, .rst_n, .in_tok, .in_ack, .out_tok, .out_ack, .out_busy);

    dr_tok_t sent [NPORTS][$];
    int      done_src = 0;

    for (genvar s = 0; s < NPORTS; s++) begin : g_src
      initial begin
        wait (rst_n);
        for (int n = 0; n < NPK; n++) begin
          logic [3:0] tx, ty; int len;
          // targets that never turn back through the entry side
          do begin tx = 4'($urandom_range(0, 3)); ty = 4'($urandom_range(0, 3)); end
          while (s != LOCAL ? productive(s, tx, ty) || (r == 0 && xy(tx, ty) == s)
                            : (tx == 1 && ty == 1));
          len = $urandom_range(1, 6);
          repeat ($urandom_range(0, 8)) @(negedge clk);
          for (int k = 0; k <= len; k++) begin
            dr_tok_t tok;
            tok = encode(k == 0, k == len, (k == 0) ? {ty, tx} : (k == 1) ? 8'(s) : 8'($urandom));
            sent[s].push_back(tok);
            @(negedge clk); in_tok[s] = tok;
            while (!in_ack[s]) @(negedge clk);
            in_tok[s] = SPACER;
            while (in_ack[s]) @(negedge clk);
          end
        end
        done_src++;
      end
    end

    for (genvar o = 0; o < NPORTS; o++) begin : g_dst
      initial begin
        dr_tok_t cur[$];
        forever begin
          @(negedge clk);
          check(!(out_tok[o].t[BOP_B] && out_tok[o].t[EOP_B]), "kill token never leaves the router");
          if (!out_ack[o] && complete(out_tok[o]) && $urandom_range(0, 2) != 0) begin
            out_ack[o] = 1;
            cur.push_back(out_tok[o]);
            if (out_tok[o].t[EOP_B]) begin
              int s; logic [3:0] tx, ty;
              s = int'(cur[1].t[2:0]);
              {ty, tx} = cur[0].t[7:0];
              check(cur[0].t[BOP_B], "packet starts with its header");
              if (r == 0) check(o == xy(tx, ty), "XY output");
              else begin
                check(productive(o, tx, ty), "minimal output");
                check((o == WEST) == (tx < 1), "west first");
                if (o != xy(tx, ty)) n_adapt[r]++;
              end
              check(s < NPORTS, "source byte");
              if (s < NPORTS) foreach (cur[k]) begin
                check(sent[s].size() > 0 && cur[k] == sent[s][0], "packet whole and in order");
                if (sent[s].size() > 0) void'(sent[s].pop_front());
              end
              n_pkts[r]++;
              cur.delete();
            end
          end else if (out_ack[o] && is_spacer(out_tok[o]) && $urandom_range(0, 2) != 0) out_ack[o] = 0;
        end
      end
    end

    // mechanism counters
    always @(posedge clk) if (rst_n) begin
      int busy_outs;
      busy_outs = 0;
      for (int o = 0; o < NPORTS; o++) begin
        if ($countones(dut.src_rt[o]) > 1) n_contend[r]++;
        if (dut.kills[o] != '0) n_kill[r]++;
        if (complete(out_tok[o])) busy_outs++;
      end
      if (busy_outs >= 3) n_multi[r]++;
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (g_r[0].done_src == NPORTS && g_r[1].done_src == NPORTS);
    repeat (50) @(negedge clk);
    for (int r = 0; r < 2; r++) begin
      check(n_pkts[r] == NPORTS * NPK, "every packet delivered");
      check(n_contend[r] > 0, "output contention");
      check(n_kill[r] > 0, "kill tokens consumed");
      check(n_multi[r] > 0, "three or more flows at once");
      $display("%s: packets=%0d contention=%0d kill=%0d multi=%0d non_xy=%0d",
               r ? "west-first" : "XY", n_pkts[r], n_contend[r], n_kill[r], n_multi[r], n_adapt[r]);
    end
    check(n_adapt[1] > 0, "west-first used a non-XY output");
    for (int s = 0; s < NPORTS; s++)
      check(g_r[0].sent[s].size() == 0 && g_r[1].sent[s].size() == 0, "nothing left undelivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
