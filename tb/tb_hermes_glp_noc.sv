// tb_hermes_glp_noc: 3x3 mesh of Hermes-GLP routers, end to end.
//
// Every node has an IP clock of its own (periods 7 to 15 ns, none equal to
// the routers' fast 10 ns or slow 20 ns sources). Senders write the local
// inputs with their IP clock; receivers read the local outputs with the
// router clock brought out of each node. A scoreboard keeps one queue per
// (source, destination) pair: XY routing is deterministic, so packets of a
// pair arrive in order, and each must equal the next packet sent on that
// pair, priority bit included.
//
// Phases:
//  (1) idle after reset: every router clock must be stopped;
//  (2) the dynamic-clock example on the middle row: a long low-priority flow
//      10 -> 12 (through 11) runs; a short high-priority flow 01 -> 21
//      (through 11) starts during it. Routers 01, 11, 21 must run fast while
//      it lasts, routers 10 and 12 never, and routers off both paths must
//      stay stopped. Once the high-priority flow is delivered, 01 and 21 must
//      stop and 11 must fall back to the slow clock while the low flow
//      continues;
//  (3) random traffic between all nodes, mixed priority, with back-pressure;
//      afterwards every router must be stopped again;
//  (4) six traffic patterns (pats below), each two producer-consumer flows
//      between fixed nodes, all high or all low priority. The average
//      activation rate of the NoC (1 for a router on the fast source, 1/2
//      on the slow one, 0 stopped, sampled every 1 ns and averaged over
//      routers and time) is printed per pattern and must stay below that of
//      an always-on NoC. A low-priority pattern must never select the fast
//      source, a high-priority one must. IP clocks stay as above; they are
//      not set per pattern.
module tb_hermes_glp_noc;
  import noc_pkg::*;
  localparam int NX = 3, NY = 3, NN = NX * NY;

  logic clk_fast = 0, clk_slow = 0, rst_n = 0;
  logic [NN-1:0] ip_clk = '0;
  always #5 clk_fast = ~clk_fast;
  initial begin #3; forever #10 clk_slow = ~clk_slow; end
  for (genvar n = 0; n < NN; n++) begin : g_ipclk
    always #(3.5 + 0.5 * n) ip_clk[n] = ~ip_clk[n];
  end

  logic [NN-1:0]      loc_rx_valid, loc_rx_ready, loc_rx_prio;
  logic [NN-1:0][7:0] loc_rx_data, loc_tx_data;
  logic [NN-1:0]      loc_tx_clk, loc_tx_valid, loc_tx_ready, loc_tx_prio, fast_on, clk_on;

  hermes_glp_noc dut (.*);

  int checks = 0, failures = 0;
  int n_pkts = 0, n_sent = 0;
  int n_fast [NN], n_on [NN];
  int throttle_in = 100, throttle_out = 100;

  typedef logic [8:0] flit_q_t[$];                  // {prio, flit}
  flit_q_t stim [NN];
  flit_q_t sent [NN][NN][$];
  flit_q_t rbuf [NN];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [3:0] addr_of(int n);
    return {2'(n % NX), 2'(n / NX)};
  endfunction

  task automatic make_packet(input int src, input int dst, input int len, input bit prio);
    flit_q_t p;
    p.push_back({prio, 4'($urandom), addr_of(dst)});
    p.push_back({prio, 8'(len)});
    p.push_back({prio, 4'($urandom), 4'(src)});
    for (int k = 1; k < len; k++) p.push_back({prio, 8'($urandom)});
    foreach (p[k]) stim[src].push_back(p[k]);
    sent[src][dst].push_back(p);
    n_sent++;
  endtask

  function automatic bit pair_done(int src, int dst);
    return sent[src][dst].size() == 0;
  endfunction

  function automatic bit all_delivered();
    for (int s = 0; s < NN; s++) begin
      if (stim[s].size() > 0) return 0;
      for (int d = 0; d < NN; d++) if (sent[s][d].size() > 0) return 0;
    end
    return 1;
  endfunction

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // senders, one per node, each on its IP clock
  for (genvar gn = 0; gn < NN; gn++) begin : g_send
    initial begin
      bit fire;
      loc_rx_valid[gn] = 0; loc_rx_data[gn] = '0; loc_rx_prio[gn] = 0;
      wait (rst_n);
      forever begin
        @(negedge ip_clk[gn]);
        loc_rx_valid[gn] = (stim[gn].size() > 0) && ($urandom_range(1, 100) <= throttle_in);
        {loc_rx_prio[gn], loc_rx_data[gn]} = (stim[gn].size() > 0) ? stim[gn][0] : 9'h0;
        #0.5 fire = loc_rx_valid[gn] && loc_rx_ready[gn];
        @(posedge ip_clk[gn]);
        if (fire) void'(stim[gn].pop_front());
      end
    end
  end

  // receivers, one per node, on that node's router clock
  for (genvar gn = 0; gn < NN; gn++) begin : g_recv
    initial begin
      bit fire;
      logic [8:0] od;
      loc_tx_ready[gn] = 0;
      wait (rst_n);
      forever begin
        @(negedge loc_tx_clk[gn]);
        loc_tx_ready[gn] = ($urandom_range(1, 100) <= throttle_out);
        #0.5;
        fire = loc_tx_valid[gn] && loc_tx_ready[gn];
        od   = {loc_tx_prio[gn], loc_tx_data[gn]};
        @(posedge loc_tx_clk[gn]);
        if (fire) begin
          rbuf[gn].push_back(od);
          if (rbuf[gn].size() >= 3 && rbuf[gn].size() == 2 + int'(rbuf[gn][1][7:0])) begin
            int src; src = int'(rbuf[gn][2][3:0]);
            check(rbuf[gn][0][3:0] == addr_of(gn), "packet delivered at its target node");
            check(src < NN && sent[src][gn].size() > 0, "packet has a pending source");
            if (src < NN && sent[src][gn].size() > 0) begin
              check(rbuf[gn] == sent[src][gn][0], "packet contents, priority and order");
              void'(sent[src][gn].pop_front());
            end
            n_pkts++;
            rbuf[gn].delete();
          end
        end
      end
    end
  end

  // clock-state monitor, sampled on the fast source
  always @(posedge clk_fast) if (rst_n)
    for (int n = 0; n < NN; n++) begin
      if (clk_on[n]) n_on[n]++;
      if (clk_on[n] && fast_on[n]) n_fast[n]++;
    end

  // activation monitor, every 1 ns: 2 = fast source, 1 = slow, 0 = stopped
  // (the activation rate is this over 2, the fast source being the maximum)
  int act_sum [NN] = '{default: 0};
  int act_n = 0, act_fast = 0;                     // act_fast: samples with a router on the fast source
  initial forever begin
    #1;
    if (rst_n) begin
      act_n++;
      for (int n = 0; n < NN; n++) act_sum[n] += clk_on[n] ? (fast_on[n] ? 2 : 1) : 0;
      if ((clk_on & fast_on) != '0) act_fast++;
    end
  end

  // Traffic patterns: two producer-consumer flows, addresses written "xy".
  typedef struct { int sa, ra, sb, rb; bit prio; } pattern_t;
  function automatic int node_of(int xy);
    return (xy % 10) * NX + (xy / 10);
  endfunction

  // node numbers: n = y*3 + x
  localparam int N00 = 0, N10 = 1, N20 = 2, N01 = 3, N11 = 4, N21 = 5, N02 = 6, N12 = 7, N22 = 8;

  initial begin
    int on0 [NN], fast0 [NN];
    foreach (n_on[n]) begin n_on[n] = 0; n_fast[n] = 0; end
    repeat (10) @(posedge clk_slow);
    rst_n = 1;

    // (1) idle
    #1000;
    for (int n = 0; n < NN; n++) check(!clk_on[n], "router clock stopped while idle");

    // (2) dynamic-clock example
    foreach (n_on[n]) begin on0[n] = n_on[n]; fast0[n] = n_fast[n]; end
    throttle_in = 60;
    for (int k = 0; k < 40; k++) make_packet(N10, N12, 20, 1'b0);
    #1000;
    for (int k = 0; k < 6; k++) make_packet(N01, N21, 10, 1'b1);
    while (!pair_done(N01, N21)) #50;
    check(n_fast[N01] > fast0[N01] && n_fast[N11] > fast0[N11] && n_fast[N21] > fast0[N21],
          "routers on the high-priority path ran fast");
    #400;
    check(!pair_done(N10, N12), "low-priority flow still running after the high-priority one");
    check(!clk_on[N01] && !clk_on[N21], "routers left by the high-priority flow stopped");
    check(!fast_on[N11], "shared router back on the slow clock");
    foreach (fast0[n]) fast0[n] = n_fast[n];
    while (!pair_done(N10, N12)) #50;
    check(n_fast[N11] == fast0[N11], "shared router stayed slow with only the low-priority flow");
    check(n_fast[N10] == 0 && n_fast[N12] == 0, "routers on the low-priority path never ran fast");
    check(n_on[N10] > on0[N10] && n_on[N11] > on0[N11] && n_on[N12] > on0[N12],
          "routers on the low-priority path ran");
    for (int n = 0; n < NN; n++)
      if (n inside {N00, N20, N02, N22})
        check(n_on[n] == on0[n], "routers off both paths stayed stopped");
    #500;
    for (int n = 0; n < NN; n++) check(!clk_on[n], "all routers stopped after the example");

    // (3) random traffic
    throttle_in = 80; throttle_out = 70;
    for (int k = 0; k < 12; k++)
      for (int s = 0; s < NN; s++)
        make_packet(s, $urandom_range(0, NN - 1), $urandom_range(1, 12), $urandom_range(1, 100) <= 30);
    while (!all_delivered()) #100;
    #1000;
    for (int n = 0; n < NN; n++) check(!clk_on[n], "router clock stopped again after the traffic");
    check(n_pkts == n_sent, "every packet delivered");

    // (4) six traffic patterns, each two flows (a) and (b) of 30 packets,
    //     activation rate measured per pattern
    begin
      pattern_t pats [6];
      pats[0] = '{sa: 02, ra: 20, sb: 02, rb: 22, prio: 1'b1};
      pats[1] = '{sa: 22, ra: 00, sb: 01, rb: 21, prio: 1'b1};
      pats[2] = '{sa: 12, ra: 21, sb: 20, rb: 00, prio: 1'b0};
      pats[3] = '{sa: 20, ra: 12, sb: 22, rb: 20, prio: 1'b0};
      pats[4] = '{sa: 01, ra: 11, sb: 12, rb: 10, prio: 1'b0};
      pats[5] = '{sa: 21, ra: 02, sb: 00, rb: 02, prio: 1'b0};
      throttle_in = 50; throttle_out = 100;
      foreach (pats[t]) begin
        int s0 [NN], n0, f0, tot;
        foreach (act_sum[n]) s0[n] = act_sum[n];
        n0 = act_n; f0 = act_fast;
        for (int k = 0; k < 30; k++) begin
          make_packet(node_of(pats[t].sa), node_of(pats[t].ra), 8, pats[t].prio);
          make_packet(node_of(pats[t].sb), node_of(pats[t].rb), 8, pats[t].prio);
        end
        while (!all_delivered()) #100;
        #200;
        tot = 0;
        for (int n = 0; n < NN; n++) tot += act_sum[n] - s0[n];
        // average over routers and time, in percent of the fast source
        $display("T%0d: NoC activation rate %0d.%0d%%", t + 1,
                 (100 * tot) / (2 * NN * (act_n - n0)), ((1000 * tot) / (2 * NN * (act_n - n0))) % 10);
        check(tot < 2 * NN * (act_n - n0), "activation rate below an always-on NoC");
        if (!pats[t].prio) check(act_fast == f0, "low-priority pattern never selects the fast source");
        else               check(act_fast > f0,  "high-priority pattern selects the fast source");
      end
    end
    check(n_pkts == n_sent, "every pattern packet delivered");
    for (int n = 0; n < NN; n++) $display("router %0d%0d: on=%0d fast=%0d", n % NX, n / NX, n_on[n], n_fast[n]);
    $display("packets=%0d", n_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
