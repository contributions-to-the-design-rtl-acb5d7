// tb_hermes_glp_router: end-to-end test of the GALS Hermes-GLP router at
// node 11.
//
// Each of the five input links has its own clock (periods 7, 9, 11, 13, 17),
// unrelated to the router's two sources (fast 10, slow 20). The receivers on
// the output side follow the router's forwarded clock tx_clk. Packets carry a
// priority bit on the sideband: a scoreboard rebuilds each packet at the
// outputs, checks it against the next packet of its source, its XY output and
// that tx_prio matches the priority it was sent with.
//
// Phases: (1) idle, the router clock must stop; (2) low-priority traffic only,
// the fast clock must never be selected; (3) mixed traffic with random
// back-pressure; (4) the East output blocked for a while so the input FIFOs
// fill up. Counts of gated time, fast and slow cycles and FIFO-full stalls
// must all be non-zero.
module tb_hermes_glp_router;
  import noc_pkg::*;
  localparam logic [3:0] ME = 4'h5;
  logic clk_fast = 0, clk_slow = 0, rst_n = 0;
  logic [NPORTS-1:0] rx_clk = '0;
  always #5 clk_fast = ~clk_fast;
  initial begin #3; forever #10 clk_slow = ~clk_slow; end
  always #3.5 rx_clk[0] = ~rx_clk[0];
  always #4.5 rx_clk[1] = ~rx_clk[1];
  always #5.5 rx_clk[2] = ~rx_clk[2];
  always #6.5 rx_clk[3] = ~rx_clk[3];
  always #8.5 rx_clk[4] = ~rx_clk[4];

  logic [NPORTS-1:0]      rx_valid, rx_ready, rx_prio, tx_valid, tx_ready, tx_prio;
  logic [NPORTS-1:0][7:0] rx_data, tx_data;
  logic tx_clk, fast_on, clk_on;

  hermes_glp_router dut (.*);

  int checks = 0, failures = 0;
  int n_full = 0, n_gated = 0, n_fast = 0, n_slow = 0, n_pkts = 0, n_prio_pkts = 0;
  int throttle_in = 100, throttle_out = 100;
  bit block_east = 0, count_fast = 1;

  typedef logic [8:0] flit_q_t[$];                  // {prio, flit}
  flit_q_t tx_stim [NPORTS];
  flit_q_t sent_pkts [NPORTS][$];
  int      sent_route [NPORTS][$];
  flit_q_t rx_buf [NPORTS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int ref_route(logic [3:0] d);
    if (d[3:2] != ME[3:2]) return (d[3:2] > ME[3:2]) ? 0 : 1;
    if (d[1:0] != ME[1:0]) return (d[1:0] > ME[1:0]) ? 2 : 3;
    return 4;
  endfunction

  task automatic make_packet(input int src, input logic [3:0] dest, input int len, input bit prio);
    flit_q_t p;
    p.push_back({prio, 4'($urandom), dest});
    p.push_back({prio, 8'(len)});
    p.push_back({prio, 5'($urandom), 3'(src)});
    for (int k = 1; k < len; k++) p.push_back({prio, 8'($urandom)});
    foreach (p[k]) tx_stim[src].push_back(p[k]);
    sent_pkts[src].push_back(p);
    sent_route[src].push_back(ref_route(dest));
  endtask

  initial begin
    #3000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // one sender per input, each in its own clock domain
  for (genvar gi = 0; gi < NPORTS; gi++) begin : g_send
    initial begin
      bit fire;
      rx_valid[gi] = 0; rx_data[gi] = '0; rx_prio[gi] = 0;
      wait (rst_n);
      forever begin
        @(negedge rx_clk[gi]);
        rx_valid[gi] = (tx_stim[gi].size() > 0) && ($urandom_range(1, 100) <= throttle_in);
        {rx_prio[gi], rx_data[gi]} = (tx_stim[gi].size() > 0) ? tx_stim[gi][0] : 9'h0;
        #0.5 fire = rx_valid[gi] && rx_ready[gi];
        if (rx_valid[gi] && !rx_ready[gi]) n_full++;
        @(posedge rx_clk[gi]);
        if (fire) void'(tx_stim[gi].pop_front());
      end
    end
  end

  // receivers on the forwarded router clock
  initial begin
    logic [NPORTS-1:0] out_fire;
    logic [NPORTS-1:0][8:0] od;
    tx_ready = '0;
    wait (rst_n);
    forever begin
      @(negedge tx_clk);
      for (int o = 0; o < NPORTS; o++)
        tx_ready[o] = ($urandom_range(1, 100) <= throttle_out) && !(block_east && o == 0);
      #0.5;
      out_fire = tx_valid & tx_ready;
      for (int o = 0; o < NPORTS; o++) od[o] = {tx_prio[o], tx_data[o]};
      @(posedge tx_clk);
      for (int o = 0; o < NPORTS; o++) if (out_fire[o]) begin
        rx_buf[o].push_back(od[o]);
        if (rx_buf[o].size() >= 3 && rx_buf[o].size() == 2 + int'(rx_buf[o][1][7:0])) begin
          int src; src = int'(rx_buf[o][2][2:0]);
          check(src < NPORTS && sent_pkts[src].size() > 0, "packet has a pending source");
          if (src < NPORTS && sent_pkts[src].size() > 0) begin
            check(rx_buf[o] == sent_pkts[src][0], "packet contents, priority and order");
            check(sent_route[src][0] == o, "packet left through its XY output");
            if (rx_buf[o][0][8]) n_prio_pkts++;
            void'(sent_pkts[src].pop_front());
            void'(sent_route[src].pop_front());
          end
          n_pkts++;
          rx_buf[o].delete();
        end
      end
    end
  end

  // clock-state monitor, sampled on the fast source
  always @(posedge clk_fast) if (rst_n) begin
    if (!clk_on) n_gated++;
    else if (fast_on) n_fast++;
    else n_slow++;
  end

  function automatic bit all_delivered();
    for (int i = 0; i < NPORTS; i++) if (sent_pkts[i].size() > 0 || tx_stim[i].size() > 0) return 0;
    return 1;
  endfunction

  task automatic random_packets(input int n, input int prio_pct);
    for (int k = 0; k < n; k++)
      for (int i = 0; i < NPORTS; i++) begin
        logic [3:0] d;
        do d = 4'($urandom); while (ref_route(d) == i && i != LOCAL);
        make_packet(i, d, $urandom_range(1, 8), $urandom_range(1, 100) <= prio_pct);
      end
  endtask

  initial begin
    int fast0, gated0;
    #100 rst_n = 1;
    // (1) idle
    #500;
    gated0 = n_gated;
    #500;
    check(n_gated - gated0 >= 45, "router clock stopped while idle");
    // (2) low priority only
    fast0 = n_fast;
    random_packets(20, 0);
    while (!all_delivered()) #100;
    check(n_fast == fast0, "fast clock never chosen for low-priority traffic");
    #500;
    // (3) mixed, with back-pressure
    throttle_in = 70; throttle_out = 60;
    random_packets(40, 40);
    while (!all_delivered()) #100;
    // (4) blocked East output
    throttle_in = 100; throttle_out = 100; block_east = 1;
    for (int i = 1; i < NPORTS; i++) make_packet(i, 4'hD, 12, i[0]);
    #3000;
    block_east = 0;
    while (!all_delivered()) #100;
    #1000;
    check(!clk_on, "clock stopped again after the traffic");
    check(n_pkts == 100 + 200 + 4, "every packet delivered");
    check(n_prio_pkts > 0, "high-priority packets crossed the router");
    check(n_full > 0, "an input FIFO filled up");
    check(n_gated > 0 && n_fast > 0 && n_slow > 0, "gated, fast and slow operation all seen");
    $display("packets=%0d prio=%0d fifo_full=%0d gated=%0d fast=%0d slow=%0d",
             n_pkts, n_prio_pkts, n_full, n_gated, n_fast, n_slow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
