// tb_router_core: test of the routing core alone (IN CTRL, switch control,
// crossbar) at node 11, with no input buffering.
//
// The same stimulus as the full router test: first five packets on five
// disjoint paths, which must stream at one flit per cycle per path, then
// random traffic with random stalls on inputs and outputs. A scoreboard
// rebuilds every packet at the outputs and compares it with the next packet
// of its source, and checks the XY output. It also checks the sideband
// outputs: bound_valid/bound_in must name the source of every flit seen on
// an output, and in_busy must be high while a source has a packet in flight.
module tb_router_core;
  import noc_pkg::*;
  localparam logic [3:0] ME = 4'h5;
  localparam int PAY1 = 30;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NPORTS-1:0]      rx_valid, rx_ready, tx_valid, tx_ready;
  logic [NPORTS-1:0][7:0] rx_data, tx_data;

  router_core #(.FLIT_W(8), .ROUTER_ADDR(ME)) dut (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_ready(rx_ready), .in_data(rx_data),
    .out_valid(tx_valid), .out_ready(tx_ready), .out_data(tx_data),
    .in_busy, .bound_valid, .bound_in);
  logic [NPORTS-1:0] in_busy, bound_valid;
  logic [NPORTS-1:0][PORT_W-1:0] bound_in;
  int   bound_seen [NPORTS][$];

  int checks = 0, failures = 0;
  int n_fifo_full = 0, n_arb = 0, n_queued = 0, n_five = 0, n_pkts = 0;

  typedef logic [7:0] flit_q_t[$];
  flit_q_t tx_stim [NPORTS];           // flits still to inject per input
  flit_q_t sent_pkts [NPORTS][$];      // packets sent per input, in order
  int      sent_route [NPORTS][$];
  flit_q_t rx_buf [NPORTS];            // packet being rebuilt per output
  int      throttle_in, throttle_out;  // percent

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int ref_route(logic [3:0] d);
    if (d[3:2] != ME[3:2]) return (d[3:2] > ME[3:2]) ? 0 : 1;
    if (d[1:0] != ME[1:0]) return (d[1:0] > ME[1:0]) ? 2 : 3;
    return 4;
  endfunction

  task automatic make_packet(input int src, input logic [3:0] dest, input int len);
    flit_q_t p;
    p.push_back({4'($urandom), dest});
    p.push_back(8'(len));
    p.push_back({5'($urandom), 3'(src)});     // first payload flit names the source
    for (int k = 1; k < len; k++) p.push_back(8'($urandom));
    foreach (p[k]) tx_stim[src].push_back(p[k]);
    sent_pkts[src].push_back(p);
    sent_route[src].push_back(ref_route(dest));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drivers and scoreboard, all on the falling edge / just after the rising edge
  initial begin
    logic [NPORTS-1:0] in_fire, out_fire;
    logic [NPORTS-1:0][7:0] od;
    rx_valid = 0; rx_data = '0; tx_ready = 0;
    throttle_in = 100; throttle_out = 100;
    repeat (3) @(posedge clk); rst_n = 1;
    forever begin
      @(negedge clk);
      for (int i = 0; i < NPORTS; i++) begin
        rx_valid[i] = (tx_stim[i].size() > 0) && ($urandom_range(1, 100) <= throttle_in);
        rx_data[i]  = (tx_stim[i].size() > 0) ? tx_stim[i][0] : 8'h00;
        tx_ready[i] = ($urandom_range(1, 100) <= throttle_out);
      end
      #1;
      in_fire  = rx_valid & rx_ready;
      out_fire = tx_valid & tx_ready;
      od       = tx_data;
      for (int o = 0; o < NPORTS; o++) if (out_fire[o]) begin
        check(bound_valid[o], "bound_valid while flits leave");
        bound_seen[o].push_back(int'(bound_in[o]));
      end
      for (int i = 0; i < NPORTS; i++) if (rx_valid[i] && !rx_ready[i]) n_fifo_full++;
      if ($countones(dut.addr_valid) > 1) n_arb++;
      if (dut.u_switch.g_out[0].u_req_fifo.count > 1 ||
          dut.u_switch.g_out[1].u_req_fifo.count > 1 ||
          dut.u_switch.g_out[2].u_req_fifo.count > 1 ||
          dut.u_switch.g_out[3].u_req_fifo.count > 1 ||
          dut.u_switch.g_out[4].u_req_fifo.count > 1) n_queued++;
      if (out_fire == '1) n_five++;
      @(posedge clk); #1;
      for (int i = 0; i < NPORTS; i++) if (in_fire[i]) void'(tx_stim[i].pop_front());
      for (int i = 0; i < NPORTS; i++)
        if (sent_pkts[i].size() > 0 && tx_stim[i].size() > 0 &&
            tx_stim[i].size() < sent_pkts[i][$].size()) check(in_busy[i], "in_busy during a packet");
      for (int o = 0; o < NPORTS; o++) if (out_fire[o]) begin
        rx_buf[o].push_back(od[o]);
        if (rx_buf[o].size() >= 3 && rx_buf[o].size() == 2 + int'(rx_buf[o][1])) begin
          int src; src = int'(rx_buf[o][2][2:0]);
          check(src < NPORTS && sent_pkts[src].size() > 0, "packet has a pending source");
          if (src < NPORTS && sent_pkts[src].size() > 0) begin
            check(rx_buf[o] == sent_pkts[src][0], "packet contents and order");
            check(sent_route[src][0] == o, "packet left through its XY output");
            foreach (bound_seen[o][k]) check(bound_seen[o][k] == src, "bound_in names the source");
            void'(sent_pkts[src].pop_front());
            void'(sent_route[src].pop_front());
          end
          n_pkts++;
          rx_buf[o].delete();
          bound_seen[o].delete();
        end
      end
    end
  end

  function automatic bit all_delivered();
    for (int i = 0; i < NPORTS; i++) if (sent_pkts[i].size() > 0 || tx_stim[i].size() > 0) return 0;
    return 1;
  endfunction

  initial begin
    int t0, t1, best_run, run;
    wait (rst_n);
    // ---- phase 1: five disjoint flows (targets 01, 21, 10, 12, 11)
    @(negedge clk);
    make_packet(EAST,  4'h1, PAY1);   // 01 -> West
    make_packet(LOCAL, 4'h9, PAY1);   // 21 -> East
    make_packet(NORTH, 4'h4, PAY1);   // 10 -> South
    make_packet(SOUTH, 4'h6, PAY1);   // 12 -> North
    make_packet(WEST,  4'h5, PAY1);   // 11 -> Local
    t0 = $time / 10;
    best_run = 0; run = 0;
    while (!all_delivered()) begin
      @(posedge clk); #2;
      if ((tx_valid & tx_ready) == '1) run++; else run = 0;
      if (run > best_run) best_run = run;
    end
    t1 = $time / 10;
    $display("phase 1: %0d cycles for 5 x %0d flits, longest 5-path run %0d", t1 - t0, PAY1 + 2, best_run);
    check(best_run >= PAY1 - 2, "five paths stream one flit per cycle each");
    check(t1 - t0 <= PAY1 + 2 + 10, "five packets delivered within header setup + one flit per cycle");
    // ---- phase 2: random traffic with back-pressure
    throttle_in = 70; throttle_out = 60;
    for (int n = 0; n < 80; n++)
      for (int i = 0; i < NPORTS; i++) begin
        logic [3:0] d;
        do d = 4'($urandom); while (ref_route(d) == i && i != LOCAL);
        make_packet(i, d, $urandom_range(1, 10));
      end
    while (!all_delivered()) @(posedge clk);
    repeat (5) @(posedge clk);
    check(n_pkts == 5 + 400, "every packet delivered");
    check(n_fifo_full > 0, "an input was stalled by the core");
    check(n_arb > 0, "simultaneous routing requests were arbitrated");
    check(n_queued > 0, "an output had requests queued behind its owner");
    check(n_five > 0, "five concurrent paths occurred");
    $display("packets=%0d input_stalls=%0d arbitration=%0d queued=%0d five_paths=%0d",
             n_pkts, n_fifo_full, n_arb, n_queued, n_five);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
