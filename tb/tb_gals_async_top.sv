// tb_gals_async_top: end-to-end test of the whole top at its default
// parameters.
//
// All five designs run at the same time, each with its own traffic:
//  * BaBaRouter (node 11): five disjoint flows at once, then random packets
//    with random back-pressure;
//  * Hermes-GLP (node 11): five input clocks unrelated to the router's two
//    sources; an idle gap, low-priority traffic, mixed-priority traffic and a
//    blocked output that fills the input FIFOs;
//  * the 3x3 Hermes-GLP mesh: four random packets from every node, mixed
//    priority; afterwards every router clock must be stopped;
//  * Hermes-A (XY) and Hermes-AA (west-first) at node (1,1): four-phase
//    dual-rail packets from all five inputs;
//  * the C-element cells and the mutual-exclusion element: random input
//    sequences and simultaneous requests.
// Every packet is rebuilt at its output and compared with what its source
// sent, and its output is checked against the routing rule. Each mechanism
// the designs rely on is counted and must happen at least once: FIFO full,
// routing arbitration, queued output requests, five concurrent paths,
// clock gating, fast and slow clock, bisynchronous FIFO full, kill tokens,
// output contention, adaptive (non-XY) choices, multi-hop mesh packets,
// mesh routers on the fast clock, C-element hold and mutex
// tie resolution.
module tb_gals_async_top;
  import noc_pkg::*;
  import hermes_a_pkg::*;
  localparam logic [3:0] ME = 4'h5;

  logic clk = 0, rst_n = 0, glp_clk_fast = 0, glp_clk_slow = 0;
  logic [NPORTS-1:0] glp_rx_clk = '0;
  always #5 clk = ~clk;
  always #5 glp_clk_fast = ~glp_clk_fast;
  initial begin #3; forever #10 glp_clk_slow = ~glp_clk_slow; end
  always #3.5 glp_rx_clk[0] = ~glp_rx_clk[0];
  always #4.5 glp_rx_clk[1] = ~glp_rx_clk[1];
  always #5.5 glp_rx_clk[2] = ~glp_rx_clk[2];
  always #6.5 glp_rx_clk[3] = ~glp_rx_clk[3];
  always #8.5 glp_rx_clk[4] = ~glp_rx_clk[4];

  logic [NPORTS-1:0]      bb_rx_valid, bb_rx_ready, bb_tx_valid, bb_tx_ready;
  logic [NPORTS-1:0][7:0] bb_rx_data, bb_tx_data;
  logic [NPORTS-1:0]      glp_rx_valid, glp_rx_ready, glp_rx_prio, glp_tx_valid, glp_tx_ready, glp_tx_prio;
  logic [NPORTS-1:0][7:0] glp_rx_data, glp_tx_data;
  logic                   glp_tx_clk, glp_fast_on, glp_clk_on;
  dr_tok_t [NPORTS-1:0]   ha_in_tok, ha_out_tok, haa_in_tok, haa_out_tok;
  logic    [NPORTS-1:0]   ha_in_ack, ha_out_ack, ha_out_busy, haa_in_ack, haa_out_ack, haa_out_busy;
  logic [2:0]             cell_in = '0;
  logic                   cell_rst_n = 0;
  logic [3:0]             cell_q;
  logic [1:0]             mutex_req = '0, mutex_ack;

  logic [8:0]      noc_ip_clk = '0;
  logic [8:0]      noc_rx_valid, noc_rx_ready, noc_rx_prio, noc_tx_clk, noc_tx_valid, noc_tx_ready;
  logic [8:0]      noc_tx_prio, noc_fast_on, noc_clk_on;
  logic [8:0][7:0] noc_rx_data, noc_tx_data;
  for (genvar n = 0; n < 9; n++) begin : g_noc_clk
    always #(3.5 + 0.5 * n) noc_ip_clk[n] = ~noc_ip_clk[n];
  end

  gals_async_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int bb_fifo_full = 0, bb_arb = 0, bb_queued = 0, bb_five = 0, bb_pkts = 0;
  int glp_gated = 0, glp_fast = 0, glp_slow = 0, glp_full = 0, glp_pkts = 0;
  int ha_pkts [2], ha_kill [2], ha_contend [2], ha_non_xy [2];
  int cell_hold = 0, mutex_tie = 0;
  bit bb_done = 0, glp_done = 0, cells_done = 0, noc_done = 0;
  int noc_pkts = 0, noc_total = 0, noc_multi_hop = 0, noc_fast_routers = 0, noc_stopped = 0;
  int ha_done [2];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int ref_route(logic [3:0] d);
    if (d[3:2] != ME[3:2]) return (d[3:2] > ME[3:2]) ? 0 : 1;
    if (d[1:0] != ME[1:0]) return (d[1:0] > ME[1:0]) ? 2 : 3;
    return 4;
  endfunction

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ======================================================= BaBaRouter
  typedef logic [8:0] flit_q_t[$];     // {prio, flit}; prio unused for BaBa
  flit_q_t bb_stim [NPORTS];
  flit_q_t bb_sent [NPORTS][$];
  int      bb_route [NPORTS][$];
  flit_q_t bb_buf [NPORTS];
  int      bb_tin = 100, bb_tout = 100;

  task automatic bb_packet(input int src, input logic [3:0] dest, input int len);
    flit_q_t p;
    p.push_back({1'b0, 4'($urandom), dest});
    p.push_back({1'b0, 8'(len)});
    p.push_back({1'b0, 5'($urandom), 3'(src)});
    for (int k = 1; k < len; k++) p.push_back({1'b0, 8'($urandom)});
    foreach (p[k]) bb_stim[src].push_back(p[k]);
    bb_sent[src].push_back(p);
    bb_route[src].push_back(ref_route(dest));
  endtask

  function automatic bit bb_idle();
    for (int i = 0; i < NPORTS; i++) if (bb_sent[i].size() > 0 || bb_stim[i].size() > 0) return 0;
    return 1;
  endfunction

  initial begin
    logic [NPORTS-1:0] in_fire, out_fire;
    logic [NPORTS-1:0][7:0] od;
    bb_rx_valid = 0; bb_rx_data = '0; bb_tx_ready = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      for (int i = 0; i < NPORTS; i++) begin
        bb_rx_valid[i] = (bb_stim[i].size() > 0) && ($urandom_range(1, 100) <= bb_tin);
        bb_rx_data[i]  = (bb_stim[i].size() > 0) ? bb_stim[i][0][7:0] : 8'h00;
        bb_tx_ready[i] = ($urandom_range(1, 100) <= bb_tout);
      end
      #1;
      in_fire  = bb_rx_valid & bb_rx_ready;
      out_fire = bb_tx_valid & bb_tx_ready;
      od       = bb_tx_data;
      for (int i = 0; i < NPORTS; i++) if (bb_rx_valid[i] && !bb_rx_ready[i]) bb_fifo_full++;
      if ($countones(dut.u_baba.u_core.addr_valid) > 1) bb_arb++;
      if (dut.u_baba.u_core.u_switch.g_out[0].u_req_fifo.count > 1 ||
          dut.u_baba.u_core.u_switch.g_out[1].u_req_fifo.count > 1 ||
          dut.u_baba.u_core.u_switch.g_out[2].u_req_fifo.count > 1 ||
          dut.u_baba.u_core.u_switch.g_out[3].u_req_fifo.count > 1 ||
          dut.u_baba.u_core.u_switch.g_out[4].u_req_fifo.count > 1) bb_queued++;
      if (out_fire == '1) bb_five++;
      @(posedge clk); #1;
      for (int i = 0; i < NPORTS; i++) if (in_fire[i]) void'(bb_stim[i].pop_front());
      for (int o = 0; o < NPORTS; o++) if (out_fire[o]) begin
        bb_buf[o].push_back({1'b0, od[o]});
        if (bb_buf[o].size() >= 3 && bb_buf[o].size() == 2 + int'(bb_buf[o][1][7:0])) begin
          int src; src = int'(bb_buf[o][2][2:0]);
          check(src < NPORTS && bb_sent[src].size() > 0, "BaBa: packet has a pending source");
          if (src < NPORTS && bb_sent[src].size() > 0) begin
            check(bb_buf[o] == bb_sent[src][0], "BaBa: packet contents and order");
            check(bb_route[src][0] == o, "BaBa: XY output");
            void'(bb_sent[src].pop_front()); void'(bb_route[src].pop_front());
          end
          bb_pkts++;
          bb_buf[o].delete();
        end
      end
    end
  end

  initial begin
    int t0, run, best;
    wait (rst_n);
    @(negedge clk);
    bb_packet(EAST, 4'h1, 20); bb_packet(LOCAL, 4'h9, 20); bb_packet(NORTH, 4'h4, 20);
    bb_packet(SOUTH, 4'h6, 20); bb_packet(WEST, 4'h5, 20);
    t0 = $time / 10; run = 0; best = 0;
    while (!bb_idle()) begin
      @(posedge clk); #2;
      if ((bb_tx_valid & bb_tx_ready) == '1) run++; else run = 0;
      if (run > best) best = run;
    end
    check(best >= 18, "BaBa: five paths at one flit per cycle");
    check($time / 10 - t0 <= 22 + 12, "BaBa: five packets within setup + one flit per cycle");
    bb_tin = 70; bb_tout = 50;
    for (int n = 0; n < 30; n++)
      for (int i = 0; i < NPORTS; i++) begin
        logic [3:0] d;
        do d = 4'($urandom); while (ref_route(d) == i && i != LOCAL);
        bb_packet(i, d, $urandom_range(1, 8));
      end
    while (!bb_idle()) @(posedge clk);
    check(bb_pkts == 155, "BaBa: every packet delivered");
    bb_done = 1;
  end

  // ======================================================= Hermes-GLP
  flit_q_t glp_stim [NPORTS];
  flit_q_t glp_sent [NPORTS][$];
  int      glp_route [NPORTS][$];
  flit_q_t glp_buf [NPORTS];
  int      glp_tin = 100, glp_tout = 100;
  bit      glp_block = 0;

  task automatic glp_packet(input int src, input logic [3:0] dest, input int len, input bit prio);
    flit_q_t p;
    p.push_back({prio, 4'($urandom), dest});
    p.push_back({prio, 8'(len)});
    p.push_back({prio, 5'($urandom), 3'(src)});
    for (int k = 1; k < len; k++) p.push_back({prio, 8'($urandom)});
    foreach (p[k]) glp_stim[src].push_back(p[k]);
    glp_sent[src].push_back(p);
    glp_route[src].push_back(ref_route(dest));
  endtask

  function automatic bit glp_idle();
    for (int i = 0; i < NPORTS; i++) if (glp_sent[i].size() > 0 || glp_stim[i].size() > 0) return 0;
    return 1;
  endfunction

  for (genvar gi = 0; gi < NPORTS; gi++) begin : g_glp_send
    initial begin
      bit fire;
      glp_rx_valid[gi] = 0; glp_rx_data[gi] = '0; glp_rx_prio[gi] = 0;
      wait (rst_n);
      forever begin
        @(negedge glp_rx_clk[gi]);
        glp_rx_valid[gi] = (glp_stim[gi].size() > 0) && ($urandom_range(1, 100) <= glp_tin);
        {glp_rx_prio[gi], glp_rx_data[gi]} = (glp_stim[gi].size() > 0) ? glp_stim[gi][0] : 9'h0;
        #0.5 fire = glp_rx_valid[gi] && glp_rx_ready[gi];
        if (glp_rx_valid[gi] && !glp_rx_ready[gi]) glp_full++;
        @(posedge glp_rx_clk[gi]);
        if (fire) void'(glp_stim[gi].pop_front());
      end
    end
  end

  initial begin
    logic [NPORTS-1:0] out_fire;
    logic [NPORTS-1:0][8:0] od;
    glp_tx_ready = '0;
    wait (rst_n);
    forever begin
      @(negedge glp_tx_clk);
      for (int o = 0; o < NPORTS; o++)
        glp_tx_ready[o] = ($urandom_range(1, 100) <= glp_tout) && !(glp_block && o == 0);
      #0.5;
      out_fire = glp_tx_valid & glp_tx_ready;
      for (int o = 0; o < NPORTS; o++) od[o] = {glp_tx_prio[o], glp_tx_data[o]};
      @(posedge glp_tx_clk);
      for (int o = 0; o < NPORTS; o++) if (out_fire[o]) begin
        glp_buf[o].push_back(od[o]);
        if (glp_buf[o].size() >= 3 && glp_buf[o].size() == 2 + int'(glp_buf[o][1][7:0])) begin
          int src; src = int'(glp_buf[o][2][2:0]);
          check(src < NPORTS && glp_sent[src].size() > 0, "GLP: packet has a pending source");
          if (src < NPORTS && glp_sent[src].size() > 0) begin
            check(glp_buf[o] == glp_sent[src][0], "GLP: packet contents, priority and order");
            check(glp_route[src][0] == o, "GLP: XY output");
            void'(glp_sent[src].pop_front()); void'(glp_route[src].pop_front());
          end
          glp_pkts++;
          glp_buf[o].delete();
        end
      end
    end
  end

  always @(posedge glp_clk_fast) if (rst_n) begin
    if (!glp_clk_on) glp_gated++;
    else if (glp_fast_on) glp_fast++;
    else glp_slow++;
  end

  task automatic glp_random(input int n, input int prio_pct);
    for (int k = 0; k < n; k++)
      for (int i = 0; i < NPORTS; i++) begin
        logic [3:0] d;
        do d = 4'($urandom); while (ref_route(d) == i && i != LOCAL);
        glp_packet(i, d, $urandom_range(1, 8), $urandom_range(1, 100) <= prio_pct);
      end
  endtask

  initial begin
    int fast0;
    wait (rst_n);
    #1000;
    check(!glp_clk_on, "GLP: router clock stopped while idle");
    fast0 = glp_fast;
    glp_random(8, 0);
    while (!glp_idle()) #100;
    check(glp_fast == fast0, "GLP: slow clock for low-priority traffic");
    glp_tin = 70; glp_tout = 60;
    glp_random(12, 40);
    while (!glp_idle()) #100;
    glp_tin = 100; glp_tout = 100; glp_block = 1;
    for (int i = 1; i < NPORTS; i++) glp_packet(i, 4'hD, 12, i[0]);
    #3000 glp_block = 0;
    while (!glp_idle()) #100;
    #1000;
    check(!glp_clk_on, "GLP: clock stopped again after the traffic");
    check(glp_pkts == 40 + 60 + 4, "GLP: every packet delivered");
    glp_done = 1;
  end

  // ======================================================= Hermes-A / Hermes-AA
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

  localparam int HA_NPK = 25;
  for (genvar r = 0; r < 2; r++) begin : g_ha
    dr_tok_t [NPORTS-1:0] in_tok = '0, out_tok;
    logic    [NPORTS-1:0] in_ack, out_ack = '0;
    dr_tok_t sent [NPORTS][$];
    if (r == 0) begin : g_xy
      assign ha_in_tok = in_tok; assign in_ack = ha_in_ack;
      assign out_tok = ha_out_tok; assign ha_out_ack = out_ack;
    end else begin : g_wf
      assign haa_in_tok = in_tok; assign in_ack = haa_in_ack;
      assign out_tok = haa_out_tok; assign haa_out_ack = out_ack;
    end

    for (genvar s = 0; s < NPORTS; s++) begin : g_src
      initial begin
        wait (rst_n);
        for (int n = 0; n < HA_NPK; n++) begin
          logic [3:0] tx, ty; int len;
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
        ha_done[r]++;
      end
    end

    for (genvar o = 0; o < NPORTS; o++) begin : g_dst
      initial begin
        dr_tok_t cur[$];
        forever begin
          @(negedge clk);
          check(!(out_tok[o].t[BOP_B] && out_tok[o].t[EOP_B]), "Hermes-A: kill token stays inside");
          if (!out_ack[o] && complete(out_tok[o]) && $urandom_range(0, 2) != 0) begin
            out_ack[o] = 1;
            cur.push_back(out_tok[o]);
            if (out_tok[o].t[EOP_B]) begin
              int s; logic [3:0] tx, ty;
              s = int'(cur[1].t[2:0]);
              {ty, tx} = cur[0].t[7:0];
              if (r == 0) check(o == xy(tx, ty), "Hermes-A: XY output");
              else begin
                check(productive(o, tx, ty) && ((o == WEST) == (tx < 1)), "Hermes-AA: minimal west-first output");
                if (o != xy(tx, ty)) ha_non_xy[r]++;
              end
              if (s < NPORTS) foreach (cur[k]) begin
                check(sent[s].size() > 0 && cur[k] == sent[s][0], "Hermes-A: packet whole and in order");
                if (sent[s].size() > 0) void'(sent[s].pop_front());
              end else check(0, "Hermes-A: source byte");
              ha_pkts[r]++;
              cur.delete();
            end
          end else if (out_ack[o] && is_spacer(out_tok[o]) && $urandom_range(0, 2) != 0) out_ack[o] = 0;
        end
      end
    end
  end

  always @(posedge clk) if (rst_n)
    for (int o = 0; o < NPORTS; o++) begin
      if ($countones(dut.u_hermes_a.src_rt[o]) > 1)  ha_contend[0]++;
      if ($countones(dut.u_hermes_aa.src_rt[o]) > 1) ha_contend[1]++;
      if (dut.u_hermes_a.kills[o] != '0)  ha_kill[0]++;
      if (dut.u_hermes_aa.kills[o] != '0) ha_kill[1]++;
    end

  // ======================================================= ASCEnD cells
  initial begin
    logic [3:0] qp, qn;
    #1 cell_rst_n = 1; #1;
    qp = cell_q;
    for (int n = 0; n < 2000; n++) begin
      {cell_in} = ($urandom_range(0, 3) == 0) ? 3'($urandom) : cell_in ^ 3'(1 << $urandom_range(0, 2));
      #1;
      qn[0] = (cell_in[0] & cell_in[1]) | (qp[0] & (cell_in[0] | cell_in[1]));
      qn[1] = (&cell_in) | (qp[1] & (|cell_in));
      qn[2] = (cell_in[0] & cell_in[1]) | (qp[2] & (cell_in[0] | cell_in[1]));
      qn[3] = cell_in[1] & (cell_in[0] | qp[3]);
      for (int k = 0; k < 4; k++) if (!$isunknown(qp[k])) check(cell_q[k] == qn[k], "cell next state");
      if (cell_q[0] == qp[0] && cell_in[0] != cell_in[1]) cell_hold++;
      qp = cell_q;
    end
    for (int n = 0; n < 20; n++) begin
      #10 mutex_req = 2'b11;
      #5 check(mutex_ack == 2'b01 || mutex_ack == 2'b10, "mutex: one winner");
      if (mutex_ack == 2'b01 || mutex_ack == 2'b10) mutex_tie++;
      mutex_req = 2'b00;
      #5 check(mutex_ack == 2'b00, "mutex: released");
    end
    cells_done = 1;
  end

  // ======================================================= end
  // ======================================================= Hermes-GLP 3x3 mesh
  typedef logic [8:0] noc_q_t[$];
  noc_q_t noc_stim [9];
  noc_q_t noc_sent [9][9][$];
  noc_q_t noc_buf [9];
  int     noc_fast_cnt [9];

  function automatic logic [3:0] noc_addr(int n);
    return {2'(n % 3), 2'(n / 3)};
  endfunction

  for (genvar gn = 0; gn < 9; gn++) begin : g_noc
    initial begin
      bit fire;
      noc_rx_valid[gn] = 0; noc_rx_data[gn] = '0; noc_rx_prio[gn] = 0;
      wait (rst_n);
      forever begin
        @(negedge noc_ip_clk[gn]);
        noc_rx_valid[gn] = (noc_stim[gn].size() > 0);
        {noc_rx_prio[gn], noc_rx_data[gn]} = (noc_stim[gn].size() > 0) ? noc_stim[gn][0] : 9'h0;
        #0.5 fire = noc_rx_valid[gn] && noc_rx_ready[gn];
        @(posedge noc_ip_clk[gn]);
        if (fire) void'(noc_stim[gn].pop_front());
      end
    end
    initial begin
      bit fire;
      logic [8:0] od;
      noc_tx_ready[gn] = 0;
      wait (rst_n);
      forever begin
        @(negedge noc_tx_clk[gn]);
        noc_tx_ready[gn] = ($urandom_range(1, 100) <= 80);
        #0.5;
        fire = noc_tx_valid[gn] && noc_tx_ready[gn];
        od   = {noc_tx_prio[gn], noc_tx_data[gn]};
        @(posedge noc_tx_clk[gn]);
        if (fire) begin
          noc_buf[gn].push_back(od);
          if (noc_buf[gn].size() >= 3 && noc_buf[gn].size() == 2 + int'(noc_buf[gn][1][7:0])) begin
            int src; src = int'(noc_buf[gn][2][3:0]);
            check(src < 9 && noc_sent[src][gn].size() > 0, "mesh: packet has a pending source");
            if (src < 9 && noc_sent[src][gn].size() > 0) begin
              check(noc_buf[gn] == noc_sent[src][gn][0], "mesh: packet contents, priority and order");
              void'(noc_sent[src][gn].pop_front());
            end
            noc_pkts++;
            noc_buf[gn].delete();
          end
        end
      end
    end
  end

  always @(posedge glp_clk_fast) if (rst_n)
    for (int n = 0; n < 9; n++) if (noc_clk_on[n] && noc_fast_on[n]) noc_fast_cnt[n]++;

  initial begin
    foreach (noc_fast_cnt[n]) noc_fast_cnt[n] = 0;
    wait (rst_n);
    #500;
    for (int k = 0; k < 4; k++)
      for (int s = 0; s < 9; s++) begin
        int d, len; bit prio; noc_q_t p;
        p.delete();
        d = $urandom_range(0, 8); len = $urandom_range(1, 10); prio = ($urandom_range(0, 1) == 1);
        p.push_back({prio, 4'($urandom), noc_addr(d)});
        p.push_back({prio, 8'(len)});
        p.push_back({prio, 4'($urandom), 4'(s)});
        for (int j = 1; j < len; j++) p.push_back({prio, 8'($urandom)});
        foreach (p[j]) noc_stim[s].push_back(p[j]);
        noc_sent[s][d].push_back(p);
        noc_total++;
        if ((s % 3 > d % 3 ? s % 3 - d % 3 : d % 3 - s % 3) + (s / 3 > d / 3 ? s / 3 - d / 3 : d / 3 - s / 3) >= 2)
          noc_multi_hop++;
      end
    forever begin
      bit busy; busy = 0;
      for (int s = 0; s < 9; s++) begin
        if (noc_stim[s].size() > 0) busy = 1;
        for (int d = 0; d < 9; d++) if (noc_sent[s][d].size() > 0) busy = 1;
      end
      if (!busy) break;
      #100;
    end
    #1000;
    check(noc_pkts == noc_total, "mesh: every packet delivered");
    for (int n = 0; n < 9; n++) begin
      if (!noc_clk_on[n]) noc_stopped++;
      if (noc_fast_cnt[n] > 0) noc_fast_routers++;
    end
    check(noc_stopped == 9, "mesh: every router clock stopped after the traffic");
    noc_done = 1;
  end

  initial begin
    repeat (10) @(posedge clk); rst_n = 1;   // several slow-clock cycles for the GLP core
    wait (bb_done && glp_done && cells_done && noc_done && ha_done[0] == NPORTS && ha_done[1] == NPORTS);
    repeat (50) @(negedge clk);
    check(ha_pkts[0] == NPORTS * HA_NPK && ha_pkts[1] == NPORTS * HA_NPK, "Hermes-A/AA: every packet delivered");
    check(bb_fifo_full > 0, "mechanism: BaBa input FIFO full");
    check(bb_arb > 0,       "mechanism: BaBa routing arbitration");
    check(bb_queued > 0,    "mechanism: BaBa queued output request");
    check(bb_five > 0,      "mechanism: BaBa five concurrent paths");
    check(glp_gated > 0,    "mechanism: GLP clock gated");
    check(glp_fast > 0,     "mechanism: GLP fast clock");
    check(glp_slow > 0,     "mechanism: GLP slow clock");
    check(glp_full > 0,     "mechanism: GLP bisynchronous FIFO full");
    check(ha_kill[0] > 0 && ha_kill[1] > 0,       "mechanism: kill tokens");
    check(ha_contend[0] > 0 && ha_contend[1] > 0, "mechanism: Hermes-A output contention");
    check(ha_non_xy[1] > 0, "mechanism: Hermes-AA adaptive choice");
    check(noc_multi_hop > 0,    "mechanism: mesh packets over two or more hops");
    check(noc_fast_routers > 0, "mechanism: mesh routers on the fast clock");
    check(cell_hold > 0,    "mechanism: C-element hold");
    check(mutex_tie > 0,    "mechanism: mutex tie resolved");
    $display("BaBa: packets=%0d fifo_full=%0d arbitration=%0d queued=%0d five_paths=%0d",
             bb_pkts, bb_fifo_full, bb_arb, bb_queued, bb_five);
    $display("GLP: packets=%0d gated=%0d fast=%0d slow=%0d fifo_full=%0d",
             glp_pkts, glp_gated, glp_fast, glp_slow, glp_full);
    $display("Hermes-A: packets=%0d kill=%0d contention=%0d | Hermes-AA: packets=%0d kill=%0d contention=%0d non_xy=%0d",
             ha_pkts[0], ha_kill[0], ha_contend[0], ha_pkts[1], ha_kill[1], ha_contend[1], ha_non_xy[1]);
    $display("GLP mesh: packets=%0d multi_hop=%0d fast_routers=%0d stopped=%0d",
             noc_pkts, noc_multi_hop, noc_fast_routers, noc_stopped);
    $display("cells: hold=%0d mutex ties=%0d", cell_hold, mutex_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
