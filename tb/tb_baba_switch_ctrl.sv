// tb_baba_switch_ctrl: self-checking test of the switch control of router 11
// (address 4'h5). Five ports raise address requests with random destinations
// and hold them until accepted; the crossbar side releases owned outputs at
// random. A reference model routes each accepted request with the XY rule
// and queues the requesting port per output. Checks: at most one request
// accepted per cycle, owners and their order per output, a request to a full
// output queue waits, simultaneous requests (arbitration) occur.
module tb_baba_switch_ctrl;
  import noc_pkg::*;
  localparam logic [3:0] ME = 4'h5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NPORTS-1:0]             addr_valid, addr_ready, ctrl_valid, ctrl_release;
  logic [NPORTS-1:0][3:0]        addr;
  logic [NPORTS-1:0][PORT_W-1:0] ctrl_in;
  int checks = 0, failures = 0, n_conflict = 0, n_full_wait = 0, n_accept = 0;
  int q [NPORTS][$];

  baba_switch_ctrl #(.ADDR_W(4), .ROUTER_ADDR(ME)) dut (.*);

  function automatic int ref_route(logic [3:0] d);
    if (d[3:2] != ME[3:2]) return (d[3:2] > ME[3:2]) ? 0 : 1;
    if (d[1:0] != ME[1:0]) return (d[1:0] > ME[1:0]) ? 2 : 3;
    return 4;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NPORTS-1:0] acc, rel;
    addr_valid = 0; addr = '0; ctrl_release = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < NPORTS; i++) begin
        if (!addr_valid[i] && $urandom_range(0, 3) == 0) begin
          addr_valid[i] = 1;
          // bias towards the Local output (4'h5) to fill its queue
          addr[i] = ($urandom_range(0, 2) == 0) ? ME : 4'($urandom);
        end
      end
      for (int o = 0; o < NPORTS; o++)
        ctrl_release[o] = ctrl_valid[o] && ($urandom_range(0, 7) == 0);
      #1;
      acc = addr_valid & addr_ready;
      rel = ctrl_release;
      check($countones(acc) <= 1, "one request accepted per cycle");
      if ($countones(addr_valid) > 1) n_conflict++;
      for (int i = 0; i < NPORTS; i++)
        if (addr_valid[i] && !acc[i] && dut.gnt[i]) n_full_wait++;
      @(posedge clk); #1;
      for (int o = 0; o < NPORTS; o++) if (rel[o]) void'(q[o].pop_front());
      for (int i = 0; i < NPORTS; i++) if (acc[i]) begin
        q[ref_route(addr[i])].push_back(i);
        addr_valid[i] = 0;
        n_accept++;
      end
      for (int o = 0; o < NPORTS; o++) begin
        check(ctrl_valid[o] == (q[o].size() > 0), "owner present");
        if (q[o].size() > 0) check(ctrl_in[o] == PORT_W'(q[o][0]), "owner order");
        check(q[o].size() <= 4, "request queue within 4 positions");
      end
    end
    check(n_conflict > 0, "simultaneous requests occurred");
    check(n_full_wait > 0, "a request waited for a full output queue");
    check(n_accept > 100, "requests accepted");
    $display("conflicts=%0d full_waits=%0d accepted=%0d", n_conflict, n_full_wait, n_accept);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
