// tb_baba_in_ctrl: self-checking test of IN CTRL.
// Sends Hermes packets (address, size, payload) of random sizes, including
// size 0, with random stalls on both output channels. Checks that each packet
// produces exactly one address (the header's lower half) before its header
// flit reaches the crossbar, that flits pass in order and unchanged, and that
// EOP marks exactly the last flit.
module tb_baba_in_ctrl;
  localparam int W = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, addr_valid, addr_ready, d_valid, d_ready, d_eop, busy;
  logic [W-1:0] in_data, d_data;
  logic [W/2-1:0] addr;
  int checks = 0, failures = 0;

  baba_in_ctrl #(.FLIT_W(W)) dut (.*);

  typedef struct { logic [W-1:0] flit; logic eop; } exp_t;
  exp_t           exp_q[$];
  logic [W/2-1:0] exp_addr[$];
  logic [W-1:0]   stim[$];
  int             addr_seen = 0, pkt_done = 0, hdr_pending = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // build the stimulus
  initial begin
    for (int p = 0; p < 60; p++) begin
      logic [W-1:0] hdr, sz;
      hdr = W'($urandom);
      sz  = (p % 7 == 3) ? 0 : W'($urandom_range(1, 12));
      stim.push_back(hdr); exp_addr.push_back(hdr[W/2-1:0]);
      exp_q.push_back('{hdr, 1'b0});
      stim.push_back(sz);  exp_q.push_back('{sz, sz == 0});
      for (int k = 0; k < sz; k++) begin
        logic [W-1:0] d; d = W'($urandom);
        stim.push_back(d); exp_q.push_back('{d, k == sz - 1});
      end
    end
  end

  // driver
  initial begin
    in_valid = 0; in_data = 0; addr_ready = 0; d_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    while (stim.size() > 0) begin
      @(negedge clk);
      in_valid   = ($urandom_range(0, 3) != 0);
      in_data    = stim[0];
      addr_ready = ($urandom_range(0, 2) != 0);
      d_ready    = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (in_valid && in_ready) void'(stim.pop_front());
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0, "all flits delivered");
    check(exp_addr.size() == 0, "all addresses delivered");
    check(pkt_done == 60, "60 packets ended with EOP");
    check(!busy, "idle after last packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitors
  always @(posedge clk) if (rst_n) begin
    if (addr_valid && addr_ready) begin
      check(exp_addr.size() > 0 && addr == exp_addr[0], "address value");
      check(hdr_pending == 0, "one address per packet");
      void'(exp_addr.pop_front());
      hdr_pending = 1;
    end else if (d_valid && d_ready) begin
      if (exp_q.size() > 0) begin
        check(d_data == exp_q[0].flit, "flit value");
        check(d_eop == exp_q[0].eop, "EOP flag");
        if (d_eop) pkt_done++;
        void'(exp_q.pop_front());
      end else check(0, "unexpected flit");
      hdr_pending = 0;
    end
  end
endmodule
