// tb_baba_crossbar: self-checking test of the crossbar.
// Ownership of each output is set directly (as the switch control would)
// and packets are pushed from the owning inputs with random stalls on both
// sides. Checks that flits appear only on the owned output, in order, that
// the output is released exactly with the EOP flit, that non-owning inputs
// are stalled, and that five disjoint paths transfer in the same cycle.
module tb_baba_crossbar;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NPORTS-1:0]             d_valid, d_ready, d_eop, ctrl_valid, ctrl_release, out_valid, out_ready;
  logic [NPORTS-1:0][7:0]        d_data, out_data;
  logic [NPORTS-1:0][PORT_W-1:0] ctrl_in;
  int checks = 0, failures = 0, n_five = 0, n_released = 0;

  baba_crossbar #(.FLIT_W(8)) dut (.*);

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

  // per-input packet state
  int len [NPORTS], sent [NPORTS];
  logic [7:0] seq [NPORTS];

  initial begin
    int perm [NPORTS];
    d_valid = 0; d_eop = 0; d_data = '0; ctrl_valid = 0; ctrl_in = '0; out_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int round = 0; round < 200; round++) begin
      // random permutation input->output, some outputs unowned
      for (int i = 0; i < NPORTS; i++) perm[i] = i;
      perm.shuffle();
      @(negedge clk);
      for (int o = 0; o < NPORTS; o++) begin
        ctrl_valid[o] = (round % 4 == 0) || ($urandom_range(0, 3) != 0);
        ctrl_in[o]    = PORT_W'(perm[o]);
      end
      for (int i = 0; i < NPORTS; i++) begin
        len[i] = $urandom_range(1, 6); sent[i] = 0; seq[i] = 8'($urandom);
      end
      // transfer until every owned output released
      while (ctrl_valid != 0) begin
        logic [NPORTS-1:0] rel, ov, orr;
        logic [NPORTS-1:0][7:0] od;
        for (int i = 0; i < NPORTS; i++) begin
          d_valid[i] = (sent[i] < len[i]) && ((round % 4 == 0) || $urandom_range(0, 3) != 0);
          d_data[i]  = seq[i] + 8'(sent[i]);
          d_eop[i]   = (sent[i] == len[i] - 1);
        end
        out_ready = (round % 4 == 0) ? '1 : NPORTS'($urandom);
        #1;
        rel = ctrl_release; ov = out_valid; orr = out_ready; od = out_data;
        if ((ov & orr) == 5'b11111) n_five++;
        for (int o = 0; o < NPORTS; o++) begin
          int i; i = ctrl_in[o];
          if (!ctrl_valid[o]) check(!out_valid[o], "unowned output idle");
          else begin
            check(out_valid[o] == d_valid[i], "valid follows owner");
            if (out_valid[o]) check(out_data[o] == seq[i] + 8'(sent[i]), "flit order and value");
            check(d_ready[i] == out_ready[o], "ready returns to owner");
            check(rel[o] == (d_valid[i] && out_ready[o] && d_eop[i]), "release exactly at EOP");
          end
        end
        for (int i = 0; i < NPORTS; i++) begin
          bit owned; owned = 0;
          for (int o = 0; o < NPORTS; o++) if (ctrl_valid[o] && ctrl_in[o] == PORT_W'(i)) owned = 1;
          if (!owned) check(!d_ready[i], "non-owner stalled");
        end
        @(posedge clk); #1;
        for (int o = 0; o < NPORTS; o++)
          if (ctrl_valid[o] && ov[o] && orr[o]) sent[ctrl_in[o]]++;
        @(negedge clk);
        for (int o = 0; o < NPORTS; o++) if (rel[o]) begin ctrl_valid[o] = 0; n_released++; end
      end
      d_valid = 0;
    end
    check(n_five > 0, "five concurrent paths observed");
    check(n_released > 500, "outputs released");
    $display("five_paths=%0d released=%0d", n_five, n_released);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
