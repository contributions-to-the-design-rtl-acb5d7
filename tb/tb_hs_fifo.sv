// tb_hs_fifo: self-checking test of the handshaking FIFO.
// Random producer/consumer traffic against a queue model: data order, the
// ready flag (no room when DEPTH words are held), one-cycle input-to-output
// latency, and that the full and empty conditions are both reached.
module tb_hs_fifo;
  localparam int W = 8, D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0, n_full = 0, n_empty_after = 0;
  logic [W-1:0] model[$];

  hs_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency: a word written into the empty FIFO is visible one cycle later
    @(negedge clk); in_valid = 1; in_data = 8'hA5;
    @(negedge clk); in_valid = 0;
    check(out_valid && out_data == 8'hA5, "one-cycle latency");
    out_ready = 1; @(negedge clk); out_ready = 0;
    check(!out_valid, "empty after single pop");
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      check(in_ready == (model.size() < D), "in_ready matches occupancy");
      check(out_valid == (model.size() > 0), "out_valid matches occupancy");
      if (out_valid && model.size() > 0) check(out_data == model[0], "data order");
      if (model.size() == D) n_full++;
      // phases: fill-biased, then drain-biased
      in_valid  = ($urandom_range(0, 99) < ((cyc / 500) % 2 ? 30 : 80));
      out_ready = ($urandom_range(0, 99) < ((cyc / 500) % 2 ? 80 : 30));
      in_data   = W'($urandom);
      @(posedge clk);
      #1;
    end
    check(n_full > 0, "FIFO became full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update at the clock edge
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) void'(model.pop_front());
    if (in_valid && in_ready) model.push_back(in_data);
  end
endmodule
