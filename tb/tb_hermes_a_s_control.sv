// tb_hermes_a_s_control: handshake-order test of the end-of-packet
// sequencer.
//
// The environment plays the input side (four-phase Req in / Ack out) and
// the two output channels A and B, each answering after a random delay. Every
// signal transition is logged and the log of each sequence must be exactly:
// Req in+, Ack out+, Req in-, Req A+, Ack A+, Req A-, Ack A-, Req B+, Ack B+,
// Req B-, Ack B-, Ack out-. Channel A must carry the captured EOP flit while
// Req A is high and a spacer otherwise; channel B must carry the kill token
// (BOP and EOP both set) while Req B is high and a spacer otherwise.
module tb_hermes_a_s_control;
  import hermes_a_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_in = 0, ack_out, req_a, ack_a = 0, req_b, ack_b = 0;
  dr_tok_t din = SPACER, dout_a, dout_b;
  hermes_a_s_control dut (.*);

  int checks = 0, failures = 0, n_seq = 0;
  string log_q[$];
  dr_tok_t flit;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // transition logger (all signals change on edges, so sample after them)
  logic p_req_in, p_ack_out, p_req_a, p_ack_a, p_req_b, p_ack_b;
  always @(posedge clk or negedge clk) begin
    #2;
    if (req_in  != p_req_in)  log_q.push_back(req_in  ? "Req in+"  : "Req in-");
    if (ack_out != p_ack_out) log_q.push_back(ack_out ? "Ack out+" : "Ack out-");
    if (req_a   != p_req_a)   log_q.push_back(req_a   ? "Req A+"   : "Req A-");
    if (ack_a   != p_ack_a)   log_q.push_back(ack_a   ? "Ack A+"   : "Ack A-");
    if (req_b   != p_req_b)   log_q.push_back(req_b   ? "Req B+"   : "Req B-");
    if (ack_b   != p_ack_b)   log_q.push_back(ack_b   ? "Ack B+"   : "Ack B-");
    {p_req_in, p_ack_out, p_req_a, p_ack_a, p_req_b, p_ack_b} =
      {req_in, ack_out, req_a, ack_a, req_b, ack_b};
    check(req_a ? (dout_a == flit) : (dout_a == SPACER), "channel A data");
    check(req_b ? (dout_b == kill_token()) : (dout_b == SPACER), "channel B data");
  end

  // output channel responders
  initial forever begin
    @(negedge clk);
    if (req_a != ack_a && $urandom_range(0, 3) == 0) ack_a = req_a;
    if (req_b != ack_b && $urandom_range(0, 3) == 0) ack_b = req_b;
  end

  initial begin
    string want[$];
    want = '{"Req in+", "Ack out+", "Req in-", "Req A+", "Ack A+", "Req A-", "Ack A-",
             "Req B+", "Ack B+", "Req B-", "Ack B-", "Ack out-"};
    {p_req_in, p_ack_out, p_req_a, p_ack_a, p_req_b, p_ack_b} = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      @(negedge clk);
      flit = encode(1'b0, 1'b1, 8'($urandom));
      din = flit; req_in = 1;
      wait (ack_out); @(negedge clk);
      din = SPACER; req_in = 0;
      wait (!ack_out);
      repeat (2) @(negedge clk);
      check(log_q.size() == want.size(), "number of transitions in a sequence");
      for (int k = 0; k < want.size() && k < log_q.size(); k++)
        check(log_q[k] == want[k], $sformatf("transition %0d is %s (got %s)", k, want[k], log_q[k]));
      log_q.delete();
      n_seq++;
    end
    $display("sequences=%0d", n_seq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
