// tb_ascend_celem: function test of the four C-element cells.
//
// All four variants see the same random input sequence (one change per
// step, plus steps that change several inputs at once). After every step
// each output is compared with a reference next-state function evaluated on
// the present output. The test also requires that every cell has been seen
// holding its state while its inputs disagree, and switching both ways.
module tb_ascend_celem;
  import ascend_pkg::*;
  logic a = 0, b = 0, c = 0, rst_n = 0;
  logic [3:0] q;
  ascend_celem #(.CELL(CELL_C2))   u_c2   (.a, .b, .c, .rst_n, .q(q[0]));
  ascend_celem #(.CELL(CELL_C3))   u_c3   (.a, .b, .c, .rst_n, .q(q[1]));
  ascend_celem #(.CELL(CELL_C2R1)) u_c2r1 (.a, .b, .c, .rst_n, .q(q[2]));
  ascend_celem #(.CELL(CELL_C1U1)) u_c1u1 (.a, .b, .c, .rst_n, .q(q[3]));

  int checks = 0, failures = 0;
  int holds [4], rises [4], falls [4];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s a=%b b=%b c=%b rst_n=%b q=%b at %0t", what, a, b, c, rst_n, q, $time); end
  endtask

  function automatic logic [3:0] ref_next(logic [3:0] qp);
    logic [3:0] n;
    n[0] = (a & b) | (a & qp[0]) | (b & qp[0]);
    n[1] = (a & b & c) | (qp[1] & (a | b | c));
    n[2] = rst_n & ((a & b) | (a & qp[2]) | (b & qp[2]));
    n[3] = b & (a | qp[3]);
    return n;
  endfunction

  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [3:0] qp, qn;
    // reset clears C2R1; the others start from whatever was last loaded
    #1; rst_n = 1; #1;
    check(q[2] == 0, "C2R1 reset");
    qp = q;
    for (int n = 0; n < 20000; n++) begin
      if ($urandom_range(0, 3) == 0) {a, b, c} = 3'($urandom);
      else case ($urandom_range(0, 2)) 0: a = ~a; 1: b = ~b; default: c = ~c; endcase
      rst_n = ($urandom_range(0, 30) != 0);
      #1;
      if ($isunknown(qp)) qp = q;       // first steps: outputs not yet defined
      qn = ref_next(qp);
      for (int k = 0; k < 4; k++) begin
        if (!$isunknown(qp[k])) begin
          check(q[k] == qn[k], $sformatf("cell %0d next state", k));
          if (q[k] == qp[k]) holds[k]++;
          if (q[k] && !qp[k]) rises[k]++;
          if (!q[k] && qp[k]) falls[k]++;
        end
      end
      qp = q;
    end
    for (int k = 0; k < 4; k++)
      check(holds[k] > 0 && rises[k] > 0 && falls[k] > 0, $sformatf("cell %0d held, set and cleared", k));
    $display("C2 %0d/%0d/%0d C3 %0d/%0d/%0d C2R1 %0d/%0d/%0d C1U1 %0d/%0d/%0d (hold/set/clear)",
             holds[0], rises[0], falls[0], holds[1], rises[1], falls[1],
             holds[2], rises[2], falls[2], holds[3], rises[3], falls[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
