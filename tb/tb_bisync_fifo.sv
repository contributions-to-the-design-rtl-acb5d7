// tb_bisync_fifo: two-clock FIFO test with unrelated write and read clocks.
//
// The writer (period 10) and the reader (period 7, then 23) push and pop at
// random. A queue model checks every popped word and its order; the test
// also checks that a write is never lost when the FIFO is full, that a read
// is never made when it is empty, and that full, empty and occupied all
// happened and then cleared. Inputs are driven on the falling edge of their
// own clock.
module tb_bisync_fifo;
  localparam int DW = 9, AW = 3;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  int   rhalf = 3;                       // read half period, changed mid test
  always #5 wclk = ~wclk;
  always begin #(rhalf) rclk = ~rclk; end

  logic winc, wfull, occupied, rinc, rempty;
  logic [DW-1:0] wdata, rdata;
  bisync_fifo #(.DATA_W(DW), .ADDR_W(AW)) dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_nonempty = 0;
  int wr_pct = 50, rd_pct = 50, written = 0, read = 0;
  logic [DW-1:0] model[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // writer
  initial begin
    winc = 0; wdata = '0;
    repeat (3) @(posedge wclk); wrst_n = 1;
    forever begin
      bit fire;
      @(negedge wclk);
      winc = ($urandom_range(1, 100) <= wr_pct); wdata = DW'($urandom);
      #1 fire = winc && !wfull;
      if (wfull) n_full++;
      if (occupied) n_nonempty++;
      @(posedge wclk);
      if (fire) begin model.push_back(wdata); written++; end
    end
  end

  // reader
  initial begin
    rinc = 0;
    repeat (3) @(posedge rclk); rrst_n = 1;
    forever begin
      bit fire; logic [DW-1:0] d;
      @(negedge rclk);
      rinc = ($urandom_range(1, 100) <= rd_pct);
      #1 fire = rinc && !rempty; d = rdata;
      if (rempty) n_empty++;
      @(posedge rclk);
      if (fire) begin
        check(model.size() > 0, "read only data that was written");
        if (model.size() > 0) check(d == model.pop_front(), "read data and order");
        read++;
      end
    end
  end

  initial begin
    wait (wrst_n && rrst_n);
    wr_pct = 90; rd_pct = 20; #40000;      // writer faster: fills
    wr_pct = 20; rd_pct = 90; #40000;      // reader faster: drains
    rhalf = 11;
    wr_pct = 60; rd_pct = 60; #80000;      // slow reader, mixed
    wr_pct = 0; rd_pct = 100; #3000;       // drain completely
    check(model.size() == 0, "everything written was read");
    check(rempty && !wfull && !occupied, "idle flags after drain");
    check(n_full > 0, "FIFO reached full");
    check(n_empty > 0, "FIFO reached empty");
    check(n_nonempty > 0, "occupied seen while data was held");
    $display("written=%0d read=%0d full=%0d empty=%0d", written, read, n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
