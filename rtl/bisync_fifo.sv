// bisync_fifo: bisynchronous (dual-clock) FIFO, the input buffer of the
// Hermes-G and Hermes-GLP GALS routers.
//
// A dual-port memory is written on wclk and read on rclk, so one word can be
// written per write-clock cycle and one read per read-clock cycle. Each side
// keeps a binary pointer one bit wider than the address, plus its Gray-coded
// copy (wptr, rptr). The Gray pointers cross to the other domain through
// two-flop synchronizers (sync_w2r, sync_r2w); since consecutive Gray values
// differ in one bit, a synchronizer can only return the old or the new value.
// The read side raises empty when its pointer equals the synchronized write
// pointer; the write side raises full when the synchronized read pointer
// equals its own with the two top bits inverted. Late synchronization only
// makes empty or full appear early (pessimistic), never loses data.
//
// Interface: write side winc/wdata/wfull on wclk, read side rinc/rdata/rempty
// on rclk (rdata is the oldest word, valid while !rempty; rinc pops it).
// occupied is high while the FIFO holds words the reader has not taken. It
// compares the two Gray pointers directly, belongs to neither clock domain
// and must be synchronized by its user; since only one pointer bit changes
// at a time it moves cleanly. The GLP clock control uses it both to wake a
// clock-gated router and to let it stop, which has to work while the writer's
// clock or the reader's clock (or both) are stopped. Each domain has its own asynchronous active-low
// reset.
//
// Own choice: DEPTH = 2**ADDR_W = 8 words by default, matching the 8-flit
// input buffers used elsewhere in the router family.
module bisync_fifo #(
  parameter int unsigned DATA_W = 9,
  parameter int unsigned ADDR_W = 3
) (
  input  logic              wclk,
  input  logic              wrst_n,
  input  logic              winc,
  input  logic [DATA_W-1:0] wdata,
  output logic              wfull,
  output logic              occupied,
  input  logic              rclk,
  input  logic              rrst_n,
  input  logic              rinc,
  output logic [DATA_W-1:0] rdata,
  output logic              rempty
);
  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [ADDR_W:0]   wbin, wptr, wq2_rptr;
  logic [ADDR_W:0]   rbin, rptr, rq2_wptr;
  logic [ADDR_W:0]   wbin_next, wgray_next, rbin_next, rgray_next;

  // ---------------- write domain ----------------
  assign wbin_next  = wbin + (ADDR_W+1)'(winc && !wfull);
  assign wgray_next = (wbin_next >> 1) ^ wbin_next;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wptr  <= '0;
      wfull <= 1'b0;
    end else begin
      wbin  <= wbin_next;
      wptr  <= wgray_next;
      wfull <= (wgray_next == {~wq2_rptr[ADDR_W:ADDR_W-1], wq2_rptr[ADDR_W-2:0]});
    end
  end

  always_ff @(posedge wclk) begin
    if (winc && !wfull) mem[wbin[ADDR_W-1:0]] <= wdata;
  end

  assign occupied = (wptr != rptr);

  sync2 #(.W(ADDR_W+1)) u_sync_r2w (.clk(wclk), .rst_n(wrst_n), .d(rptr), .q(wq2_rptr));

  // ---------------- read domain ----------------
  assign rbin_next  = rbin + (ADDR_W+1)'(rinc && !rempty);
  assign rgray_next = (rbin_next >> 1) ^ rbin_next;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin   <= '0;
      rptr   <= '0;
      rempty <= 1'b1;
    end else begin
      rbin   <= rbin_next;
      rptr   <= rgray_next;
      rempty <= (rgray_next == rq2_wptr);
    end
  end

  assign rdata = mem[rbin[ADDR_W-1:0]];

  sync2 #(.W(ADDR_W+1)) u_sync_w2r (.clk(rclk), .rst_n(rrst_n), .d(wptr), .q(rq2_wptr));

endmodule
