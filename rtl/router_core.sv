// router_core: the routing part of a five-port Hermes-style router.
//
// Five IN CTRL blocks (baba_in_ctrl), the shared switch control
// (baba_switch_ctrl) and the crossbar (baba_crossbar), wired as in the
// BaBaRouter block diagram: IN CTRL sends the FLIT_W/2-bit address to the
// switch control and flit+EOP to the crossbar; the switch control sends a
// 3-bit CTRL word per output to the crossbar. The input buffers are left
// outside so that the same core serves the clockless-style BaBaRouter
// (handshake FIFOs) and the GALS Hermes-GLP router (bisynchronous FIFOs).
//
// Interface: in_* are the heads of the five input buffers, out_* the five
// output links (valid/ready, flit only). in_busy[i] is high while input i has
// a packet under way; bound_valid/bound_in report which input owns each
// output (used to forward per-packet sideband signals).
// Timing: a header flit needs the address handshake, one cycle in the
// switch control's request FIFO, then passes; body flits pass with no
// added cycle, one per clock per path.
module router_core
  import noc_pkg::*;
#(
  parameter int unsigned         FLIT_W      = 8,
  parameter logic [FLIT_W/2-1:0] ROUTER_ADDR = '0
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [NPORTS-1:0]              in_valid,
  output logic [NPORTS-1:0]              in_ready,
  input  logic [NPORTS-1:0][FLIT_W-1:0]  in_data,
  output logic [NPORTS-1:0]              out_valid,
  input  logic [NPORTS-1:0]              out_ready,
  output logic [NPORTS-1:0][FLIT_W-1:0]  out_data,
  output logic [NPORTS-1:0]              in_busy,
  output logic [NPORTS-1:0]              bound_valid,
  output logic [NPORTS-1:0][PORT_W-1:0]  bound_in
);
  localparam int unsigned ADDR_W = FLIT_W / 2;

  logic [NPORTS-1:0]             addr_valid, addr_ready;
  logic [NPORTS-1:0][ADDR_W-1:0] addr;
  logic [NPORTS-1:0]             d_valid, d_ready, d_eop;
  logic [NPORTS-1:0][FLIT_W-1:0] d_data;
  logic [NPORTS-1:0]             ctrl_valid, ctrl_release;
  logic [NPORTS-1:0][PORT_W-1:0] ctrl_in;

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    baba_in_ctrl #(.FLIT_W(FLIT_W)) u_in_ctrl (
      .clk, .rst_n,
      .in_valid  (in_valid[i]),
      .in_ready  (in_ready[i]),
      .in_data   (in_data[i]),
      .addr_valid(addr_valid[i]),
      .addr_ready(addr_ready[i]),
      .addr      (addr[i]),
      .d_valid   (d_valid[i]),
      .d_ready   (d_ready[i]),
      .d_data    (d_data[i]),
      .d_eop     (d_eop[i]),
      .busy      (in_busy[i])
    );
  end

  baba_switch_ctrl #(.ADDR_W(ADDR_W), .ROUTER_ADDR(ROUTER_ADDR)) u_switch (
    .clk, .rst_n, .addr_valid, .addr_ready, .addr,
    .ctrl_valid, .ctrl_in, .ctrl_release
  );

  baba_crossbar #(.FLIT_W(FLIT_W)) u_xbar (
    .clk, .rst_n, .d_valid, .d_ready, .d_data, .d_eop,
    .ctrl_valid, .ctrl_in, .ctrl_release,
    .out_valid, .out_ready, .out_data
  );

  assign bound_valid = ctrl_valid;
  assign bound_in    = ctrl_in;

endmodule
