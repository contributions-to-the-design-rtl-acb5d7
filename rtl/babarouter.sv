// babarouter: five-port NoC router in the BaBaRouter organisation.
//
// The router moves Hermes-format packets (address flit, size flit, payload)
// between the East (0), West (1), North (2), South (3) and Local (4) ports of
// a 2D-mesh node using XY routing and wormhole switching. Each input has a
// FIFO of handshaking buffers (hs_fifo, FIFO_DEPTH flits) followed by the
// shared routing core (router_core: IN CTRL, switch control, crossbar). The
// first flit of a packet is routed by the switch control, which binds an
// output to the input; the remaining flits follow the binding until the flit
// marked EOP has passed, after which the output is free for the next input
// queued in its request FIFO. Up to five disjoint input/output paths carry
// flits at the same time.
//
// The original is a clockless quasi-delay-insensitive circuit; here every
// handshake channel is a valid/ready pair sampled on clk, so one flit per
// cycle per path is the best-case rate.
//
// Parameters follow the published configuration: 8-bit flits, 8-flit input
// FIFOs; ROUTER_ADDR is the XY address of this node (X in bits 3:2, Y in
// bits 1:0 for 8-bit flits).
module babarouter
  import noc_pkg::*;
#(
  parameter int unsigned         FLIT_W      = 8,
  parameter int unsigned         FIFO_DEPTH  = 8,
  parameter logic [FLIT_W/2-1:0] ROUTER_ADDR = 4'h5
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [NPORTS-1:0]              rx_valid,
  output logic [NPORTS-1:0]              rx_ready,
  input  logic [NPORTS-1:0][FLIT_W-1:0]  rx_data,
  output logic [NPORTS-1:0]              tx_valid,
  input  logic [NPORTS-1:0]              tx_ready,
  output logic [NPORTS-1:0][FLIT_W-1:0]  tx_data
);
  logic [NPORTS-1:0]             f_valid, f_ready;
  logic [NPORTS-1:0][FLIT_W-1:0] f_data;
  logic [NPORTS-1:0]             busy_unused, bvalid_unused;
  logic [NPORTS-1:0][PORT_W-1:0] bin_unused;

  for (genvar i = 0; i < NPORTS; i++) begin : g_fifo
    hs_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_DEPTH)) u_in_fifo (
      .clk, .rst_n,
      .in_valid (rx_valid[i]),
      .in_ready (rx_ready[i]),
      .in_data  (rx_data[i]),
      .out_valid(f_valid[i]),
      .out_ready(f_ready[i]),
      .out_data (f_data[i])
    );
  end

  router_core #(.FLIT_W(FLIT_W), .ROUTER_ADDR(ROUTER_ADDR)) u_core (
    .clk, .rst_n,
    .in_valid (f_valid),
    .in_ready (f_ready),
    .in_data  (f_data),
    .out_valid(tx_valid),
    .out_ready(tx_ready),
    .out_data (tx_data),
    .in_busy    (busy_unused),
    .bound_valid(bvalid_unused),
    .bound_in   (bin_unused)
  );

endmodule
