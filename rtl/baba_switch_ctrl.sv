// baba_switch_ctrl: BaBaRouter switch control.
//
// One switch control serves all five input ports. Address requests from the
// IN CTRL blocks go through an arbiter (baba_arbiter); the winner's address
// is routed by the XY ROUTER CTRL (baba_xy_route) to a 3-bit output-port
// code, and the number of the requesting input port is written into the
// request FIFO of that output port (4 positions of 3 bits each). The head of
// each output FIFO tells the crossbar which input currently owns that output;
// further requests wait in order behind it, so one input can never be served
// twice in a row on an output another input is also waiting for. The crossbar
// pops the head (ctrl_release) after forwarding the packet's EOP flit.
//
// Interface: addr_valid/addr_ready/addr per input port; per output port
// ctrl_valid (an owner exists), ctrl_in (owning input) and ctrl_release.
// Timing: an address is accepted in the cycle it is granted if the target
// FIFO has room; the owner appears at ctrl_* one cycle later.
//
// Own choice: if the target request FIFO is full, the request simply waits
// (the original argues this cannot happen with 4 positions and 4 possible
// requesters per output).
module baba_switch_ctrl
  import noc_pkg::*;
#(
  parameter int unsigned       ADDR_W    = 4,
  parameter logic [ADDR_W-1:0] ROUTER_ADDR = '0,
  parameter int unsigned       REQ_DEPTH = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [NPORTS-1:0]              addr_valid,
  output logic [NPORTS-1:0]              addr_ready,
  input  logic [NPORTS-1:0][ADDR_W-1:0]  addr,
  output logic [NPORTS-1:0]              ctrl_valid,
  output logic [NPORTS-1:0][PORT_W-1:0]  ctrl_in,
  input  logic [NPORTS-1:0]              ctrl_release
);
  logic [NPORTS-1:0] gnt;
  logic [ADDR_W-1:0] sel_addr;
  logic [PORT_W-1:0] sel_in;
  port_e             route;
  logic [NPORTS-1:0] fifo_push, fifo_ready;
  logic              fire;

  baba_arbiter #(.N(NPORTS)) u_arb (
    .clk, .rst_n, .req(addr_valid), .advance(fire), .gnt
  );

  always_comb begin
    sel_addr = '0;
    sel_in   = '0;
    for (int unsigned i = 0; i < NPORTS; i++)
      if (gnt[i]) begin
        sel_addr = addr[i];
        sel_in   = PORT_W'(i);
      end
  end

  baba_xy_route #(.ADDR_W(ADDR_W)) u_route (
    .router_addr(ROUTER_ADDR), .dest_addr(sel_addr), .port(route)
  );

  assign fire = (gnt != '0) && fifo_ready[route];

  always_comb begin
    fifo_push  = '0;
    addr_ready = '0;
    if (fire) begin
      fifo_push[route] = 1'b1;
      addr_ready       = gnt;
    end
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    hs_fifo #(.WIDTH(PORT_W), .DEPTH(REQ_DEPTH)) u_req_fifo (
      .clk, .rst_n,
      .in_valid (fifo_push[o]),
      .in_ready (fifo_ready[o]),
      .in_data  (sel_in),
      .out_valid(ctrl_valid[o]),
      .out_ready(ctrl_release[o]),
      .out_data (ctrl_in[o])
    );
  end

  // The crossbar only releases an output that is owned.
  assert property (@(posedge clk) disable iff (!rst_n) (ctrl_release & ~ctrl_valid) == '0);

endmodule
