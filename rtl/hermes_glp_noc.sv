// hermes_glp_noc: NX x NY mesh of Hermes-GLP routers.
//
// Each router runs on its own gated and switched clock (see
// hermes_glp_router). Neighbours are joined port to port: the East output of
// router (x,y) feeds the West input of router (x+1,y), the North output of
// (x,y) feeds the South input of (x,y+1), and the same in the other
// direction. Every link carries the sending router's clock with it, and the
// receiving router's input FIFO is written with that clock. No clock is
// shared between routers, so each router can stop or change frequency on
// its own: a router only runs while a packet is inside it, and runs on the
// fast source only while a high-priority packet is inside it. The priority
// travels with the packet from router to router on the sideband wire.
//
// Interface: node n = y*NX + x has address {x, y} (two bits each) and a
// local port: loc_rx_* written with the IP clock ip_clk[n], and loc_tx_*
// read with the router clock, which is brought out as loc_tx_clk[n] so the
// IP's own bisynchronous FIFO can be written with it. fast_on[n] and
// clk_on[n] report the state of router n's clock. All routers share the two
// clock sources clk_fast and clk_slow and one asynchronous reset, which must
// be held for a few cycles of the slow source.
//
// Following the original: the 3x3 default size, XY routing, one clock domain
// per router with bisynchronous FIFOs on every input, priorities routed with
// the packets. Own choices: inputs at the mesh edge are tied idle, and
// outputs at the edge always accept, so a packet addressed outside the mesh
// is dropped at the edge instead of blocking the routers it holds. The
// unused edge FIFOs are written with the router's own clock, so that their
// write side sees clock edges during reset like every other FIFO.
module hermes_glp_noc
  import noc_pkg::*;
#(
  parameter int unsigned NX     = 3,
  parameter int unsigned NY     = 3,
  parameter int unsigned FLIT_W = 8
) (
  input  logic                              clk_fast,
  input  logic                              clk_slow,
  input  logic                              rst_n,
  input  logic [NX*NY-1:0]                  ip_clk,
  input  logic [NX*NY-1:0]                  loc_rx_valid,
  output logic [NX*NY-1:0]                  loc_rx_ready,
  input  logic [NX*NY-1:0][FLIT_W-1:0]      loc_rx_data,
  input  logic [NX*NY-1:0]                  loc_rx_prio,
  output logic [NX*NY-1:0]                  loc_tx_clk,
  output logic [NX*NY-1:0]                  loc_tx_valid,
  input  logic [NX*NY-1:0]                  loc_tx_ready,
  output logic [NX*NY-1:0][FLIT_W-1:0]      loc_tx_data,
  output logic [NX*NY-1:0]                  loc_tx_prio,
  output logic [NX*NY-1:0]                  fast_on,
  output logic [NX*NY-1:0]                  clk_on
);
  localparam int unsigned NN = NX * NY;

  // per-router port bundles, indexed [node][port]
  logic [NN-1:0][NPORTS-1:0]             rx_clk, rx_valid, rx_ready, rx_prio;
  logic [NN-1:0][NPORTS-1:0][FLIT_W-1:0] rx_data;
  logic [NN-1:0][NPORTS-1:0]             tx_valid, tx_ready, tx_prio;
  logic [NN-1:0][NPORTS-1:0][FLIT_W-1:0] tx_data;
  logic [NN-1:0]                         tx_clk;

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int unsigned N = y * NX + x;

      hermes_glp_router #(
        .FLIT_W(FLIT_W),
        .ROUTER_ADDR((FLIT_W/2)'({2'(x), 2'(y)}))
      ) u_router (
        .clk_fast, .clk_slow, .rst_n,
        .rx_clk(rx_clk[N]), .rx_valid(rx_valid[N]), .rx_ready(rx_ready[N]),
        .rx_data(rx_data[N]), .rx_prio(rx_prio[N]),
        .tx_clk(tx_clk[N]), .tx_valid(tx_valid[N]), .tx_ready(tx_ready[N]),
        .tx_data(tx_data[N]), .tx_prio(tx_prio[N]),
        .fast_on(fast_on[N]), .clk_on(clk_on[N])
      );

      // local port
      assign rx_clk[N][LOCAL]   = ip_clk[N];
      assign rx_valid[N][LOCAL] = loc_rx_valid[N];
      assign rx_data[N][LOCAL]  = loc_rx_data[N];
      assign rx_prio[N][LOCAL]  = loc_rx_prio[N];
      assign loc_rx_ready[N]    = rx_ready[N][LOCAL];
      assign loc_tx_clk[N]      = tx_clk[N];
      assign loc_tx_valid[N]    = tx_valid[N][LOCAL];
      assign loc_tx_data[N]     = tx_data[N][LOCAL];
      assign loc_tx_prio[N]     = tx_prio[N][LOCAL];
      assign tx_ready[N][LOCAL] = loc_tx_ready[N];

      // West input <- East output of the left neighbour
      if (x > 0) begin : g_w
        assign rx_clk[N][WEST]     = tx_clk[N-1];
        assign rx_valid[N][WEST]   = tx_valid[N-1][EAST];
        assign rx_data[N][WEST]    = tx_data[N-1][EAST];
        assign rx_prio[N][WEST]    = tx_prio[N-1][EAST];
        assign tx_ready[N-1][EAST] = rx_ready[N][WEST];
      end else begin : g_w_edge
        assign rx_clk[N][WEST]   = tx_clk[N];
        assign rx_valid[N][WEST] = 1'b0;
        assign rx_data[N][WEST]  = '0;
        assign rx_prio[N][WEST]  = 1'b0;
        assign tx_ready[N][WEST] = 1'b1;
      end

      // East input <- West output of the right neighbour
      if (x < NX - 1) begin : g_e
        assign rx_clk[N][EAST]     = tx_clk[N+1];
        assign rx_valid[N][EAST]   = tx_valid[N+1][WEST];
        assign rx_data[N][EAST]    = tx_data[N+1][WEST];
        assign rx_prio[N][EAST]    = tx_prio[N+1][WEST];
        assign tx_ready[N+1][WEST] = rx_ready[N][EAST];
      end else begin : g_e_edge
        assign rx_clk[N][EAST]   = tx_clk[N];
        assign rx_valid[N][EAST] = 1'b0;
        assign rx_data[N][EAST]  = '0;
        assign rx_prio[N][EAST]  = 1'b0;
        assign tx_ready[N][EAST] = 1'b1;
      end

      // South input <- North output of the neighbour below
      if (y > 0) begin : g_s
        assign rx_clk[N][SOUTH]      = tx_clk[N-NX];
        assign rx_valid[N][SOUTH]    = tx_valid[N-NX][NORTH];
        assign rx_data[N][SOUTH]     = tx_data[N-NX][NORTH];
        assign rx_prio[N][SOUTH]     = tx_prio[N-NX][NORTH];
        assign tx_ready[N-NX][NORTH] = rx_ready[N][SOUTH];
      end else begin : g_s_edge
        assign rx_clk[N][SOUTH]   = tx_clk[N];
        assign rx_valid[N][SOUTH] = 1'b0;
        assign rx_data[N][SOUTH]  = '0;
        assign rx_prio[N][SOUTH]  = 1'b0;
        assign tx_ready[N][SOUTH] = 1'b1;
      end

      // North input <- South output of the neighbour above
      if (y < NY - 1) begin : g_n
        assign rx_clk[N][NORTH]      = tx_clk[N+NX];
        assign rx_valid[N][NORTH]    = tx_valid[N+NX][SOUTH];
        assign rx_data[N][NORTH]     = tx_data[N+NX][SOUTH];
        assign rx_prio[N][NORTH]     = tx_prio[N+NX][SOUTH];
        assign tx_ready[N+NX][SOUTH] = rx_ready[N][NORTH];
      end else begin : g_n_edge
        assign rx_clk[N][NORTH]   = tx_clk[N];
        assign rx_valid[N][NORTH] = 1'b0;
        assign rx_data[N][NORTH]  = '0;
        assign rx_prio[N][NORTH]  = 1'b0;
        assign tx_ready[N][NORTH] = 1'b1;
      end
    end
  end

endmodule
