// gals_async_top: the router family and cell models side by side.
//
// Five independent designs share this top, each with its own ports:
//  * babarouter        - clockless-style 5-port router (handshake FIFOs,
//                        IN CTRL, shared switch control, crossbar), node 11
//  * hermes_glp_router - GALS router: bisynchronous input FIFOs, router clock
//                        gated when idle and switched between a fast and a
//                        slow source by packet priority, node 11
//  * hermes_glp_noc    - a 3x3 mesh of Hermes-GLP routers (every router with
//                        its own gated, switched clock), fed by the same two
//                        clock sources as the single router
//  * hermes_a_router   - 4-phase dual-rail router with distributed XY routing
//                        (Hermes-A); a second instance with west-first
//                        adaptive routing (Hermes-AA)
//  * ascend cells      - C2, C3, C2R1, C1U1 C-elements and the
//                        mutual-exclusion element
// Nothing connects the designs to one another; the top exists so that one
// elaboration covers everything.
module gals_async_top
  import noc_pkg::*;
  import hermes_a_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  // BaBaRouter
  input  logic [NPORTS-1:0]          bb_rx_valid,
  output logic [NPORTS-1:0]          bb_rx_ready,
  input  logic [NPORTS-1:0][7:0]     bb_rx_data,
  output logic [NPORTS-1:0]          bb_tx_valid,
  input  logic [NPORTS-1:0]          bb_tx_ready,
  output logic [NPORTS-1:0][7:0]     bb_tx_data,
  // Hermes-GLP
  input  logic                       glp_clk_fast,
  input  logic                       glp_clk_slow,
  input  logic [NPORTS-1:0]          glp_rx_clk,
  input  logic [NPORTS-1:0]          glp_rx_valid,
  output logic [NPORTS-1:0]          glp_rx_ready,
  input  logic [NPORTS-1:0][7:0]     glp_rx_data,
  input  logic [NPORTS-1:0]          glp_rx_prio,
  output logic                       glp_tx_clk,
  output logic [NPORTS-1:0]          glp_tx_valid,
  input  logic [NPORTS-1:0]          glp_tx_ready,
  output logic [NPORTS-1:0][7:0]     glp_tx_data,
  output logic [NPORTS-1:0]          glp_tx_prio,
  output logic                       glp_fast_on,
  output logic                       glp_clk_on,
  // Hermes-GLP 3x3 mesh (node n = 3*y + x), local ports only
  input  logic [8:0]                 noc_ip_clk,
  input  logic [8:0]                 noc_rx_valid,
  output logic [8:0]                 noc_rx_ready,
  input  logic [8:0][7:0]            noc_rx_data,
  input  logic [8:0]                 noc_rx_prio,
  output logic [8:0]                 noc_tx_clk,
  output logic [8:0]                 noc_tx_valid,
  input  logic [8:0]                 noc_tx_ready,
  output logic [8:0][7:0]            noc_tx_data,
  output logic [8:0]                 noc_tx_prio,
  output logic [8:0]                 noc_fast_on,
  output logic [8:0]                 noc_clk_on,
  // Hermes-A (XY)
  input  dr_tok_t [NPORTS-1:0]       ha_in_tok,
  output logic    [NPORTS-1:0]       ha_in_ack,
  output dr_tok_t [NPORTS-1:0]       ha_out_tok,
  input  logic    [NPORTS-1:0]       ha_out_ack,
  output logic    [NPORTS-1:0]       ha_out_busy,
  // Hermes-AA (west-first)
  input  dr_tok_t [NPORTS-1:0]       haa_in_tok,
  output logic    [NPORTS-1:0]       haa_in_ack,
  output dr_tok_t [NPORTS-1:0]       haa_out_tok,
  input  logic    [NPORTS-1:0]       haa_out_ack,
  output logic    [NPORTS-1:0]       haa_out_busy,
  // ASCEnD cells
  input  logic [2:0]                 cell_in,
  input  logic                       cell_rst_n,
  output logic [3:0]                 cell_q,
  input  logic [1:0]                 mutex_req,
  output logic [1:0]                 mutex_ack
);
  babarouter #(.ROUTER_ADDR(4'h5)) u_baba (
    .clk, .rst_n,
    .rx_valid(bb_rx_valid), .rx_ready(bb_rx_ready), .rx_data(bb_rx_data),
    .tx_valid(bb_tx_valid), .tx_ready(bb_tx_ready), .tx_data(bb_tx_data)
  );

  hermes_glp_router #(.ROUTER_ADDR(4'h5)) u_glp (
    .clk_fast(glp_clk_fast), .clk_slow(glp_clk_slow), .rst_n,
    .rx_clk(glp_rx_clk), .rx_valid(glp_rx_valid), .rx_ready(glp_rx_ready),
    .rx_data(glp_rx_data), .rx_prio(glp_rx_prio),
    .tx_clk(glp_tx_clk), .tx_valid(glp_tx_valid), .tx_ready(glp_tx_ready),
    .tx_data(glp_tx_data), .tx_prio(glp_tx_prio),
    .fast_on(glp_fast_on), .clk_on(glp_clk_on)
  );

  hermes_glp_noc u_glp_noc (
    .clk_fast(glp_clk_fast), .clk_slow(glp_clk_slow), .rst_n,
    .ip_clk(noc_ip_clk),
    .loc_rx_valid(noc_rx_valid), .loc_rx_ready(noc_rx_ready),
    .loc_rx_data(noc_rx_data), .loc_rx_prio(noc_rx_prio),
    .loc_tx_clk(noc_tx_clk), .loc_tx_valid(noc_tx_valid), .loc_tx_ready(noc_tx_ready),
    .loc_tx_data(noc_tx_data), .loc_tx_prio(noc_tx_prio),
    .fast_on(noc_fast_on), .clk_on(noc_clk_on)
  );

  hermes_a_router #(.ROUTING(1'b0)) u_hermes_a (
    .clk, .rst_n,
    .in_tok(ha_in_tok), .in_ack(ha_in_ack),
    .out_tok(ha_out_tok), .out_ack(ha_out_ack), .out_busy(ha_out_busy)
  );

  hermes_a_router #(.ROUTING(1'b1)) u_hermes_aa (
    .clk, .rst_n,
    .in_tok(haa_in_tok), .in_ack(haa_in_ack),
    .out_tok(haa_out_tok), .out_ack(haa_out_ack), .out_busy(haa_out_busy)
  );

  ascend_celem #(.CELL(ascend_pkg::CELL_C2))   u_c2   (.a(cell_in[0]), .b(cell_in[1]), .c(1'b0),       .rst_n(1'b1),       .q(cell_q[0]));
  ascend_celem #(.CELL(ascend_pkg::CELL_C3))   u_c3   (.a(cell_in[0]), .b(cell_in[1]), .c(cell_in[2]), .rst_n(1'b1),       .q(cell_q[1]));
  ascend_celem #(.CELL(ascend_pkg::CELL_C2R1)) u_c2r1 (.a(cell_in[0]), .b(cell_in[1]), .c(1'b0),       .rst_n(cell_rst_n), .q(cell_q[2]));
  ascend_celem #(.CELL(ascend_pkg::CELL_C1U1)) u_c1u1 (.a(cell_in[0]), .b(cell_in[1]), .c(1'b0),       .rst_n(1'b1),       .q(cell_q[3]));

  ascend_mutex u_mutex (.ra(mutex_req[0]), .rb(mutex_req[1]), .aa(mutex_ack[0]), .ab(mutex_ack[1]));

endmodule
