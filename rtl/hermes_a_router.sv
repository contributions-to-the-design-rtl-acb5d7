// hermes_a_router: five-port asynchronous router of the Hermes-A family.
//
// Each of the East (0), West (1), North (2), South (3) and Local (4) ports
// has an input port (hermes_a_input_port) and an output port
// (hermes_a_output_port). Every input port has four output channels, one to
// each of the other ports' outputs; every output port merges four flows
// under its own arbiter. Routing is distributed: each input port computes the
// path of its own packets (XY for Hermes-A, ROUTING = 1 selects west-first
// adaptive routing as in Hermes-AA, which looks at which outputs are busy)
// and keeps it until the packet's kill token has passed. Links are 4-phase
// dual-rail: a flit token (8 data bits, BOP, EOP) and a single-rail
// acknowledge per direction, 21 wires per port.
//
// Interface: in_tok/in_ack per input link, out_tok/out_ack per output link.
// router_x/router_y are the node's mesh coordinates. This is a clocked model:
// clk only paces the evaluation of the handshake logic.
module hermes_a_router
  import noc_pkg::*;
  import hermes_a_pkg::*;
#(
  parameter bit         ROUTING  = 1'b0,
  parameter logic [3:0] ROUTER_X = 4'd1,
  parameter logic [3:0] ROUTER_Y = 4'd1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  dr_tok_t [NPORTS-1:0]       in_tok,
  output logic    [NPORTS-1:0]       in_ack,
  output dr_tok_t [NPORTS-1:0]       out_tok,
  input  logic    [NPORTS-1:0]       out_ack,
  output logic    [NPORTS-1:0]       out_busy
);
  // channel k of input i, seen from both ends
  dr_tok_t [NPORTS-1:0][3:0] ch_tok;      // [input][channel]
  logic    [NPORTS-1:0][3:0] ch_ack;
  logic    [NPORTS-1:0][3:0] ch_rt, ch_rf;
  // source s of output o
  dr_tok_t [NPORTS-1:0][3:0] src_tok;     // [output][source]
  logic    [NPORTS-1:0][3:0] src_ack;
  logic    [NPORTS-1:0][3:0] src_rt, src_rf;
  logic    [NPORTS-1:0][3:0] gnt, kills;

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    hermes_a_input_port #(.IN_PORT(port_e'(i)), .ROUTING(ROUTING)) u_in (
      .clk, .rst_n,
      .router_x(ROUTER_X), .router_y(ROUTER_Y), .out_busy,
      .din(in_tok[i]), .ack_in(in_ack[i]),
      .dout(ch_tok[i]), .ack_out(ch_ack[i]),
      .route_t(ch_rt[i]), .route_f(ch_rf[i])
    );
  end

  // wiring: input i channel k <-> output o source s
  for (genvar o = 0; o < NPORTS; o++) begin : g_wire_o
    for (genvar s = 0; s < 4; s++) begin : g_wire_s
      localparam int I = (s < o) ? s : s + 1;   // input feeding source s
      localparam int K = (o < I) ? o : o - 1;   // its channel towards o
      assign src_tok[o][s] = ch_tok[I][K];
      assign src_rt[o][s]  = ch_rt[I][K];
      assign src_rf[o][s]  = ch_rf[I][K];
      assign ch_ack[I][K]  = src_ack[o][s];
    end
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    hermes_a_output_port u_out (
      .clk, .rst_n,
      .route_t(src_rt[o]), .route_f(src_rf[o]),
      .din(src_tok[o]), .ack_in(src_ack[o]),
      .dout(out_tok[o]), .ack_out(out_ack[o]),
      .gnt(gnt[o]), .kill_seen(kills[o])
    );
    assign out_busy[o] = |gnt[o];
  end

endmodule
