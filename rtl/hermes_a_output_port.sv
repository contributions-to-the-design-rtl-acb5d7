// hermes_a_output_port: one output port of the Hermes-A router.
//
// The port receives four dual-rail flows, one from each of the other input
// ports. Each flow has its own output control (hermes_a_output_ctrl), which
// turns the input's routing bit into an arbiter request and separates kill
// tokens from flits. The port arbiter (hermes_a_out_arbiter) grants one flow
// at a time in arrival order; the merge ORs the dual-rail outputs of the
// controls (only the granted one is ever non-spacer) onto the output link,
// and the link's acknowledge returns to the granted control. A kill token
// withdraws the request, freeing the port for the next flow.
//
// Interface: per source k = 0..3 a dual-rail routing bit (route_t/route_f),
// a token channel (din/ack_in); one output link (dout/ack_out, 4-phase
// dual-rail). gnt shows the current owner, kill_seen which control holds a
// kill token.
module hermes_a_output_port
  import hermes_a_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic    [3:0]       route_t,
  input  logic    [3:0]       route_f,
  input  dr_tok_t [3:0]       din,
  output logic    [3:0]       ack_in,
  output dr_tok_t             dout,
  input  logic                ack_out,
  output logic    [3:0]       gnt,
  output logic    [3:0]       kill_seen
);
  logic    [3:0] req;
  dr_tok_t [3:0] cdout;

  for (genvar k = 0; k < 4; k++) begin : g_ctrl
    hermes_a_output_ctrl u_ctrl (
      .clk, .rst_n,
      .route_t(route_t[k]), .route_f(route_f[k]),
      .din(din[k]), .ack_in(ack_in[k]),
      .arb_req(req[k]), .grant(gnt[k]),
      .dout(cdout[k]), .ack_out,
      .kill_seen(kill_seen[k])
    );
  end

  hermes_a_out_arbiter #(.N(4)) u_arb (.clk, .rst_n, .req, .gnt);

  always_comb begin
    dout = '0;
    for (int unsigned k = 0; k < 4; k++) dout = dout | cdout[k];
  end

  // The merge never sees two flows at once.
  logic [3:0] cd_any;
  always_comb
    for (int unsigned k = 0; k < 4; k++) cd_any[k] = (cdout[k] != '0);
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(cd_any));

endmodule
