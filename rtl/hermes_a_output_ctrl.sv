// hermes_a_output_ctrl: output control of a Hermes-A output port, one per
// input port that can reach this output.
//
// Flits from the input port enter a dual-rail register (a 4-phase
// half-buffer: every rail is a C-element of the incoming rail and the
// inverted downstream acknowledge). An AND of the BOP and EOP true rails
// detects the kill token and steers a demux:
//  * ordinary flits (demux output 0) go to the output port's merge, but only
//    while the arbiter grants this input; the downstream acknowledge comes
//    back through the same path;
//  * the kill token (demux output 1) goes to a validity detector that
//    acknowledges it locally, and its detection withdraws the arbiter request,
//    which undoes the connection between the input and the output.
// The arbiter request itself is the input port's dual-rail routing bit for
// this output converted to single rail by a C-element with one inverted
// input (set by the true rail, cleared by the false rail) and is also cleared
// by the kill token.
//
// This model evaluates the C-elements on a clock edge. Own choice: the
// routing bit sets the request on its rising true rail only, so a routing
// decision still present while the kill token is consumed does not request
// the output again.
module hermes_a_output_ctrl
  import hermes_a_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    route_t,
  input  logic    route_f,
  input  dr_tok_t din,
  output logic    ack_in,
  output logic    arb_req,
  input  logic    grant,
  output dr_tok_t dout,
  input  logic    ack_out,
  output logic    kill_seen
);
  dr_tok_t reg_q;
  logic    req_q, route_t_q, kill, reg_ack;

  assign kill    = reg_q.t[BOP_B] && reg_q.t[EOP_B];
  // demux: kill tokens are acknowledged by the validity detector, flits by
  // the output path when granted.
  assign reg_ack = kill ? complete(reg_q) : (grant && ack_out);
  assign dout    = (grant && !kill) ? reg_q : '0;
  assign arb_req = req_q && !kill;
  assign kill_seen = kill;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reg_q     <= '0;
      ack_in    <= 1'b0;
      req_q     <= 1'b0;
      route_t_q <= 1'b0;
    end else begin
      // half-buffer: per-rail C-element of (input rail, not reg_ack)
      for (int unsigned k = 0; k < TOK_W; k++) begin
        if (din.t[k] == !reg_ack) reg_q.t[k] <= din.t[k];
        if (din.f[k] == !reg_ack) reg_q.f[k] <= din.f[k];
      end
      // acknowledge to the input: completion of the register contents
      if (complete(reg_q))       ack_in <= 1'b1;
      else if (is_spacer(reg_q)) ack_in <= 1'b0;
      // request C-element with one inverted input
      route_t_q <= route_t;
      if (kill)                        req_q <= 1'b0;
      else if (route_t && !route_t_q)  req_q <= 1'b1;
      else if (route_f && !route_t)    req_q <= 1'b0;
    end
  end

endmodule
