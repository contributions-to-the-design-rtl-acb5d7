// hermes_a_path_calc: path calculation of a Hermes-A / Hermes-AA input port.
//
// Receives the first flit of a packet as a 10-bit dual-rail token (8 data
// bits, EOP, BOP). A completion detector (CD) recognises a complete token;
// only then is the router's own X/Y address released to two 4-bit
// subtractors, which compute destination minus router for X (flit bits 3:0)
// and Y (flit bits 7:4). The routing logic turns the two results into the
// output port: with XY routing, East/West by the sign of a non-zero X
// difference, otherwise North/South by the sign of a non-zero Y difference,
// otherwise Local. With ROUTING = 1 the west-first adaptive logic of Hermes-AA
// (hermes_aa_wf_route) is used instead.
//
// The decision leaves as a 4-bit dual-rail one-hot code over the four output
// ports other than the input's own side (in increasing port number): exactly
// the true rail of the chosen port is high and the false rails of the other
// three. When the input is a spacer every output rail is low, so the block
// behaves as delay-insensitive combinational logic: outputs are valid exactly
// when the input is. The 10 information bits are forwarded unchanged.
//
// port is the same decision as a binary code, for observation; dest_valid is
// the completion detector output.
module hermes_a_path_calc
  import noc_pkg::*;
  import hermes_a_pkg::*;
#(
  parameter port_e IN_PORT = LOCAL,
  parameter bit    ROUTING = 1'b0    // 0: XY (Hermes-A), 1: west-first (Hermes-AA)
) (
  input  dr_tok_t           flit,
  input  logic [3:0]        router_x,
  input  logic [3:0]        router_y,
  input  logic [NPORTS-1:0] out_busy,
  output dr_tok_t           flit_fwd,
  output dr4_t              dest,
  output logic              dest_valid,
  output port_e             port
);
  logic              cd;
  logic [3:0]        rx_g, ry_g;
  logic signed [4:0] dx, dy;
  port_e             route;

  assign cd   = complete(flit);
  assign rx_g = cd ? router_x : 4'd0;     // address released by the CD
  assign ry_g = cd ? router_y : 4'd0;
  assign dx   = $signed({1'b0, flit.t[3:0]}) - $signed({1'b0, rx_g});
  assign dy   = $signed({1'b0, flit.t[7:4]}) - $signed({1'b0, ry_g});

  if (ROUTING) begin : g_wf
    hermes_aa_wf_route u_wf (.dx, .dy, .out_busy, .port(route));
  end else begin : g_xy
    always_comb begin
      if      (dx > 0) route = EAST;
      else if (dx < 0) route = WEST;
      else if (dy > 0) route = NORTH;
      else if (dy < 0) route = SOUTH;
      else             route = LOCAL;
    end
  end

  // Map the port code onto the four outputs that exclude the input's side.
  always_comb begin
    dest = '0;
    if (cd) begin
      for (int unsigned k = 0; k < 4; k++) begin
        if (32'(route) == ((k < 32'(IN_PORT)) ? k : k + 1)) dest.t[k] = 1'b1;
        else                                                 dest.f[k] = 1'b1;
      end
    end
  end

  assign flit_fwd   = flit;
  assign dest_valid = cd;
  assign port       = route;

  // A minimal route never turns back through the port it came from (checked
  // on header flits only; other flits carry payload, not a target).
  always_comb begin
    if (cd && flit.t[BOP_B]) assert (route != IN_PORT);
  end

endmodule
