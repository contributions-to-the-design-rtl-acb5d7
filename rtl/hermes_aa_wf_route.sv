// hermes_aa_wf_route: west-first adaptive routing decision (Hermes-AA).
//
// West-first is a partially adaptive, deadlock-free turn-model algorithm: a
// packet whose destination lies to the West must take all its West hops
// first, so it is routed West without choice. Otherwise every productive
// direction (East if the destination X is larger, North/South if the
// destination Y is larger/smaller) is allowed, and the first of them whose
// output is not busy is taken, in the order East, North, South; if all are
// busy the first productive one is chosen and the packet waits there. When
// both offsets are zero the packet goes to the Local port.
//
// Inputs are the signed offsets destination - router from the subtractors
// and the busy state of the router's outputs; purely combinational.
module hermes_aa_wf_route
  import noc_pkg::*;
(
  input  logic signed [4:0] dx,
  input  logic signed [4:0] dy,
  input  logic [NPORTS-1:0] out_busy,
  output port_e             port
);
  logic go_e, go_n, go_s;

  assign go_e = (dx > 0);
  assign go_n = (dy > 0);
  assign go_s = (dy < 0);

  always_comb begin
    if (dx < 0)                        port = WEST;
    else if (!go_e && !go_n && !go_s)  port = LOCAL;
    else if (go_e && !out_busy[EAST])  port = EAST;
    else if (go_n && !out_busy[NORTH]) port = NORTH;
    else if (go_s && !out_busy[SOUTH]) port = SOUTH;
    else if (go_e)                     port = EAST;
    else if (go_n)                     port = NORTH;
    else                               port = SOUTH;
  end

endmodule
