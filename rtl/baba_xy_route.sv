// baba_xy_route: XY routing decision of BaBaRouter's ROUTER CTRL.
//
// The address field is ADDR_W bits: X in the upper half, Y in the lower half.
// The packet first travels along X: East when the destination X is larger
// than the router's X, West when smaller. Once X matches it travels along Y:
// North when the destination Y is larger, South when smaller. When both match
// the packet leaves through the Local port. The result is a 3-bit port code
// (East 0, West 1, North 2, South 3, Local 4). Purely combinational.
module baba_xy_route
  import noc_pkg::*;
#(
  parameter int unsigned ADDR_W = 4
) (
  input  logic [ADDR_W-1:0] router_addr,
  input  logic [ADDR_W-1:0] dest_addr,
  output port_e             port
);
  localparam int unsigned HW = ADDR_W / 2;

  logic [HW-1:0] rx, ry, dx, dy;

  assign rx = router_addr[ADDR_W-1:HW];
  assign ry = router_addr[HW-1:0];
  assign dx = dest_addr[ADDR_W-1:HW];
  assign dy = dest_addr[HW-1:0];

  always_comb begin
    if      (dx > rx) port = EAST;
    else if (dx < rx) port = WEST;
    else if (dy > ry) port = NORTH;
    else if (dy < ry) port = SOUTH;
    else              port = LOCAL;
  end

endmodule
