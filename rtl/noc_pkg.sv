// noc_pkg: types and constants shared by the routers.
//
// The routers have five ports numbered as in the Hermes family of NoCs:
// East (0), West (1), North (2), South (3) and Local (4). Ports 0-3 connect to
// neighbouring routers in a 2D mesh, port 4 to the local processing element.
// A router address is written XY, X in the upper half of the address field and
// Y in the lower half; X grows towards East and Y towards North.
//
// Handshake channels of the asynchronous originals are modelled in this RTL as
// synchronous valid/ready channels: one transfer happens on a clock edge where
// both valid and ready are high. This is the one systematic departure from the
// clockless implementation and is explained in the README.
package noc_pkg;

  localparam int unsigned NPORTS  = 5;
  localparam int unsigned PORT_W  = 3;   // width of an output-port code

  typedef enum logic [PORT_W-1:0] {
    EAST  = 3'd0,
    WEST  = 3'd1,
    NORTH = 3'd2,
    SOUTH = 3'd3,
    LOCAL = 3'd4
  } port_e;

endpackage
