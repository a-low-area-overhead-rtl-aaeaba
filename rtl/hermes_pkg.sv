// hermes_pkg: constants and helpers shared by the blocks of the five-port
// mesh switch and the mesh network built from it.
//
// Port numbering follows the switch description: East=0, West=1, North=2,
// South=3, Local=4. A switch address and the target address in a header flit
// are XY coordinates; the upper half of the header flit holds X and the lower
// half Y (so a header 8'h11 means X=1, Y=1). Y grows towards South, as in the
// mesh drawing where row 0 is at the top. The placement of X and Y inside the
// flit is this design's choice.
//
// xy_route() takes coordinates zero-extended to 16 bits (flits up to 32
// bits wide) and is the deterministic XY algorithm: Local when the addresses are
// equal, otherwise East/West until X matches, then South/North.
package hermes_pkg;

  localparam int unsigned NPORTS = 5;
  localparam int unsigned PORT_W = 3;

  typedef enum logic [PORT_W-1:0] {
    EAST  = 3'd0,
    WEST  = 3'd1,
    NORTH = 3'd2,
    SOUTH = 3'd3,
    LOCAL = 3'd4
  } port_e;

  // XY routing decision. xl/yl: this switch, xt/yt: target.
  function automatic port_e xy_route(input logic [15:0] xl, input logic [15:0] yl,
                                     input logic [15:0] xt, input logic [15:0] yt);
    if (xl == xt && yl == yt) return LOCAL;
    else if (xl < xt)         return EAST;
    else if (xl > xt)         return WEST;
    else if (yl < yt)         return SOUTH;
    else                      return NORTH;
  endfunction

endpackage
