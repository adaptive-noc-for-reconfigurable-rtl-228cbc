// noc_pkg: types and constants shared by the fault-tolerant mesh NoC.
//
// A packet is a sequence of 32-bit flits sent by wormhole switching:
//   flit 0  header   - destination coordinates, x in [3:0], y in [7:4], z in [11:8]
//   flit 1  size     - number of payload flits that follow (0 allowed)
//   flit 2+ payload
// The header/size layout follows the usual HERMES packet format; the exact bit
// positions are a choice of this design. Ports are numbered LOCAL, EAST, WEST,
// NORTH, SOUTH (2D router) and additionally UP, DOWN (3D router). East is +x,
// north is +y, up is +z.
package noc_pkg;

  localparam int FLIT_W  = 32;   // flit width (32 bits in the FPGA evaluation)
  localparam int COORD_W = 4;    // bits per coordinate: meshes up to 16 per side

  typedef logic [FLIT_W-1:0] flit_t;

  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_EAST  = 3'd1,
    P_WEST  = 3'd2,
    P_NORTH = 3'd3,
    P_SOUTH = 3'd4,
    P_UP    = 3'd5,
    P_DOWN  = 3'd6
  } port_e;

  typedef struct packed {
    logic [COORD_W-1:0] z;
    logic [COORD_W-1:0] y;
    logic [COORD_W-1:0] x;
  } coord_t;

  // Link flow control: a ready/acknowledge handshake, or credits that count
  // the free places of the receiving buffer.
  typedef enum logic {
    FC_HANDSHAKE = 1'b0,
    FC_CREDIT    = 1'b1
  } flow_ctrl_e;

  function automatic coord_t header_dest(flit_t f);
    return coord_t'(f[3*COORD_W-1:0]);
  endfunction

  function automatic flit_t make_header(coord_t d);
    flit_t f;
    f = '0;
    f[3*COORD_W-1:0] = d;
    return f;
  endfunction

  // Port on the far side of a link leaving through port p.
  function automatic port_e opposite(port_e p);
    case (p)
      P_EAST:  return P_WEST;
      P_WEST:  return P_EAST;
      P_NORTH: return P_SOUTH;
      P_SOUTH: return P_NORTH;
      P_UP:    return P_DOWN;
      P_DOWN:  return P_UP;
      default: return P_LOCAL;
    endcase
  endfunction

endpackage
