// Shared types and constants of the 3D electronic-controlled optical NoC.
//
// The network has two overlapped meshes. Control packets (setup and tail)
// travel hop by hop in a 32-bit electronic control network; payload travels
// as light in a circuit-switched optical network whose Cygnus switching
// fabrics are configured by the electronic control units.
//
// Port numbering of every 5x5 router (electronic and optical alike):
//   0 = local injection/ejection, 1 = north, 2 = south, 3 = west, 4 = east.
// Coordinates: x grows towards east, y grows towards north.
//
// Microresonator (MR) numbering: the fabric holds one MR for every
// input/output pair that needs a turn or uses the local port. The four
// straight pairs (west<->east, north<->south) are passive and have no MR,
// and a port never loops back to itself, which leaves 5*4-4 = 16 MRs.
// They are numbered input-major, output ascending (mr_index below).
//
// The control packet layout, the coordinate width and the optical word
// abstraction (one 32-bit word per 1 GHz control clock, i.e. 32 Gbit/s)
// are this design's own choices.
package onoc_pkg;

  localparam int unsigned NPORTS   = 5;
  localparam int unsigned NMR      = 16;
  localparam int unsigned COORD_W  = 4;   // up to 16x16 meshes
  localparam int unsigned LINK_W   = 32;  // metallic control link width
  localparam int unsigned OPT_W    = 32;  // optical bits carried per control-clock cycle
  localparam int unsigned LEN_W    = 16;  // payload length in words

  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_SOUTH = 3'd2,
    P_WEST  = 3'd3,
    P_EAST  = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    PKT_NONE  = 2'd0,
    PKT_SETUP = 2'd1,
    PKT_TAIL  = 2'd2
  } pkt_type_e;

  // One control packet fills one 32-bit flit of the control network.
  typedef struct packed {
    pkt_type_e          ptype;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [LINK_W-2-4*COORD_W-1:0] rsvd;
  } ctrl_pkt_t;

  // Light on one waveguide during one control-clock cycle: "on" marks that
  // a modulated signal is present, "bits" is what it carries.
  typedef struct packed {
    logic             on;
    logic [OPT_W-1:0] bits;
  } opt_t;

  localparam opt_t OPT_DARK = '0;

  // Passive straight connection of the optical fabric: light entering on
  // port p leaves on straight_out(p) when no MR of that input is powered.
  function automatic logic is_straight(input int unsigned i, input int unsigned o);
    return (i == 32'(P_WEST)  && o == 32'(P_EAST))  || (i == 32'(P_EAST)  && o == 32'(P_WEST)) ||
           (i == 32'(P_NORTH) && o == 32'(P_SOUTH)) || (i == 32'(P_SOUTH) && o == 32'(P_NORTH));
  endfunction

  // True for input/output pairs that need one powered MR.
  function automatic logic has_mr(input int unsigned i, input int unsigned o);
    return (i != o) && !is_straight(i, o);
  endfunction

  // Index of the MR serving input i -> output o (valid when has_mr(i,o)).
  function automatic int unsigned mr_index(input int unsigned i, input int unsigned o);
    int unsigned n;
    n = 0;
    for (int unsigned a = 0; a < NPORTS; a++) begin
      for (int unsigned b = 0; b < NPORTS; b++) begin
        if (a == i && b == o) return n;
        if (has_mr(a, b)) n++;
      end
    end
    return n;
  endfunction

  // Port on the far side of a link: leaving east arrives on the west input.
  function automatic port_e opposite(input port_e p);
    case (p)
      P_NORTH: return P_SOUTH;
      P_SOUTH: return P_NORTH;
      P_WEST:  return P_EAST;
      P_EAST:  return P_WEST;
      default: return P_LOCAL;
    endcase
  endfunction

  // XY (dimension-order) routing: correct x first, then y.
  function automatic port_e xy_route(input logic [COORD_W-1:0] cur_x, input logic [COORD_W-1:0] cur_y,
                                     input logic [COORD_W-1:0] dst_x, input logic [COORD_W-1:0] dst_y);
    if (dst_x > cur_x) return P_EAST;
    if (dst_x < cur_x) return P_WEST;
    if (dst_y > cur_y) return P_NORTH;
    if (dst_y < cur_y) return P_SOUTH;
    return P_LOCAL;
  endfunction

endpackage
