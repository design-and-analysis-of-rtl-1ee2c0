// rian_route: the decoder of the router. It reads the destination of a control
// flit and names the port the flit must leave on: one of the compass links
// toward the destination, or the local port when the operand is meant for the
// ALU of this node.
//
// Routing is minimal and deterministic. On a STAR network (eight neighbours)
// a flit moves diagonally while both its column and row differ from the
// destination's, then straight; on a MESH network (four neighbours) it first
// corrects the column, then the row. With WRAP set, the bottom row of the
// array is wired to the top row, and a flit takes that wrap link when it makes
// the trip in rows strictly shorter (ties go the direct way). The document
// gives the topologies and the bottom-to-top wires; the routing rule is this
// design's own, chosen because every hop brings the flit closer to its target.
//
// Interface: the node's own coordinates (ports, so one router serves every
// node), the control flit, and the chosen port as a 4-bit rian_pkg::dir_e
// value. Purely combinational.
module rian_route
  import rian_pkg::*;
#(
  parameter int unsigned GRID_Y = 8,
  parameter topo_e       TOPO   = TOPO_STAR,
  parameter bit          WRAP   = 1'b1
) (
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  ctrl_flit_t         flit,
  output logic [3:0]         dir
);
  int dx, dy, sx, sy;

  always_comb begin
    dx = int'(flit.dst_x) - int'(my_x);
    dy = int'(flit.dst_y) - int'(my_y);
    if (WRAP) begin
      if (2 * dy > int'(GRID_Y))       dy = dy - int'(GRID_Y);
      else if (2 * dy < -int'(GRID_Y)) dy = dy + int'(GRID_Y);
    end
    sx = (dx > 0) ? 1 : (dx < 0) ? -1 : 0;
    sy = (dy > 0) ? 1 : (dy < 0) ? -1 : 0;
    if (TOPO == TOPO_MESH && sx != 0) sy = 0;

    unique case ({sx[1:0], sy[1:0]})
      4'b00_00: dir = DIR_LOCAL;
      4'b00_11: dir = DIR_N;
      4'b01_11: dir = DIR_NE;
      4'b01_00: dir = DIR_E;
      4'b01_01: dir = DIR_SE;
      4'b00_01: dir = DIR_S;
      4'b11_01: dir = DIR_SW;
      4'b11_00: dir = DIR_W;
      4'b11_11: dir = DIR_NW;
      default:  dir = DIR_LOCAL;
    endcase
  end
endmodule
