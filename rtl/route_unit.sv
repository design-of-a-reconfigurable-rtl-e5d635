// route_unit: XY routing adapted to switched-off neighbour routers.
//
// Given the router's own coordinates, a flit's destination and detour bit, and
// which of the four neighbours are active, it picks the output port
// (combinational, no state). With every neighbour active it is plain XY
// routing: first along X to the destination column, then along Y.
//
// When the wanted neighbour is switched off the flit goes around it:
//  * X move blocked: take the Y move towards the destination if one is still
//    needed, otherwise step to whichever vertical neighbour is active (north
//    first). The next router resumes XY and passes under/over the obstacle.
//  * Y move blocked with no X move left: step sideways (east first) and set the
//    detour bit. A flit with the detour bit set is routed Y-first, so it does
//    not bounce straight back into the blocked column; the bit is cleared as
//    soon as it takes an X move again.
// If no useful neighbour is active the wanted port is returned unchanged; the
// flit then waits, since that port reports no buffer space.
//
// The first rule is the adaptation the design is built on (a flit blocked
// horizontally is released on the vertical path); the sidestep order and the
// detour bit for the vertical case are this design's own choices. A rectangle
// of active routers never blocks an XY path, so the detours only occur in
// irregular active maps.
module route_unit
  import noc_pkg::*;
#(
  parameter int unsigned MY_X = 0,
  parameter int unsigned MY_Y = 0
) (
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  input  logic               detour_in,
  input  logic [3:0]         nbr_active,   // [0]=N [1]=E [2]=S [3]=W
  output port_e              out_port,
  output logic               detour_out
);

  localparam logic [COORD_W-1:0] MX = COORD_W'(MY_X);
  localparam logic [COORD_W-1:0] MY = COORD_W'(MY_Y);

  function automatic logic up(input logic [3:0] act, input port_e p);
    case (p)
      PORT_NORTH: return act[0];
      PORT_EAST:  return act[1];
      PORT_SOUTH: return act[2];
      PORT_WEST:  return act[3];
      default:    return 1'b1;
    endcase
  endfunction

  logic  need_x, need_y;
  port_e dir_x, dir_y;

  always_comb begin
    need_x = (dst_x != MX);
    need_y = (dst_y != MY);
    dir_x  = (dst_x > MX) ? PORT_EAST  : PORT_WEST;
    dir_y  = (dst_y > MY) ? PORT_SOUTH : PORT_NORTH;

    out_port   = PORT_LOCAL;
    detour_out = 1'b0;

    if (!need_x && !need_y) begin
      out_port = PORT_LOCAL;
    end else if (!detour_in) begin
      // X first
      if (need_x && up(nbr_active, dir_x)) begin
        out_port = dir_x;
      end else if (need_y && up(nbr_active, dir_y)) begin
        out_port = dir_y;
      end else if (need_x && !need_y) begin
        // horizontally blocked on the destination row: step around vertically
        if      (up(nbr_active, PORT_NORTH)) out_port = PORT_NORTH;
        else if (up(nbr_active, PORT_SOUTH)) out_port = PORT_SOUTH;
        else                                 out_port = dir_x;
      end else if (!need_x && need_y) begin
        // vertically blocked in the destination column: step aside, go Y first
        if (up(nbr_active, PORT_EAST)) begin
          out_port   = PORT_EAST;
          detour_out = 1'b1;
        end else if (up(nbr_active, PORT_WEST)) begin
          out_port   = PORT_WEST;
          detour_out = 1'b1;
        end else begin
          out_port = dir_y;
        end
      end else begin
        out_port = dir_x;   // both wanted moves blocked: wait
      end
    end else begin
      // detour: Y first; leave detour mode on the first X move
      if (need_y && up(nbr_active, dir_y)) begin
        out_port   = dir_y;
        detour_out = 1'b1;
      end else if (need_x && up(nbr_active, dir_x)) begin
        out_port = dir_x;
      end else if (need_y && !need_x) begin
        if (up(nbr_active, PORT_EAST)) begin
          out_port   = PORT_EAST;
          detour_out = 1'b1;
        end else if (up(nbr_active, PORT_WEST)) begin
          out_port   = PORT_WEST;
          detour_out = 1'b1;
        end else begin
          out_port   = dir_y;
          detour_out = 1'b1;
        end
      end else if (need_x && !need_y) begin
        if      (up(nbr_active, PORT_NORTH)) out_port = PORT_NORTH;
        else if (up(nbr_active, PORT_SOUTH)) out_port = PORT_SOUTH;
        else                                 out_port = dir_x;
      end else begin
        out_port   = dir_y;
        detour_out = 1'b1;
      end
    end
  end

endmodule
