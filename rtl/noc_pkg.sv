// noc_pkg: types and constants shared by the reconfigurable mesh NoC.
//
// A flit is a single-flit packet: it carries its own destination coordinates,
// the virtual channel it travels on end to end, a detour bit used by the
// obstacle-avoiding XY routing, and a data word. Router ports are numbered
// LOCAL (user port), NORTH, EAST, SOUTH, WEST; y grows towards the south and a
// node's index in the active map is y*MESH_X + x.
//
// The field widths are fixed here and bound the largest network the RTL can
// build: a 4x4 mesh (2-bit coordinates) with up to 8 virtual channels. The 4x4
// mesh, the 2..8 virtual channels and the credit/peek flow-control choice come
// from the evaluated configurations; the 32-bit data word and the detour bit
// are this design's own choices.
package noc_pkg;

  localparam int unsigned COORD_W     = 2;   // up to 4 columns / 4 rows
  localparam int unsigned VC_W        = 3;   // up to 8 virtual channels
  localparam int unsigned FLIT_DATA_W = 32;
  localparam int unsigned NUM_PORTS   = 5;

  typedef enum logic [2:0] {
    PORT_LOCAL = 3'd0,
    PORT_NORTH = 3'd1,
    PORT_EAST  = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_WEST  = 3'd4
  } port_e;

  // Credit: the receiver returns one pulse per freed buffer slot.
  // Peek:   the receiver drives a level "busy" per virtual channel.
  typedef enum logic {
    FC_CREDIT = 1'b0,
    FC_PEEK   = 1'b1
  } flow_ctrl_e;

  typedef struct packed {
    logic                   valid;
    logic                   detour;   // set while a packet is sidestepping a blocked column
    logic [VC_W-1:0]        vc;
    logic [COORD_W-1:0]     dst_x;
    logic [COORD_W-1:0]     dst_y;
    logic [FLIT_DATA_W-1:0] data;
  } flit_t;

endpackage
