// network_map: global configuration of which routers are active.
//
// Holds one bit per node (1 = active, node index y*MESH_X + x), written as a
// whole word through cfg_we/cfg_data; after reset every node is active. From
// the register it derives, for every router, its own active bit and the
// active bits of its four neighbours (a neighbour outside the mesh reads as
// inactive), which is all the routing and the connectivity switches need.
//
// The network only tolerates routers whose neighbours do not change at the
// same time, because each router knows the state of its direct neighbours
// only. cfg_err flags, for one cycle after the write, an update that switched
// two adjacent routers in the same write; the update is still applied.
// Timing: the new map is visible the cycle after cfg_we.
//
// The per-node active word and its bit order follow the configuration words
// used in the design (e.g. fffe = node 0 off); the reset value and the
// adjacency check are this design's choices.
module network_map #(
  parameter int unsigned MESH_X = 4,
  parameter int unsigned MESH_Y = 4,
  localparam int unsigned N     = MESH_X * MESH_Y
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_we,
  input  logic [N-1:0] cfg_data,
  output logic [N-1:0] active,
  output logic [3:0]   nbr_active [N],   // [0]=N [1]=E [2]=S [3]=W
  output logic         cfg_err
);

  logic [N-1:0] changed;
  logic         adj;

  always_comb begin
    changed = active ^ cfg_data;
    adj     = 1'b0;
    for (int y = 0; y < MESH_Y; y++) begin
      for (int x = 0; x < MESH_X; x++) begin
        if (x + 1 < MESH_X && changed[y*MESH_X + x] && changed[y*MESH_X + x + 1]) adj = 1'b1;
        if (y + 1 < MESH_Y && changed[y*MESH_X + x] && changed[(y+1)*MESH_X + x]) adj = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= '1;
      cfg_err <= 1'b0;
    end else begin
      cfg_err <= cfg_we && adj;
      if (cfg_we) active <= cfg_data;
    end
  end

  always_comb begin
    for (int y = 0; y < MESH_Y; y++) begin
      for (int x = 0; x < MESH_X; x++) begin
        nbr_active[y*MESH_X + x][0] = (y > 0)          ? active[(y-1)*MESH_X + x] : 1'b0;
        nbr_active[y*MESH_X + x][1] = (x + 1 < MESH_X) ? active[y*MESH_X + x + 1] : 1'b0;
        nbr_active[y*MESH_X + x][2] = (y + 1 < MESH_Y) ? active[(y+1)*MESH_X + x] : 1'b0;
        nbr_active[y*MESH_X + x][3] = (x > 0)          ? active[y*MESH_X + x - 1] : 1'b0;
      end
    end
  end

endmodule
