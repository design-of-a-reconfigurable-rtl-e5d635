// connect_mesh: the runtime-reconfigurable 2D mesh network on chip.
//
// MESH_X x MESH_Y connect_router instances (4x4 in the main configuration),
// each with its user port brought out, joined to their four neighbours through
// link_switch connectivity switches, plus the network_map that holds the
// active-router word. Writing a new word switches routers off or back on at
// runtime: a switched-off router is emptied and isolated, its neighbours route
// around it, and the remaining routers keep exchanging packets. Shrinking the
// active set to a rectangle (4x3, 3x3, 3x2, 2x2, 2x1) gives a smaller regular
// mesh; any other set gives an irregular network.
//
// User port of node n (index y*MESH_X + x), same protocol as a router link:
//  inj_flit[n]  flit offered to the router (valid for one cycle per flit)
//  inj_fc[n]    per-VC credit pulses (or busy levels, peek) back to the user
//  ej_flit[n]   flit delivered by the router
//  ej_fc[n]     per-VC credit pulses (or busy levels) from the user's receiver
// The user may only send packets from and to active nodes, and must not send
// when it holds no credit for the chosen virtual channel.
// Latency: with no contention a flit injected at cycle t is delivered on
// ej_flit at cycle t + 2*(hops+1) (queueing cycle plus output register per
// router on the path).
module connect_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned NUM_VC    = 2,
  parameter int unsigned BUF_DEPTH = 4,
  parameter flow_ctrl_e  FC        = FC_CREDIT,
  localparam int unsigned N        = MESH_X * MESH_Y
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [N-1:0]      cfg_data,
  output logic [N-1:0]      active,
  output logic              cfg_err,
  input  flit_t             inj_flit [N],
  output logic [NUM_VC-1:0] inj_fc   [N],
  output flit_t             ej_flit  [N],
  input  logic [NUM_VC-1:0] ej_fc    [N]
);

  logic [3:0] nbr_active [N];

  network_map #(.MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_map (
    .clk, .rst_n, .cfg_we, .cfg_data,
    .active, .nbr_active, .cfg_err
  );

  flit_t             rin_flit  [N][NUM_PORTS];
  logic [NUM_VC-1:0] rin_fc    [N][NUM_PORTS];
  flit_t             rout_flit [N][NUM_PORTS];
  logic [NUM_VC-1:0] rout_fc   [N][NUM_PORTS];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned ID = y * MESH_X + x;

      connect_router #(
        .MY_X(x), .MY_Y(y), .NUM_VC(NUM_VC), .BUF_DEPTH(BUF_DEPTH), .FC(FC)
      ) u_router (
        .clk, .rst_n,
        .active     (active[ID]),
        .nbr_active (nbr_active[ID]),
        .in_flit    (rin_flit[ID]),
        .in_fc      (rin_fc[ID]),
        .out_flit   (rout_flit[ID]),
        .out_fc     (rout_fc[ID])
      );

      // user port
      assign rin_flit[ID][PORT_LOCAL] = inj_flit[ID];
      assign inj_fc[ID]               = rin_fc[ID][PORT_LOCAL];
      assign ej_flit[ID]              = rout_flit[ID][PORT_LOCAL];
      assign rout_fc[ID][PORT_LOCAL]  = ej_fc[ID];

      // links leaving this router: d = N, E, S, W
      for (genvar d = 1; d < NUM_PORTS; d++) begin : g_dir
        localparam int NX  = (d == 2) ? x + 1 : (d == 4) ? x - 1 : x;
        localparam int NY  = (d == 3) ? y + 1 : (d == 1) ? y - 1 : y;
        localparam int OPP = (d == 1) ? 3 : (d == 2) ? 4 : (d == 3) ? 1 : 2;

        if (NX >= 0 && NX < int'(MESH_X) && NY >= 0 && NY < int'(MESH_Y)) begin : g_link
          localparam int unsigned NID = NY * MESH_X + NX;
          link_switch #(.NUM_VC(NUM_VC), .FC(FC)) u_sw (
            .src_active (active[ID]),
            .dst_active (active[NID]),
            .flit_in    (rout_flit[ID][d]),
            .flit_out   (rin_flit[NID][OPP]),
            .fc_in      (rin_fc[NID][OPP]),
            .fc_out     (rout_fc[ID][d])
          );
        end else begin : g_edge
          // mesh boundary: nothing arrives, and the port never has space
          assign rin_flit[ID][d] = '0;
          assign rout_fc[ID][d]  = (FC == FC_PEEK) ? '1 : '0;
        end
      end
    end
  end

endmodule
