// connect_router: five-port virtual-channel router of the reconfigurable mesh.
//
// Structure (after the CONNECT router core): each of the five input ports
// (LOCAL user port, N, E, S, W) has one flit_fifo per virtual channel. The head
// flit of every queue is routed by a route_unit that knows which neighbours are
// active. Allocation is separable, input first: each input port picks one of
// its virtual channels whose head has downstream space on its wanted output
// (round robin), then each output port picks one of the input ports asking for
// it (round robin). A winning flit is popped and registered onto the output
// link; it keeps its virtual channel end to end. Per output port an
// out_flow_ctrl tracks the downstream buffer space (credit or peek).
//
// Flow-control signals towards the upstream routers: with credit flow control
// fc_out pulses for one cycle per flit popped from a queue; with peek flow
// control fc_out[v] is a busy level, raised when a queue holds BUF_DEPTH-1 or
// more flits, which leaves room for the two flits that can be in flight
// (decided last cycle and this cycle) when the sender sees it.
//
// Runtime reconfiguration: while active is low (the router is being
// reconfigured) all queues are emptied, every output is idle and nothing is
// accepted. nbr_active tells the router which neighbours are on: routing avoids
// the others and their credit counters are refilled, so a neighbour comes back
// with a full view of its empty buffers.
//
// Timing: a flit written into a queue at edge t can leave on an output link
// at edge t+1 and appears at the next router's input during the following
// cycle, i.e. one cycle per hop plus one cycle of queueing. Only single-flit
// packets are handled (each flit carries its destination); this, the allocator
// policy and the detour bit are this design's choices.
module connect_router
  import noc_pkg::*;
#(
  parameter int unsigned MY_X      = 0,
  parameter int unsigned MY_Y      = 0,
  parameter int unsigned NUM_VC    = 2,
  parameter int unsigned BUF_DEPTH = 4,
  parameter flow_ctrl_e  FC        = FC_CREDIT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              active,
  input  logic [3:0]        nbr_active,               // [0]=N [1]=E [2]=S [3]=W
  input  flit_t             in_flit  [NUM_PORTS],
  output logic [NUM_VC-1:0] in_fc    [NUM_PORTS],     // to upstream senders
  output flit_t             out_flit [NUM_PORTS],
  input  logic [NUM_VC-1:0] out_fc   [NUM_PORTS]      // from downstream receivers
);

  localparam int unsigned CNT_W   = $clog2(BUF_DEPTH + 1);
  localparam int unsigned VCIDX_W = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;

  // ---------------- input queues ----------------
  flit_t             q_head  [NUM_PORTS][NUM_VC];
  logic              q_empty [NUM_PORTS][NUM_VC];
  logic              q_full  [NUM_PORTS][NUM_VC];
  logic [CNT_W-1:0]  q_count [NUM_PORTS][NUM_VC];
  logic              q_wr    [NUM_PORTS][NUM_VC];
  logic              q_rd    [NUM_PORTS][NUM_VC];
  port_e             q_port  [NUM_PORTS][NUM_VC];
  logic              q_det   [NUM_PORTS][NUM_VC];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      assign q_wr[p][v] = active && in_flit[p].valid && (in_flit[p].vc == VC_W'(v));

      flit_fifo #(.T(flit_t), .DEPTH(BUF_DEPTH)) u_q (
        .clk, .rst_n,
        .clr     (!active),
        .wr_en   (q_wr[p][v]),
        .wr_data (in_flit[p]),
        .rd_en   (q_rd[p][v]),
        .rd_data (q_head[p][v]),
        .empty   (q_empty[p][v]),
        .full    (q_full[p][v]),
        .count   (q_count[p][v])
      );

      route_unit #(.MY_X(MY_X), .MY_Y(MY_Y)) u_route (
        .dst_x      (q_head[p][v].dst_x),
        .dst_y      (q_head[p][v].dst_y),
        .detour_in  (q_head[p][v].detour),
        .nbr_active (nbr_active),
        .out_port   (q_port[p][v]),
        .detour_out (q_det[p][v])
      );

      if (FC == FC_CREDIT) begin : g_credit
        assign in_fc[p][v] = q_rd[p][v];
      end else begin : g_peek
        assign in_fc[p][v] = !active || (q_count[p][v] >= CNT_W'(BUF_DEPTH - 1));
      end
    end
  end

  // ---------------- output flow control ----------------
  logic [NUM_VC-1:0] o_avail [NUM_PORTS];
  logic              o_send  [NUM_PORTS];
  logic [VC_W-1:0]   o_vc    [NUM_PORTS];
  logic              o_clr   [NUM_PORTS];

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    if (o == 0) begin : g_local
      assign o_clr[o] = !active;
    end else begin : g_link
      assign o_clr[o] = !active || !nbr_active[o-1];
    end

    out_flow_ctrl #(.NUM_VC(NUM_VC), .BUF_DEPTH(BUF_DEPTH), .FC(FC)) u_fc (
      .clk, .rst_n,
      .clr     (o_clr[o]),
      .fc_in   (out_fc[o]),
      .send    (o_send[o]),
      .send_vc (o_vc[o]),
      .avail   (o_avail[o])
    );
  end

  // ---------------- stage 1: input port picks a virtual channel ----------------
  logic [NUM_VC-1:0] vc_req   [NUM_PORTS];
  logic [NUM_VC-1:0] vc_grant [NUM_PORTS];
  logic              in_any   [NUM_PORTS];
  logic              in_won   [NUM_PORTS];
  port_e             in_port  [NUM_PORTS];
  logic [VCIDX_W-1:0] in_vc   [NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_s1
    always_comb begin
      for (int v = 0; v < NUM_VC; v++)
        vc_req[p][v] = !q_empty[p][v] && o_avail[q_port[p][v]][v];
    end

    rr_arbiter #(.N(NUM_VC)) u_vc_arb (
      .clk, .rst_n,
      .req     (vc_req[p]),
      .advance (in_won[p]),
      .grant   (vc_grant[p]),
      .any     (in_any[p])
    );

    always_comb begin
      in_vc[p]   = '0;
      in_port[p] = PORT_LOCAL;
      for (int v = 0; v < NUM_VC; v++) begin
        if (vc_grant[p][v]) begin
          in_vc[p]   = VCIDX_W'(v);
          in_port[p] = q_port[p][v];
        end
      end
    end
  end

  // ---------------- stage 2: output port picks an input port ----------------
  logic [NUM_PORTS-1:0] out_req   [NUM_PORTS];
  logic [NUM_PORTS-1:0] out_grant [NUM_PORTS];
  logic                 out_any   [NUM_PORTS];

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_s2
    always_comb begin
      for (int p = 0; p < NUM_PORTS; p++)
        out_req[o][p] = in_any[p] && (in_port[p] == port_e'(o));
    end

    rr_arbiter #(.N(NUM_PORTS)) u_port_arb (
      .clk, .rst_n,
      .req     (out_req[o]),
      .advance (1'b1),
      .grant   (out_grant[o]),
      .any     (out_any[o])
    );
  end

  // ---------------- crossbar, queue pops, output registers ----------------
  flit_t out_d [NUM_PORTS];

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      in_won[p] = 1'b0;
      for (int v = 0; v < NUM_VC; v++) q_rd[p][v] = 1'b0;
    end
    for (int o = 0; o < NUM_PORTS; o++) begin
      out_d[o]  = '0;
      o_send[o] = 1'b0;
      o_vc[o]   = '0;
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (active && out_grant[o][p]) begin
          in_won[p]               = 1'b1;
          q_rd[p][in_vc[p]]       = 1'b1;
          out_d[o]                = q_head[p][in_vc[p]];
          out_d[o].valid          = 1'b1;
          out_d[o].detour         = q_det[p][in_vc[p]];
          o_send[o]               = 1'b1;
          o_vc[o]                 = q_head[p][in_vc[p]].vc;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NUM_PORTS; o++) out_flit[o] <= '0;
    end else begin
      for (int o = 0; o < NUM_PORTS; o++) out_flit[o] <= active ? out_d[o] : '0;
    end
  end

  // the link a flit is granted to must lead to an active neighbour
  for (genvar o = 1; o < NUM_PORTS; o++) begin : g_chk
    a_send_to_active: assert property (@(posedge clk) disable iff (!rst_n)
                                       o_send[o] |-> nbr_active[o-1]);
  end

endmodule
