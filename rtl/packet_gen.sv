// packet_gen: traffic source attached to one node's user port.
//
// Every cycle, with probability traffic_pct/100, it creates a packet for a
// random destination among the currently active nodes other than its own,
// on a random virtual channel, and holds it in a one-entry source register
// until the router has buffer space on that channel (tracked with an
// out_flow_ctrl, credit or peek). While the source register is full no new
// packet is created, so at high traffic densities the offered load is
// limited by what the network accepts. A switched-off node generates nothing
// and drops its held packet; a held packet whose destination is switched off
// is dropped too.
//
// Destination choice: uniform among the active nodes other than this one (a
// random number modulo their count selects one of them). Random numbers come from a 32-bit
// xorshift generator seeded per node. Data word: [31:24] source node index,
// [23:0] sequence number of the packet at this source.
// Counters: gen_count packets created, sent_count packets injected.
//
// Generating flits to random active destinations and virtual channels at a
// chosen traffic density, and skipping inactive nodes, follows the test
// environment of the design; the generator, the one-entry source register and
// the data layout are this design's choices.
module packet_gen
  import noc_pkg::*;
#(
  parameter int unsigned MY_X      = 0,
  parameter int unsigned MY_Y      = 0,
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned NUM_VC    = 2,
  parameter int unsigned BUF_DEPTH = 4,
  parameter flow_ctrl_e  FC        = FC_CREDIT,
  parameter logic [31:0] SEED      = 32'h1234_5678,
  localparam int unsigned N        = MESH_X * MESH_Y
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [6:0]        traffic_pct,   // 0..100
  input  logic [N-1:0]      active_map,
  input  logic [NUM_VC-1:0] fc_in,         // from the router's user input port
  output flit_t             flit_out,
  output logic [31:0]       gen_count,
  output logic [31:0]       sent_count
);

  localparam int unsigned ME = MY_Y * MESH_X + MY_X;

  logic [31:0] rng;
  logic [31:0] rng_next;
  flit_t       pend;
  logic [23:0] seq;
  logic        me_active;

  assign me_active = active_map[ME];

  always_comb begin
    rng_next = rng ^ (rng << 13);
    rng_next = rng_next ^ (rng_next >> 17);
    rng_next = rng_next ^ (rng_next << 5);
  end

  // ---- random draw: fire?, destination, virtual channel ----
  logic [22:0]  pct_draw;      // r[15:0]*100, top bits hold 0..99
  logic         fire;
  int unsigned  n_cand;        // active nodes other than this one
  int unsigned  pick;          // which of them, 0 .. n_cand-1
  logic         dst_found;
  int unsigned  dst_id;
  logic [VC_W-1:0] vc_draw;

  always_comb begin
    pct_draw = 23'(rng[15:0]) * 23'd100;
    fire     = enable && me_active && (pct_draw[22:16] < traffic_pct);
    vc_draw  = VC_W'(int'(rng[30:24]) % NUM_VC);
    n_cand   = 0;
    for (int c = 0; c < N; c++)
      if (active_map[c] && c != ME) n_cand++;
    pick      = (n_cand == 0) ? 0 : int'(rng[23:16]) % n_cand;
    dst_found = 1'b0;
    dst_id    = 0;
    for (int c = 0, seen = 0; c < N; c++) begin
      if (active_map[c] && c != ME) begin
        if (seen == pick && !dst_found) begin
          dst_found = 1'b1;
          dst_id    = c;
        end
        seen++;
      end
    end
  end

  // ---- injection ----
  logic [NUM_VC-1:0] avail;
  logic              send;

  logic pend_dst_ok;   // the held packet's destination is still active
  assign pend_dst_ok = active_map[int'(pend.dst_y) * MESH_X + int'(pend.dst_x)];
  assign send = pend.valid && pend_dst_ok && me_active && avail[pend.vc];

  out_flow_ctrl #(.NUM_VC(NUM_VC), .BUF_DEPTH(BUF_DEPTH), .FC(FC)) u_fc (
    .clk, .rst_n,
    .clr     (!me_active),
    .fc_in,
    .send,
    .send_vc (pend.vc),
    .avail
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rng        <= (SEED == '0) ? 32'h1 : SEED;
      pend       <= '0;
      flit_out   <= '0;
      seq        <= '0;
      gen_count  <= '0;
      sent_count <= '0;
    end else begin
      rng      <= rng_next;
      flit_out <= '0;
      if (!me_active) begin
        pend <= '0;
      end else begin
        if (send) begin
          flit_out   <= pend;
          sent_count <= sent_count + 1'b1;
          pend.valid <= 1'b0;
        end else if (pend.valid && !pend_dst_ok) begin
          pend.valid <= 1'b0;           // destination switched off: drop
        end
        if ((!pend.valid || send || !pend_dst_ok) && fire && dst_found) begin
          pend.valid  <= 1'b1;
          pend.detour <= 1'b0;
          pend.vc     <= vc_draw;
          pend.dst_x  <= COORD_W'(dst_id % MESH_X);
          pend.dst_y  <= COORD_W'(dst_id / MESH_X);
          pend.data   <= {8'(ME), seq};
          seq         <= seq + 1'b1;
          gen_count   <= gen_count + 1'b1;
        end
      end
    end
  end

endmodule
