// reconf_noc_top: runtime-reconfigurable mesh NoC in its traffic environment,
// next to the reconfigurable-region encoders of the radio chain.
//
// Network part: a connect_mesh (4x4, 2 virtual channels, buffer depth 4,
// credit flow control by default) whose every user port is driven by a
// packet_gen and drained by a credit_sink. The active-router word (cfg_we /
// cfg_data) shrinks or regrows the network at runtime; generators only target
// active nodes. traffic_pct sets the traffic density (5..100 % evaluated),
// gen_enable starts and stops the sources. The totals give the throughput:
// rx_total / (cycles * active nodes) packets per cycle per node; rx_err_total
// counts packets delivered to a wrong node.
//
// Radio part, independent of the network: the two convolutional encoders
// that partial reconfiguration swaps in the radio chain, WiFi (K=7, rate 1/2)
// and 3G (K=9, rate 1/3), each with its own ports. Only one of them occupies
// the reconfigurable region at a time in a real device; both are provided
// here as separate instances.
module reconf_noc_top
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned NUM_VC    = 2,
  parameter int unsigned BUF_DEPTH = 4,
  parameter flow_ctrl_e  FC        = FC_CREDIT,
  localparam int unsigned N        = MESH_X * MESH_Y
) (
  input  logic         clk,
  input  logic         rst_n,
  // network configuration and traffic
  input  logic         cfg_we,
  input  logic [N-1:0] cfg_data,
  input  logic         gen_enable,
  input  logic [6:0]   traffic_pct,
  output logic [N-1:0] active,
  output logic         cfg_err,
  output logic [31:0]  gen_total,
  output logic [31:0]  tx_total,
  output logic [31:0]  rx_total,
  output logic [31:0]  rx_node [N],
  output logic [31:0]  rx_err_total,
  // WiFi encoder
  input  logic         wifi_clear,
  input  logic         wifi_in_valid,
  input  logic         wifi_in_bit,
  output logic         wifi_out_valid,
  output logic [1:0]   wifi_out_bits,
  // 3G encoder
  input  logic         g3_clear,
  input  logic         g3_in_valid,
  input  logic         g3_in_bit,
  output logic         g3_out_valid,
  output logic [2:0]   g3_out_bits
);

  flit_t             inj_flit [N];
  logic [NUM_VC-1:0] inj_fc   [N];
  flit_t             ej_flit  [N];
  logic [NUM_VC-1:0] ej_fc    [N];
  logic [31:0]       gen_cnt  [N];
  logic [31:0]       sent_cnt [N];
  logic [31:0]       rx_vc    [N][NUM_VC];
  logic [15:0]       err_cnt  [N];

  connect_mesh #(
    .MESH_X(MESH_X), .MESH_Y(MESH_Y), .NUM_VC(NUM_VC), .BUF_DEPTH(BUF_DEPTH), .FC(FC)
  ) u_mesh (
    .clk, .rst_n, .cfg_we, .cfg_data, .active, .cfg_err,
    .inj_flit, .inj_fc, .ej_flit, .ej_fc
  );

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned ID = y * MESH_X + x;

      packet_gen #(
        .MY_X(x), .MY_Y(y), .MESH_X(MESH_X), .MESH_Y(MESH_Y),
        .NUM_VC(NUM_VC), .BUF_DEPTH(BUF_DEPTH), .FC(FC),
        .SEED(32'h9E37_79B9 ^ (32'(ID + 1) * 32'h0101_0A3D))
      ) u_gen (
        .clk, .rst_n,
        .enable      (gen_enable),
        .traffic_pct (traffic_pct),
        .active_map  (active),
        .fc_in       (inj_fc[ID]),
        .flit_out    (inj_flit[ID]),
        .gen_count   (gen_cnt[ID]),
        .sent_count  (sent_cnt[ID])
      );

      credit_sink #(.MY_X(x), .MY_Y(y), .NUM_VC(NUM_VC), .FC(FC)) u_sink (
        .clk, .rst_n,
        .flit_in     (ej_flit[ID]),
        .fc_out      (ej_fc[ID]),
        .rx_count    (rx_node[ID]),
        .rx_vc_count (rx_vc[ID]),
        .err_count   (err_cnt[ID])
      );
    end
  end

  always_comb begin
    gen_total    = '0;
    tx_total     = '0;
    rx_total     = '0;
    rx_err_total = '0;
    for (int n = 0; n < N; n++) begin
      gen_total    += gen_cnt[n];
      tx_total     += sent_cnt[n];
      rx_total     += rx_node[n];
      rx_err_total += 32'(err_cnt[n]);
    end
  end

  conv_encoder #(.K(7), .N_OUT(2), .G0(16'o133), .G1(16'o171), .G2(16'o000)) u_enc_wifi (
    .clk, .rst_n,
    .clear     (wifi_clear),
    .in_valid  (wifi_in_valid),
    .in_bit    (wifi_in_bit),
    .out_valid (wifi_out_valid),
    .out_bits  (wifi_out_bits)
  );

  conv_encoder #(.K(9), .N_OUT(3), .G0(16'o557), .G1(16'o663), .G2(16'o711)) u_enc_3g (
    .clk, .rst_n,
    .clear     (g3_clear),
    .in_valid  (g3_in_valid),
    .in_bit    (g3_in_bit),
    .out_valid (g3_out_valid),
    .out_bits  (g3_out_bits)
  );

endmodule
