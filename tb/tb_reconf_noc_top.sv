// tb_reconf_noc_top: whole-design test at the default parameters (4x4 mesh,
// 2 VCs, buffer depth 4, credit flow control), the generators and receivers of
// the top providing the traffic.
// For each regular network the design is shrunk to (4x4, 4x3, 3x3, 3x2, 2x2,
// 2x1) and one irregular map (corner 0 off) it loads the network at 80 %
// traffic density for a fixed window, measures the throughput in packets per
// cycle per active node, drains the network and checks that every injected
// packet was delivered to its own destination. At 20 % density the accepted
// throughput must equal the offered load (within 0.03), and the full 4x4
// network at 80 % must carry at least 0.59 packets/cycle/node. Counts, and requires
// at least once: a map change (mode switch), a map change of adjacent routers
// (flagged), back-pressure on a source, and a flit routed around a switched-
// off router. The two encoders are checked with their impulse responses.
module tb_reconf_noc_top;
  import noc_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, gen_enable = 0;
  logic [N-1:0] cfg_data = '1, active;
  logic [6:0] traffic_pct = 7'd80;
  logic cfg_err;
  logic [31:0] gen_total, tx_total, rx_total, rx_err_total;
  logic [31:0] rx_node [N];
  logic wifi_clear = 0, wifi_in_valid = 0, wifi_in_bit = 0, wifi_out_valid;
  logic [1:0] wifi_out_bits;
  logic g3_clear = 0, g3_in_valid = 0, g3_in_bit = 0, g3_out_valid;
  logic [2:0] g3_out_bits;
  int checks = 0, failures = 0;
  int n_switch = 0, n_adj = 0, n_stall = 0, n_detour = 0;
  real thr [string];
  localparam bit [6:0] WG0 = 7'o133, WG1 = 7'o171;
  localparam bit [8:0] TG0 = 9'o557, TG1 = 9'o663, TG2 = 9'o711;

  reconf_noc_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  for (genvar n = 0; n < N; n++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n) begin
        if (dut.g_y[n/4].g_x[n%4].u_gen.pend.valid && !dut.g_y[n/4].g_x[n%4].u_gen.send && active[n])
          n_stall++;
        for (int o = 1; o < 5; o++) begin
          flit_t f;
          int xy;
          f = dut.u_mesh.g_y[n/4].g_x[n%4].u_router.out_flit[o];
          xy = (int'(f.dst_x) > n % 4) ? 2 : (int'(f.dst_x) < n % 4) ? 4 :
               (int'(f.dst_y) > n / 4) ? 3 : 1;
          if (f.valid && o != xy) n_detour++;
        end
      end
    end
  end

  task automatic set_map(input logic [N-1:0] m);
    @(negedge clk);
    cfg_data = m; cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
    n_switch++;
    if (cfg_err) n_adj++;
    checks++;
    if (active != m) begin failures++; $display("map %h not applied", m); end
  endtask

  task automatic run(input string name, input logic [N-1:0] m, input int pct, input int cycles,
                     output real t);
    int rx0, nact;
    set_map(m);
    traffic_pct = 7'(pct);
    nact = $countones(m);
    gen_enable = 1;
    repeat (200) @(posedge clk);          // warm up
    rx0 = int'(rx_total);
    repeat (cycles) @(posedge clk);
    t = real'(int'(rx_total) - rx0) / real'(cycles) / real'(nact);
    gen_enable = 0;
    repeat (300) @(posedge clk);          // drain
    checks += 2;
    if (tx_total != rx_total) begin
      failures++; $display("%s: %0d packets injected, %0d delivered", name, tx_total, rx_total);
    end
    if (rx_err_total != 0) begin failures++; $display("%s: %0d misdelivered", name, rx_err_total); end
    $display("%-22s traffic %3d%%  throughput %.3f packets/cycle/node", name, pct, t);
  endtask

  initial begin
    real t;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);

    run("mesh 4x4", 16'hFFFF, 80, 3000, t); thr["4x4"] = t;
    run("mesh 4x3", 16'h0FFF, 80, 3000, t); thr["4x3"] = t;
    run("mesh 3x3", 16'h0777, 80, 3000, t); thr["3x3"] = t;
    run("mesh 3x2", 16'h0077, 80, 3000, t); thr["3x2"] = t;
    run("mesh 2x2", 16'h0033, 80, 3000, t); thr["2x2"] = t;
    run("mesh 2x1", 16'h0003, 80, 3000, t); thr["2x1"] = t;
    run("mesh 4x4", 16'hFFFF, 20, 3000, t);
    checks++;
    if (t < 0.17 || t > 0.23) begin failures++; $display("low-load throughput %.3f, offered 0.20", t); end
    run("4x4, corner 0 off", 16'hFFFE, 80, 3000, t);
    run("4x4, edge 1 off", 16'hFFFD, 80, 3000, t);
    run("mesh 4x4", 16'hFFFF, 100, 3000, t);

    // the 4x4 network with 2 VCs and buffer depth 4 at 80 % traffic is
    // reported to sustain at least 0.59 packets/cycle/node
    checks++;
    if (thr["4x4"] < 0.59) begin failures++; $display("4x4 throughput %.3f below 0.59", thr["4x4"]); end
    checks += 2;
    if (gen_total < tx_total) begin failures++; $display("gen_total below tx_total"); end
    if (!(thr["4x4"] > 0.0 && thr["2x1"] > 0.0)) begin failures++; $display("no throughput"); end

    // encoders: impulse responses
    @(negedge clk);
    for (int s = 0; s < 9; s++) begin
      wifi_in_valid = 1; wifi_in_bit = (s == 0);
      g3_in_valid = 1; g3_in_bit = (s == 0);
      @(negedge clk);
      checks += 2;
      if (s < 7 && wifi_out_bits != {WG1[6-s], WG0[6-s]}) begin
        failures++; $display("wifi encoder step %0d: %b", s, wifi_out_bits);
      end
      if (g3_out_bits != {TG2[8-s], TG1[8-s], TG0[8-s]}) begin
        failures++; $display("3g encoder step %0d: %b", s, g3_out_bits);
      end
    end
    wifi_in_valid = 0; g3_in_valid = 0;

    $display("map switches=%0d adjacent-change flags=%0d source stalls=%0d surround hops=%0d",
             n_switch, n_adj, n_stall, n_detour);
    checks += 4;
    if (n_switch == 0) begin failures++; $display("no map switch"); end
    if (n_adj == 0)    begin failures++; $display("adjacent-change flag never raised"); end
    if (n_stall == 0)  begin failures++; $display("no back-pressure"); end
    if (n_detour == 0) begin failures++; $display("no flit went around a switched-off router"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
