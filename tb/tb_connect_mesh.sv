// tb_connect_mesh: end-to-end test of the reconfigurable 4x4 mesh, run on two
// instances at once, one with credit and one with peek flow control.
// Every node has a driver that sends random flits (random active destination,
// random VC) while it holds buffer space, and a receiver that takes flits at
// once and returns credits. A scoreboard checks that every flit arrives
// exactly once, at its destination, on its VC.
// Phases, each ended by stopping the drivers, draining the network and
// checking that nothing is left: full 4x4; the regular 4x3, 3x3, 3x2, 2x2 and
// 2x1 networks; the irregular maps with one router off (fffe, fffd, efff,
// 7fff) and with two boundary routers off that do not touch (7ffe, bffd), the
// last ones at full load. Before each new map the network is drained, since a router
// that is switched off loses what it holds. The uncontended latency from node
// 0 to node 15 (six hops, seven routers) is checked: 2 cycles per router.
module tb_connect_mesh;
  import noc_pkg::*;
  localparam int NVC = 2, D = 4, N = 16;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [N-1:0] cfg_data = '1;
  logic [N-1:0] active [2];
  logic cfg_err [2];
  flit_t inj_flit [2][N];
  logic [NVC-1:0] inj_fc [2][N];
  flit_t ej_flit [2][N];
  logic [NVC-1:0] ej_fc [2][N];
  int checks = 0, failures = 0;
  int credits [2][N][NVC];
  int dest_of [2][int];
  int uid = 0;
  bit drive = 0;
  int pct = 50;
  int delivered [2] = '{0, 0};
  int maps_run = 0, cfg_err_seen = 0, detour_hops = 0, stalls = 0;

  connect_mesh #(.MESH_X(4), .MESH_Y(4), .NUM_VC(NVC), .BUF_DEPTH(D), .FC(FC_CREDIT)) dut_credit (
    .clk, .rst_n, .cfg_we, .cfg_data, .active(active[0]), .cfg_err(cfg_err[0]),
    .inj_flit(inj_flit[0]), .inj_fc(inj_fc[0]), .ej_flit(ej_flit[0]), .ej_fc(ej_fc[0]));
  connect_mesh #(.MESH_X(4), .MESH_Y(4), .NUM_VC(NVC), .BUF_DEPTH(D), .FC(FC_PEEK)) dut_peek (
    .clk, .rst_n, .cfg_we, .cfg_data, .active(active[1]), .cfg_err(cfg_err[1]),
    .inj_flit(inj_flit[1]), .inj_fc(inj_fc[1]), .ej_flit(ej_flit[1]), .ej_fc(ej_fc[1]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // peek: the user port shows busy; a flit may be sent when not busy and
  // nothing was sent in the previous cycle on that VC (two in flight max)
  logic [NVC-1:0] sent_last [N];

  always @(posedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < 2; k++) begin
        for (int n = 0; n < N; n++) begin
          flit_t f;
          int v, d;
          bit can;
          if (k == 0) for (int c = 0; c < NVC; c++) if (inj_fc[0][n][c]) credits[0][n][c]++;
          f = '0;
          v = $urandom_range(0, NVC - 1);
          can = (k == 0) ? (credits[0][n][v] > 0) : (!inj_fc[1][n][v] && !sent_last[n][v]);
          if (k == 1) sent_last[n] <= '0;
          if (drive && active[k][n] && $urandom_range(0, 99) < pct) begin
            if (!can) stalls++;
            else begin
              d = $urandom_range(0, N - 1);
              while (!active[k][d] || d == n) d = (d + 1) % N;
              f.valid = 1; f.vc = VC_W'(v); f.dst_x = 2'(d % 4); f.dst_y = 2'(d / 4);
              f.data = 32'(uid);
              dest_of[k][uid] = d;
              uid++;
              if (k == 0) credits[0][n][v]--;
              else sent_last[n][v] <= 1'b1;
            end
          end
          inj_flit[k][n] <= f;
        end
      end
    end
  end

  // receivers
  always @(posedge clk) begin
    for (int k = 0; k < 2; k++)
      for (int n = 0; n < N; n++) begin
        logic [NVC-1:0] c;
        c = '0;
        if (rst_n && ej_flit[k][n].valid) begin
          int id;
          id = int'(ej_flit[k][n].data);
          checks++;
          if (!dest_of[k].exists(id)) begin
            failures++; $display("[%0d] flit %0d unknown or duplicated at node %0d", k, id, n);
          end else begin
            if (dest_of[k][id] != n) begin
              failures++; $display("[%0d] flit %0d at node %0d, expected %0d", k, id, n, dest_of[k][id]);
            end
            dest_of[k].delete(id);
          end
          delivered[k]++;
          c[ej_flit[k][n].vc[0]] = 1'b1;
        end
        ej_fc[k][n] <= (k == 0) ? c : '0;
      end
  end

  // count flits that leave a router in a direction plain XY would not take
  for (genvar n = 0; n < N; n++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n)
        for (int o = 1; o < 5; o++) begin
          flit_t f;
          int xy;
          f = dut_credit.g_y[n/4].g_x[n%4].u_router.out_flit[o];
          xy = (int'(f.dst_x) > n % 4) ? 2 : (int'(f.dst_x) < n % 4) ? 4 :
               (int'(f.dst_y) > n / 4) ? 3 : 1;
          if (f.valid && o != xy) detour_hops++;
        end
    end
  end

  task automatic run_map(input logic [N-1:0] m, input int cycles);
    @(negedge clk);
    cfg_data = m; cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
    if (cfg_err[0]) cfg_err_seen++;
    checks++;
    if (active[0] != m || active[1] != m) begin failures++; $display("map not applied"); end
    drive = 1;
    repeat (cycles) @(posedge clk);
    drive = 0;
    repeat (400) @(posedge clk);
    checks += 2;
    for (int k = 0; k < 2; k++)
      if (dest_of[k].size() != 0) begin
        failures++; $display("[%0d] %0d flits lost in map %h", k, dest_of[k].size(), m);
        dest_of[k].delete();
      end
    maps_run++;
  endtask

  initial begin
    for (int k = 0; k < 2; k++) for (int n = 0; n < N; n++) begin
      inj_flit[k][n] = '0; ej_fc[k][n] = '0;
      for (int v = 0; v < NVC; v++) credits[k][n][v] = D;
    end
    for (int n = 0; n < N; n++) sent_last[n] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (5) @(posedge clk);

    // latency 0 -> 15 on the credit instance
    begin
      int t;
      @(negedge clk);
      inj_flit[0][0] = '0; inj_flit[0][0].valid = 1; inj_flit[0][0].dst_x = 3; inj_flit[0][0].dst_y = 3;
      inj_flit[0][0].data = 32'h7000_0000;
      dest_of[0][32'h7000_0000] = 15;
      credits[0][0][0]--;
      @(negedge clk); inj_flit[0][0] = '0;
      t = 1;
      while (!ej_flit[0][15].valid && t < 40) begin @(negedge clk); t++; end
      checks++;
      if (t != 14) begin failures++; $display("latency 0->15: %0d cycles, expected 14", t); end
      repeat (5) @(posedge clk);
    end

    run_map(16'hFFFF, 3000);   // 4x4
    run_map(16'h0FFF, 2000);   // 4x3
    run_map(16'h0777, 2000);   // 3x3
    run_map(16'h0077, 2000);   // 3x2
    run_map(16'h0033, 2000);   // 2x2
    run_map(16'h0003, 1000);   // 2x1
    run_map(16'hFFFF, 500);
    run_map(16'hFFFE, 2000);   // corner 0 off
    run_map(16'hFFFF, 200);
    run_map(16'hFFFD, 2000);   // edge 1 off
    run_map(16'hFFFF, 200);
    run_map(16'hEFFF, 2000);   // corner 12 off
    run_map(16'hFFFF, 200);
    run_map(16'h7FFF, 2000);   // corner 15 off
    run_map(16'hFFFF, 200);
    pct = 100;
    run_map(16'h7FFE, 2000);   // corners 0 and 15 off
    run_map(16'hFFFF, 200);
    run_map(16'hBFFD, 2000);   // edge routers 1 and 14 off
    run_map(16'hFFFF, 2000);   // full network at full load
    $display("delivered credit=%0d peek=%0d maps=%0d cfg_err=%0d detour_hops=%0d stalls=%0d",
             delivered[0], delivered[1], maps_run, cfg_err_seen, detour_hops, stalls);
    checks += 3;
    if (detour_hops == 0)  begin failures++; $display("no detour happened"); end
    if (stalls == 0)       begin failures++; $display("no back-pressure happened"); end
    if (cfg_err_seen == 0) begin failures++; $display("adjacent-change flag never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
