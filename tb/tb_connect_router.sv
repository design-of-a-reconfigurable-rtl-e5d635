// tb_connect_router: router (1,1) of a 4x4 mesh (2 VCs, depth 4, credit flow
// control) between traffic drivers on all five inputs, which respect the
// credits the router returns, and receiver models on all five outputs, which
// hold each flit a random time and then return a credit.
// Checks: every flit leaves exactly once, on the port the reference routing
// chooses, on its own virtual channel; receivers never overflow; the
// uncontended input-to-output latency is 2 cycles; with the east neighbour
// switched off east-bound flits go around it; with the south neighbour off,
// flits for the column below it step sideways with the detour bit set, and
// no other flit leaves with that bit; switching the router off
// empties it and silences its outputs. Counts how often back-pressure and
// the detour happened and fails if either never did.
module tb_connect_router;
  import noc_pkg::*;
  localparam int NVC = 2, D = 4, NP = 5;
  logic clk = 0, rst_n = 0, active = 1;
  logic [3:0] nbr = 4'hF;
  flit_t in_flit [NP];
  logic [NVC-1:0] in_fc [NP];
  flit_t out_flit [NP];
  logic [NVC-1:0] out_fc [NP];
  int checks = 0, failures = 0;
  int credits [NP][NVC];
  int occ [NP][NVC];
  int hold [NP][NVC][$];
  int expect_port [int];
  int dst_col     [int];
  int uid = 0;
  int delivered = 0, stalls = 0, detours = 0;
  bit drive = 0;
  int drive_pct = 60;
  int slow = 3;

  connect_router #(.MY_X(1), .MY_Y(1), .NUM_VC(NVC), .BUF_DEPTH(D), .FC(FC_CREDIT)) dut (
    .clk, .rst_n, .active, .nbr_active(nbr), .in_flit, .in_fc, .out_flit, .out_fc);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit up(input logic [3:0] a, input int p);
    return (p == 0) ? 1'b1 : a[p-1];
  endfunction

  // reference route for router (1,1), detour bit clear on arrival
  function automatic int ref_route(input int tx, input int ty, input logic [3:0] a);
    int hx, vy;
    if (tx == 1 && ty == 1) return 0;
    hx = (tx > 1) ? 2 : 4;
    vy = (ty > 1) ? 3 : 1;
    if (tx != 1 && up(a, hx)) return hx;
    if (ty != 1 && up(a, vy)) return vy;
    if (ty == 1) return up(a, 1) ? 1 : 3;
    return up(a, 2) ? 2 : 4;
  endfunction

  // drivers
  always @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < NP; p++)
        for (int v = 0; v < NVC; v++)
          if (in_fc[p][v]) credits[p][v]++;
      for (int p = 0; p < NP; p++) begin
        flit_t f;
        int v, tx, ty;
        f = '0;
        v = $urandom_range(0, NVC - 1);
        if (drive && $urandom_range(0, 99) < drive_pct && credits[p][v] > 0) begin
          tx = $urandom_range(0, 3);
          ty = $urandom_range(0, 3);
          if (nbr[1] == 1'b0 && tx == 2 && ty == 1) tx = 3;   // never target the switched-off node
          if (nbr[2] == 1'b0 && tx == 1 && ty == 2) tx = 3;
          f.valid = 1; f.vc = VC_W'(v); f.dst_x = 2'(tx); f.dst_y = 2'(ty);
          f.data  = 32'(uid);
          expect_port[uid] = ref_route(tx, ty, nbr);
          dst_col[uid]     = tx;
          if (expect_port[uid] != ((tx > 1) ? 2 : (tx < 1) ? 4 : (ty > 1) ? 3 : (ty < 1) ? 1 : 0)) detours++;
          uid++;
          credits[p][v]--;
        end
        in_flit[p] <= f;
      end
    end
  end

  // receivers
  always @(posedge clk) begin
    if (rst_n) begin
      for (int o = 0; o < NP; o++) begin
        logic [NVC-1:0] c;
        c = '0;
        for (int v = 0; v < NVC; v++) begin
          if (hold[o][v].size() > 0) begin
            if (hold[o][v][0] <= 0) begin
              void'(hold[o][v].pop_front()); occ[o][v]--; c[v] = 1'b1;
            end else hold[o][v][0]--;
          end
        end
        out_fc[o] <= c;
        if (out_flit[o].valid) begin
          int id, v;
          id = int'(out_flit[o].data);
          v  = int'(out_flit[o].vc);
          checks += 2;
          if (!expect_port.exists(id)) begin
            failures++; $display("unknown or duplicate flit %0d on port %0d", id, o);
          end else begin
            if (expect_port[id] != o) begin
              failures++; $display("flit %0d on port %0d, expected %0d", id, o, expect_port[id]);
            end
            // a sideways step in the destination column marks the flit as detoured
            checks++;
            if (out_flit[o].detour != (dst_col[id] == 1 && (o == 2 || o == 4))) begin
              failures++; $display("flit %0d detour bit %0b on port %0d", id, out_flit[o].detour, o);
            end
            expect_port.delete(id);
          end
          occ[o][v]++;
          hold[o][v].push_back($urandom_range(0, slow));
          if (occ[o][v] > D) begin failures++; $display("receiver %0d vc %0d overflow", o, v); end
          delivered++;
        end
      end
      // back-pressure: a queue head waiting while its VC has no credit
      for (int p = 0; p < NP; p++)
        for (int v = 0; v < NVC; v++)
          if (!dut.q_empty[p][v] && !dut.o_avail[dut.q_port[p][v]][v]) stalls++;
    end
  end

  task automatic drain();
    drive = 0;
    repeat (200) @(posedge clk);
  endtask

  initial begin
    for (int p = 0; p < NP; p++) begin
      in_flit[p] = '0; out_fc[p] = '0;
      for (int v = 0; v < NVC; v++) begin credits[p][v] = D; occ[p][v] = 0; end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);

    // latency of one flit, West input -> East output (dest (3,1))
    begin
      int t0, t1;
      @(negedge clk);
      in_flit[4] = '0; in_flit[4].valid = 1; in_flit[4].dst_x = 3; in_flit[4].dst_y = 1;
      in_flit[4].data = 32'hFFFF_0000;
      expect_port[32'hFFFF_0000] = 2;
      credits[4][0]--;
      t0 = 0;
      @(negedge clk); in_flit[4] = '0;
      t1 = 1;
      while (!out_flit[2].valid && t1 < 10) begin @(negedge clk); t1++; end
      checks++;
      if (t1 != 2) begin failures++; $display("latency %0d cycles, expected 2", t1); end
      repeat (5) @(posedge clk);
    end

    // random traffic, all neighbours active, slow receivers
    drive = 1;
    repeat (3000) @(posedge clk);
    drain();
    // east neighbour switched off
    nbr = 4'b1101;
    drive = 1;
    repeat (3000) @(posedge clk);
    drain();
    // south neighbour switched off: flits for (1,3) step sideways and carry the detour bit
    nbr = 4'b1011;
    drive = 1;
    repeat (3000) @(posedge clk);
    drain();
    nbr = 4'hF;
    checks++;
    if (expect_port.size() != 0) begin failures++; $display("%0d flits never left", expect_port.size()); end
    // switch the router off while it holds flits
    slow = 20;
    drive = 1;
    repeat (300) @(posedge clk);
    drive = 0;
    @(negedge clk);
    active = 0;
    repeat (3) @(negedge clk);
    checks++;
    for (int o = 0; o < NP; o++) if (out_flit[o].valid) begin failures++; $display("output %0d busy while off", o); end
    for (int p = 0; p < NP; p++) for (int v = 0; v < NVC; v++)
      if (!dut.q_empty[p][v]) begin failures++; $display("queue %0d/%0d not emptied", p, v); end
    checks++;

    $display("delivered=%0d stalls=%0d detours=%0d", delivered, stalls, detours);
    checks += 2;
    if (stalls == 0)  begin failures++; $display("back-pressure never happened"); end
    if (detours == 0) begin failures++; $display("detour never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
