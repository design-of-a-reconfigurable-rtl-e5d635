// tb_route_unit: exhaustive check of the adaptive XY routing of router (1,1)
// in a 4x4 mesh, and a walk test. For every destination, detour bit and
// neighbour-activity pattern the chosen port is compared with a reference
// decision written separately below. The walk test then follows flits hop by
// hop through a 4x4 map with one or two inactive routers, using one routing
// function instance per position, and checks that every packet reaches its
// destination within 12 hops without entering an inactive router. Holes in the
// walk maps never touch each other, not even diagonally (the routing only sees
// direct neighbours, so touching holes can trap a flit).
module tb_route_unit;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  // ---------- single router exhaustive ----------
  logic [1:0] dx, dy;
  logic det_in;
  logic [3:0] nbr;
  port_e port;
  logic det_out;

  route_unit #(.MY_X(1), .MY_Y(1)) dut (.dst_x(dx), .dst_y(dy), .detour_in(det_in),
                                        .nbr_active(nbr), .out_port(port), .detour_out(det_out));

  // all 16 positions for the walk test
  logic [1:0] wx [16], wy [16];
  logic       wdet [16];
  logic [3:0] wnbr [16];
  port_e      wport [16];
  logic       wdo [16];
  for (genvar i = 0; i < 16; i++) begin : g_pos
    route_unit #(.MY_X(i % 4), .MY_Y(i / 4)) u_r (.dst_x(wx[i]), .dst_y(wy[i]), .detour_in(wdet[i]),
      .nbr_active(wnbr[i]), .out_port(wport[i]), .detour_out(wdo[i]));
  end

  // reference: index of neighbour bit of a port (N=0,E=1,S=2,W=3)
  function automatic bit ok(input logic [3:0] a, input int p);
    return a[p-1];
  endfunction

  function automatic int ref_port(input int x, input int y, input int tx, input int ty,
                                  input bit det, input logic [3:0] a, output bit dout);
    int hx, vy;
    dout = 0;
    if (tx == x && ty == y) return 0;
    hx = (tx > x) ? 2 : 4;
    vy = (ty > y) ? 3 : 1;
    if (!det) begin
      if (tx != x && ok(a, hx)) return hx;
      if (ty != y && ok(a, vy)) return vy;
      if (ty == y) begin
        if (ok(a, 1)) return 1;
        if (ok(a, 3)) return 3;
        return hx;
      end
      if (tx == x) begin
        dout = 1;
        if (ok(a, 2)) return 2;
        if (ok(a, 4)) return 4;
        dout = 0;
        return vy;
      end
      return hx;
    end else begin
      if (ty != y && ok(a, vy)) begin dout = 1; return vy; end
      if (tx != x && ok(a, hx)) return hx;
      if (tx == x) begin
        dout = 1;
        if (ok(a, 2)) return 2;
        if (ok(a, 4)) return 4;
        return vy;
      end
      if (ty == y) begin
        if (ok(a, 1)) return 1;
        if (ok(a, 3)) return 3;
        return hx;
      end
      dout = 1;
      return vy;
    end
  endfunction

  function automatic logic [3:0] nbrs(input logic [15:0] act, input int id);
    int x, y;
    logic [3:0] r;
    x = id % 4; y = id / 4;
    r[0] = (y > 0) ? act[id-4] : 1'b0;
    r[1] = (x < 3) ? act[id+1] : 1'b0;
    r[2] = (y < 3) ? act[id+4] : 1'b0;
    r[3] = (x > 0) ? act[id-1] : 1'b0;
    return r;
  endfunction

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int detours;
    // exhaustive at (1,1)
    for (int t = 0; t < 16; t++)
      for (int d = 0; d < 2; d++)
        for (int a = 0; a < 16; a++) begin
          int exp; bit edo;
          dx = 2'(t % 4); dy = 2'(t / 4); det_in = d[0]; nbr = 4'(a);
          #1;
          exp = ref_port(1, 1, t % 4, t / 4, d[0], 4'(a), edo);
          checks++;
          if (int'(port) != exp || det_out != edo) begin
            failures++;
            $display("route mismatch dst=%0d det=%0d nbr=%b: got %0d/%0b exp %0d/%0b",
                     t, d, a, port, det_out, exp, edo);
          end
        end

    // walk test over maps with holes
    detours = 0;
    for (int m = 0; m < 40; m++) begin
      logic [15:0] act;
      act = 16'hFFFF;
      if (m < 16) act[m] = 1'b0;
      else begin
        int h1, h2;
        h1 = $urandom_range(0, 15);
        h2 = $urandom_range(0, 15);
        // two holes that do not touch, not even diagonally
        if ((h1 % 4 - h2 % 4) inside {-1, 0, 1} && (h1 / 4 - h2 / 4) inside {-1, 0, 1}) h2 = h1;
        act[h1] = 1'b0; act[h2] = 1'b0;
      end
      for (int s = 0; s < 16; s++) begin
        if (!act[s]) continue;
        for (int t = 0; t < 16; t++) begin
          int cur, prev, hops; bit det; bit arrived;
          if (!act[t] || t == s) continue;
          cur = s; det = 0; hops = 0; arrived = 0;
          while (hops < 12 && !arrived) begin
            wx[cur] = 2'(t % 4); wy[cur] = 2'(t / 4); wdet[cur] = det; wnbr[cur] = nbrs(act, cur);
            #1;
            prev = cur;
            case (wport[cur])
              PORT_LOCAL: arrived = 1;
              PORT_NORTH: cur = cur - 4;
              PORT_EAST:  cur = cur + 1;
              PORT_SOUTH: cur = cur + 4;
              PORT_WEST:  cur = cur - 1;
              default: ;
            endcase
            if (!arrived) det = wdo[prev];   // set by the forwarding router
            if (cur < 0 || cur > 15 || !act[cur]) begin
              failures++;
              $display("walk %0d->%0d entered inactive/outside node (map %h)", s, t, act);
              arrived = 1;
              hops = 99;
            end
            hops++;
          end
          checks++;
          if (!arrived || hops > 12) begin
            failures++;
            $display("walk %0d->%0d did not arrive (map %h)", s, t, act);
          end
          if (hops > 1 + ((s % 4 > t % 4) ? s % 4 - t % 4 : t % 4 - s % 4) +
                         ((s / 4 > t / 4) ? s / 4 - t / 4 : t / 4 - s / 4)) detours++;
        end
      end
    end
    checks++;
    if (detours == 0) begin failures++; $display("no detour was ever taken"); end
    $display("walks with a detour: %0d", detours);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
