// tb_network_map: checks the reset map (all active), that a written word is
// visible the next cycle, the neighbour bits of every node against a
// reference computed from coordinates for random maps, and that cfg_err
// rises for a write changing two adjacent nodes but not for one changing
// only non-adjacent nodes.
module tb_network_map;
  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [15:0] cfg_data = '0, active;
  logic [3:0] nbr_active [16];
  logic cfg_err;
  int checks = 0, failures = 0;

  network_map #(.MESH_X(4), .MESH_Y(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_nbrs(input logic [15:0] m);
    for (int n = 0; n < 16; n++) begin
      int x, y;
      logic [3:0] e;
      x = n % 4; y = n / 4;
      e[0] = (y == 0) ? 1'b0 : m[n - 4];
      e[1] = (x == 3) ? 1'b0 : m[n + 1];
      e[2] = (y == 3) ? 1'b0 : m[n + 4];
      e[3] = (x == 0) ? 1'b0 : m[n - 1];
      checks++;
      if (nbr_active[n] != e) begin
        failures++;
        $display("node %0d nbr=%b exp %b (map %h)", n, nbr_active[n], e, m);
      end
    end
  endtask

  task automatic write(input logic [15:0] d, input bit exp_err);
    cfg_data = d; cfg_we = 1;
    @(posedge clk); #1 cfg_we = 0;
    checks += 2;
    if (active != d)        begin failures++; $display("active %h exp %h", active, d); end
    if (cfg_err != exp_err) begin failures++; $display("cfg_err %0b exp %0b for %h", cfg_err, exp_err, d); end
    check_nbrs(d);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (active != 16'hFFFF) begin failures++; $display("reset map %h", active); end
    check_nbrs(16'hFFFF);
    write(16'hFFFE, 0);          // corner 0 off
    write(16'hFFFF, 0);          // back on
    write(16'h7FFF, 0);          // corner 15 off
    write(16'h7FFD, 0);          // node 1 off: not adjacent to 15
    write(16'h7FFF, 0);
    write(16'hFFFC, 1);          // 15 on, 0 and 1 off: adjacent 0-1 change
    write(16'hFFFF, 1);          // 0 and 1 back: adjacent
    write(16'hFFEE, 1);          // 0 and 4 off: vertical neighbours
    write(16'hFFFF, 1);
    // rectangles 4x3, 3x3
    write(16'h0FFF, 1);
    write(16'h0777, 1);
    for (int i = 0; i < 100; i++) begin
      logic [15:0] d, ch;
      bit adj;
      d  = 16'($urandom);
      ch = d ^ active;
      adj = 0;
      for (int n = 0; n < 16; n++) begin
        if (n % 4 != 3 && ch[n] && ch[n+1]) adj = 1;
        if (n < 12 && ch[n] && ch[n+4]) adj = 1;
      end
      write(d, adj);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
