// tb_packet_gen: the traffic source of node (1,1) in a 4x4 mesh, connected
// to a model of the router's input queues (2 VCs, depth 4) that frees slots
// after a random delay and returns one credit per freed slot. Checks: no send
// without buffer space, destinations only among active nodes and never the
// source, valid virtual channels, source field and sequence numbers in the
// data word, an injection rate of one packet per cycle at 100 % density with
// free buffers and about 30 % at 30 % density, no traffic while the source
// node is switched off, and the gen/sent counters.
module tb_packet_gen;
  import noc_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [6:0] pct = 7'd100;
  logic [15:0] amap = 16'hFFFF;
  logic [1:0] fc = '0;
  flit_t fo;
  logic [31:0] gen_count, sent_count;
  int checks = 0, failures = 0;
  int occ [2] = '{0, 0};
  int held [2][$];        // remaining hold cycles of queued flits
  int exp_seq = 0;
  int sent = 0;
  bit slow_credits = 0;
  bit map_changed = 0;
  int stalls = 0;

  packet_gen #(.MY_X(1), .MY_Y(1), .MESH_X(4), .MESH_Y(4), .NUM_VC(2), .BUF_DEPTH(D),
               .FC(FC_CREDIT), .SEED(32'hCAFE_0001)) dut (
    .clk, .rst_n, .enable, .traffic_pct(pct), .active_map(amap), .fc_in(fc),
    .flit_out(fo), .gen_count, .sent_count);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver model: sample flits, hold them, return credits
  always @(posedge clk) begin
    if (rst_n) begin
      logic [1:0] nfc;
      nfc = '0;
      for (int v = 0; v < 2; v++) begin
        if (held[v].size() > 0) begin
          if (held[v][0] == 0) begin
            void'(held[v].pop_front());
            occ[v]--;
            nfc[v] = 1'b1;
          end else held[v][0]--;
        end
      end
      if (fo.valid) begin
        int id;
        id = int'(fo.dst_y) * 4 + int'(fo.dst_x);
        sent++;
        checks += 4;
        if (fo.vc > 1) begin failures++; $display("bad vc %0d", fo.vc); end
        else begin
          occ[fo.vc]++;
          held[fo.vc].push_back(slow_credits ? $urandom_range(2, 8) : 0);
          if (occ[fo.vc] > D) begin failures++; $display("overflow on vc %0d", fo.vc); end
        end
        if (!amap[id] || id == 5) begin failures++; $display("bad destination %0d (map %h)", id, amap); end
        if (fo.data[31:24] != 8'd5) begin failures++; $display("bad source field"); end
        // consecutive numbers while the map is unchanged; a packet held for a
        // node that was switched off is dropped, which leaves a gap
        if (map_changed ? (int'(fo.data[23:0]) < exp_seq) : (int'(fo.data[23:0]) != exp_seq)) begin
          failures++; $display("seq %0d exp %0d", fo.data[23:0], exp_seq);
        end
        exp_seq = int'(fo.data[23:0]) + 1;
      end else if (enable && dut.pend.valid) stalls++;
      fc <= nfc;
    end
  end

  task automatic measure(input int cycles, output int n);
    int s0;
    s0 = sent;
    repeat (cycles) @(posedge clk);
    n = sent - s0;
  endtask

  initial begin
    int n;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    checks++;
    if (fo.valid) begin failures++; $display("sent while disabled"); end
    enable = 1;
    // full density, credits back at once
    repeat (20) @(posedge clk);
    measure(1000, n);
    checks++;
    if (n < 990) begin failures++; $display("rate at 100%%: %0d/1000", n); end
    // 30 %
    pct = 7'd30;
    repeat (20) @(posedge clk);
    measure(4000, n);
    checks++;
    if (n < 1000 || n > 1400) begin failures++; $display("rate at 30%%: %0d/4000", n); end
    // slow receiver: back-pressure
    pct = 7'd100; slow_credits = 1;
    measure(2000, n);
    checks++;
    if (stalls == 0) begin failures++; $display("no back-pressure seen"); end
    slow_credits = 0;
    // 3x3 map (nodes x<3, y<3)
    amap = 16'h0777;
    map_changed = 1;
    repeat (10) @(posedge clk);
    measure(1000, n);
    // source switched off
    amap = 16'h0757;
    repeat (3) @(posedge clk);
    measure(200, n);
    checks++;
    if (n != 0) begin failures++; $display("sent %0d while switched off", n); end
    amap = 16'hFFFF;
    enable = 0;
    repeat (20) @(posedge clk);
    checks += 2;
    if (sent_count != 32'(sent)) begin failures++; $display("sent_count %0d vs %0d", sent_count, sent); end
    if (gen_count < sent_count) begin failures++; $display("gen_count below sent_count"); end
    $display("sent=%0d stalls=%0d", sent, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
