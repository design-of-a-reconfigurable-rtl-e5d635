// tb_out_flow_ctrl: checks the credit counters of one output port (2 VCs,
// depth 4) against a reference count under random sends and credit returns,
// that a channel is unavailable exactly when its credits are exhausted, that
// clr refills the counters, and (second instance) the peek variant, whose
// availability is the inverse of the busy level.
module tb_out_flow_ctrl;
  import noc_pkg::*;
  localparam int NVC = 2, D = 4;
  logic clk = 0, rst_n = 0, clr = 0, send = 0;
  logic [NVC-1:0] fc_in = '0, avail, peek_busy = '0, peek_avail;
  logic [VC_W-1:0] send_vc = '0;
  int checks = 0, failures = 0;
  int ref_cnt [NVC];
  int exhausted = 0;

  out_flow_ctrl #(.NUM_VC(NVC), .BUF_DEPTH(D), .FC(FC_CREDIT)) dut (.*);
  out_flow_ctrl #(.NUM_VC(NVC), .BUF_DEPTH(D), .FC(FC_PEEK)) dut_peek (
    .clk, .rst_n, .clr(1'b0), .fc_in(peek_busy), .send(1'b0), .send_vc('0), .avail(peek_avail));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int v = 0; v < NVC; v++) begin
      checks++;
      if (avail[v] != (ref_cnt[v] > 0)) begin
        failures++;
        $display("vc%0d avail=%0b ref credits=%0d", v, avail[v], ref_cnt[v]);
      end
      if (ref_cnt[v] == 0) exhausted++;
    end
  endtask

  initial begin
    for (int v = 0; v < NVC; v++) ref_cnt[v] = D;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 compare();
    for (int i = 0; i < 4000; i++) begin
      int v;
      v = $urandom_range(0, NVC - 1);
      send    = avail[v] && ($urandom_range(0, 2) != 0);
      send_vc = VC_W'(v);
      for (int c = 0; c < NVC; c++)
        fc_in[c] = (ref_cnt[c] - ((send && c == v) ? 1 : 0) < D) && ($urandom_range(0, 2) == 0);
      @(posedge clk);
      for (int c = 0; c < NVC; c++) begin
        if (send && c == v) ref_cnt[c]--;
        if (fc_in[c])       ref_cnt[c]++;
      end
      #1;
      send = 0; fc_in = '0;
      compare();
      if (i == 2000) begin
        clr = 1;
        #1;
        checks++;
        if (avail != '0) begin failures++; $display("avail while clr"); end
        @(posedge clk); #1 clr = 0;
        for (int c = 0; c < NVC; c++) ref_cnt[c] = D;
        #1 compare();
      end
    end
    checks++;
    if (exhausted == 0) begin failures++; $display("credits never ran out"); end
    // peek
    for (int i = 0; i < 4; i++) begin
      peek_busy = 2'(i);
      #1;
      checks++;
      if (peek_avail != ~peek_busy) begin failures++; $display("peek avail wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
