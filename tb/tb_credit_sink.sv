// tb_credit_sink: drives random flits into the receiver of node (1,2) and
// checks that each one returns exactly one credit on its virtual channel in
// the next cycle, that the total, per-VC and wrong-destination counters match
// counts kept here, and that the peek variant never signals busy.
module tb_credit_sink;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  flit_t fin;
  logic [1:0] fc, fc_p;
  logic [31:0] rx, rx_p;
  logic [31:0] rxvc [2], rxvc_p [2];
  logic [15:0] err, err_p;
  int checks = 0, failures = 0;
  int e_rx = 0, e_err = 0;
  int e_vc [2] = '{0, 0};

  credit_sink #(.MY_X(1), .MY_Y(2), .NUM_VC(2), .FC(FC_CREDIT)) dut (
    .clk, .rst_n, .flit_in(fin), .fc_out(fc), .rx_count(rx), .rx_vc_count(rxvc), .err_count(err));
  credit_sink #(.MY_X(1), .MY_Y(2), .NUM_VC(2), .FC(FC_PEEK)) dut_p (
    .clk, .rst_n, .flit_in(fin), .fc_out(fc_p), .rx_count(rx_p), .rx_vc_count(rxvc_p), .err_count(err_p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fin = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int i = 0; i < 2000; i++) begin
      logic [1:0] exp_fc;
      fin = '0;
      exp_fc = '0;
      if ($urandom_range(0, 2) != 0) begin
        fin.valid = 1;
        fin.vc    = VC_W'($urandom_range(0, 1));
        fin.dst_x = ($urandom_range(0, 9) == 0) ? 2'd3 : 2'd1;
        fin.dst_y = 2'd2;
        fin.data  = $urandom;
        e_rx++;
        e_vc[fin.vc[0]]++;
        if (fin.dst_x != 2'd1) e_err++;
        exp_fc[fin.vc[0]] = 1'b1;
      end
      @(posedge clk); #1;
      checks += 2;
      if (fc != exp_fc) begin failures++; $display("credit %b exp %b", fc, exp_fc); end
      if (fc_p != 2'b00) begin failures++; $display("peek sink busy"); end
    end
    fin = '0;
    @(posedge clk); #1;
    checks += 4;
    if (rx != 32'(e_rx))       begin failures++; $display("rx %0d exp %0d", rx, e_rx); end
    if (rxvc[0] != 32'(e_vc[0]) || rxvc[1] != 32'(e_vc[1])) begin failures++; $display("per-vc counts"); end
    if (err != 16'(e_err))     begin failures++; $display("err %0d exp %0d", err, e_err); end
    if (rx_p != 32'(e_rx))     begin failures++; $display("peek rx"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
