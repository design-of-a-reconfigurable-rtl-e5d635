// tb_flit_fifo: self-checking test of one virtual-channel input queue.
// A reference queue model in the testbench follows every random push/pop;
// the head, empty, full and count outputs are compared each cycle. Also
// checks fill to DEPTH, simultaneous push+pop when full, and clr.
module tb_flit_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0, clr = 0, wr_en = 0, rd_en = 0;
  logic [15:0] wr_data = '0, rd_data;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [15:0] model [$];

  flit_fifo #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    checks++;
    if (count != model.size() || empty != (model.size() == 0) || full != (model.size() == DEPTH)) begin
      failures++;
      $display("state mismatch: count=%0d model=%0d empty=%0b full=%0b", count, model.size(), empty, full);
    end
    if (model.size() > 0) begin
      checks++;
      if (rd_data != model[0]) begin
        failures++;
        $display("head mismatch: %h vs %h", rd_data, model[0]);
      end
    end
  endtask

  task automatic step(input logic w, input logic r, input logic [15:0] d);
    wr_en = w; rd_en = r; wr_data = d;
    @(posedge clk);
    if (r) void'(model.pop_front());
    if (w) model.push_back(d);
    #1;
    wr_en = 0; rd_en = 0;
    check_state();
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check_state();
    // fill completely
    for (int i = 0; i < DEPTH; i++) step(1, 0, 16'(16'hA000 + i));
    checks++; if (!full) begin failures++; $display("not full after %0d writes", DEPTH); end
    // push and pop at once while full
    step(1, 1, 16'hBEEF);
    // drain
    while (model.size() > 0) step(0, 1, 0);
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      logic w, r;
      w = ($urandom_range(0, 1) == 1) && (model.size() < DEPTH);
      r = ($urandom_range(0, 1) == 1) && (model.size() > 0);
      if (model.size() == DEPTH && $urandom_range(0,1) == 1) begin w = 1; r = 1; end
      step(w, r, 16'($urandom));
    end
    // clear
    if (model.size() == 0) step(1, 0, 16'h1234);
    clr = 1; @(posedge clk); #1 clr = 0;
    model.delete();
    check_state();
    step(1, 0, 16'h5555);
    step(0, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
