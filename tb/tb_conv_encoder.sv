// tb_conv_encoder: checks the WiFi (K=7, 133/171) and 3G (K=9, 557/663/711)
// encoders. First the impulse response: a single 1 followed by zeros must
// reproduce each generator polynomial bit by bit (written out here from the
// octal values). Then random bit streams are compared with a reference that
// convolves the stored input history with the generators, including a frame
// restart with clear, and the one-cycle output latency is checked.
module tb_conv_encoder;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_bit = 0;
  logic w_ov, g_ov;
  logic [1:0] w_out;
  logic [2:0] g_out;
  int checks = 0, failures = 0;

  conv_encoder #(.K(7), .N_OUT(2), .G0(16'o133), .G1(16'o171), .G2(16'o0)) dut_wifi (
    .clk, .rst_n, .clear, .in_valid, .in_bit, .out_valid(w_ov), .out_bits(w_out));
  conv_encoder #(.K(9), .N_OUT(3), .G0(16'o557), .G1(16'o663), .G2(16'o711)) dut_3g (
    .clk, .rst_n, .clear, .in_valid, .in_bit, .out_valid(g_ov), .out_bits(g_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // impulse responses, first output bit first
  localparam bit [6:0] W_G0 = 7'b1011011;   // 133 octal
  localparam bit [6:0] W_G1 = 7'b1111001;   // 171 octal
  localparam bit [8:0] T_G0 = 9'b101101111; // 557 octal
  localparam bit [8:0] T_G1 = 9'b110110011; // 663 octal
  localparam bit [8:0] T_G2 = 9'b111001001; // 711 octal

  bit hist [$];   // hist[0] = newest input

  function automatic bit conv(input bit [8:0] g, input int k);
    bit r = 0;
    for (int i = 0; i < k; i++)
      if (i < hist.size()) r ^= g[k-1-i] & hist[i];
    return r;
  endfunction

  task automatic push(input bit b, input bit do_check);
    in_valid = 1; in_bit = b;
    hist.push_front(b);
    @(posedge clk); #1;
    in_valid = 0;
    if (do_check) begin
      checks += 3;
      if (!w_ov || !g_ov) begin failures++; $display("out_valid missing"); end
      if (w_out != {conv(9'(W_G1), 7), conv(9'(W_G0), 7)}) begin
        failures++; $display("wifi mismatch at %0d: %b", hist.size(), w_out);
      end
      if (g_out != {conv(T_G2, 9), conv(T_G1, 9), conv(T_G0, 9)}) begin
        failures++; $display("3g mismatch at %0d: %b", hist.size(), g_out);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // impulse response
    for (int n = 0; n < 9; n++) begin
      in_valid = 1; in_bit = (n == 0);
      @(posedge clk); #1;
      in_valid = 0;
      checks += 2;
      if (n < 7 && w_out != {W_G1[6-n], W_G0[6-n]}) begin
        failures++; $display("wifi impulse step %0d: %b", n, w_out);
      end
      if (g_out != {T_G2[8-n], T_G1[8-n], T_G0[8-n]}) begin
        failures++; $display("3g impulse step %0d: %b", n, g_out);
      end
    end
    // idle cycle: no output
    @(posedge clk); #1;
    checks++;
    if (w_ov || g_ov) begin failures++; $display("out_valid without input"); end
    // new frame
    clear = 1; @(posedge clk); #1 clear = 0;
    hist.delete();
    for (int i = 0; i < 500; i++) begin
      push(1'($urandom), 1);
      if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end   // gaps keep the state
      if (i == 250) begin
        clear = 1; @(posedge clk); #1 clear = 0;
        hist.delete();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
