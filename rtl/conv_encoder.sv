// conv_encoder: convolutional (forward error correction) encoder of the
// software-defined-radio chain, the module swapped by partial reconfiguration.
//
// A rate 1/N_OUT, constraint length K feed-forward encoder: a K-1 bit shift
// register holds the previous input bits, and each output bit j is the parity
// of the input window {in_bit, history} masked by generator polynomial Gj
// (octal notation, most significant tap = current input bit). One input bit
// per in_valid gives N_OUT coded bits, registered, one cycle later on out_bits
// with out_valid. clear resets the shift register to the all-zero state (start
// of a frame).
//
// Defaults are the IEEE 802.11 (WiFi) code, K = 7, generators 133 and 171.
// The 3G scheme is obtained with K = 9, N_OUT = 3 and generators 557, 663, 711
// (the rate 1/3 WCDMA code). The two schemes come from the design; their
// polynomials are the published standards' values, not given in the design
// description.
module conv_encoder #(
  parameter int unsigned K     = 7,
  parameter int unsigned N_OUT = 2,             // 2 or 3
  parameter logic [15:0] G0    = 16'o133,
  parameter logic [15:0] G1    = 16'o171,
  parameter logic [15:0] G2    = 16'o000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic             in_bit,
  output logic             out_valid,
  output logic [N_OUT-1:0] out_bits      // out_bits[j] from generator Gj
);

  logic [K-2:0] hist;     // hist[K-2] = most recent previous input bit
  logic [K-1:0] window;
  logic [N_OUT-1:0] coded;

  function automatic logic [15:0] gen_poly(input int unsigned j);
    case (j)
      0:       return G0;
      1:       return G1;
      default: return G2;
    endcase
  endfunction

  always_comb begin
    window = {in_bit, hist};
    for (int j = 0; j < N_OUT; j++) coded[j] = ^(window & gen_poly(j)[K-1:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist      <= '0;
      out_valid <= 1'b0;
      out_bits  <= '0;
    end else begin
      out_valid <= in_valid && !clear;
      if (clear) begin
        hist <= '0;
      end else if (in_valid) begin
        hist     <= window[K-1:1];
        out_bits <= coded;
      end
    end
  end

endmodule
