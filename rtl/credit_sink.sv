// credit_sink: traffic receiver ("credit element") on one node's user port.
//
// Accepts every flit the router delivers, returns the freed buffer slot to
// the router at once (a credit pulse on the flit's virtual channel in the
// cycle after it arrives; with peek flow control it never signals busy), and
// counts what it receives: rx_count all flits, rx_vc_count per virtual
// channel, err_count flits whose destination is not this node. The counts
// give the throughput in packets per cycle per node that the design is
// evaluated by.
//
// A receiver that monitors packets per virtual channel and hands back
// credits follows the design's test environment; always accepting at once
// is this design's choice.
module credit_sink
  import noc_pkg::*;
#(
  parameter int unsigned MY_X   = 0,
  parameter int unsigned MY_Y   = 0,
  parameter int unsigned NUM_VC = 2,
  parameter flow_ctrl_e  FC     = FC_CREDIT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  flit_t             flit_in,
  output logic [NUM_VC-1:0] fc_out,
  output logic [31:0]       rx_count,
  output logic [31:0]       rx_vc_count [NUM_VC],
  output logic [15:0]       err_count
);

  logic [NUM_VC-1:0] credit_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      credit_q  <= '0;
      rx_count  <= '0;
      err_count <= '0;
      for (int v = 0; v < NUM_VC; v++) rx_vc_count[v] <= '0;
    end else begin
      credit_q <= '0;
      if (flit_in.valid) begin
        rx_count <= rx_count + 1'b1;
        for (int v = 0; v < NUM_VC; v++) begin
          if (flit_in.vc == VC_W'(v)) begin
            credit_q[v]    <= 1'b1;
            rx_vc_count[v] <= rx_vc_count[v] + 1'b1;
          end
        end
        if (flit_in.dst_x != COORD_W'(MY_X) || flit_in.dst_y != COORD_W'(MY_Y))
          err_count <= err_count + 1'b1;
      end
    end
  end

  assign fc_out = (FC == FC_CREDIT) ? credit_q : '0;

endmodule
