// out_flow_ctrl: per-virtual-channel view of the buffer space downstream of
// one output port.
//
// Credit flow control (FC = FC_CREDIT): one counter per virtual channel starts
// at BUF_DEPTH, is decremented when a flit is sent on that channel and
// incremented by each credit pulse returned by the receiver; a channel is
// available while its counter is non-zero. A send and a credit in the same
// cycle cancel.
// Peek flow control (FC = FC_PEEK): the receiver drives a busy level per
// channel and a channel is available while it is not busy; no counters are used.
//
// clr (receiver switched off, or this router switched off) refills the credit
// counters to BUF_DEPTH, since a reconfigured router comes back with empty
// buffers, and forces every channel unavailable while it is held.
// Timing: avail is combinational from the counters; send/credit act at the
// clock edge. Both flow-control types are those the design evaluates; credit is
// its main configuration.
module out_flow_ctrl
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC    = 2,
  parameter int unsigned BUF_DEPTH = 4,
  parameter flow_ctrl_e  FC        = FC_CREDIT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic [NUM_VC-1:0] fc_in,     // credit pulses or busy levels
  input  logic              send,
  input  logic [VC_W-1:0]   send_vc,
  output logic [NUM_VC-1:0] avail
);

  localparam int unsigned CNT_W = $clog2(BUF_DEPTH + 1);

  logic [CNT_W-1:0] credits [NUM_VC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_VC; v++) credits[v] <= CNT_W'(BUF_DEPTH);
    end else if (clr) begin
      for (int v = 0; v < NUM_VC; v++) credits[v] <= CNT_W'(BUF_DEPTH);
    end else if (FC == FC_CREDIT) begin
      for (int v = 0; v < NUM_VC; v++) begin
        case ({send && (send_vc == VC_W'(v)), fc_in[v]})
          2'b10:   credits[v] <= credits[v] - 1'b1;
          2'b01:   credits[v] <= credits[v] + 1'b1;
          default: credits[v] <= credits[v];
        endcase
      end
    end
  end

  always_comb begin
    for (int v = 0; v < NUM_VC; v++) begin
      if (FC == FC_CREDIT) avail[v] = !clr && (credits[v] != '0);
      else                 avail[v] = !clr && !fc_in[v];
    end
  end

  a_send_has_space: assert property (@(posedge clk) disable iff (!rst_n || clr)
                                     send |-> avail[send_vc]);
  a_credit_bound:   assert property (@(posedge clk) disable iff (!rst_n || clr)
                                     (FC == FC_CREDIT) |-> (credits[0] <= CNT_W'(BUF_DEPTH)));

endmodule
