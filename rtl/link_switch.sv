// link_switch: connectivity switch on one directed router-to-router link.
//
// The link only carries traffic while the routers at both of its ends are
// active. When either end is switched off (being reconfigured) the switch
// isolates it: flits towards the receiver are dropped to an idle (invalid)
// flit, and the flow-control wires back to the sender are forced to "no
// credit" (credit flow control) or "busy" (peek flow control), so nothing
// a half-configured router drives can reach a working neighbour. Purely
// combinational; it adds no cycle to the link.
//
// Switches around every router that cut off a router under reconfiguration
// are part of the design; that they gate rather than re-wire the link (the
// surrounding is done by the routing) is this design's reading.
module link_switch
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC = 2,
  parameter flow_ctrl_e  FC     = FC_CREDIT
) (
  input  logic              src_active,
  input  logic              dst_active,
  input  flit_t             flit_in,     // from the sender's output port
  output flit_t             flit_out,    // to the receiver's input port
  input  logic [NUM_VC-1:0] fc_in,       // from the receiver
  output logic [NUM_VC-1:0] fc_out       // to the sender
);

  logic connected;

  always_comb begin
    connected = src_active && dst_active;
    flit_out  = connected ? flit_in : '0;
    if (connected)             fc_out = fc_in;
    else if (FC == FC_PEEK)    fc_out = '1;
    else                       fc_out = '0;
  end

endmodule
