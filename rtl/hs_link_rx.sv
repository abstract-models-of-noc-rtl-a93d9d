// hs_link_rx: 4-phase handshake receiver for one router input port.
//
// Sits between an input link and the input buffer when the router is built
// with FLOW_CONTROL = FC_HANDSHAKE. While waiting, a raised rx with room in the
// buffer makes the buffer store the link data (push) and ack_rx rises on the
// next cycle; ack_rx stays high until the sender lowers rx, then falls, which ends
// the handshake. If the buffer is full the request waits with ack_rx low.
// The link data wires (data_in) go straight to the buffer and do not pass
// through this module. The signals rx and ack_rx are the HERMES handshake
// interface; the state machine is this design's.
module hs_link_rx (
  input  logic                  clk,
  input  logic                  rst_n,
  // link side
  input  logic                  rx,
  output logic                  ack_rx,
  // input buffer side
  input  logic                  space,    // buffer credit
  output logic                  push      // buffer stores the link data
);
  assign push      = rx && !ack_rx && space;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      ack_rx <= 1'b0;
    else if (push)   ack_rx <= 1'b1;
    else if (!rx)    ack_rx <= 1'b0;
  end

endmodule
