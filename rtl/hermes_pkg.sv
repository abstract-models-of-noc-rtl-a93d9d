// hermes_pkg: types and constants shared by the HERMES mesh network-on-chip.
//
// A router has five bidirectional ports, numbered East, West, North, South,
// Local as the five HERMES ports are listed. A packet is a sequence of flits
// sent in wormhole fashion: the header flit carries the target router address
// (y in the upper half of the flit, x in the lower half), the second flit
// carries the number of payload flits that follow, and then come the payload
// flits. The numbering of the ports and the use of one address half per
// coordinate are choices of this design. Links use either credit-based flow
// control or a 4-phase handshake, the two HERMES variants.
package hermes_pkg;

  localparam int unsigned NPORTS = 5;

  typedef enum logic [2:0] {
    EAST  = 3'd0,
    WEST  = 3'd1,
    NORTH = 3'd2,
    SOUTH = 3'd3,
    LOCAL = 3'd4
  } port_e;

  // Link flow control. FC_CREDIT: a flit crosses on every clock edge where
  // the sender's tx and the receiver's credit are both high. FC_HANDSHAKE:
  // every flit is a 4-phase handshake (tx up, ack up, tx down, ack down); the
  // ack travels on the wire that carries credit in the other mode.
  typedef enum logic {
    FC_CREDIT    = 1'b0,
    FC_HANDSHAKE = 1'b1
  } flow_e;

endpackage
