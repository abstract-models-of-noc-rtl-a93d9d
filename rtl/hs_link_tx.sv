// hs_link_tx: 4-phase handshake sender for one router output port.
//
// Sits between the crossbar and an output link when the router is built with
// FLOW_CONTROL = FC_HANDSHAKE. It offers credit (take) to the crossbar while
// idle, or while releasing once ack_tx has fallen; when the crossbar shows a
// flit (valid) at such a time the flit is copied into a register, taken from
// the input buffer in the same cycle, and sent as one 4-phase handshake:
// tx rises with the data, the receiver raises ack_tx once it has stored the
// flit, tx falls, the receiver lowers ack_tx, and the handshake is over.
// The data stay stable from tx rising until ack_tx falls. Back-to-back flits
// take four clock cycles each when the receiver answers at once. The HERMES handshake
// interface (tx, ack_tx, data_out on the output side) is the source's; the
// register, the state machine and therefore the cycle count are this design's.
module hs_link_tx #(
  parameter int unsigned FLIT_WIDTH = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // crossbar side
  input  logic                  valid,
  input  logic [FLIT_WIDTH-1:0] data,
  output logic                  take,      // credit to the crossbar
  // link side
  output logic                  tx,
  output logic [FLIT_WIDTH-1:0] data_out,
  input  logic                  ack_tx
);
  typedef enum logic [1:0] {T_IDLE, T_REQ, T_REL} tstate_e;
  tstate_e state;

  assign take = (state == T_IDLE) || (state == T_REL && !ack_tx);
  assign tx   = (state == T_REQ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= T_IDLE;
      data_out <= '0;
    end else begin
      unique case (state)
        T_IDLE: if (valid) begin
                  data_out <= data;
                  state    <= T_REQ;
                end
        T_REQ:  if (ack_tx)  state <= T_REL;
        T_REL:  if (!ack_tx) begin
                  if (valid) begin
                    data_out <= data;
                    state    <= T_REQ;
                  end else begin
                    state    <= T_IDLE;
                  end
                end
        default: state <= T_IDLE;
      endcase
    end
  end

  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (tx && !ack_tx) |=> $stable(data_out))
    else $error("hs_link_tx: data changed during a handshake");

endmodule
