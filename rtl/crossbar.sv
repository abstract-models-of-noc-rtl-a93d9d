// crossbar: the 5x5 switch of a HERMES router.
//
// Each output port shows the head flit of the input buffer connected to it by
// the switch control, and raises tx while that buffer has a flit to send. Each
// connected input gets back, as data_ack, the credit of the output it is
// connected to, so the buffer removes a flit exactly when the flit crosses the
// output link (tx and credit both high on a clock edge). An output without a
// connection drives tx low and zero data. Purely combinational; the zero data
// on idle outputs is this design's choice.
module crossbar
  import hermes_pkg::*;
#(
  parameter int unsigned FLIT_WIDTH = 16
) (
  // from the switch control
  input  logic [NPORTS-1:0]     out_busy,
  input  logic [2:0]            in_sel   [NPORTS],
  input  logic [NPORTS-1:0]     in_conn,
  input  logic [2:0]            out_sel  [NPORTS],
  // input buffer side
  input  logic [NPORTS-1:0]     buf_av,
  input  logic [FLIT_WIDTH-1:0] buf_data [NPORTS],
  output logic [NPORTS-1:0]     buf_ack,
  // output link side
  output logic [NPORTS-1:0]     tx,
  output logic [FLIT_WIDTH-1:0] data_out [NPORTS],
  input  logic [NPORTS-1:0]     credit_i
);
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      tx[o]       = out_busy[o] && buf_av[in_sel[o]];
      data_out[o] = out_busy[o] ? buf_data[in_sel[o]] : '0;
    end
    for (int i = 0; i < NPORTS; i++) begin
      buf_ack[i] = in_conn[i] && credit_i[out_sel[i]];
    end
  end
endmodule
