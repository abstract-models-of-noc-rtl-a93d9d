// hermes_router: one five-port HERMES wormhole router.
//
// Ports 0..4 are East, West, North, South and Local. Every port has an input
// buffer; a single switch control arbitrates among the routing requests of the
// buffers (round robin), routes each granted header with the XY algorithm and
// connects the input to the chosen output through the crossbar, provided the
// output is free. The connection stays for the whole packet (wormhole
// switching): if the output is taken, the header and everything behind it
// wait in the buffer. There are no output buffers.
//
// Link protocol, per direction (credit based, as in the HERMES credit
// variant): the sender drives tx and data_out, the receiver drives credit
// back; a flit crosses on every clock edge where tx and credit are both high,
// so a link carries one flit per cycle. flit_rcv marks, per input port, the
// cycles in which a flit was written into the buffer (used by the monitor).
//
// With FLOW_CONTROL = FC_HANDSHAKE each port instead runs the HERMES 4-phase
// handshake: hs_link_rx sits in front of every input buffer and hs_link_tx
// behind every crossbar output, credit_o carries ack_rx and credit_i carries
// ack_tx. A flit then takes four cycles per link instead of one.
//
// Latency: a header that enters an idle router leaves it ARB_CYCLES clock
// edges later; each further flit of the packet follows one cycle behind the
// previous one when nothing blocks it.
module hermes_router
  import hermes_pkg::*;
#(
  parameter int unsigned FLIT_WIDTH   = 16,
  parameter int unsigned BUFFER_DEPTH = 8,
  parameter int unsigned ARB_CYCLES   = 7,
  parameter int unsigned ADDR_X       = 0,
  parameter int unsigned ADDR_Y       = 0,
  parameter flow_e       FLOW_CONTROL = FC_CREDIT
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NPORTS-1:0]     rx,
  input  logic [FLIT_WIDTH-1:0] data_in  [NPORTS],
  output logic [NPORTS-1:0]     credit_o,  // ack_rx in handshake mode
  output logic [NPORTS-1:0]     tx,
  output logic [FLIT_WIDTH-1:0] data_out [NPORTS],
  input  logic [NPORTS-1:0]     credit_i,  // ack_tx in handshake mode
  output logic [NPORTS-1:0]     flit_rcv,
  output logic                  refused
);
  logic [NPORTS-1:0]     h, ack_h, pkt_done, buf_av, buf_ack;
  logic [FLIT_WIDTH-1:0] head_flit [NPORTS];
  logic [FLIT_WIDTH-1:0] buf_data  [NPORTS];
  logic [NPORTS-1:0]     out_busy, in_conn;
  logic [2:0]            in_sel  [NPORTS];
  logic [2:0]            out_sel [NPORTS];
  // between the link adapters and the buffers / crossbar
  logic [NPORTS-1:0]     b_wr, b_space, x_tx, x_credit;
  logic [FLIT_WIDTH-1:0] x_data  [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_buf
    input_buffer #(.FLIT_WIDTH(FLIT_WIDTH), .DEPTH(BUFFER_DEPTH)) u_buf (
      .clk      (clk),
      .rst_n    (rst_n),
      .rx       (b_wr[i]),
      .data_in  (data_in[i]),
      .credit_o (b_space[i]),
      .h        (h[i]),
      .head_flit(head_flit[i]),
      .ack_h    (ack_h[i]),
      .pkt_done (pkt_done[i]),
      .data_av  (buf_av[i]),
      .data_out (buf_data[i]),
      .data_ack (buf_ack[i])
    );
    assign flit_rcv[i] = b_wr[i] && b_space[i];

    if (FLOW_CONTROL == FC_HANDSHAKE) begin : g_hs
      hs_link_rx u_hrx (
        .clk(clk), .rst_n(rst_n),
        .rx(rx[i]), .ack_rx(credit_o[i]),
        .space(b_space[i]), .push(b_wr[i])
      );
      hs_link_tx #(.FLIT_WIDTH(FLIT_WIDTH)) u_htx (
        .clk(clk), .rst_n(rst_n),
        .valid(x_tx[i]), .data(x_data[i]), .take(x_credit[i]),
        .tx(tx[i]), .data_out(data_out[i]), .ack_tx(credit_i[i])
      );
    end else begin : g_credit
      assign b_wr[i]     = rx[i];
      assign credit_o[i] = b_space[i];
      assign tx[i]       = x_tx[i];
      assign data_out[i] = x_data[i];
      assign x_credit[i] = credit_i[i];
    end
  end

  switch_control #(
    .FLIT_WIDTH(FLIT_WIDTH), .ARB_CYCLES(ARB_CYCLES),
    .ADDR_X(ADDR_X), .ADDR_Y(ADDR_Y)
  ) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .h        (h),
    .head_flit(head_flit),
    .ack_h    (ack_h),
    .pkt_done (pkt_done),
    .out_busy (out_busy),
    .in_sel   (in_sel),
    .in_conn  (in_conn),
    .out_sel  (out_sel),
    .refused  (refused)
  );

  crossbar #(.FLIT_WIDTH(FLIT_WIDTH)) u_xbar (
    .out_busy(out_busy),
    .in_sel  (in_sel),
    .in_conn (in_conn),
    .out_sel (out_sel),
    .buf_av  (buf_av),
    .buf_data(buf_data),
    .buf_ack (buf_ack),
    .tx      (x_tx),
    .data_out(x_data),
    .credit_i(x_credit)
  );

  // Credit link rule: a flit offered without credit stays on the link unchanged.
  for (genvar o = 0; o < NPORTS; o++) begin : g_link_chk
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      (x_tx[o] && !x_credit[o]) |=> (x_tx[o] && $stable(x_data[o])))
      else $error("hermes_router: output %0d dropped or changed a waiting flit", o);
  end

endmodule
