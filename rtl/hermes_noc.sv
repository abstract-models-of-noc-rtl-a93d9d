// hermes_noc: an X_SIZE x Y_SIZE mesh of HERMES routers with power monitors.
//
// Node n = y * X_SIZE + x holds router (x, y). Its East port faces router
// (x+1, y), West (x-1, y), North (x, y+1) and South (x, y-1); the Local port
// is brought out of the mesh for the node's processing element, through its
// network interface, which is outside this design. Ports on the edge of the
// mesh are left unconnected: their inputs never receive and their outputs see
// no credit, which is safe because XY routing never sends a packet whose
// target lies inside the mesh across an edge. A packet to router (x, y) starts
// with the header flit {y, x} (y in the upper half), then a flit with the
// payload length, then the payload.
//
// Each router has a router_monitor that reports, every SAMPLE_WINDOW cycles,
// the flits received by each of its five input buffers and the bit toggles
// on the five links into it: the inputs of the rate-based power estimate.
//
// Timing: with no contention, the last flit of a packet of S flits sent from
// a local port into router 1 at cycle 0 is held by the target's local port
// after nhops * ARB_CYCLES + S cycles, nhops being the number of routers
// crossed (Equation 3 of the latency model).
//
// Defaults: 4x4 mesh, 16-bit flits, 8-flit buffers, as in the power
// comparison setup; ARB_CYCLES = 7 as in the worked transmission examples.
// FLOW_CONTROL selects the link protocol of every port, local ports included:
// credit based (default, one flit per cycle per link) or the 4-phase
// handshake (four cycles per flit per link); in handshake mode local_credit_o
// is ack_rx of the local input and local_credit_i is ack_tx of the local
// output. The latency formula above holds for the credit links.
module hermes_noc
  import hermes_pkg::*;
#(
  parameter int unsigned X_SIZE        = 4,
  parameter int unsigned Y_SIZE        = 4,
  parameter int unsigned FLIT_WIDTH    = 16,
  parameter int unsigned BUFFER_DEPTH  = 8,
  parameter int unsigned ARB_CYCLES    = 7,
  parameter int unsigned SAMPLE_WINDOW = 1000,
  parameter flow_e       FLOW_CONTROL  = FC_CREDIT,
  localparam int unsigned NODES = X_SIZE * Y_SIZE,
  localparam int unsigned CW    = $clog2(SAMPLE_WINDOW + 1),
  localparam int unsigned TW    = $clog2(SAMPLE_WINDOW * FLIT_WIDTH + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // local ports, one per node (core -> network)
  input  logic [NODES-1:0]      local_rx,
  input  logic [FLIT_WIDTH-1:0] local_data_in  [NODES],
  output logic [NODES-1:0]      local_credit_o,   // ack_rx in handshake mode
  // local ports, one per node (network -> core)
  output logic [NODES-1:0]      local_tx,
  output logic [FLIT_WIDTH-1:0] local_data_out [NODES],
  input  logic [NODES-1:0]      local_credit_i,   // ack_tx in handshake mode
  // monitors
  output logic [NODES-1:0]      mon_valid,
  output logic [CW-1:0]         mon_rec_flits    [NODES][NPORTS],
  output logic [TW-1:0]         mon_link_toggles [NODES][NPORTS],
  // one pulse per node whenever its switch control refuses a request
  output logic [NODES-1:0]      refused
);
  // Per-node port bundles.
  logic [NPORTS-1:0]     rx     [NODES];
  logic [NPORTS-1:0]     tx     [NODES];
  logic [NPORTS-1:0]     cr_o   [NODES];
  logic [NPORTS-1:0]     cr_i   [NODES];
  logic [NPORTS-1:0]     frcv   [NODES];
  logic [FLIT_WIDTH-1:0] din    [NODES][NPORTS];
  logic [FLIT_WIDTH-1:0] dout   [NODES][NPORTS];

  for (genvar y = 0; y < Y_SIZE; y++) begin : g_y
    for (genvar x = 0; x < X_SIZE; x++) begin : g_x
      localparam int unsigned N  = y * X_SIZE + x;
      localparam int unsigned NE = y * X_SIZE + x + 1;
      localparam int unsigned NW = y * X_SIZE + x - 1;
      localparam int unsigned NN = (y + 1) * X_SIZE + x;
      localparam int unsigned NS = (y - 1) * X_SIZE + x;

      // East side
      if (x + 1 < X_SIZE) begin : g_e
        assign rx[N][EAST]   = tx[NE][WEST];
        assign din[N][EAST]  = dout[NE][WEST];
        assign cr_i[N][EAST] = cr_o[NE][WEST];
      end else begin : g_e_edge
        assign rx[N][EAST]   = 1'b0;
        assign din[N][EAST]  = '0;
        assign cr_i[N][EAST] = 1'b0;
      end
      // West side
      if (x > 0) begin : g_w
        assign rx[N][WEST]   = tx[NW][EAST];
        assign din[N][WEST]  = dout[NW][EAST];
        assign cr_i[N][WEST] = cr_o[NW][EAST];
      end else begin : g_w_edge
        assign rx[N][WEST]   = 1'b0;
        assign din[N][WEST]  = '0;
        assign cr_i[N][WEST] = 1'b0;
      end
      // North side
      if (y + 1 < Y_SIZE) begin : g_n
        assign rx[N][NORTH]   = tx[NN][SOUTH];
        assign din[N][NORTH]  = dout[NN][SOUTH];
        assign cr_i[N][NORTH] = cr_o[NN][SOUTH];
      end else begin : g_n_edge
        assign rx[N][NORTH]   = 1'b0;
        assign din[N][NORTH]  = '0;
        assign cr_i[N][NORTH] = 1'b0;
      end
      // South side
      if (y > 0) begin : g_s
        assign rx[N][SOUTH]   = tx[NS][NORTH];
        assign din[N][SOUTH]  = dout[NS][NORTH];
        assign cr_i[N][SOUTH] = cr_o[NS][NORTH];
      end else begin : g_s_edge
        assign rx[N][SOUTH]   = 1'b0;
        assign din[N][SOUTH]  = '0;
        assign cr_i[N][SOUTH] = 1'b0;
      end
      // Local port
      assign rx[N][LOCAL]     = local_rx[N];
      assign din[N][LOCAL]    = local_data_in[N];
      assign cr_i[N][LOCAL]   = local_credit_i[N];
      assign local_credit_o[N] = cr_o[N][LOCAL];
      assign local_tx[N]       = tx[N][LOCAL];
      assign local_data_out[N] = dout[N][LOCAL];

      hermes_router #(
        .FLIT_WIDTH(FLIT_WIDTH), .BUFFER_DEPTH(BUFFER_DEPTH),
        .ARB_CYCLES(ARB_CYCLES), .ADDR_X(x), .ADDR_Y(y),
        .FLOW_CONTROL(FLOW_CONTROL)
      ) u_router (
        .clk     (clk),
        .rst_n   (rst_n),
        .rx      (rx[N]),
        .data_in (din[N]),
        .credit_o(cr_o[N]),
        .tx      (tx[N]),
        .data_out(dout[N]),
        .credit_i(cr_i[N]),
        .flit_rcv(frcv[N]),
        .refused (refused[N])
      );

      router_monitor #(
        .FLIT_WIDTH(FLIT_WIDTH), .SAMPLE_WINDOW(SAMPLE_WINDOW)
      ) u_mon (
        .clk         (clk),
        .rst_n       (rst_n),
        .flit_rcv    (frcv[N]),
        .link_data   (din[N]),
        .win_valid   (mon_valid[N]),
        .rec_flits   (mon_rec_flits[N]),
        .link_toggles(mon_link_toggles[N])
      );
    end
  end

endmodule
