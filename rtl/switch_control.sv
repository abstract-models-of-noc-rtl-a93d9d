// switch_control: the centralized switch control of a HERMES router.
//
// One controller serves the routing requests (h) of all five input buffers,
// one request at a time, in the order of the HERMES interaction sequence:
// the round-robin arbiter picks a requesting input, the XY routing unit reads
// that input's header flit and names an output port, and the controller then
// checks whether that output is free. If it is, the input is connected to the
// output (the connection table below drives the crossbar) and the buffer gets
// a one-cycle ack_h; if not, the request is refused and the input competes
// again in a later round while the controller moves on. A connection lasts
// until the buffer reports with pkt_done that the last flit of its packet has
// left, which frees the output port.
//
// Timing: the controller is built so that a header flit written into an input
// buffer at clock edge t leaves the router on clock edge t + ARB_CYCLES when
// there is no contention and the output is free (ARB_CYCLES >= 5), and never
// earlier: a round only considers the requests present when it started. The default
// of 7 cycles is the arbitration/routing time used in the document's worked
// transmission examples; the way the cycles are spent (one to arbitrate, a
// routing phase padded to length, one to check and connect) is this design's.
module switch_control
  import hermes_pkg::*;
#(
  parameter int unsigned FLIT_WIDTH = 16,
  parameter int unsigned ARB_CYCLES = 7,
  parameter int unsigned ADDR_X     = 0,
  parameter int unsigned ADDR_Y     = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NPORTS-1:0]     h,
  input  logic [FLIT_WIDTH-1:0] head_flit [NPORTS],
  output logic [NPORTS-1:0]     ack_h,
  input  logic [NPORTS-1:0]     pkt_done,
  // connection table
  output logic [NPORTS-1:0]     out_busy,         // per output: connected
  output logic [2:0]            in_sel   [NPORTS], // per output: which input
  output logic [NPORTS-1:0]     in_conn,          // per input: connected
  output logic [2:0]            out_sel  [NPORTS], // per input: which output
  // observability: a pulse per refused request
  output logic                  refused
);
  localparam int unsigned HW   = FLIT_WIDTH / 2;
  localparam int unsigned WAIT = ARB_CYCLES - 5;

  typedef enum logic [1:0] {S_IDLE, S_ARB, S_ROUTE, S_CHECK} cstate_e;

  cstate_e     state;
  logic [2:0]  sel;
  port_e       dir, route_dir;
  logic [7:0]  wait_cnt;
  logic        arb_valid;
  logic [2:0]  arb_idx;
  logic [NPORTS-1:0] req_snap;   // requests present when the round started

  rr_arbiter #(.N(NPORTS)) u_arb (
    .clk      (clk),
    .rst_n    (rst_n),
    .req      (h & req_snap),
    .update   (state == S_ARB),
    .gnt_valid(arb_valid),
    .gnt_idx  (arb_idx)
  );

  xy_routing #(.FLIT_WIDTH(FLIT_WIDTH)) u_xy (
    .my_x    (HW'(ADDR_X)),
    .my_y    (HW'(ADDR_Y)),
    .header  (head_flit[sel]),
    .out_port(route_dir)
  );

  logic connect;
  assign connect = (state == S_CHECK) && !out_busy[dir] && h[sel];
  assign refused = (state == S_CHECK) && !connect;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      sel      <= '0;
      dir      <= LOCAL;
      wait_cnt <= '0;
      req_snap <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (|h) begin
                   req_snap <= h;
                   state    <= S_ARB;
                 end
        S_ARB:   begin
                   if (arb_valid) begin
                     sel      <= arb_idx;
                     wait_cnt <= '0;
                     state    <= S_ROUTE;
                   end else begin
                     state <= S_IDLE;
                   end
                 end
        S_ROUTE: begin
                   dir <= route_dir;
                   if (wait_cnt == 8'(WAIT)) state <= S_CHECK;
                   else                      wait_cnt <= wait_cnt + 1'b1;
                 end
        S_CHECK: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_busy <= '0;
      in_conn  <= '0;
      for (int o = 0; o < NPORTS; o++) in_sel[o]  <= '0;
      for (int i = 0; i < NPORTS; i++) out_sel[i] <= '0;
    end else begin
      for (int i = 0; i < NPORTS; i++) begin
        if (pkt_done[i] && in_conn[i]) begin
          in_conn[i]           <= 1'b0;
          out_busy[out_sel[i]] <= 1'b0;
        end
      end
      if (connect) begin
        in_conn[sel]   <= 1'b1;
        out_sel[sel]   <= 3'(dir);
        out_busy[dir]  <= 1'b1;
        in_sel[dir]    <= sel;
      end
    end
  end

  always_comb begin
    ack_h = '0;
    if (connect) ack_h[sel] = 1'b1;
  end

  // Each connected output must point back at an input connected to it.
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    a_table_consistent: assert property (@(posedge clk) disable iff (!rst_n)
      out_busy[o] |-> (in_conn[in_sel[o]] && out_sel[in_sel[o]] == 3'(o)))
      else $error("switch_control: connection table inconsistent at output %0d", o);
  end

  initial begin
    if (ARB_CYCLES < 5) $error("switch_control: ARB_CYCLES must be at least 5");
  end

endmodule
