// router_monitor: reception-rate and link-activity monitor of one router.
//
// The rate-based power model needs, for every input buffer of a router, the
// number of flits it received in each sample window, and the switching
// activity of the link feeding it. This monitor counts both over a window of
// SAMPLE_WINDOW clock cycles: rec_flits[i] is the number of flits written into
// buffer i, and link_toggles[i] the number of data wires of link i that
// changed value from one cycle to the next, summed over the window. At the end
// of each window the totals are copied to the outputs, win_valid pulses for
// one cycle and the counters restart. The reception rate in bits per second
// follows as rec_flits * FLIT_WIDTH / (clock period * SAMPLE_WINDOW), and the
// activity factor as link_toggles / (FLIT_WIDTH * SAMPLE_WINDOW). The power
// equations that turn these into milliwatts are calibration data, not logic,
// and are left to the software that reads the monitor. The window length of
// 1000 cycles is this design's choice.
module router_monitor
  import hermes_pkg::*;
#(
  parameter int unsigned FLIT_WIDTH    = 16,
  parameter int unsigned SAMPLE_WINDOW = 1000,
  localparam int unsigned CW = $clog2(SAMPLE_WINDOW + 1),
  localparam int unsigned TW = $clog2(SAMPLE_WINDOW * FLIT_WIDTH + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NPORTS-1:0]     flit_rcv,
  input  logic [FLIT_WIDTH-1:0] link_data    [NPORTS],
  output logic                  win_valid,
  output logic [CW-1:0]         rec_flits    [NPORTS],
  output logic [TW-1:0]         link_toggles [NPORTS]
);
  localparam int unsigned WW = $clog2(SAMPLE_WINDOW);

  logic [WW-1:0]         cyc;
  logic [CW-1:0]         flit_cnt [NPORTS];
  logic [TW-1:0]         tog_cnt  [NPORTS];
  logic [FLIT_WIDTH-1:0] prev     [NPORTS];
  logic                  last_cyc;

  logic [CW-1:0]         f_next   [NPORTS];
  logic [TW-1:0]         t_next   [NPORTS];

  assign last_cyc = (cyc == WW'(SAMPLE_WINDOW - 1));

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      f_next[i] = flit_cnt[i] + CW'(flit_rcv[i]);
      t_next[i] = tog_cnt[i] + TW'($countones(link_data[i] ^ prev[i]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc       <= '0;
      win_valid <= 1'b0;
      for (int i = 0; i < NPORTS; i++) begin
        flit_cnt[i]     <= '0;
        tog_cnt[i]      <= '0;
        prev[i]         <= '0;
        rec_flits[i]    <= '0;
        link_toggles[i] <= '0;
      end
    end else begin
      win_valid <= last_cyc;
      cyc       <= last_cyc ? '0 : cyc + 1'b1;
      for (int i = 0; i < NPORTS; i++) begin
        prev[i] <= link_data[i];
        if (last_cyc) begin
          rec_flits[i]    <= f_next[i];
          link_toggles[i] <= t_next[i];
          flit_cnt[i]     <= '0;
          tog_cnt[i]      <= '0;
        end else begin
          flit_cnt[i] <= f_next[i];
          tog_cnt[i]  <= t_next[i];
        end
      end
    end
  end

endmodule
