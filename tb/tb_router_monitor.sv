// tb_router_monitor: random flit arrivals and link data are applied to the
// monitor with a 37-cycle sample window. The testbench counts, per port, the
// flits and the bit toggles of each window itself and compares them with the
// monitor's outputs at every win_valid pulse; it also checks that win_valid
// comes exactly once per window.
`timescale 1ns/1ps
module tb_router_monitor;
  import hermes_pkg::*;
  localparam int unsigned F = 16, WIN = 37;
  localparam int unsigned CW = $clog2(WIN + 1), TW = $clog2(WIN * F + 1);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NPORTS-1:0] flit_rcv;
  logic [F-1:0] link_data [NPORTS];
  logic win_valid;
  logic [CW-1:0] rec_flits [NPORTS];
  logic [TW-1:0] link_toggles [NPORTS];

  router_monitor #(.FLIT_WIDTH(F), .SAMPLE_WINDOW(WIN)) dut (.*);

  int checks = 0, failures = 0;
  int ref_f [NPORTS], ref_t [NPORTS], last_f [NPORTS], last_t [NPORTS];
  logic [F-1:0] prev [NPORTS];
  int cyc_in_win = 0, windows = 0, pending_check = 0;

  always @(negedge clk) begin
    for (int i = 0; i < NPORTS; i++) begin
      flit_rcv[i] <= ($urandom_range(99) < 40);
      // busy ports change data often, others seldom
      if ($urandom_range(99) < 10 * (i + 1)) link_data[i] <= F'($urandom);
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (win_valid) begin
      windows++;
      for (int i = 0; i < NPORTS; i++) begin
        checks += 2;
        if (rec_flits[i] != CW'(last_f[i])) begin failures++; $display("FAIL window %0d port %0d flits %0d exp %0d", windows, i, rec_flits[i], last_f[i]); end
        if (link_toggles[i] != TW'(last_t[i])) begin failures++; $display("FAIL window %0d port %0d toggles %0d exp %0d", windows, i, link_toggles[i], last_t[i]); end
      end
    end
    checks++;
    if (win_valid != (pending_check == 1)) begin failures++; $display("FAIL win_valid %b at wrong time", win_valid); end
    pending_check = 0;
    for (int i = 0; i < NPORTS; i++) begin
      ref_f[i] += int'(flit_rcv[i]);
      ref_t[i] += $countones(link_data[i] ^ prev[i]);
      prev[i] = link_data[i];
    end
    cyc_in_win++;
    if (cyc_in_win == WIN) begin
      cyc_in_win = 0;
      pending_check = 1;
      for (int i = 0; i < NPORTS; i++) begin
        last_f[i] = ref_f[i]; last_t[i] = ref_t[i]; ref_f[i] = 0; ref_t[i] = 0;
      end
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_rcv = '0;
    for (int i = 0; i < NPORTS; i++) begin
      link_data[i] = '0; prev[i] = '0; ref_f[i] = 0; ref_t[i] = 0; last_f[i] = 0; last_t[i] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (WIN * 40 + 3) @(posedge clk);
    checks++;
    if (windows != 40) begin failures++; $display("FAIL %0d windows, expected 40", windows); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
