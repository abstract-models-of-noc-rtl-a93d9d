// tb_noc_workloads: runs hermes_noc in the mesh configurations used by the
// latency, throughput and power studies, each with uniform random traffic
// from every node (see tb_noc_traffic for the checks):
//   2x2, credit links, 16-flit packets;
//   3x3, 16-flit buffers, credit links, 50-flit packets;
//   5x5, credit links, 100-flit packets;
//   4x4, handshake links, 64-flit packets (the power comparison setup);
//   6x6, 32-bit flits, handshake links, 128-flit packets (the case study mesh).
// It prints the average packet latency of each and passes when every packet
// of every configuration has arrived intact at its target.
`timescale 1ns/1ps
module tb_noc_workloads;
  import hermes_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NW = 5;
  logic   done [NW];
  int     chk [NW], fail [NW], dlv [NW];
  longint lat [NW];

  tb_noc_traffic #(.X_SIZE(2), .Y_SIZE(2), .NPKT(40), .PKT_FLITS(16)) w0 (
    .clk(clk), .rst_n(rst_n), .done(done[0]), .checks(chk[0]), .failures(fail[0]), .lat_sum(lat[0]), .delivered(dlv[0]));
  tb_noc_traffic #(.X_SIZE(3), .Y_SIZE(3), .BUFFER_DEPTH(16), .NPKT(20), .PKT_FLITS(50)) w1 (
    .clk(clk), .rst_n(rst_n), .done(done[1]), .checks(chk[1]), .failures(fail[1]), .lat_sum(lat[1]), .delivered(dlv[1]));
  tb_noc_traffic #(.X_SIZE(5), .Y_SIZE(5), .NPKT(8), .PKT_FLITS(100)) w2 (
    .clk(clk), .rst_n(rst_n), .done(done[2]), .checks(chk[2]), .failures(fail[2]), .lat_sum(lat[2]), .delivered(dlv[2]));
  tb_noc_traffic #(.X_SIZE(4), .Y_SIZE(4), .FLOW_CONTROL(FC_HANDSHAKE), .NPKT(6), .PKT_FLITS(64)) w3 (
    .clk(clk), .rst_n(rst_n), .done(done[3]), .checks(chk[3]), .failures(fail[3]), .lat_sum(lat[3]), .delivered(dlv[3]));
  tb_noc_traffic #(.X_SIZE(6), .Y_SIZE(6), .FLIT_WIDTH(32), .FLOW_CONTROL(FC_HANDSHAKE), .NPKT(3), .PKT_FLITS(128)) w4 (
    .clk(clk), .rst_n(rst_n), .done(done[4]), .checks(chk[4]), .failures(fail[4]), .lat_sum(lat[4]), .delivered(dlv[4]));

  int checks, failures;
  task automatic report();
    string names [NW] = '{"2x2 credit 16 flits", "3x3 16-flit buffers 50 flits", "5x5 credit 100 flits",
                          "4x4 handshake 64 flits", "6x6 32-bit handshake 128 flits"};
    checks = 0; failures = 0;
    for (int w = 0; w < NW; w++) begin
      checks += chk[w] + 1; failures += fail[w];
      if (!done[w]) failures++;
      $display("%-32s delivered=%0d avg_latency=%0d cycles", names[w], dlv[w],
               dlv[w] > 0 ? lat[w] / dlv[w] : 0);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    $display("watchdog: not every configuration finished");
    report();
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    @(posedge clk);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
