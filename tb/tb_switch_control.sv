// tb_switch_control: exercises the centralized switch control of the router
// at address (1,1) with ARB_CYCLES = 7.
//  * a lone request is granted exactly ARB_CYCLES - 2 edges after the edge
//    at which h is first seen (so the header leaves the router ARB_CYCLES
//    edges after it was written), and the connection table names the XY port;
//  * a request for an output that is in use is refused, and is granted only
//    after the owner reports pkt_done;
//  * simultaneous requests are granted in round-robin order starting after
//    the input granted last;
//  * requests for each of the five outputs land on the right port.
`timescale 1ns/1ps
module tb_switch_control;
  import hermes_pkg::*;
  localparam int unsigned F = 16, ARB = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NPORTS-1:0] h, ack_h, pkt_done, out_busy, in_conn;
  logic [F-1:0] head_flit [NPORTS];
  logic [2:0] in_sel [NPORTS];
  logic [2:0] out_sel [NPORTS];
  logic refused;

  switch_control #(.FLIT_WIDTH(F), .ARB_CYCLES(ARB), .ADDR_X(1), .ADDR_Y(1)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %0t: %s", $time, msg); end
  endtask

  int cyc = 0, n_refused = 0;
  int ack_order [$];
  int ack_cyc [NPORTS];
  int h_cyc [NPORTS];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (refused) n_refused++;
    for (int i = 0; i < NPORTS; i++) begin
      if (h[i] && h_cyc[i] < 0) h_cyc[i] = cyc;
      if (ack_h[i]) begin ack_order.push_back(i); ack_cyc[i] = cyc; end
    end
  end
  // a granted input stops requesting (its buffer is now forwarding)
  always @(posedge clk) for (int i = 0; i < NPORTS; i++) if (ack_h[i]) h[i] <= 1'b0;

  task automatic request(int i, int tx, int ty);
    head_flit[i] = {8'(ty), 8'(tx)};
    h[i] = 1'b1;
    h_cyc[i] = -1;
    ack_cyc[i] = -1;
  endtask
  task automatic done(int i);
    pkt_done[i] = 1'b1;
    @(negedge clk);
    pkt_done[i] = 1'b0;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h = '0; pkt_done = '0;
    for (int i = 0; i < NPORTS; i++) begin head_flit[i] = '0; h_cyc[i] = -1; ack_cyc[i] = -1; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk);

    // 1. lone request: Local -> target (2,1) = East
    request(4, 2, 1);
    repeat (12) @(negedge clk);
    check(ack_cyc[4] - h_cyc[4] == ARB - 2, $sformatf("grant after %0d edges, expected %0d", ack_cyc[4] - h_cyc[4], ARB - 2));
    check(out_busy == 5'b00001 && in_sel[EAST] == 3'd4, "East not connected to Local");
    check(in_conn[4] && out_sel[4] == 3'(EAST), "Local not marked connected to East");

    // 2. West input wants East too: refused until Local finishes
    request(1, 3, 1);
    repeat (30) @(negedge clk);
    check(ack_cyc[1] < 0, "request for a busy output was granted");
    check(n_refused > 0, "no refusal reported");
    done(4);
    check(out_busy == 5'b00000 && !in_conn[4], "output not released by pkt_done");
    repeat (20) @(negedge clk);
    check(ack_cyc[1] > 0 && out_busy[EAST] && in_sel[EAST] == 3'd1, "West not connected after release");
    done(1);

    // 3. round robin: last granted is 1; inputs 0, 2, 3 ask for N, S, L
    ack_order.delete();
    request(0, 1, 2);
    request(2, 1, 0);
    request(3, 1, 1);
    repeat (40) @(negedge clk);
    check(ack_order.size() == 3, $sformatf("%0d grants, expected 3", ack_order.size()));
    if (ack_order.size() == 3)
      check(ack_order[0] == 2 && ack_order[1] == 3 && ack_order[2] == 0,
            $sformatf("grant order %0d %0d %0d, expected 2 3 0", ack_order[0], ack_order[1], ack_order[2]));
    check(out_sel[0] == 3'(NORTH) && out_sel[2] == 3'(SOUTH) && out_sel[3] == 3'(LOCAL), "wrong ports");
    check(out_busy == 5'b11100, $sformatf("out_busy %b", out_busy));
    done(0); done(2); done(3);

    // 4. West direction from North input
    request(2, 0, 1);
    repeat (12) @(negedge clk);
    check(in_conn[2] && out_sel[2] == 3'(WEST) && in_sel[WEST] == 3'd2, "West route wrong");
    done(2);
    check(out_busy == '0, "not all released");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
