// tb_hs_link_rx: a router at address (1,1) built with the 4-phase handshake
// links (FLOW_CONTROL = FC_HANDSHAKE), so that each of its five inputs runs
// through hs_link_rx and each of its five outputs through hs_link_tx.
// The testbench plays a handshake sender on every input and a handshake
// receiver on every output, both with random delays, and sends packets of
// random length from every input to random targets around the router.
// Checks on each input link: ack_rx rises only in answer to rx, stays high
// until rx falls, and every handshake writes exactly one flit into the buffer
// (flit_rcv). Checks on each output: tx never rises while ack_tx is high, the
// data hold still during a handshake, and every packet arrives intact, once,
// on its XY port and not interleaved with another.
`timescale 1ns/1ps
module tb_hs_link_rx;
  import hermes_pkg::*;
  localparam int unsigned F = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NPORTS-1:0] rx, credit_o, tx, credit_i, flit_rcv;
  logic [F-1:0] data_in [NPORTS];
  logic [F-1:0] data_out [NPORTS];
  logic refused;

  hermes_router #(.ADDR_X(1), .ADDR_Y(1), .FLOW_CONTROL(FC_HANDSHAKE)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic [F-1:0] txq [NPORTS][$];
  logic [F-1:0] rxp [NPORTS][$];
  int pkt_len [int];
  int pkt_port [int];
  int pending = 0, seq = 0, n_refused = 0, n_slow_ack = 0;
  int snd_st [NPORTS];      // sender: 0 idle, 1 request, 2 release
  int in_hs_pushes [NPORTS];
  logic [NPORTS-1:0] rx_q, ack_rx_q, tx_q, ack_tx_q;
  logic [F-1:0] out_q [NPORTS];

  function automatic int xy_port(int tx_, int ty_);
    if (tx_ > 1) return EAST;
    if (tx_ < 1) return WEST;
    if (ty_ > 1) return NORTH;
    if (ty_ < 1) return SOUTH;
    return LOCAL;
  endfunction

  task automatic send(int src, int tgx, int tgy, int npay);
    int k = seq++;
    txq[src].push_back({8'(tgy), 8'(tgx)});
    txq[src].push_back(F'(npay));
    txq[src].push_back(F'(k));
    for (int j = 1; j < npay; j++) txq[src].push_back(F'(k * 7 + j * 3));
    pkt_len[k] = npay + 2;
    pkt_port[k] = xy_port(tgx, tgy);
    pending++;
  endtask

  // handshake senders on the inputs, handshake receivers on the outputs
  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < NPORTS; p++) begin
      case (snd_st[p])
        0: if (txq[p].size() > 0 && $urandom_range(99) >= 20) begin
             rx[p] <= 1'b1; data_in[p] <= txq[p][0]; snd_st[p] = 1;
           end
        1: if (credit_o[p] && $urandom_range(99) >= 30) begin rx[p] <= 1'b0; void'(txq[p].pop_front()); snd_st[p] = 2; end
        default: if (!credit_o[p]) snd_st[p] = 0;
      endcase
      if (!credit_i[p] && tx[p] && $urandom_range(99) >= 30) begin
        credit_i[p] <= 1'b1;
        rxp[p].push_back(data_out[p]);
      end else if (credit_i[p] && !tx[p] && $urandom_range(99) >= 30) begin
        credit_i[p] <= 1'b0;
      end else if (!credit_i[p] && tx[p]) begin
        n_slow_ack++;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (refused) n_refused++;
    for (int p = 0; p < NPORTS; p++) begin
      // input link protocol
      if (credit_o[p] && !ack_rx_q[p]) check(rx_q[p], $sformatf("ack_rx[%0d] rose without rx", p));
      if (!credit_o[p] && ack_rx_q[p]) check(!rx_q[p], $sformatf("ack_rx[%0d] fell while rx high", p));
      if (flit_rcv[p]) begin
        check(rx[p] && !credit_o[p], $sformatf("flit_rcv[%0d] outside a request", p));
        in_hs_pushes[p]++;
      end
      if (!rx[p] && rx_q[p]) begin
        check(in_hs_pushes[p] == 1, $sformatf("input %0d handshake wrote %0d flits", p, in_hs_pushes[p]));
        in_hs_pushes[p] = 0;
      end
      // output link protocol
      check(!(tx[p] && !tx_q[p] && ack_tx_q[p]), $sformatf("tx[%0d] rose while ack_tx high", p));
      if ((tx_q[p] || ack_tx_q[p]) && (tx[p] || credit_i[p]))
        check(data_out[p] == out_q[p], $sformatf("data_out[%0d] changed during a handshake", p));
      // packets
      if (rxp[p].size() >= 3 && rxp[p].size() == int'(rxp[p][1]) + 2) begin
        int k; bit ok;
        k = int'(rxp[p][2]);
        check(pkt_len.exists(k), $sformatf("unknown packet %0d on port %0d", k, p));
        if (pkt_len.exists(k)) begin
          check(pkt_port[k] == p, $sformatf("packet %0d left on port %0d", k, p));
          check(xy_port(int'(rxp[p][0][7:0]), int'(rxp[p][0][15:8])) == p, "header does not match port");
          ok = 1;
          for (int j = 3; j < rxp[p].size(); j++) if (rxp[p][j] != F'(k * 7 + (j - 2) * 3)) ok = 0;
          check(ok, $sformatf("packet %0d corrupted or interleaved", k));
          pkt_len.delete(k);
          pending--;
        end
        rxp[p].delete();
      end
    end
    rx_q <= rx; ack_rx_q <= credit_o; tx_q <= tx; ack_tx_q <= credit_i;
    for (int p = 0; p < NPORTS; p++) out_q[p] <= data_out[p];
  end

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog: %0d packets pending", pending);
    for (int p = 0; p < NPORTS; p++)
      $display("  port %0d: queued %0d, partial %0d, rx=%b ack_rx=%b tx=%b ack_tx=%b",
               p, txq[p].size(), rxp[p].size(), rx[p], credit_o[p], tx[p], credit_i[p]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rx = '0; credit_i = '0; rx_q = '0; ack_rx_q = '0; tx_q = '0; ack_tx_q = '0;
    for (int p = 0; p < NPORTS; p++) begin
      data_in[p] = '0; out_q[p] = '0; snd_st[p] = 0; in_hs_pushes[p] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 60; i++)
      for (int p = 0; p < NPORTS; p++)
        send(p, $urandom_range(2), $urandom_range(2), $urandom_range(20, 1));
    while (pending > 0) @(posedge clk);
    repeat (10) @(posedge clk);
    for (int p = 0; p < NPORTS; p++) check(txq[p].size() == 0 && rxp[p].size() == 0, "flits left over");
    check(n_refused > 0, "no request was refused");
    check(n_slow_ack > 0, "no receiver ever delayed its acknowledge");
    $display("events: refused=%0d slow_ack=%0d", n_refused, n_slow_ack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
