// tb_hermes_router: one router at address (1,1) with a producer on each of its
// five inputs and a consumer on each of its five outputs.
// First an isolated 10-flit packet from Local to East checks the timing: the
// header must leave ARB_CYCLES edges after it entered and the remaining flits
// must follow at one flit per cycle. Then all producers send packets of
// random length to random targets around the router while the consumers
// randomly withhold credit. Each packet must come out, intact and exactly
// once, on the port XY routing names for its target; no two packets may be
// interleaved on one output, and flit_rcv must mark exactly the cycles in
// which an input took a flit. The run must include refused requests, full
// input buffers and withheld credit.
`timescale 1ns/1ps
module tb_hermes_router;
  import hermes_pkg::*;
  localparam int unsigned F = 16, ARB = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NPORTS-1:0] rx, credit_o, tx, credit_i, flit_rcv;
  logic [F-1:0] data_in [NPORTS];
  logic [F-1:0] data_out [NPORTS];
  logic refused;

  hermes_router #(.ADDR_X(1), .ADDR_Y(1)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic [F-1:0] txq [NPORTS][$];
  logic [F-1:0] rxp [NPORTS][$];
  int pkt_len [int];
  int pkt_port [int];
  int pending = 0, seq = 0, stall_pct = 0, gap_pct = 0;
  int n_refused = 0, n_full = 0, n_stall = 0;
  longint cyc = 0;
  longint t_in_hdr = -1, t_out_hdr = -1, t_out_last = -1;

  function automatic int xy_port(int tx, int ty);
    if (tx > 1) return EAST;
    if (tx < 1) return WEST;
    if (ty > 1) return NORTH;
    if (ty < 1) return SOUTH;
    return LOCAL;
  endfunction

  task automatic send(int src, int tgx, int tgy, int npay);
    int k = seq++;
    txq[src].push_back({8'(tgy), 8'(tgx)});
    txq[src].push_back(F'(npay));
    txq[src].push_back(F'(k));
    for (int j = 1; j < npay; j++) txq[src].push_back(F'(k * 7 + j * 3 + src));
    pkt_len[k] = npay + 2;
    pkt_port[k] = xy_port(tgx, tgy);
    pending++;
  endtask

  always @(negedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      rx[p] <= txq[p].size() > 0 && $urandom_range(99) >= gap_pct;
      data_in[p] <= txq[p].size() > 0 ? txq[p][0] : '0;
      credit_i[p] <= $urandom_range(99) >= stall_pct;
    end
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (refused) n_refused++;
    for (int p = 0; p < NPORTS; p++) begin
      if (rx[p] && !credit_o[p]) n_full++;
      if (tx[p] && !credit_i[p]) n_stall++;
      check(flit_rcv[p] == (rx[p] && credit_o[p]), $sformatf("flit_rcv[%0d] wrong", p));
      if (rx[p] && credit_o[p]) begin
        if (t_in_hdr < 0) t_in_hdr = cyc;
        void'(txq[p].pop_front());
      end
      if (tx[p] && credit_i[p]) begin
        if (t_out_hdr < 0) t_out_hdr = cyc;
        t_out_last = cyc;
        rxp[p].push_back(data_out[p]);
        if (rxp[p].size() >= 3 && rxp[p].size() == int'(rxp[p][1]) + 2) begin
          int k; bit ok;
          k = int'(rxp[p][2]);
          check(pkt_len.exists(k), $sformatf("unknown packet %0d on port %0d", k, p));
          if (pkt_len.exists(k)) begin
            check(pkt_port[k] == p, $sformatf("packet %0d left on port %0d, expected %0d", k, p, pkt_port[k]));
            check(pkt_len[k] == rxp[p].size(), "length");
            check(xy_port(int'(rxp[p][0][7:0]), int'(rxp[p][0][15:8])) == p, "header does not match port");
            ok = 1;
            for (int j = 3; j < rxp[p].size(); j++) if (rxp[p][j] != F'(k * 7 + (j - 2) * 3)) begin
              // payload depends on the source too; accept any of the five sources
              bit any = 0;
              for (int s = 0; s < NPORTS; s++) if (rxp[p][j] == F'(k * 7 + (j - 2) * 3 + s)) any = 1;
              if (!any) ok = 0;
            end
            check(ok, $sformatf("packet %0d corrupted or interleaved", k));
            pkt_len.delete(k);
            pending--;
          end
          rxp[p].delete();
        end
      end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rx = '0; credit_i = '1;
    for (int p = 0; p < NPORTS; p++) data_in[p] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // timing of an isolated packet: 10 flits Local -> East
    send(LOCAL, 2, 1, 8);
    while (pending > 0) @(posedge clk);
    check(t_out_hdr - t_in_hdr == ARB, $sformatf("header took %0d edges, expected %0d", t_out_hdr - t_in_hdr, ARB));
    check(t_out_last - t_out_hdr == 9, $sformatf("10 flits took %0d edges after the header, expected 9", t_out_last - t_out_hdr));
    // random load
    stall_pct = 30; gap_pct = 10;
    for (int i = 0; i < 150; i++)
      for (int p = 0; p < NPORTS; p++)
        send(p, $urandom_range(2), $urandom_range(2), $urandom_range(20, 1));
    while (pending > 0) @(posedge clk);
    check(n_refused > 0, "no request was refused");
    check(n_full > 0, "no input buffer was ever full");
    check(n_stall > 0, "no consumer withheld credit");
    $display("events: refused=%0d full=%0d stall=%0d", n_refused, n_full, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
