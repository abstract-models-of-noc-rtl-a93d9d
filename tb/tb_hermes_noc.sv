// tb_hermes_noc: end-to-end test of the HERMES mesh at its default size (4x4,
// 16-bit flits, 8-flit buffers, 7-cycle arbitration, 1000-cycle monitor
// window).
//
// Every node has a producer that injects packets through its local port and a
// consumer that takes packets out of it. Phase 1 sends single packets through
// an empty network and checks the exact delivery time against the
// blocking-free latency formula nhops * ARB_CYCLES + packet size, including
// the 5-router, 21-flit example (56 cycles). Phase 2 lets all nodes send
// packets of random length to random targets while the consumers randomly
// withhold credit; every packet must arrive once, intact, at its target, and
// never faster than the blocking-free bound. Finally the monitor totals are
// compared with what the traffic must have produced: the flits received by all
// buffers of the mesh, the flits each local port took in, and the bit toggles
// on each local input link. The test also counts the events the network must
// go through under load (refused routing requests, simultaneous requests at
// one switch control, full buffers holding a producer back, consumers
// withholding credit, packets in each of the four directions, monitor windows)
// and fails if any of them never happened.
`timescale 1ns/1ps
module tb_hermes_noc;
  import hermes_pkg::*;

  localparam int unsigned X = 4, Y = 4, NODES = X * Y, F = 16, HW = F / 2;
  localparam int unsigned ARB = 7, WIN = 1000;
  localparam int unsigned CW = $clog2(WIN + 1), TW = $clog2(WIN * F + 1);
  localparam int unsigned NPKT = 100;         // packets per node in phase 2
  localparam int unsigned WATCHDOG = 400000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NODES-1:0] local_rx, local_credit_o, local_tx, local_credit_i;
  logic [F-1:0]     local_data_in  [NODES];
  logic [F-1:0]     local_data_out [NODES];
  logic [NODES-1:0] mon_valid, refused;
  logic [CW-1:0]    mon_rec_flits    [NODES][NPORTS];
  logic [TW-1:0]    mon_link_toggles [NODES][NPORTS];

  hermes_noc dut (.*);

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  // ------------------------------------------------------------ producers
  logic [F-1:0] txq [NODES][$];
  int unsigned  inj_flits [NODES];
  int unsigned  gap_pct = 0;       // chance of a producer pausing a cycle
  int unsigned  stall_pct = 0;     // chance of a consumer withholding credit
  longint unsigned hdr_time [int]; // packet key -> edge its header entered
  int unsigned  pkt_size [int];    // packet key -> total flits
  int unsigned  pkt_hops [int];    // packet key -> routers crossed
  int unsigned  pending = 0;       // packets sent and not yet received
  longint unsigned expect_rec_total = 0;

  function automatic logic [F-1:0] pay(int src, int seq, int k);
    return F'((src * 40503 + seq * 977 + k * 131) ^ (k << 7));
  endfunction

  function automatic int key_of(int src, int seq);
    return src * 65536 + seq;
  endfunction

  task automatic send_packet(int src, int dst, int seq, int npay);
    int sx = src % X, sy = src / X, dx = dst % X, dy = dst / X;
    int k = key_of(src, seq);
    int hops = ((dx > sx) ? dx - sx : sx - dx) + ((dy > sy) ? dy - sy : sy - dy) + 1;
    txq[src].push_back({HW'(dy), HW'(dx)});
    txq[src].push_back(F'(npay));
    txq[src].push_back(F'(src));
    txq[src].push_back(F'(seq));
    for (int j = 2; j < npay; j++) txq[src].push_back(pay(src, seq, j));
    pkt_size[k] = npay + 2;
    pkt_hops[k] = hops;
    pending++;
    expect_rec_total += longint'(npay + 2) * hops;
  endtask

  // Remember which packet each producer is in the middle of, to time headers.
  int cur_hdr_seq [NODES];
  int flits_left  [NODES];
  int next_seq    [NODES];

  always @(negedge clk) begin
    for (int n = 0; n < NODES; n++) begin
      if (txq[n].size() > 0 && ($urandom_range(99) >= gap_pct)) begin
        local_rx[n]      <= 1'b1;
        local_data_in[n] <= txq[n][0];
      end else begin
        local_rx[n]      <= 1'b0;
        local_data_in[n] <= local_data_in[n];
      end
      local_credit_i[n] <= ($urandom_range(99) >= stall_pct);
    end
  end

  // ------------------------------------------------------------ event counts
  int unsigned n_refused = 0, n_multi_req = 0, n_backpressure = 0;
  int unsigned n_stall = 0, n_windows = 0;
  int unsigned n_dir [4];

  // Simultaneous routing requests at one switch control.
  logic [NODES-1:0] multi_req;
  for (genvar gy = 0; gy < Y; gy++) begin : g_ry
    for (genvar gx = 0; gx < X; gx++) begin : g_rx
      assign multi_req[gy*X+gx] = $countones(dut.g_y[gy].g_x[gx].u_router.u_ctrl.h) > 1;
    end
  end

  // ------------------------------------------------------------ consumers
  logic [F-1:0] rxp [NODES][$];
  longint unsigned mon_total = 0;
  longint unsigned mon_local [NODES];
  longint unsigned mon_tog_local [NODES];
  longint unsigned ref_tog_local [NODES];
  logic [F-1:0]    prev_in [NODES];
  int unsigned     pidx_flit [NODES];

  task automatic finish_packet(int n);
    int src, seq, k, npay;
    bit ok;
    npay = int'(rxp[n][1]);
    src  = int'(rxp[n][2]);
    seq  = int'(rxp[n][3]);
    k    = key_of(src, seq);
    check(rxp[n][0] == {HW'(n / X), HW'(n % X)}, $sformatf("node %0d got header %h", n, rxp[n][0]));
    check(pkt_size.exists(k), $sformatf("node %0d got unknown packet src %0d seq %0d", n, src, seq));
    if (pkt_size.exists(k)) begin
      check(pkt_size[k] == npay + 2, $sformatf("packet %0d/%0d size %0d", src, seq, npay + 2));
      ok = 1'b1;
      for (int j = 2; j < npay; j++) if (rxp[n][j + 2] != pay(src, seq, j)) ok = 1'b0;
      check(ok, $sformatf("packet %0d/%0d payload corrupted", src, seq));
      // Latency: no packet can beat the blocking-free bound.
      check(cyc - hdr_time[k] + 1 >= longint'(pkt_hops[k] * ARB + pkt_size[k]),
            $sformatf("packet %0d/%0d too fast: %0d", src, seq, cyc - hdr_time[k] + 1));
      last_latency = cyc - hdr_time[k] + 1;
      pkt_size.delete(k);
      pending--;
    end
    rxp[n].delete();
  endtask

  longint unsigned last_latency = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      for (int n = 0; n < NODES; n++) begin
        // producer side: a flit crosses when rx and credit are both high
        if (local_rx[n] && local_credit_o[n]) begin
          if (flits_left[n] == 0) begin
            // header of the next packet of this node
            cur_hdr_seq[n] = next_seq[n];
            next_seq[n]++;
            hdr_time[key_of(n, cur_hdr_seq[n])] = cyc;
            flits_left[n] = int'(pkt_size[key_of(n, cur_hdr_seq[n])]);
          end
          flits_left[n]--;
          void'(txq[n].pop_front());
          inj_flits[n]++;
        end
        if (local_rx[n] && !local_credit_o[n]) n_backpressure++;
        // reference toggle count of the local input link
        ref_tog_local[n] += $countones(local_data_in[n] ^ prev_in[n]);
        prev_in[n] = local_data_in[n];
        // consumer side
        if (local_tx[n] && !local_credit_i[n]) n_stall++;
        if (local_tx[n] && local_credit_i[n]) begin
          rxp[n].push_back(local_data_out[n]);
          if (rxp[n].size() >= 2 && rxp[n].size() == int'(rxp[n][1]) + 2) finish_packet(n);
        end
        if (mon_valid[n]) begin
          for (int p = 0; p < NPORTS; p++) mon_total += mon_rec_flits[n][p];
          mon_local[n]     += mon_rec_flits[n][LOCAL];
          mon_tog_local[n] += mon_link_toggles[n][LOCAL];
        end
      end
      n_refused   += $countones(refused);
      n_multi_req += $countones(multi_req);
      if (mon_valid[0]) n_windows++;
    end
  end

  task automatic wait_idle(int unsigned limit);
    int unsigned t = 0;
    while ((pending != 0) && t < limit) begin
      @(posedge clk);
      t++;
    end
  endtask

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, %0d packets outstanding", pending);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int dst, npay;
    local_rx = '0;
    local_credit_i = '1;
    for (int n = 0; n < NODES; n++) begin
      local_data_in[n] = '0;
      prev_in[n] = '0;
      inj_flits[n] = 0;
      mon_local[n] = 0;
      mon_tog_local[n] = 0;
      ref_tog_local[n] = 0;
      cur_hdr_seq[n] = 0;
      flits_left[n] = 0;
      next_seq[n] = 0;
    end
    for (int d = 0; d < 4; d++) n_dir[d] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // ---- phase 1: isolated packets, exact blocking-free latency
    // (0,0) -> (2,2): five routers, 21 flits: 5 * 7 + 21 = 56 cycles.
    send_packet(0, 2 * X + 2, next_seq_val(0, 0), 19);
    wait_idle(1000);
    check(last_latency == 56, $sformatf("5-hop 21-flit packet took %0d cycles, expected 56", last_latency));
    // (3,3) -> (0,0): seven routers, 16 flits: 7 * 7 + 16 = 65 cycles.
    send_packet(15, 0, next_seq_val(15, 0), 14);
    wait_idle(1000);
    check(last_latency == 65, $sformatf("7-hop 16-flit packet took %0d cycles, expected 65", last_latency));
    // (1,2) -> (1,2) itself: one router, 4 flits: 7 + 4 = 11 cycles.
    send_packet(6, 6, next_seq_val(6, 0), 2);
    wait_idle(1000);
    check(last_latency == 11, $sformatf("local 4-flit packet took %0d cycles, expected 11", last_latency));

    // ---- phase 2: all nodes, random targets and lengths, random stalls
    gap_pct = 10;
    stall_pct = 25;
    for (int i = 0; i < NPKT; i++) begin
      for (int n = 0; n < NODES; n++) begin
        dst  = $urandom_range(NODES - 1);
        npay = $urandom_range(30, 2);
        if (dst % X > n % X) n_dir[0]++;
        if (dst % X < n % X) n_dir[1]++;
        if (dst / X > n / X) n_dir[2]++;
        if (dst / X < n / X) n_dir[3]++;
        send_packet(n, dst, next_seq_val(n, i + 1), npay);
      end
    end
    wait_idle(WATCHDOG - 10000);
    check(pending == 0, $sformatf("%0d packets never arrived", pending));
    for (int n = 0; n < NODES; n++)
      check(txq[n].size() == 0, $sformatf("node %0d still holds %0d flits", n, txq[n].size()));

    // ---- monitor totals: wait for the window that holds the last flit
    gap_pct = 0;
    repeat (2) @(posedge mon_valid[0]);
    @(posedge clk);
    check(mon_total == expect_rec_total,
          $sformatf("monitors saw %0d buffer writes, traffic implies %0d", mon_total, expect_rec_total));
    for (int n = 0; n < NODES; n++) begin
      check(mon_local[n] == inj_flits[n],
            $sformatf("node %0d local monitor %0d flits, injected %0d", n, mon_local[n], inj_flits[n]));
      check(mon_tog_local[n] == ref_tog_local[n],
            $sformatf("node %0d local link toggles %0d, expected %0d", n, mon_tog_local[n], ref_tog_local[n]));
    end

    // ---- every mechanism must have happened
    check(n_refused > 0,      "no routing request was ever refused");
    check(n_multi_req > 0,    "no switch control ever saw simultaneous requests");
    check(n_backpressure > 0, "no producer was ever held back by a full buffer");
    check(n_stall > 0,        "no consumer ever withheld credit");
    check(n_windows > 2,      "too few monitor windows");
    for (int d = 0; d < 4; d++) check(n_dir[d] > 0, $sformatf("no packet went in direction %0d", d));
    $display("events: refused=%0d multi_req=%0d backpressure=%0d stall=%0d windows=%0d dirs=%0d/%0d/%0d/%0d",
             n_refused, n_multi_req, n_backpressure, n_stall, n_windows, n_dir[0], n_dir[1], n_dir[2], n_dir[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sequence numbers are handed out in injection order per node.
  int seq_alloc [NODES];
  initial for (int n = 0; n < NODES; n++) seq_alloc[n] = 0;
  function automatic int next_seq_val(int n, int dummy);
    int s = seq_alloc[n];
    seq_alloc[n]++;
    return s;
  endfunction

endmodule
