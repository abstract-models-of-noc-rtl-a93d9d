// tb_noc_traffic: traffic source, sink and checker around one hermes_noc,
// used by tb_noc_workloads to run the mesh in several configurations.
// Every node sends NPKT packets of PKT_FLITS flits (header, size, payload) to
// uniformly random targets. The local ports are driven with the link
// protocol the mesh is built with: credit (tx/credit, with the sinks randomly
// withholding credit) or 4-phase handshake (with random delays on both sides).
// Each packet must arrive exactly once, intact and at its target; the
// latency of each packet, from the header being offered at the source to the
// last flit being taken at the target, is summed for an average. done rises
// when every packet has arrived.
`timescale 1ns/1ps
module tb_noc_traffic
  import hermes_pkg::*;
#(
  parameter int unsigned X_SIZE       = 2,
  parameter int unsigned Y_SIZE       = 2,
  parameter int unsigned FLIT_WIDTH   = 16,
  parameter int unsigned BUFFER_DEPTH = 8,
  parameter flow_e       FLOW_CONTROL = FC_CREDIT,
  parameter int unsigned NPKT         = 10,
  parameter int unsigned PKT_FLITS    = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   done,
  output int     checks,
  output int     failures,
  output longint lat_sum,
  output int     delivered
);
  localparam int unsigned NODES = X_SIZE * Y_SIZE;
  localparam int unsigned F = FLIT_WIDTH, HW = F / 2;

  logic [NODES-1:0]   l_rx, l_cr_o, l_tx, l_cr_i, mon_valid, refused;
  logic [F-1:0]       l_din  [NODES];
  logic [F-1:0]       l_dout [NODES];
  logic [$clog2(1000+1)-1:0]   mon_rf [NODES][NPORTS];
  logic [$clog2(1000*F+1)-1:0] mon_lt [NODES][NPORTS];

  hermes_noc #(
    .X_SIZE(X_SIZE), .Y_SIZE(Y_SIZE), .FLIT_WIDTH(F), .BUFFER_DEPTH(BUFFER_DEPTH),
    .FLOW_CONTROL(FLOW_CONTROL)
  ) u_noc (
    .clk(clk), .rst_n(rst_n),
    .local_rx(l_rx), .local_data_in(l_din), .local_credit_o(l_cr_o),
    .local_tx(l_tx), .local_data_out(l_dout), .local_credit_i(l_cr_i),
    .mon_valid(mon_valid), .mon_rec_flits(mon_rf), .mon_link_toggles(mon_lt),
    .refused(refused)
  );

  logic [F-1:0] txq [NODES][$];
  logic [F-1:0] rxp [NODES][$];
  int     exp_dst [int];
  longint t_start [int];
  longint cyc = 0;
  bit     hdr_seen [NODES];
  int     snd_st [NODES];
  int     total;

  function automatic void check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %m %0t: %s", $time, msg); end
  endfunction

  initial begin
    checks = 0; failures = 0; lat_sum = 0; delivered = 0; done = 0;
    total = NODES * NPKT;
    l_rx = '0; l_cr_i = (FLOW_CONTROL == FC_CREDIT) ? '1 : '0;
    for (int n = 0; n < NODES; n++) begin
      l_din[n] = '0; hdr_seen[n] = 0; snd_st[n] = 0;
      for (int i = 0; i < NPKT; i++) begin
        int k, d;
        k = n * NPKT + i;
        d = $urandom_range(NODES - 1);
        txq[n].push_back({HW'(d / X_SIZE), HW'(d % X_SIZE)});
        txq[n].push_back(F'(PKT_FLITS - 2));
        txq[n].push_back(F'(k));
        for (int j = 3; j < PKT_FLITS; j++) txq[n].push_back(F'(k * 7 + j));
        exp_dst[k] = d;
      end
    end
  end

  // packet start time: the cycle its header is first offered
  function automatic void note_header(int n);
    if (!hdr_seen[n] && txq[n].size() > 0) begin
      hdr_seen[n] = 1;
      t_start[int'(txq[n][2])] = cyc;
    end
  endfunction

  function automatic void took_flit(int n);
    void'(txq[n].pop_front());
    if (txq[n].size() % PKT_FLITS == 0) hdr_seen[n] = 0;
  endfunction

  function automatic void got_flit(int n, logic [F-1:0] f);
    rxp[n].push_back(f);
    if (rxp[n].size() == PKT_FLITS) begin
      int k = int'(rxp[n][2]);
      bit ok = exp_dst.exists(k);
      check(ok, $sformatf("unknown packet %0d at node %0d", k, n));
      if (ok) begin
        check(exp_dst[k] == n, $sformatf("packet %0d at node %0d, sent to %0d", k, n, exp_dst[k]));
        check(rxp[n][0] == {HW'(n / X_SIZE), HW'(n % X_SIZE)}, "header changed");
        check(rxp[n][1] == F'(PKT_FLITS - 2), "size flit changed");
        for (int j = 3; j < PKT_FLITS; j++) if (rxp[n][j] != F'(k * 7 + j)) ok = 0;
        check(ok, $sformatf("packet %0d corrupted", k));
        lat_sum += cyc - t_start[k];
        exp_dst.delete(k);
        delivered++;
      end
      rxp[n].delete();
    end
  endfunction

  if (FLOW_CONTROL == FC_CREDIT) begin : g_credit
    always @(negedge clk) if (rst_n) begin
      for (int n = 0; n < NODES; n++) begin
        l_rx[n]  <= txq[n].size() > 0;
        l_din[n] <= txq[n].size() > 0 ? txq[n][0] : '0;
        if (txq[n].size() > 0) note_header(n);
        l_cr_i[n] <= $urandom_range(99) >= 10;
      end
    end
    always @(posedge clk) if (rst_n) begin
      cyc++;
      for (int n = 0; n < NODES; n++) begin
        if (l_rx[n] && l_cr_o[n]) took_flit(n);
        if (l_tx[n] && l_cr_i[n]) got_flit(n, l_dout[n]);
      end
    end
  end else begin : g_hs
    always @(negedge clk) if (rst_n) begin
      for (int n = 0; n < NODES; n++) begin
        case (snd_st[n])
          0: if (txq[n].size() > 0 && $urandom_range(99) >= 10) begin
               note_header(n);
               l_rx[n] <= 1'b1; l_din[n] <= txq[n][0]; snd_st[n] = 1;
             end
          1: if (l_cr_o[n]) begin l_rx[n] <= 1'b0; took_flit(n); snd_st[n] = 2; end
          default: if (!l_cr_o[n]) snd_st[n] = 0;
        endcase
        if (!l_cr_i[n] && l_tx[n] && $urandom_range(99) >= 10) begin
          l_cr_i[n] <= 1'b1;
          got_flit(n, l_dout[n]);
        end else if (l_cr_i[n] && !l_tx[n]) begin
          l_cr_i[n] <= 1'b0;
        end
      end
    end
    always @(posedge clk) if (rst_n) cyc++;
  end

  always @(posedge clk) if (rst_n && !done && delivered == total) begin
    for (int n = 0; n < NODES; n++) check(txq[n].size() == 0 && rxp[n].size() == 0, "flits left over");
    check(exp_dst.size() == 0, "packets missing");
    done <= 1'b1;
  end

endmodule
