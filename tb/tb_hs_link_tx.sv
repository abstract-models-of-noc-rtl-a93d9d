// tb_hs_link_tx: one 4-phase handshake link, hs_link_tx sending to
// hs_link_rx. The testbench feeds the sender from a queue the way the crossbar
// does (valid with the head flit, popped when take is high) and plays the
// input buffer on the receiving side with a random space signal.
// Checks: every flit arrives exactly once and in order; tx never rises while
// ack_tx is still high; data_out is stable while tx or ack_tx is high; each
// push happens while tx is high; and with the buffer always free, back-to-back
// flits are pushed exactly four cycles apart.
`timescale 1ns/1ps
module tb_hs_link_tx;
  localparam int unsigned F = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic valid, take, tx, ack, space, push;
  logic [F-1:0] data, link_data;

  hs_link_tx #(.FLIT_WIDTH(F)) dut (
    .clk(clk), .rst_n(rst_n), .valid(valid), .data(data), .take(take),
    .tx(tx), .data_out(link_data), .ack_tx(ack));
  hs_link_rx u_rx (
    .clk(clk), .rst_n(rst_n), .rx(tx), .ack_rx(ack),
    .space(space), .push(push));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic [F-1:0] srcq [$];
  logic [F-1:0] expq [$];
  int full_pct = 0, gap_pct = 0, n_wait = 0;
  longint cyc = 0, t_last_push = -1;
  bit check_period = 0;
  logic tx_q, ack_q;
  logic [F-1:0] data_q;

  always @(negedge clk) begin
    valid <= srcq.size() > 0 && $urandom_range(99) >= gap_pct;
    data  <= srcq.size() > 0 ? srcq[0] : '0;
    space <= $urandom_range(99) >= full_pct;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (valid && take) void'(srcq.pop_front());
    check(!(tx && !tx_q && ack_q), "tx rose while ack_tx was high");
    if ((tx_q || ack_q) && (tx || ack)) check(link_data == data_q, "data_out changed during a handshake");
    if (tx && !space && !ack) n_wait++;
    if (push) begin
      check(tx, "push without tx");
      check(expq.size() > 0, "unexpected flit");
      if (expq.size() > 0) check(link_data == expq.pop_front(), "flit out of order or corrupted");
      if (check_period && t_last_push >= 0)
        check(cyc - t_last_push == 4, $sformatf("flits %0d cycles apart, expected 4", cyc - t_last_push));
      t_last_push = cyc;
    end
    tx_q <= tx; ack_q <= ack; data_q <= link_data;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(int n);
    for (int i = 0; i < n; i++) begin
      logic [F-1:0] v = F'($urandom);
      srcq.push_back(v); expq.push_back(v);
    end
  endtask

  initial begin
    valid = 0; data = '0; space = 1; tx_q = 0; ack_q = 0; data_q = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // back to back, receiver always ready: four cycles per flit
    check_period = 1;
    load(20);
    while (expq.size() > 0) @(posedge clk);
    check_period = 0;
    repeat (5) @(posedge clk);
    // random gaps on the sending side and a randomly full buffer
    full_pct = 40; gap_pct = 30;
    load(2000);
    while (expq.size() > 0) @(posedge clk);
    check(srcq.size() == 0, "source queue not drained");
    check(n_wait > 0, "the receiver never had to wait for buffer space");
    $display("events: waits_for_space=%0d", n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
