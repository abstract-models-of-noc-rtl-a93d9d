// tb_input_buffer: drives one input buffer with packets of random length and
// checks it cycle by cycle against a reference queue kept in the testbench.
// The reference knows which queued flit is a header and which is the last
// of its packet, so it can predict the routing request (h), the flit offered
// to the crossbar, credit (free space among DEPTH slots) and pkt_done. The
// grant (ack_h) and the downstream acknowledge come at random times, and a
// phase without any acknowledge fills the buffer to check that credit drops
// after exactly DEPTH flits.
`timescale 1ns/1ps
module tb_input_buffer;
  localparam int unsigned F = 16, DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic rx, credit_o, h, ack_h, pkt_done, data_av, data_ack;
  logic [F-1:0] data_in, head_flit, data_out;

  input_buffer #(.FLIT_WIDTH(F), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %0t: %s", $time, msg); end
  endtask

  typedef struct { logic [F-1:0] d; bit hdr; bit last; } flit_t;
  flit_t src_q [$];   // not yet sent into the buffer
  flit_t buf_q [$];   // reference buffer contents
  bit    granted;     // reference: head packet has its connection
  int    ack_pct = 70, gap_pct = 20;
  bit    allow_ack = 1;
  int    n_done = 0, n_full = 0;

  task automatic add_packet(int npay);
    flit_t f;
    f.d = 16'h0101 + F'($urandom_range(255)); f.hdr = 1; f.last = 0; src_q.push_back(f);
    f.d = F'(npay); f.hdr = 0; f.last = (npay == 0); src_q.push_back(f);
    for (int j = 0; j < npay; j++) begin
      f.d = F'($urandom); f.hdr = 0; f.last = (j == npay - 1); src_q.push_back(f);
    end
  endtask

  // stimulus on the falling edge
  always @(negedge clk) begin
    rx      <= (src_q.size() > 0) && ($urandom_range(99) >= gap_pct);
    data_in <= (src_q.size() > 0) ? src_q[0].d : '0;
    data_ack <= allow_ack && ($urandom_range(99) < ack_pct);
  end
  // ack_h: a combinational answer some cycles after h
  int h_wait = 0;
  always @(negedge clk) begin
    if (h && !granted) begin
      if (h_wait == 0) begin ack_h <= 1'b1; h_wait <= $urandom_range(3); end
      else begin ack_h <= 1'b0; h_wait <= h_wait - 1; end
    end else ack_h <= 1'b0;
  end

  always @(posedge clk) if (rst_n) begin
    bit exp_h, exp_av, pop;
    exp_h  = !granted && buf_q.size() > 0;
    exp_av = granted && buf_q.size() > 0;
    check(credit_o == (buf_q.size() < DEPTH), $sformatf("credit %b with %0d stored", credit_o, buf_q.size()));
    check(h == exp_h, $sformatf("h %b expected %b", h, exp_h));
    check(data_av == exp_av, $sformatf("data_av %b expected %b", data_av, exp_av));
    if (buf_q.size() > 0) begin
      check(data_out == buf_q[0].d, $sformatf("data_out %h expected %h", data_out, buf_q[0].d));
      if (exp_h) begin
        check(buf_q[0].hdr, "request raised for a non-header flit");
        check(head_flit == buf_q[0].d, "head_flit wrong");
      end
    end
    pop = exp_av && data_ack;
    check(pkt_done == (pop && buf_q[0].last), $sformatf("pkt_done %b", pkt_done));
    if (!credit_o) n_full++;
    if (pop) begin
      if (buf_q[0].last) begin granted = 0; n_done++; end
      void'(buf_q.pop_front());
    end
    if (ack_h && h) granted = 1;
    if (rx && credit_o) buf_q.push_back(src_q.pop_front());
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rx = 0; data_in = '0; ack_h = 0; data_ack = 0; granted = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // fill: no acknowledge, 12 flits offered, only DEPTH may enter
    allow_ack = 0;
    add_packet(10);
    repeat (30) @(posedge clk);
    check(buf_q.size() == DEPTH, $sformatf("buffer took %0d flits, expected %0d", buf_q.size(), DEPTH));
    check(!credit_o, "credit still high when full");
    allow_ack = 1;
    // random packets, including empty payloads
    for (int p = 0; p < 200; p++) add_packet($urandom_range(12));
    while (src_q.size() > 0 || buf_q.size() > 0) @(posedge clk);
    repeat (3) @(posedge clk);
    check(n_done == 201, $sformatf("%0d packets completed, expected 201", n_done));
    check(n_full > 0, "buffer never full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
