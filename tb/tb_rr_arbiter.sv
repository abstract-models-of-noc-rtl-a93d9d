// tb_rr_arbiter: checks the round-robin choice against a reference model.
// Random request patterns are applied for many cycles; the reference keeps its
// own copy of the last chosen input and searches from the next one, and the
// test compares validity and index every cycle, whether or not the choice is
// committed. It also checks the reset order (input 0 first) and that a
// continuously requesting set of inputs is served in rotation.
`timescale 1ns/1ps
module tb_rr_arbiter;
  localparam int unsigned N = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [N-1:0] req;
  logic update, gnt_valid;
  logic [2:0] gnt_idx;

  rr_arbiter #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int ref_last;

  function automatic int ref_pick(logic [N-1:0] r, int last);
    for (int k = 1; k <= N; k++) if (r[(last + k) % N]) return (last + k) % N;
    return -1;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_idx;
    req = '0; update = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    ref_last = N - 1;
    // all request: after reset input 0 wins, then 1, 2, 3, 4, 0
    req = '1;
    for (int k = 0; k < 6; k++) begin
      update = 1'b1;
      #1;
      checks++;
      if (!(gnt_valid && gnt_idx == 3'(k % N))) begin
        failures++;
        $display("FAIL rotation step %0d: got %0d", k, gnt_idx);
      end
      @(negedge clk);
      ref_last = k % N;
    end
    // random patterns
    for (int t = 0; t < 5000; t++) begin
      req = N'($urandom);
      update = $urandom_range(1);
      #1;
      exp_idx = ref_pick(req, ref_last);
      checks++;
      if (gnt_valid != (exp_idx >= 0) || (exp_idx >= 0 && gnt_idx != 3'(exp_idx))) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d req=%b last=%0d got %0d/%0d exp %0d", t, req, ref_last, gnt_valid, gnt_idx, exp_idx);
      end
      @(negedge clk);
      if (update && exp_idx >= 0) ref_last = exp_idx;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
