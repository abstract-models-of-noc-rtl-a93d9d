// tb_crossbar: random connection tables and buffer states are applied to the
// crossbar and every output (tx, data) and every input acknowledge is compared
// with values computed from the table in the testbench.
`timescale 1ns/1ps
module tb_crossbar;
  import hermes_pkg::*;
  logic [NPORTS-1:0] out_busy, in_conn, buf_av, buf_ack, tx, credit_i;
  logic [2:0]  in_sel [NPORTS];
  logic [2:0]  out_sel [NPORTS];
  logic [15:0] buf_data [NPORTS];
  logic [15:0] data_out [NPORTS];

  crossbar #(.FLIT_WIDTH(16)) dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [NPORTS];
    for (int t = 0; t < 3000; t++) begin
      // a random partial one-to-one mapping input -> output
      for (int i = 0; i < NPORTS; i++) perm[i] = i;
      perm.shuffle();
      out_busy = '0; in_conn = '0;
      for (int i = 0; i < NPORTS; i++) begin
        in_sel[i] = 3'($urandom_range(4));
        out_sel[i] = 3'($urandom_range(4));
      end
      for (int i = 0; i < NPORTS; i++) begin
        if ($urandom_range(1)) begin
          in_conn[i] = 1'b1;
          out_sel[i] = 3'(perm[i]);
          out_busy[perm[i]] = 1'b1;
          in_sel[perm[i]] = 3'(i);
        end
        buf_data[i] = 16'($urandom);
      end
      buf_av = NPORTS'($urandom);
      credit_i = NPORTS'($urandom);
      #1;
      for (int o = 0; o < NPORTS; o++) begin
        logic etx; logic [15:0] ed;
        etx = 1'b0; ed = '0;
        for (int i = 0; i < NPORTS; i++)
          if (in_conn[i] && perm[i] == o) begin etx = buf_av[i]; ed = buf_data[i]; end
        checks++;
        if (tx[o] != etx || data_out[o] != ed) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d tx %b/%b data %h/%h", o, tx[o], etx, data_out[o], ed);
        end
      end
      for (int i = 0; i < NPORTS; i++) begin
        checks++;
        if (buf_ack[i] != (in_conn[i] && credit_i[perm[i]])) begin
          failures++;
          if (failures < 10) $display("FAIL ack %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
