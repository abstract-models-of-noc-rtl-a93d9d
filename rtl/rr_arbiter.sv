// rr_arbiter: round-robin choice among N requesting router inputs.
//
// The search for a winner starts at the input after the one chosen last and
// wraps around, so the input served last has the lowest priority in the next
// round. This is the rule the HERMES switch control uses: the priority of an
// input is a function of the last input whose routing request was granted.
// The choice is combinational (gnt_valid, gnt_idx); the pointer to the last
// chosen input is registered and moves only when `update` is high, so the
// switch control can take the choice and commit it in the same cycle.
// Reset puts the pointer on the last input, so input 0 comes first; the reset
// value is this design's choice.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 update,     // commit the current choice
  output logic                 gnt_valid,  // some input is requesting
  output logic [$clog2(N)-1:0] gnt_idx     // chosen input
);
  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] last_q;

  always_comb begin
    logic [IW-1:0] cand;
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    // Walk N positions starting just after last_q; the first hit wins.
    for (int unsigned k = N; k >= 1; k--) begin
      cand = IW'((int'(last_q) + k) % N);
      if (req[cand]) begin
        gnt_valid = 1'b1;
        gnt_idx   = cand;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   last_q <= IW'(N - 1);
    else if (update && gnt_valid) last_q <= gnt_idx;
  end

endmodule
