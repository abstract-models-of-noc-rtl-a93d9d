// input_buffer: FIFO input buffer of one HERMES router port.
//
// Flits arrive on a credit-based link: the upstream sender shows a flit on
// data_in with rx high, and the flit is written on a clock edge where credit_o
// is also high. credit_o is high whenever the FIFO has a free slot, so one
// flit can cross the link per clock cycle; a sender that sees no credit keeps
// its flit on the link. The FIFO holds DEPTH flits.
//
// The buffer also follows the packet it is forwarding. When a header flit
// reaches the head of an idle buffer it raises h, the routing request to the
// switch control, and shows the header on head_flit. The switch control
// answers with a one-cycle ack_h once it has connected this input to an output
// port. From then on the buffer offers its flits (data_av) to the crossbar and
// removes one each cycle data_ack reports that the downstream side took it.
// The second flit of a packet holds the number of payload flits; the buffer
// loads it into a down counter, and when the last payload flit leaves it pulses
// pkt_done so the switch control releases the output port. Wormhole packets
// and the size flit follow the HERMES description; doing the flit counting in
// the buffer rather than in the controller is this design's choice.
module input_buffer #(
  parameter int unsigned FLIT_WIDTH = 16,
  parameter int unsigned DEPTH      = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // link from the upstream router or core
  input  logic                  rx,
  input  logic [FLIT_WIDTH-1:0] data_in,
  output logic                  credit_o,
  // switch control
  output logic                  h,
  output logic [FLIT_WIDTH-1:0] head_flit,
  input  logic                  ack_h,
  output logic                  pkt_done,
  // crossbar
  output logic                  data_av,
  output logic [FLIT_WIDTH-1:0] data_out,
  input  logic                  data_ack
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef enum logic [1:0] {B_IDLE, B_HEADER, B_SIZE, B_PAYLOAD} bstate_e;

  logic [FLIT_WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]         wr_ptr, rd_ptr;
  logic [AW:0]           count;
  logic                  empty, full, push, pop;
  bstate_e               state;
  logic [FLIT_WIDTH-1:0] remaining;

  assign empty    = (count == '0);
  assign full     = (count == (AW+1)'(DEPTH));
  assign credit_o = !full;
  assign push     = rx && !full;

  assign head_flit = mem[rd_ptr];
  assign data_out  = mem[rd_ptr];
  assign h         = (state == B_IDLE) && !empty;
  assign data_av   = (state != B_IDLE) && !empty;
  assign pop       = data_av && data_ack;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= data_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  // Packet tracking.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= B_IDLE;
      remaining <= '0;
    end else begin
      unique case (state)
        B_IDLE:    if (ack_h) state <= B_HEADER;
        B_HEADER:  if (pop)   state <= B_SIZE;
        B_SIZE:    if (pop) begin
                     remaining <= data_out;
                     state     <= (data_out == '0) ? B_IDLE : B_PAYLOAD;
                   end
        B_PAYLOAD: if (pop) begin
                     remaining <= remaining - 1'b1;
                     if (remaining == FLIT_WIDTH'(1)) state <= B_IDLE;
                   end
      endcase
    end
  end

  always_comb begin
    pkt_done = 1'b0;
    if (pop) begin
      if (state == B_SIZE && data_out == '0)              pkt_done = 1'b1;
      if (state == B_PAYLOAD && remaining == FLIT_WIDTH'(1)) pkt_done = 1'b1;
    end
  end

  a_ack_only_on_request: assert property (@(posedge clk) disable iff (!rst_n) ack_h |-> h)
    else $error("input_buffer: ack_h without a pending request");

endmodule
