// packet_buffer: consumption or injection buffer of a network node.
//
// The consumption buffer is the interface from the network to the processor
// and the injection buffer the interface from the processor to the network;
// each holds at most PKTS packets (three in the evaluated network). This is a
// flit FIFO of PKTS*MAX_FLITS entries that also counts the packets it holds:
// a head flit is accepted only while fewer than PKTS packets are present, so
// that a fourth packet waits in the network. A packet counts from the moment
// its head enters until its tail leaves.
//
// Interface: valid/ready on both sides, a transfer happens when both are 1.
// Output data come from a register array, a flit pushed in cycle t can leave
// in cycle t+1. The three-packet limit follows the document; the flit-level
// organisation and the handshake are this design's choices.
module packet_buffer
  import noctest_pkg::*;
#(
  parameter int PKTS      = 3,
  parameter int MAX_FLITS = 42
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  flit_t in_flit,
  output logic  in_ready,
  output logic  out_valid,
  output flit_t out_flit,
  input  logic  out_ready,
  output logic [$clog2(PKTS+1)-1:0] npkts
);
  localparam int DEPTH = PKTS * MAX_FLITS;
  localparam int AW    = $clog2(DEPTH);
  localparam int CW    = $clog2(DEPTH + 1);

  flit_t          mem [DEPTH];
  logic [AW-1:0]  wptr, rptr;
  logic [CW-1:0]  count;
  logic           push, pop;

  assign in_ready  = (count != CW'(DEPTH)) && (!in_flit.head || npkts != PKTS[$bits(npkts)-1:0]);
  assign out_valid = (count != '0);
  assign out_flit  = mem[rptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= in_flit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
      npkts <= '0;
    end else begin
      if (push) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (pop)  rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + CW'(push) - CW'(pop);
      npkts <= npkts + $bits(npkts)'(push && in_flit.head) - $bits(npkts)'(pop && out_flit.tail);
    end
  end

  // A packet cannot be both entering and completely leaving when the buffer is full.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH));

endmodule
