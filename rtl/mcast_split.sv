// mcast_split: one step of the recursive unicast-based multicast.
//
// A node that holds a test packet is responsible for the part [lo, hi] of a
// dimension-ordered chain of destinations, and sits itself at position p of it.
// While that part has more than one member, the node halves it: the half that
// holds the node stays with it, the other half is handed to one member of that
// half with a single unicast, and both continue recursively in the next unicast
// step. The member handed the packet is the one nearest to the node in the
// chain: the first node of the upper half when the node is in the lower half,
// the last node of the lower half when it is in the upper half. This is the
// procedure of the document; with a part of two members the packet simply goes
// to the other member.
//
// When the part has an odd size the two halves cannot be equal. This design
// gives the larger half to the receiving node, which is what the document's
// six-router example tree shows (the router that starts with three routers
// keeps one and sends to the neighbour that takes two). A node that is the
// exact middle of an odd part joins the lower half.
//
// Purely combinational. active=0 when lo == hi (nothing left to send).
module mcast_split #(
  parameter int IW = 8
) (
  input  logic [IW-1:0] lo,
  input  logic [IW-1:0] hi,
  input  logic [IW-1:0] p,
  output logic          active,
  output logic [IW-1:0] target,   // chain position that receives the packet
  output logic [IW-1:0] t_lo,     // part handed over to the target
  output logic [IW-1:0] t_hi,
  output logic [IW-1:0] n_lo,     // part this node keeps
  output logic [IW-1:0] n_hi
);
  logic [IW:0] n, half;

  always_comb begin
    n      = {1'b0, hi} - {1'b0, lo} + 1'b1;
    half   = n >> 1;
    active = (hi > lo);
    target = p;
    t_lo   = p;
    t_hi   = p;
    n_lo   = lo;
    n_hi   = hi;
    if (active) begin
      if ({1'b0, p} < {1'b0, lo} + half) begin
        // in the lower half, which is the smaller one
        n_lo   = lo;
        n_hi   = IW'({1'b0, lo} + half - 1'b1);
        t_lo   = IW'({1'b0, lo} + half);
        t_hi   = hi;
        target = t_lo;
      end else if ({1'b0, p} > {1'b0, hi} - half) begin
        // in the upper half, which is the smaller one
        n_lo   = IW'({1'b0, hi} - half + 1'b1);
        n_hi   = hi;
        t_lo   = lo;
        t_hi   = IW'({1'b0, hi} - half);
        target = t_hi;
      end else begin
        // exact middle of an odd part: lower half, sized half+1
        n_lo   = lo;
        n_hi   = IW'({1'b0, lo} + half);
        t_lo   = IW'({1'b0, lo} + half + 1'b1);
        t_hi   = hi;
        target = t_lo;
      end
    end
  end

endmodule
