// misr: multiple-input signature register with an unknown-value mask.
//
// Every router and every core under test compacts its scan-out responses in a
// MISR, and only the final signature goes back to the tester after all test
// packets of a session have been applied. This register is a Galois LFSR of
// width W whose parallel inputs are XORed into the shifted state on each cycle
// with en=1. A bit whose mask bit is 1 is treated as an unknown and blocked, so
// that it cannot spoil the signature (the X-tolerance the compactor needs).
// clr has priority and loads zero. The signature is available at sig one cycle
// after the last enabled cycle.
//
// The document gives the function (an X-tolerant MISR) but not the feedback
// polynomial or the masking circuit: both are this design's choice. The default
// polynomial is x^32 + x^22 + x^2 + x + 1.
module misr #(
  parameter int          W    = 32,
  parameter logic [W-1:0] POLY = W'(32'h0040_0007)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] d,
  input  logic [W-1:0] xmask,
  output logic [W-1:0] sig
);

  logic [W-1:0] nxt;

  always_comb begin
    nxt = {sig[W-2:0], 1'b0};
    if (sig[W-1]) nxt = nxt ^ POLY;
    nxt = nxt ^ (d & ~xmask);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sig <= '0;
    else if (clr) sig <= '0;
    else if (en)  sig <= nxt;
  end

endmodule
