// core_dft: design-for-test logic of one core (scan trees fed from the network).
//
// Test data reach the core through the consumption buffer, so the core needs no
// scan-in pins of its own. A demultiplexer after the consumption side sends a
// flit to the scan trees when it belongs to a test packet (in_test, "x") and the
// core's class is under test (class pin c), and to the processor otherwise.
// Each of the N_SI bits of a flit is the root of one scan tree: it drives one
// scan chain in each of N_GRP chain groups. A one-hot group register R (reset
// value 1,0,...,0) lets only one group shift at a time, which keeps shift power
// low: every payload flit of a test packet is one shift of the selected group,
// and after shift_len shifts (the length of the core's longest chain) the
// token passes to the next group, whatever the packet boundaries. When the token
// leaves the last group, all chains have been loaded and one capture cycle
// (scan_cap) follows, in which the core's inputs are blocked. The scan-outs of
// the selected group are XORed across groups per tree and compacted in a MISR
// (misr, unknown bits masked by xmask) while the next pattern shifts in. A
// rising edge of the global pin e makes resp_inject send the signature to the
// tester; otherwise the processor's packets pass to the injection buffer.
//
// From the document: the class pin and test-packet demultiplexer, the scan
// trees rooted at the consumption buffer, the group register with its
// 1,0..0 start value, the XOR compaction into the MISR and the output
// multiplexer controlled by e. This design's choices: the shift counter,
// capture after the last group, the gating reduced to shift enables
// (the chains' clocks are not gated here), MISR cleared when c rises.
// Timing: one shift per accepted test flit, one capture cycle per full load
// (N_GRP * shift_len shifts). in_last marks packet ends and is not needed here.
module core_dft
  import noctest_pkg::*;
#(
  parameter int N_SI  = 32,
  parameter int N_GRP = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  addr_t                       my_addr,
  input  addr_t                       ate_addr,
  input  logic                        c,
  input  logic                        e,
  input  logic [N_SI-1:0]             xmask,
  input  logic [15:0]                 shift_len,
  // from the consumption side
  input  logic                        in_valid,
  input  logic [FLIT_W-1:0]           in_data,
  input  logic                        in_test,
  input  logic                        in_last,
  output logic                        in_ready,
  // operational packets to the processor
  output logic                        proc_valid,
  output logic [FLIT_W-1:0]           proc_data,
  output logic                        proc_last,
  input  logic                        proc_ready,
  // operational packets from the processor
  input  logic                        pin_valid,
  input  flit_t                       pin_flit,
  output logic                        pin_ready,
  // to the injection buffer
  output logic                        inj_valid,
  output flit_t                       inj_flit,
  input  logic                        inj_ready,
  // scan chains of the core
  output logic [N_SI-1:0]             scan_si,
  output logic [N_GRP-1:0]            scan_se,
  output logic                        scan_cap,
  input  logic [N_GRP-1:0][N_SI-1:0]  scan_so,
  // status
  output logic [N_GRP-1:0]            grp,
  output logic [N_SI-1:0]             sig,
  output logic                        resp_done
);
  logic             sel, shift, cap_pend, c_q;
  logic [N_SI-1:0]  comp;
  logic [15:0]      scnt;

  assign sel        = in_test && c;
  assign in_ready   = sel ? !cap_pend : proc_ready;
  assign proc_valid = in_valid && !sel;
  assign proc_data  = in_data;
  assign proc_last  = in_last;
  assign shift      = in_valid && sel && !cap_pend;
  assign scan_si    = in_data[N_SI-1:0];
  assign scan_se    = shift ? grp : '0;
  assign scan_cap   = cap_pend;

  always_comb begin
    comp = '0;
    for (int g = 0; g < N_GRP; g++)
      if (grp[g]) comp = comp ^ scan_so[g];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grp      <= N_GRP'(1);
      cap_pend <= 1'b0;
      c_q      <= 1'b0;
      scnt     <= '0;
    end else begin
      c_q      <= c;
      cap_pend <= 1'b0;
      if (c && !c_q) begin
        grp  <= N_GRP'(1);
        scnt <= '0;
      end else if (shift) begin
        if (scnt >= shift_len - 1'b1) begin
          scnt <= '0;
          grp  <= {grp[N_GRP-2:0], grp[N_GRP-1]};
          if (grp[N_GRP-1]) cap_pend <= 1'b1;
        end else begin
          scnt <= scnt + 1'b1;
        end
      end
    end
  end

  misr #(.W(N_SI)) u_misr (
    .clk(clk), .rst_n(rst_n), .clr(c && !c_q), .en(shift),
    .d(comp), .xmask(xmask), .sig(sig)
  );

  resp_inject #(.W(N_SI)) u_out (
    .clk(clk), .rst_n(rst_n), .my_addr(my_addr), .ate_addr(ate_addr),
    .e(e), .en(c), .sig(sig),
    .pin_valid(pin_valid), .pin_flit(pin_flit), .pin_ready(pin_ready),
    .inj_valid(inj_valid), .inj_flit(inj_flit), .inj_ready(inj_ready),
    .resp_done(resp_done)
  );

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(grp));

endmodule
