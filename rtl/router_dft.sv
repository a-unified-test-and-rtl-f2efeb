// router_dft: design-for-test logic of one router (test data arrive on a link).
//
// A router under test receives its test packets on one input port, from the
// neighbouring fault-free router that delivers them in the last unicast step,
// so the packets never cross the switch of the router being tested. Each of
// the NP input ports has a demultiplexer: normally the port's flits go to the
// switch; when the router is under test (rt_test) the port selected by tport
// is cut off from the switch and a multiplexer routes its flits to the scan
// chains instead. The header flit of a test packet is dropped; every payload
// flit is one shift of D scan chains (bit i of the flit feeds chain i), and
// every shift_len shifts (the router's longest chain) are followed by one
// capture cycle, whatever the packet boundaries. Scan-outs are
// compacted in a MISR during shifting, and the router's other combinational
// outputs (comb_out) are compacted in it during the capture cycle. A rising
// edge of e makes resp_inject send the signature to the tester through the
// injection port, whose other input carries the processor's packets.
//
// From the document: the four port demultiplexers, the multiplexer feeding up
// to d = 32 scan chains, the MISR fed by scan-outs and by the other
// combinational outputs, the injection multiplexer. This design's choices:
// the port select input, one shift per payload flit, the shift counter,
// MISR cleared when rt_test rises.
// Interface: valid/ready streams on every port; scan_se/scan_cap are single
// cycle strobes for the router's scan chains.
module router_dft
  import noctest_pkg::*;
#(
  parameter int NP = 4,
  parameter int D  = 32,
  parameter int CW = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  addr_t                  my_addr,
  input  addr_t                  ate_addr,
  input  logic                   rt_test,
  input  logic [$clog2(NP)-1:0]  tport,
  input  logic                   e,
  input  logic [D-1:0]           xmask,
  input  logic [15:0]            shift_len,
  // link input ports
  input  logic [NP-1:0]          lin_valid,
  input  flit_t [NP-1:0]         lin_flit,
  output logic [NP-1:0]          lin_ready,
  // towards the switch
  output logic [NP-1:0]          sw_valid,
  output flit_t [NP-1:0]         sw_flit,
  input  logic [NP-1:0]          sw_ready,
  // scan chains of the router
  output logic [D-1:0]           scan_si,
  output logic                   scan_se,
  output logic                   scan_cap,
  input  logic [D-1:0]           scan_so,
  input  logic [CW-1:0]          comb_out,
  // processor packets and injection port
  input  logic                   pin_valid,
  input  flit_t                  pin_flit,
  output logic                   pin_ready,
  output logic                   inj_valid,
  output flit_t                  inj_flit,
  input  logic                   inj_ready,
  // status
  output logic [D-1:0]           sig,
  output logic                   resp_done
);
  logic          tv, cap_pend, rt_q;
  flit_t         tf;
  logic [D-1:0]  comb_fold, md;
  logic [15:0]   scnt;

  // demultiplexers at the input ports
  always_comb begin
    for (int q = 0; q < NP; q++) begin
      if (rt_test && 32'(tport) == q) begin
        sw_valid[q]  = 1'b0;
        lin_ready[q] = !cap_pend;
      end else begin
        sw_valid[q]  = lin_valid[q];
        lin_ready[q] = sw_ready[q];
      end
    end
  end
  assign sw_flit = lin_flit;

  // multiplexer towards the scan chains
  assign tf       = lin_flit[tport];
  assign tv       = rt_test && lin_valid[tport] && !cap_pend;
  assign scan_se  = tv && !tf.head;
  assign scan_si  = tf.data[D-1:0];
  assign scan_cap = cap_pend;

  always_comb begin
    comb_fold = '0;
    for (int b = 0; b < CW; b++) comb_fold[b % D] = comb_fold[b % D] ^ comb_out[b];
  end
  assign md = cap_pend ? comb_fold : scan_so;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_pend <= 1'b0;
      rt_q     <= 1'b0;
      scnt     <= '0;
    end else begin
      rt_q     <= rt_test;
      cap_pend <= 1'b0;
      if (rt_test && !rt_q) begin
        scnt <= '0;
      end else if (scan_se) begin
        if (scnt >= shift_len - 1'b1) begin
          scnt     <= '0;
          cap_pend <= 1'b1;
        end else begin
          scnt <= scnt + 1'b1;
        end
      end
    end
  end

  misr #(.W(D)) u_misr (
    .clk(clk), .rst_n(rst_n), .clr(rt_test && !rt_q), .en(scan_se || cap_pend),
    .d(md), .xmask(xmask), .sig(sig)
  );

  resp_inject #(.W(D)) u_out (
    .clk(clk), .rst_n(rst_n), .my_addr(my_addr), .ate_addr(ate_addr),
    .e(e), .en(rt_test), .sig(sig),
    .pin_valid(pin_valid), .pin_flit(pin_flit), .pin_ready(pin_ready),
    .inj_valid(inj_valid), .inj_flit(inj_flit), .inj_ready(inj_ready),
    .resp_done(resp_done)
  );

endmodule
