// resp_inject: the multiplexer in front of the injection port of a router or a
// core, which chooses between the processor's operational packets and the
// compacted test response.
//
// A rising edge of the response pin e, while this unit's router or core is under
// test (en = 1), schedules one response packet: a header addressed to the
// tester followed by one flit that holds the MISR signature. It is sent as soon
// as no operational packet is half-way through the multiplexer, so packets are
// never interleaved. Otherwise the processor's flits pass straight through.
// The signature goes back only once per session, after all test packets, as
// the document describes; the packet format is this design's choice.
// Interface: valid/ready streams, a transfer when both are 1; resp_done pulses
// in the cycle the signature flit leaves.
module resp_inject
  import noctest_pkg::*;
#(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  addr_t        my_addr,
  input  addr_t        ate_addr,
  input  logic         e,
  input  logic         en,
  input  logic [W-1:0] sig,
  input  logic         pin_valid,
  input  flit_t        pin_flit,
  output logic         pin_ready,
  output logic         inj_valid,
  output flit_t        inj_flit,
  input  logic         inj_ready,
  output logic         resp_done
);
  typedef enum logic [1:0] { R_IDLE, R_HEAD, R_SIG } rstate_e;

  rstate_e st;
  logic    e_q, pend, pin_mid;

  always_comb begin
    pin_ready = 1'b0;
    inj_valid = 1'b0;
    inj_flit  = pin_flit;
    resp_done = 1'b0;
    unique case (st)
      R_HEAD: begin
        inj_valid = 1'b1;
        inj_flit  = '{head: 1'b1, tail: 1'b0, data: mk_hdr(PT_RESP, ate_addr, 8'd0, my_addr)};
      end
      R_SIG: begin
        inj_valid = 1'b1;
        inj_flit  = '{head: 1'b0, tail: 1'b1, data: FLIT_W'(sig)};
        resp_done = inj_ready;
      end
      default: begin
        if (!(pend && !pin_mid)) begin
          inj_valid = pin_valid;
          pin_ready = inj_ready;
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= R_IDLE;
      e_q     <= 1'b0;
      pend    <= 1'b0;
      pin_mid <= 1'b0;
    end else begin
      e_q <= e;
      if (e && !e_q && en) pend <= 1'b1;
      if (pin_valid && pin_ready) pin_mid <= !pin_flit.tail;
      unique case (st)
        R_IDLE: if (pend && !pin_mid) begin
          st   <= R_HEAD;
          pend <= 1'b0;
        end
        R_HEAD: if (inj_ready) st <= R_SIG;
        R_SIG:  if (inj_ready) st <= R_IDLE;
        default: st <= R_IDLE;
      endcase
    end
  end

endmodule
