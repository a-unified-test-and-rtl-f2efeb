// mcast_node_ctrl: test-packet handler of one network node.
//
// A test packet carries in its header flits the dimension-ordered chain of the
// nodes it must still reach; the node that receives it is a member of that
// chain. The controller reads the packet from the consumption buffer into a
// local packet store, finds its own position in the chain, and then runs the
// recursive multicast one unicast step at a time (mcast_split): in each step it
// sends one copy of the packet, carrying the handed-over part of the chain, to
// the member that takes that part over, and keeps the other part. When its part
// has shrunk to itself the multicast duty is over, and:
//   - a core test packet (PT_CORE_TEST) is streamed to the core's DFT logic;
//   - a router test packet travelling among fault-free routers (PT_RT_MCAST) is
//     sent on in one last unicast (PT_RT_FINAL) to the router under test that
//     this node serves, named in its chain entry.
// Operational packets (PT_OPER and anything else) go unchanged to the processor
// side, with dft_test = 0.
//
// Forwarding comes before local application so the copies leave as early as
// possible; the node keeps the packet until all its copies are out, as the
// document requires of the consumption side. The packet store, the header
// layout (noctest_pkg) and this order are this design's choices.
//
// Interfaces: valid/ready streams. cin_* from the consumption buffer, inj_* to
// the injection buffer (whole packets, head and tail marked), dft_* to the DFT
// logic (one flit per transfer, dft_last on the last flit of a packet).
// A packet of H chain flits and P payload flits is read in 1+H+P cycles and
// each copy takes 1+h+P cycles to send, h being the chain flits of that copy.
module mcast_node_ctrl
  import noctest_pkg::*;
#(
  parameter int MAX_CHAIN = 64,
  parameter int MAX_PAY   = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  addr_t             my_addr,
  // consumption side
  input  logic              cin_valid,
  input  flit_t             cin_flit,
  output logic              cin_ready,
  // injection side
  output logic              inj_valid,
  output flit_t             inj_flit,
  input  logic              inj_ready,
  // towards the DFT logic / processor
  output logic              dft_valid,
  output logic [FLIT_W-1:0] dft_data,
  output logic              dft_test,
  output logic              dft_last,
  input  logic              dft_ready,
  // statistics
  output logic [15:0]       n_forwarded
);
  localparam int IW = 8;
  localparam int PW = $clog2(MAX_PAY + 1);

  typedef enum logic [3:0] {
    S_HDR, S_OPER, S_CHAIN, S_PAY, S_STEP, S_EH, S_EC, S_EP, S_RH, S_RP, S_APPLY
  } state_e;

  state_e             st;
  hdr_t               hdr;
  entry_t             chain [MAX_CHAIN];
  logic [FLIT_W-1:0]  pay   [MAX_PAY];
  logic [IW-1:0]      lo, hi, pos, tgt, tlo, thi;
  logic [IW-1:0]      cidx;          // chain flit counter (read and emit)
  logic [PW-1:0]      npay, pidx;
  logic               sp_active;
  logic [IW-1:0]      sp_target, sp_tlo, sp_thi, sp_nlo, sp_nhi;
  logic [IW-1:0]      nflits_in, m, mflits;
  entry_t             e0, e1;
  hdr_t               in_hdr;
  entry_t             in_e0, in_e1;

  mcast_split #(.IW(IW)) u_split (
    .lo(lo), .hi(hi), .p(pos),
    .active(sp_active), .target(sp_target),
    .t_lo(sp_tlo), .t_hi(sp_thi), .n_lo(sp_nlo), .n_hi(sp_nhi)
  );

  assign in_hdr    = hdr_t'(cin_flit.data);
  assign in_e0     = cin_flit.data[15:0];
  assign in_e1     = cin_flit.data[31:16];
  assign nflits_in = (hdr.nchain + 1'b1) >> 1;
  assign m         = thi - tlo + 1'b1;
  assign mflits    = (m + 1'b1) >> 1;

  // chain entries of the copy being sent
  always_comb begin
    e0 = '0;
    e1 = '0;
    if (tlo + 2 * cidx <= thi)        e0 = chain[tlo + 2 * cidx];
    if (tlo + 2 * cidx + 1'b1 <= thi) e1 = chain[tlo + 2 * cidx + 1'b1];
  end

  always_comb begin
    cin_ready = 1'b0;
    inj_valid = 1'b0;
    inj_flit  = '0;
    dft_valid = 1'b0;
    dft_data  = cin_flit.data;
    dft_test  = 1'b0;
    dft_last  = cin_flit.tail;
    unique case (st)
      S_HDR: begin
        if (in_hdr.ptype == PT_CORE_TEST || in_hdr.ptype == PT_RT_MCAST) begin
          cin_ready = 1'b1;
        end else begin
          dft_valid = cin_valid;
          cin_ready = dft_ready;
        end
      end
      S_OPER: begin
        dft_valid = cin_valid;
        cin_ready = dft_ready;
      end
      S_CHAIN, S_PAY: cin_ready = 1'b1;
      S_EH: begin
        inj_valid     = 1'b1;
        inj_flit.head = 1'b1;
        inj_flit.tail = (mflits == '0) && (npay == '0);
        inj_flit.data = mk_hdr(hdr.ptype, chain[tgt].node, m, my_addr);
      end
      S_EC: begin
        inj_valid     = 1'b1;
        inj_flit.tail = (cidx == mflits - 1'b1) && (npay == '0);
        inj_flit.data = {e1, e0};
      end
      S_EP, S_RP: begin
        inj_valid     = 1'b1;
        inj_flit.tail = (pidx == npay - 1'b1);
        inj_flit.data = pay[pidx];
      end
      S_RH: begin
        inj_valid     = 1'b1;
        inj_flit.head = 1'b1;
        inj_flit.tail = (npay == '0);
        inj_flit.data = mk_hdr(PT_RT_FINAL, chain[pos].rut, 8'd0, my_addr);
      end
      S_APPLY: begin
        dft_valid = 1'b1;
        dft_data  = pay[pidx];
        dft_test  = 1'b1;
        dft_last  = (pidx == npay - 1'b1);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (st == S_CHAIN && cin_valid) begin
      chain[2 * cidx]        <= cin_flit.data[15:0];
      chain[2 * cidx + 1'b1] <= cin_flit.data[31:16];
    end
    if (st == S_PAY && cin_valid && npay != PW'(MAX_PAY)) pay[PW'(npay)] <= cin_flit.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_HDR;
      hdr         <= '0;
      lo          <= '0;
      hi          <= '0;
      pos         <= '0;
      tgt         <= '0;
      tlo         <= '0;
      thi         <= '0;
      cidx        <= '0;
      npay        <= '0;
      pidx        <= '0;
      n_forwarded <= '0;
    end else begin
      unique case (st)
        S_HDR: if (cin_valid && cin_ready) begin
          hdr  <= in_hdr;
          cidx <= '0;
          npay <= '0;
          pos  <= '0;
          lo   <= '0;
          hi   <= (in_hdr.nchain == 0) ? '0 : in_hdr.nchain - 1'b1;
          if (in_hdr.ptype == PT_CORE_TEST || in_hdr.ptype == PT_RT_MCAST)
            st <= cin_flit.tail ? S_STEP : (in_hdr.nchain == 0 ? S_PAY : S_CHAIN);
          else if (!cin_flit.tail)
            st <= S_OPER;
        end
        S_OPER: if (cin_valid && cin_ready && cin_flit.tail) st <= S_HDR;
        S_CHAIN: if (cin_valid) begin
          if (in_e0.node == my_addr) pos <= 2 * cidx;
          if (in_e1.node == my_addr && 2 * cidx + 1'b1 < hdr.nchain) pos <= 2 * cidx + 1'b1;
          cidx <= cidx + 1'b1;
          if (cin_flit.tail)                     st <= S_STEP;
          else if (cidx == nflits_in - 1'b1)     st <= S_PAY;
        end
        S_PAY: if (cin_valid) begin
          if (npay != PW'(MAX_PAY)) npay <= npay + 1'b1;
          if (cin_flit.tail) st <= S_STEP;
        end
        S_STEP: begin
          cidx <= '0;
          pidx <= '0;
          if (sp_active) begin
            tgt <= sp_target;
            tlo <= sp_tlo;
            thi <= sp_thi;
            lo  <= sp_nlo;
            hi  <= sp_nhi;
            st  <= S_EH;
          end else if (hdr.ptype == PT_RT_MCAST) begin
            st <= S_RH;
          end else begin
            st <= (npay == '0) ? S_HDR : S_APPLY;
          end
        end
        S_EH: if (inj_ready) begin
          n_forwarded <= n_forwarded + 1'b1;
          st <= (mflits != '0) ? S_EC : (npay != '0 ? S_EP : S_STEP);
        end
        S_EC: if (inj_ready) begin
          cidx <= cidx + 1'b1;
          if (cidx == mflits - 1'b1) st <= (npay != '0) ? S_EP : S_STEP;
        end
        S_EP: if (inj_ready) begin
          pidx <= pidx + 1'b1;
          if (pidx == npay - 1'b1) st <= S_STEP;
        end
        S_RH: if (inj_ready) begin
          n_forwarded <= n_forwarded + 1'b1;
          pidx <= '0;
          st   <= (npay != '0) ? S_RP : S_HDR;
        end
        S_RP: if (inj_ready) begin
          pidx <= pidx + 1'b1;
          if (pidx == npay - 1'b1) st <= S_HDR;
        end
        S_APPLY: if (dft_ready) begin
          pidx <= pidx + 1'b1;
          if (pidx == npay - 1'b1) st <= S_HDR;
        end
        default: st <= S_HDR;
      endcase
    end
  end

endmodule
