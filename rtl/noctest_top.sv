// noctest_top: test logic of a NX x NY mesh network-on-chip.
//
// The chip is tested in one flow: first the links, by the link BIST of every
// router; then the routers, session by session, with test packets multicast
// among routers already known to be fault-free and handed on in a last unicast
// step to the routers under test; then the cores, class by class, with test
// packets multicast to all cores of the class over every working router and
// link. Every node carries the same test logic (noctest_node): consumption and
// injection buffers, the multicast controller that works out its own share of
// the multicast tree from the chain in the packet header, the core and router
// DFT logic with their MISRs, and the link BIST.
//
// This module places NX*NY nodes, gives node (x, y) the address {x, y}, and
// enables the link BIST only on ports that have a neighbour, so corner routers
// have two ports, edge routers three and inner routers four. The k class pins
// (class_c, at most four classes) select which class of cores is under test;
// node_class says which pin each core listens to. Pin e asks every unit under
// test for its signature. rt_test and tport pick the routers under test of a
// session and the port their test data arrive on. Routers of equal degree are
// identical and share one scan length (rt_shift_len), cores of one class share
// theirs (core_shift_len).
//
// The routers' switches and routing, the links between routers, the tester
// and the scan chains of cores and routers lie outside the test logic and are
// brought out as per-node ports (flattened arrays indexed by node n = y*NX+x).
// Defaults: 8x8 mesh with the tester at node (3,0), as in the document's
// example; 32-bit flits; three-packet buffers.
module noctest_top
  import noctest_pkg::*;
#(
  parameter int NX        = 8,
  parameter int NY        = 8,
  parameter int ATE_X     = 3,
  parameter int ATE_Y     = 0,
  parameter int NCLASS    = 4,
  parameter int MAX_CHAIN = 64,
  parameter int MAX_PAY   = 16,
  parameter int N_SI      = 32,
  parameter int N_GRP     = 4,
  parameter int RT_D      = 32,
  parameter int RT_CW     = 32,
  localparam int NN       = NX * NY
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // global test pins
  input  logic [NCLASS-1:0]           class_c,
  input  logic                        e,
  input  logic                        bist_start,
  input  logic [NN-1:0][1:0]          node_class,
  input  logic [NN-1:0]               rt_test,
  input  logic [NN-1:0][1:0]          tport,
  input  logic [N_SI-1:0]             core_xmask,
  input  logic [RT_D-1:0]             rt_xmask,
  input  logic [NCLASS-1:0][15:0]     core_shift_len,   // scan length of each core class
  input  logic [2:0][15:0]            rt_shift_len,     // scan length of 2-, 3-, 4-port routers
  // network side of each node's buffers
  input  logic [NN-1:0]               net_in_valid,
  input  flit_t [NN-1:0]              net_in_flit,
  output logic [NN-1:0]               net_in_ready,
  output logic [NN-1:0]               net_out_valid,
  output flit_t [NN-1:0]              net_out_flit,
  input  logic [NN-1:0]               net_out_ready,
  // processors
  output logic [NN-1:0]               proc_valid,
  output logic [NN-1:0][FLIT_W-1:0]   proc_data,
  output logic [NN-1:0]               proc_last,
  input  logic [NN-1:0]               proc_ready,
  input  logic [NN-1:0]               pin_valid,
  input  flit_t [NN-1:0]              pin_flit,
  output logic [NN-1:0]               pin_ready,
  // scan chains
  output logic [NN-1:0][N_SI-1:0]             core_si,
  output logic [NN-1:0][N_GRP-1:0]            core_se,
  output logic [NN-1:0]                       core_cap,
  input  logic [NN-1:0][N_GRP-1:0][N_SI-1:0]  core_so,
  output logic [NN-1:0][RT_D-1:0]             rt_si,
  output logic [NN-1:0]                       rt_se,
  output logic [NN-1:0]                       rt_cap,
  input  logic [NN-1:0][RT_D-1:0]             rt_so,
  input  logic [NN-1:0][RT_CW-1:0]            rt_comb,
  // links
  input  logic [NN-1:0][NPORT-1:0]    lk_rx_valid,
  input  flit_t [NN-1:0][NPORT-1:0]   lk_rx_flit,
  output logic [NN-1:0][NPORT-1:0]    lk_rx_ready,
  output logic [NN-1:0][NPORT-1:0]    lk_tx_valid,
  output flit_t [NN-1:0][NPORT-1:0]   lk_tx_flit,
  input  logic [NN-1:0][NPORT-1:0]    lk_tx_ready,
  // switches
  output logic [NN-1:0][NPORT-1:0]    sw_in_valid,
  output flit_t [NN-1:0][NPORT-1:0]   sw_in_flit,
  input  logic [NN-1:0][NPORT-1:0]    sw_in_ready,
  input  logic [NN-1:0][NPORT-1:0]    sw_out_valid,
  input  flit_t [NN-1:0][NPORT-1:0]   sw_out_flit,
  output logic [NN-1:0][NPORT-1:0]    sw_out_ready,
  // status
  output logic [NN-1:0]               bist_done,
  output logic [NN-1:0][NPORT-1:0]    link_fault,
  output logic [NN-1:0][N_SI-1:0]     core_sig,
  output logic [NN-1:0][RT_D-1:0]     rt_sig,
  output logic [NN-1:0]               core_resp_done,
  output logic [NN-1:0]               rt_resp_done,
  output logic [NN-1:0][15:0]         n_forwarded
);
  localparam addr_t ATE_ADDR = addr_t'((ATE_X << 4) | ATE_Y);

  for (genvar y = 0; y < NY; y++) begin : g_row
    for (genvar x = 0; x < NX; x++) begin : g_col
      localparam int N = y * NX + x;
      localparam logic [NPORT-1:0] PEN = {y > 0, y < NY - 1, x > 0, x < NX - 1};
      localparam int DEG = $countones(PEN);

      noctest_node #(
        .MAX_CHAIN(MAX_CHAIN), .MAX_PAY(MAX_PAY), .BUF_PKTS(3),
        .N_SI(N_SI), .N_GRP(N_GRP), .RT_D(RT_D), .RT_CW(RT_CW)
      ) u_node (
        .clk(clk), .rst_n(rst_n),
        .my_addr(addr_t'((x << 4) | y)), .ate_addr(ATE_ADDR),
        .core_c(class_c[32'(node_class[N]) % NCLASS]), .e(e),
        .rt_test(rt_test[N]), .tport(tport[N]),
        .bist_start(bist_start), .port_en(PEN),
        .core_xmask(core_xmask), .rt_xmask(rt_xmask),
        .core_shift_len(core_shift_len[32'(node_class[N]) % NCLASS]),
        .rt_shift_len(rt_shift_len[(DEG < 2) ? 0 : DEG - 2]),
        .net_in_valid(net_in_valid[N]), .net_in_flit(net_in_flit[N]),
        .net_in_ready(net_in_ready[N]),
        .net_out_valid(net_out_valid[N]), .net_out_flit(net_out_flit[N]),
        .net_out_ready(net_out_ready[N]),
        .proc_valid(proc_valid[N]), .proc_data(proc_data[N]), .proc_last(proc_last[N]),
        .proc_ready(proc_ready[N]),
        .pin_valid(pin_valid[N]), .pin_flit(pin_flit[N]), .pin_ready(pin_ready[N]),
        .core_si(core_si[N]), .core_se(core_se[N]), .core_cap(core_cap[N]),
        .core_so(core_so[N]),
        .rt_si(rt_si[N]), .rt_se(rt_se[N]), .rt_cap(rt_cap[N]), .rt_so(rt_so[N]),
        .rt_comb(rt_comb[N]),
        .lk_rx_valid(lk_rx_valid[N]), .lk_rx_flit(lk_rx_flit[N]), .lk_rx_ready(lk_rx_ready[N]),
        .lk_tx_valid(lk_tx_valid[N]), .lk_tx_flit(lk_tx_flit[N]), .lk_tx_ready(lk_tx_ready[N]),
        .sw_in_valid(sw_in_valid[N]), .sw_in_flit(sw_in_flit[N]), .sw_in_ready(sw_in_ready[N]),
        .sw_out_valid(sw_out_valid[N]), .sw_out_flit(sw_out_flit[N]),
        .sw_out_ready(sw_out_ready[N]),
        .bist_done(bist_done[N]), .link_fault(link_fault[N]),
        .core_sig(core_sig[N]), .rt_sig(rt_sig[N]), .core_grp(),
        .core_resp_done(core_resp_done[N]), .rt_resp_done(rt_resp_done[N]),
        .n_forwarded(n_forwarded[N])
      );
    end
  end

endmodule
