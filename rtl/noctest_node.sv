// noctest_node: all test logic of one mesh node (router plus core).
//
// Packets from the network enter the consumption buffer; the multicast
// controller takes test packets from it, sends the copies that continue the
// multicast, forwards router-test packets to the router under test that this
// node serves, and passes core test data to the core's DFT logic. Operational
// packets reach the processor through the same path. On the way out, the
// processor's packets pass the core's response multiplexer (pin e) and the
// router's response multiplexer (Fig. 7 type), and share the injection buffer
// with the controller's copies; a packet-level round-robin arbiter keeps
// packets whole. The link BIST drives the outgoing links while it runs and
// checks the incoming ones; otherwise the links carry the switch's traffic,
// and the incoming links pass through the router's DFT demultiplexers to the
// switch. The switch, its routing and the scan chains are outside this logic
// and appear as ports.
//
// Port order of the four link ports: 0 = x+, 1 = x-, 2 = y+, 3 = y-.
// Buffers hold three packets each, as in the evaluated network. The packet
// arbitration and the link multiplexing are this design's choices.
module noctest_node
  import noctest_pkg::*;
#(
  parameter int MAX_CHAIN = 64,
  parameter int MAX_PAY   = 16,
  parameter int BUF_PKTS  = 3,
  parameter int N_SI      = 32,
  parameter int N_GRP     = 4,
  parameter int RT_D      = 32,
  parameter int RT_CW     = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  addr_t                       my_addr,
  input  addr_t                       ate_addr,
  // test control pins
  input  logic                        core_c,
  input  logic                        e,
  input  logic                        rt_test,
  input  logic [1:0]                  tport,
  input  logic                        bist_start,
  input  logic [NPORT-1:0]            port_en,
  input  logic [N_SI-1:0]             core_xmask,
  input  logic [RT_D-1:0]             rt_xmask,
  input  logic [15:0]                 core_shift_len,
  input  logic [15:0]                 rt_shift_len,
  // network side of the buffers
  input  logic                        net_in_valid,
  input  flit_t                       net_in_flit,
  output logic                        net_in_ready,
  output logic                        net_out_valid,
  output flit_t                       net_out_flit,
  input  logic                        net_out_ready,
  // processor
  output logic                        proc_valid,
  output logic [FLIT_W-1:0]           proc_data,
  output logic                        proc_last,
  input  logic                        proc_ready,
  input  logic                        pin_valid,
  input  flit_t                       pin_flit,
  output logic                        pin_ready,
  // core scan chains
  output logic [N_SI-1:0]             core_si,
  output logic [N_GRP-1:0]            core_se,
  output logic                        core_cap,
  input  logic [N_GRP-1:0][N_SI-1:0]  core_so,
  // router scan chains
  output logic [RT_D-1:0]             rt_si,
  output logic                        rt_se,
  output logic                        rt_cap,
  input  logic [RT_D-1:0]             rt_so,
  input  logic [RT_CW-1:0]            rt_comb,
  // links
  input  logic [NPORT-1:0]            lk_rx_valid,
  input  flit_t [NPORT-1:0]           lk_rx_flit,
  output logic [NPORT-1:0]            lk_rx_ready,
  output logic [NPORT-1:0]            lk_tx_valid,
  output flit_t [NPORT-1:0]           lk_tx_flit,
  input  logic [NPORT-1:0]            lk_tx_ready,
  // switch side
  output logic [NPORT-1:0]            sw_in_valid,
  output flit_t [NPORT-1:0]           sw_in_flit,
  input  logic [NPORT-1:0]            sw_in_ready,
  input  logic [NPORT-1:0]            sw_out_valid,
  input  flit_t [NPORT-1:0]           sw_out_flit,
  output logic [NPORT-1:0]            sw_out_ready,
  // status
  output logic                        bist_done,
  output logic [NPORT-1:0]            link_fault,
  output logic [N_SI-1:0]             core_sig,
  output logic [RT_D-1:0]             rt_sig,
  output logic [N_GRP-1:0]            core_grp,
  output logic                        core_resp_done,
  output logic                        rt_resp_done,
  output logic [15:0]                 n_forwarded
);
  localparam int MAX_FLITS = 1 + (MAX_CHAIN + 1) / 2 + MAX_PAY;

  // consumption buffer -> controller
  logic  c_valid, c_ready;
  flit_t c_flit;
  packet_buffer #(.PKTS(BUF_PKTS), .MAX_FLITS(MAX_FLITS)) u_cbuf (
    .clk(clk), .rst_n(rst_n),
    .in_valid(net_in_valid), .in_flit(net_in_flit), .in_ready(net_in_ready),
    .out_valid(c_valid), .out_flit(c_flit), .out_ready(c_ready),
    .npkts()
  );

  logic              a_valid, a_ready;       // controller copies
  flit_t             a_flit;
  logic              d_valid, d_test, d_last, d_ready;
  logic [FLIT_W-1:0] d_data;
  mcast_node_ctrl #(.MAX_CHAIN(MAX_CHAIN), .MAX_PAY(MAX_PAY)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .my_addr(my_addr),
    .cin_valid(c_valid), .cin_flit(c_flit), .cin_ready(c_ready),
    .inj_valid(a_valid), .inj_flit(a_flit), .inj_ready(a_ready),
    .dft_valid(d_valid), .dft_data(d_data), .dft_test(d_test), .dft_last(d_last),
    .dft_ready(d_ready), .n_forwarded(n_forwarded)
  );

  // core DFT: processor packets -> core response mux
  logic  k_valid, k_ready;
  flit_t k_flit;
  core_dft #(.N_SI(N_SI), .N_GRP(N_GRP)) u_core (
    .clk(clk), .rst_n(rst_n), .my_addr(my_addr), .ate_addr(ate_addr),
    .c(core_c), .e(e), .xmask(core_xmask), .shift_len(core_shift_len),
    .in_valid(d_valid), .in_data(d_data), .in_test(d_test), .in_last(d_last),
    .in_ready(d_ready),
    .proc_valid(proc_valid), .proc_data(proc_data), .proc_last(proc_last),
    .proc_ready(proc_ready),
    .pin_valid(pin_valid), .pin_flit(pin_flit), .pin_ready(pin_ready),
    .inj_valid(k_valid), .inj_flit(k_flit), .inj_ready(k_ready),
    .scan_si(core_si), .scan_se(core_se), .scan_cap(core_cap), .scan_so(core_so),
    .grp(core_grp), .sig(core_sig), .resp_done(core_resp_done)
  );

  // link BIST shares the links with the switch
  logic              bist_busy, bist_tx_valid;
  logic [FLIT_W-1:0] bist_tx_data;
  logic [NPORT-1:0]  r_valid;
  logic [NPORT-1:0][FLIT_W-1:0] rx_data;
  link_bist #(.NP(NPORT), .W(FLIT_W)) u_bist (
    .clk(clk), .rst_n(rst_n), .start(bist_start), .port_en(port_en),
    .tx_valid(bist_tx_valid), .tx_data(bist_tx_data),
    .rx_valid(lk_rx_valid & {NPORT{bist_busy}}), .rx_data(rx_data),
    .busy(bist_busy), .done(bist_done), .fault(link_fault)
  );

  always_comb begin
    for (int q = 0; q < NPORT; q++) begin
      rx_data[q] = lk_rx_flit[q].data;
      if (bist_busy) begin
        lk_tx_valid[q]  = bist_tx_valid && port_en[q];
        lk_tx_flit[q]   = '{head: 1'b0, tail: 1'b0, data: bist_tx_data};
        sw_out_ready[q] = 1'b0;
      end else begin
        lk_tx_valid[q]  = sw_out_valid[q];
        lk_tx_flit[q]   = sw_out_flit[q];
        sw_out_ready[q] = lk_tx_ready[q];
      end
    end
  end

  // router DFT: core output -> router response mux
  logic  b_valid, b_ready;
  flit_t b_flit;
  logic [NPORT-1:0] r_ready;
  assign r_valid     = bist_busy ? '0 : lk_rx_valid;
  assign lk_rx_ready = bist_busy ? '1 : r_ready;
  router_dft #(.NP(NPORT), .D(RT_D), .CW(RT_CW)) u_rdft (
    .clk(clk), .rst_n(rst_n), .my_addr(my_addr), .ate_addr(ate_addr),
    .rt_test(rt_test), .tport(tport), .e(e), .xmask(rt_xmask),
    .shift_len(rt_shift_len),
    .lin_valid(r_valid), .lin_flit(lk_rx_flit), .lin_ready(r_ready),
    .sw_valid(sw_in_valid), .sw_flit(sw_in_flit), .sw_ready(sw_in_ready),
    .scan_si(rt_si), .scan_se(rt_se), .scan_cap(rt_cap), .scan_so(rt_so),
    .comb_out(rt_comb),
    .pin_valid(k_valid), .pin_flit(k_flit), .pin_ready(k_ready),
    .inj_valid(b_valid), .inj_flit(b_flit), .inj_ready(b_ready),
    .sig(rt_sig), .resp_done(rt_resp_done)
  );

  // packet arbiter in front of the injection buffer
  logic  locked, owner, pick, i_valid, i_ready, last_owner;
  flit_t i_flit;
  always_comb begin
    if (locked)                  pick = owner;
    else if (a_valid && b_valid) pick = !last_owner;
    else                         pick = b_valid;
    i_valid = pick ? b_valid : a_valid;
    i_flit  = pick ? b_flit  : a_flit;
    a_ready = !pick && i_ready;
    b_ready =  pick && i_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked     <= 1'b0;
      owner      <= 1'b0;
      last_owner <= 1'b1;
    end else if (i_valid && i_ready) begin
      locked     <= !i_flit.tail;
      owner      <= pick;
      if (i_flit.tail) last_owner <= pick;
    end
  end

  packet_buffer #(.PKTS(BUF_PKTS), .MAX_FLITS(MAX_FLITS)) u_ibuf (
    .clk(clk), .rst_n(rst_n),
    .in_valid(i_valid), .in_flit(i_flit), .in_ready(i_ready),
    .out_valid(net_out_valid), .out_flit(net_out_flit), .out_ready(net_out_ready),
    .npkts()
  );

endmodule
