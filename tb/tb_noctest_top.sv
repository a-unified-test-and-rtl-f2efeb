// tb_noctest_top: end-to-end test of the 8x8 mesh test logic at its default
// size, with the tester at node (3,0).
//
// The testbench models what lies outside the test logic: the links between
// routers (five of them defective), an ideal network that delivers each
// packet ten cycles after its tail left the injection buffer (the routing
// algorithm itself is not modelled), the tester, and the scan chains of cores
// and routers (capture inverts and rotates each chain). It runs the whole
// flow:
//   1. link BIST on every router: the fault map must name exactly the ten
//      link ends of the five defective links;
//   2. one router test session: six routers under test, (1,3) (2,4) (3,3)
//      (4,5) (5,3) (6,2), served by the fault-free routers (1,2) (2,3) (3,2)
//      (4,4) (5,2) (6,1) one row below; the tester sends each packet to (4,4).
//      The first packet must reach every router under test after five unicast
//      steps at most; router (5,3) has a defect and its signature must differ;
//   2b. a second router session for the four 2-port corner routers, served by
//      (1,0) (1,7) (6,0) (6,7): four unicast steps, and routers of other
//      port counts get another scan length meanwhile;
//   2c. a session for 19 of the 3-port edge routers, each served by its
//      inward neighbour: seven unicast steps;
//   3. one core test session for the class of the eight cores (0,1) (2,3)
//      (2,6) (4,4) (5,2) (5,6) (7,1) (7,5); the tester sends each packet to
//      (5,2). The first packet must reach all eight in four unicast steps;
//      every class core gets every packet once, cores of other classes none;
//      core (2,6) has a defect and its signature must differ. Core chains are
//      eight bits long and packets carry four, so each group load spans two
//      packets;
//   3b. a second core session with one class of all 64 cores, the longest
//      chain the node takes, and 49-flit packets that fill a buffer slot;
//      it must take seven unicast steps and every core must return the
//      signature worked out from its own chain contents;
//   4. operational packets: one from the tester to a processor, one from a
//      processor to another.
// Every mechanism is counted and a count of zero is a failure.
module tb_noctest_top;
  import noctest_pkg::*;
  localparam int NX = 8, NY = 8, NN = 64, NS = 32, NG = 4, RD = 32, L = 4, LC = 8, LAT = 10;
  localparam addr_t ATE = 8'h30;
  localparam logic [31:0] POLY = 32'h0040_0007;

  logic clk = 0, rst_n = 1;
  logic [3:0] class_c = '0;
  logic e = 0, bist_start = 0;
  logic [NN-1:0][1:0] node_class;
  logic [NN-1:0] rt_test = '0;
  logic [NN-1:0][1:0] tport;
  logic [NS-1:0] core_xmask = '0;
  logic [RD-1:0] rt_xmask = '0;
  logic [3:0][15:0] core_shift_len = {4{16'(LC)}};
  logic [2:0][15:0] rt_shift_len = {3{16'(L)}};
  logic [NN-1:0] net_in_valid, net_in_ready, net_out_valid, net_out_ready;
  flit_t [NN-1:0] net_in_flit, net_out_flit;
  logic [NN-1:0] proc_valid, proc_last, proc_ready, pin_valid, pin_ready;
  logic [NN-1:0][31:0] proc_data;
  flit_t [NN-1:0] pin_flit;
  logic [NN-1:0][NS-1:0] core_si;
  logic [NN-1:0][NG-1:0] core_se;
  logic [NN-1:0] core_cap;
  logic [NN-1:0][NG-1:0][NS-1:0] core_so;
  logic [NN-1:0][RD-1:0] rt_si, rt_so, rt_comb;
  logic [NN-1:0] rt_se, rt_cap;
  logic [NN-1:0][3:0] lk_rx_valid, lk_rx_ready, lk_tx_valid, lk_tx_ready;
  flit_t [NN-1:0][3:0] lk_rx_flit, lk_tx_flit, sw_in_flit, sw_out_flit;
  logic [NN-1:0][3:0] sw_in_valid, sw_in_ready, sw_out_valid, sw_out_ready;
  logic [NN-1:0] bist_done, core_resp_done, rt_resp_done;
  logic [NN-1:0][3:0] link_fault;
  logic [NN-1:0][NS-1:0] core_sig;
  logic [NN-1:0][RD-1:0] rt_sig;
  logic [NN-1:0][15:0] n_forwarded;

  noctest_top dut (.*);

  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int nid(input int x, input int y);
    return y * NX + x;
  endfunction
  function automatic int nid_a(input addr_t a);
    return nid(int'(a[7:4]), int'(a[3:0]));
  endfunction

  // ---------------------------------------------------------------- links
  // defective links (both directions): node, port, stuck-at-0 wire
  int bad_n[5], bad_q[5], bad_b[5];
  initial begin
    bad_n = '{nid(1,4), nid(4,5), nid(5,5), nid(5,3), nid(3,1)};
    bad_q = '{2, 2, 0, 2, 2};
    bad_b = '{0, 7, 13, 31, 20};
  end
  function automatic int opp(input int q);
    return q ^ 1;
  endfunction
  function automatic int nbr(input int n, input int q);
    int x, y;
    x = n % NX; y = n / NX;
    case (q)
      0: x++;
      1: x--;
      2: y++;
      default: y--;
    endcase
    if (x < 0 || x >= NX || y < 0 || y >= NY) return -1;
    return nid(x, y);
  endfunction

  always_comb begin
    for (int n = 0; n < NN; n++) for (int q = 0; q < 4; q++) begin
      lk_rx_valid[n][q] = 1'b0;
      lk_rx_flit[n][q]  = '0;
      lk_tx_ready[n][q] = 1'b1;
    end
    for (int n = 0; n < NN; n++) for (int q = 0; q < 4; q++) begin
      int m;
      m = nbr(n, q);
      if (m >= 0) begin
        lk_rx_valid[m][opp(q)] = lk_tx_valid[n][q];
        lk_rx_flit[m][opp(q)]  = lk_tx_flit[n][q];
        lk_tx_ready[n][q]      = lk_rx_ready[m][opp(q)];
        for (int k = 0; k < 5; k++) begin
          if ((n == bad_n[k] && q == bad_q[k]) || (m == bad_n[k] && opp(q) == bad_q[k]))
            lk_rx_flit[m][opp(q)].data[bad_b[k]] = 1'b0;
        end
      end
    end
  end

  // ---------------------------------------------------------------- scan chain models
  logic [LC-1:0] cch [NN][NG][NS];
  logic [L-1:0] rch [NN][RD];
  int faulty_core, faulty_rt;
  initial begin
    faulty_core = nid(2,6);
    faulty_rt   = nid(5,3);
    for (int n = 0; n < NN; n++) begin
      for (int g = 0; g < NG; g++) for (int i = 0; i < NS; i++) cch[n][g][i] = '0;
      for (int i = 0; i < RD; i++) rch[n][i] = '0;
    end
  end
  always_comb begin
    for (int n = 0; n < NN; n++) begin
      for (int g = 0; g < NG; g++) for (int i = 0; i < NS; i++) core_so[n][g][i] = cch[n][g][i][LC-1];
      for (int i = 0; i < RD; i++) begin
        rt_so[n][i]   = rch[n][i][L-1];
        rt_comb[n][i] = ^rch[n][i];
      end
      if (n == faulty_rt) rt_comb[n][2] = 1'b1;
    end
  end
  int core_shifts[NN], core_caps[NN], rt_shifts[NN], rt_caps[NN];
  always @(posedge clk) begin
    for (int n = 0; n < NN; n++) begin
      for (int g = 0; g < NG; g++) for (int i = 0; i < NS; i++) begin
        if (core_cap[n]) begin
          cch[n][g][i] <= ~{cch[n][g][i][0], cch[n][g][i][LC-1:1]};
          if (n == faulty_core && g == 1 && i == 9) cch[n][g][i] <= '0;
        end else if (core_se[n][g]) cch[n][g][i] <= {cch[n][g][i][LC-2:0], core_si[n][i]};
      end
      for (int i = 0; i < RD; i++) begin
        if (rt_cap[n]) rch[n][i] <= ~{rch[n][i][0], rch[n][i][L-1:1]};
        else if (rt_se[n]) rch[n][i] <= {rch[n][i][L-2:0], rt_si[n][i]};
      end
      if (core_se[n] != '0) core_shifts[n]++;
      if (core_cap[n]) core_caps[n]++;
      if (rt_se[n]) rt_shifts[n]++;
      if (rt_cap[n]) rt_caps[n]++;
    end
  end

  // ---------------------------------------------------------------- network and tester model
  class Pkt;
    flit_t f[$];
    int    src;
    int    dst;
    int    due;
    int    depth;
  endclass

  Pkt    inflight[$];
  Pkt    act[NN];          // packet being written into a consumption buffer
  int    act_i[NN];
  Pkt    lact[NN];         // router-test packet being sent over a link by node n
  int    lact_i[NN], lact_q[NN];
  flit_t asmb[NN][$];
  int    node_depth[NN], ncopy[NN];
  int    got_core_pkts[NN], got_rt_final[NN];
  int    max_depth = 0;
  int    resp_src[$];
  logic [31:0] resp_sig[$];
  int    activity = 0;
  int    cnt_fwd_copies = 0, cnt_buf_full = 0, cnt_oper = 0, cnt_oper_flits_out = 0;
  logic  track_depth = 1'b0;

  function automatic int port_to(input int s, input int d);
    for (int q = 0; q < 4; q++) if (nbr(s, q) == d) return q;
    return -1;
  endfunction

  // sample at the clock edge
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      if (net_out_valid[n] && net_out_ready[n]) begin
        activity++;
        asmb[n].push_back(net_out_flit[n]);
        if (net_out_flit[n].tail) begin
          Pkt p;
          hdr_t h;
          p = new;
          p.f = asmb[n];
          asmb[n].delete();
          h = p.f[0].data;
          p.src = n;
          p.dst = nid_a(h.dest);
          p.due = cyc + LAT;
          if (h.ptype == PT_CORE_TEST || h.ptype == PT_RT_MCAST || h.ptype == PT_RT_FINAL) begin
            ncopy[n]++;
            p.depth = node_depth[n] + ncopy[n];
            if (h.ptype != PT_RT_FINAL) cnt_fwd_copies++;
          end
          if (h.dest == ATE && h.ptype == PT_RESP) begin
            resp_src.push_back(n);
            resp_sig.push_back(p.f[1].data);
          end else begin
            inflight.push_back(p);
          end
        end
      end
      if (act[n] != null && net_in_valid[n] && net_in_ready[n]) begin
        activity++;
        act_i[n]++;
        if (act_i[n] == act[n].f.size()) begin
          hdr_t h;
          h = act[n].f[0].data;
          if (h.ptype == PT_CORE_TEST || h.ptype == PT_RT_MCAST) begin
            node_depth[n] = act[n].depth;
            ncopy[n] = 0;
            if (track_depth && act[n].depth > max_depth) max_depth = act[n].depth;
          end
          if (h.ptype == PT_CORE_TEST) got_core_pkts[n]++;
          act[n] = null;
        end
      end
      if (act[n] != null && net_in_valid[n] && !net_in_ready[n] && act_i[n] == 0) cnt_buf_full++;
      if (lact[n] != null && sw_out_valid[n][lact_q[n]] && sw_out_ready[n][lact_q[n]]) begin
        activity++;
        lact_i[n]++;
        if (lact_i[n] == lact[n].f.size()) begin
          got_rt_final[nbr(n, lact_q[n])]++;
          if (track_depth && lact[n].depth > max_depth) max_depth = lact[n].depth;
          lact[n] = null;
        end
      end
      if (proc_valid[n] && proc_ready[n]) begin
        activity++;
        cnt_oper_flits_out++;
      end
      if (pin_valid[n] && pin_ready[n]) activity++;
    end
  end

  // drive at the falling edge
  always @(negedge clk) begin
    for (int k = 0; k < inflight.size(); k++) begin
      Pkt p;
      hdr_t h;
      p = inflight[k];
      h = p.f[0].data;
      if (p.due <= cyc) begin
        if (h.ptype == PT_RT_FINAL) begin
          if (lact[p.src] == null) begin
            lact[p.src] = p;
            lact_i[p.src] = 0;
            lact_q[p.src] = port_to(p.src, p.dst);
            inflight.delete(k);
            k--;
          end
        end else if (act[p.dst] == null) begin
          act[p.dst] = p;
          act_i[p.dst] = 0;
          inflight.delete(k);
          k--;
        end
      end
    end
    for (int n = 0; n < NN; n++) begin
      net_in_valid[n] = (act[n] != null);
      net_in_flit[n]  = (act[n] != null) ? act[n].f[act_i[n]] : '0;
      for (int q = 0; q < 4; q++) begin
        sw_out_valid[n][q] = (lact[n] != null) && lact_q[n] == q;
        sw_out_flit[n][q]  = (lact[n] != null) ? lact[n].f[lact_i[n]] : '0;
      end
    end
  end

  task automatic ate_send(input ptype_e t, input addr_t dest, input entry_t ch[$],
                          input logic [31:0] pl[$]);
    Pkt p;
    p = new;
    p.f.push_back('{1'b1, 1'b0, mk_hdr(t, dest, 8'(ch.size()), ATE)});
    for (int i = 0; i < ch.size(); i += 2)
      p.f.push_back('{1'b0, 1'b0, {(i + 1 < ch.size()) ? ch[i + 1] : 16'h0, ch[i]}});
    foreach (pl[i]) p.f.push_back('{1'b0, 1'b0, pl[i]});
    p.f[p.f.size() - 1].tail = 1'b1;
    p.src = -1;
    p.dst = nid_a(dest);
    p.due = cyc + LAT;
    p.depth = 1;
    inflight.push_back(p);
  endtask

  task automatic wait_idle();
    int last;
    do begin
      last = activity;
      repeat (60) @(posedge clk);
    end while (activity != last || inflight.size() != 0);
  endtask

  function automatic logic [31:0] mstep(input logic [31:0] s, input logic [31:0] d);
    logic [31:0] r;
    r = s << 1;
    if (s[31]) r ^= POLY;
    return r ^ d;
  endfunction

  // ---------------------------------------------------------------- test flow
  int cnt_link_faults = 0, cnt_rt_sessions = 0, cnt_core_sessions = 0;
  int cnt_bad_router_found = 0, cnt_bad_core_found = 0, cnt_group_rotations = 0;
  int cnt_captures = 0, cnt_rt_final = 0;

  initial begin
    entry_t ch[$];
    logic [31:0] pl[$];
    logic [31:0] pats[$];
    int iffr[6], rut[6], cores[8];
    logic [NN-1:0][3:0] exp_fault;
    logic [31:0] gold;
    logic [LC-1:0] ref_ch [NG][NS];
    logic [L-1:0] ref_r [RD];
    int t0;

    net_out_ready = '1;
    proc_ready    = '1;
    pin_valid     = '0;
    pin_flit      = '0;
    sw_in_ready   = '1;
    tport         = '0;
    node_class    = '0;
    for (int n = 0; n < NN; n++) begin
      act[n] = null; lact[n] = null; node_depth[n] = 0; ncopy[n] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // ---------------- 1. link BIST
    bist_start = 1;
    @(negedge clk) bist_start = 0;
    t0 = cyc;
    while (bist_done != '1) @(negedge clk);
    $display("link BIST finished after %0d cycles", cyc - t0);
    exp_fault = '0;
    for (int k = 0; k < 5; k++) begin
      exp_fault[bad_n[k]][bad_q[k]] = 1'b1;
      exp_fault[nbr(bad_n[k], bad_q[k])][opp(bad_q[k])] = 1'b1;
    end
    for (int n = 0; n < NN; n++) begin
      checks++;
      if (link_fault[n] !== exp_fault[n]) begin
        failures++;
        $display("node %0d: link faults %b expected %b", n, link_fault[n], exp_fault[n]);
      end
      for (int q = 0; q < 4; q++) if (link_fault[n][q]) cnt_link_faults++;
    end

    // ---------------- 2. router test session
    iffr = '{nid(1,2), nid(2,3), nid(3,2), nid(4,4), nid(5,2), nid(6,1)};
    rut  = '{nid(1,3), nid(2,4), nid(3,3), nid(4,5), nid(5,3), nid(6,2)};
    ch.delete();
    for (int i = 0; i < 6; i++)
      ch.push_back('{addr_t'(((rut[i] % NX) << 4) | (rut[i] / NX)),
                     addr_t'(((iffr[i] % NX) << 4) | (iffr[i] / NX))});
    for (int i = 0; i < 6; i++) begin
      rt_test[rut[i]] = 1'b1;
      tport[rut[i]]   = 2'd3;   // test data arrive from the router below (y- port)
    end
    @(negedge clk);
    pats.delete();
    for (int k = 0; k < 4 * L; k++) pats.push_back($urandom);
    // first packet alone, to measure the unicast steps
    track_depth = 1'b1;
    max_depth = 0;
    pl.delete();
    for (int f = 0; f < L; f++) pl.push_back(pats[f]);
    ate_send(PT_RT_MCAST, mk_addr(4, 4), ch, pl);
    wait_idle();
    track_depth = 1'b0;
    checks++;
    if (max_depth != 5) begin
      failures++;
      $display("router session: %0d unicast steps, expected 5", max_depth);
    end
    for (int t = 1; t < 4; t++) begin
      pl.delete();
      for (int f = 0; f < L; f++) pl.push_back(pats[t * L + f]);
      ate_send(PT_RT_MCAST, mk_addr(4, 4), ch, pl);
    end
    wait_idle();
    // golden router signature
    for (int i = 0; i < RD; i++) ref_r[i] = '0;
    gold = '0;
    for (int t = 0; t < 4; t++) begin
      for (int f = 0; f < L; f++) begin
        logic [31:0] so;
        for (int i = 0; i < RD; i++) so[i] = ref_r[i][L-1];
        gold = mstep(gold, so);
        for (int i = 0; i < RD; i++) ref_r[i] = {ref_r[i][L-2:0], pats[t * L + f][i]};
      end
      begin
        logic [31:0] co;
        for (int i = 0; i < RD; i++) co[i] = ^ref_r[i];
        gold = mstep(gold, co);
      end
      for (int i = 0; i < RD; i++) ref_r[i] = ~{ref_r[i][0], ref_r[i][L-1:1]};
    end
    e = 1;
    repeat (5) @(negedge clk);
    wait_idle();
    e = 0;
    checks++;
    if (resp_src.size() != 6) begin
      failures++;
      $display("router session: %0d responses", resp_src.size());
    end
    foreach (resp_src[k]) begin
      int n;
      n = resp_src[k];
      checks++;
      if (n == faulty_rt) begin
        if (resp_sig[k] != gold) cnt_bad_router_found++;
        else failures++;
      end else if (resp_sig[k] != gold) begin
        failures++;
        $display("router %0d: signature %h expected %h", n, resp_sig[k], gold);
      end
    end
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (got_rt_final[rut[i]] != 4 || rt_shifts[rut[i]] != 4 * L || rt_caps[rut[i]] != 4) begin
        failures++;
        $display("router %0d: %0d packets %0d shifts %0d captures", rut[i],
                 got_rt_final[rut[i]], rt_shifts[rut[i]], rt_caps[rut[i]]);
      end
      cnt_rt_final += got_rt_final[rut[i]];
    end
    resp_src.delete();
    resp_sig.delete();
    rt_test = '0;
    cnt_rt_sessions++;

    // ---------------- 2b. router test session for the four 2-port corner routers
    // Served by (1,0) (1,7) (6,0) (6,7); the tester sends each packet to (1,7).
    // Routers of three and four ports get a different scan length here, so a
    // corner router that used the wrong length would capture at the wrong time.
    begin
      int csrv[4], crut[4];
      logic [1:0] cport[4];
      csrv  = '{nid(1,0), nid(1,7), nid(6,0), nid(6,7)};
      crut  = '{nid(0,0), nid(0,7), nid(7,0), nid(7,7)};
      cport = '{2'd0, 2'd0, 2'd1, 2'd1};   // x+ for the left column, x- for the right
      rt_shift_len[1] = 16'(2 * L);
      rt_shift_len[2] = 16'(2 * L);
      ch.delete();
      for (int i = 0; i < 4; i++) begin
        ch.push_back('{addr_t'(((crut[i] % NX) << 4) | (crut[i] / NX)),
                       addr_t'(((csrv[i] % NX) << 4) | (csrv[i] / NX))});
        rt_test[crut[i]] = 1'b1;
        tport[crut[i]]   = cport[i];
      end
      @(negedge clk);
      pats.delete();
      for (int k = 0; k < 3 * L; k++) pats.push_back($urandom);
      track_depth = 1'b1;
      max_depth = 0;
      pl.delete();
      for (int f = 0; f < L; f++) pl.push_back(pats[f]);
      ate_send(PT_RT_MCAST, mk_addr(1, 7), ch, pl);
      wait_idle();
      track_depth = 1'b0;
      checks++;
      if (max_depth != 4) begin
        failures++;
        $display("corner router session: %0d unicast steps, expected 4", max_depth);
      end
      for (int t = 1; t < 3; t++) begin
        pl.delete();
        for (int f = 0; f < L; f++) pl.push_back(pats[t * L + f]);
        ate_send(PT_RT_MCAST, mk_addr(1, 7), ch, pl);
      end
      wait_idle();
      for (int i = 0; i < RD; i++) ref_r[i] = '0;
      gold = '0;
      for (int t = 0; t < 3; t++) begin
        for (int f = 0; f < L; f++) begin
          logic [31:0] so;
          for (int i = 0; i < RD; i++) so[i] = ref_r[i][L-1];
          gold = mstep(gold, so);
          for (int i = 0; i < RD; i++) ref_r[i] = {ref_r[i][L-2:0], pats[t * L + f][i]};
        end
        begin
          logic [31:0] co;
          for (int i = 0; i < RD; i++) co[i] = ^ref_r[i];
          gold = mstep(gold, co);
        end
        for (int i = 0; i < RD; i++) ref_r[i] = ~{ref_r[i][0], ref_r[i][L-1:1]};
      end
      e = 1;
      repeat (5) @(negedge clk);
      wait_idle();
      e = 0;
      checks++;
      if (resp_src.size() != 4) begin
        failures++;
        $display("corner router session: %0d responses", resp_src.size());
      end
      foreach (resp_src[k]) begin
        checks++;
        if (resp_sig[k] != gold) begin
          failures++;
          $display("router %0d: signature %h expected %h", resp_src[k], resp_sig[k], gold);
        end
      end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (got_rt_final[crut[i]] != 3 || rt_shifts[crut[i]] != 3 * L || rt_caps[crut[i]] != 3) begin
          failures++;
          $display("router %0d: %0d packets %0d shifts %0d captures", crut[i],
                   got_rt_final[crut[i]], rt_shifts[crut[i]], rt_caps[crut[i]]);
        end
        cnt_rt_final += got_rt_final[crut[i]];
      end
      resp_src.delete();
      resp_sig.delete();
      rt_test = '0;
      tport   = '0;
      rt_shift_len = {3{16'(L)}};
      cnt_rt_sessions++;
    end

    // ---------------- 2c. router test session for the 3-port edge routers
    // Every edge router except the tester's own is served by its inward
    // neighbour. The four neighbours of the corners would each have to serve
    // two routers, so one of each pair is left out: 19 routers, which needs
    // five halving rounds, seven unicast steps in all.
    begin
      int srv_of[NN];
      int erut[$], esrv[$];
      for (int n = 0; n < NN; n++) srv_of[n] = -1;
      for (int x = 0; x < NX; x++) for (int y = 0; y < NY; y++) begin
        int n, sv;
        logic [1:0] q;
        n = nid(x, y);
        if ((x == 0 || x == NX - 1) == (y == 0 || y == NY - 1)) continue;   // corner or inside
        if (n == nid(3, 0)) continue;                                      // tester's router
        if (x == 0)           begin sv = nid(1, y);      q = 2'd0; end
        else if (x == NX - 1) begin sv = nid(NX - 2, y); q = 2'd1; end
        else if (y == 0)      begin sv = nid(x, 1);      q = 2'd2; end
        else                  begin sv = nid(x, NY - 2); q = 2'd3; end
        if (srv_of[sv] != -1) continue;
        srv_of[sv] = n;
        rt_test[n] = 1'b1;
        tport[n]   = q;
      end
      ch.delete();
      for (int x = 0; x < NX; x++) for (int y = 0; y < NY; y++)
        if (srv_of[nid(x, y)] != -1) begin
          esrv.push_back(nid(x, y));
          erut.push_back(srv_of[nid(x, y)]);
          ch.push_back('{addr_t'(((srv_of[nid(x, y)] % NX) << 4) | (srv_of[nid(x, y)] / NX)),
                         mk_addr(x, y)});
        end
      checks++;
      if (erut.size() != 19) begin
        failures++;
        $display("edge router session: %0d routers", erut.size());
      end
      @(negedge clk);
      pats.delete();
      for (int k = 0; k < 2 * L; k++) pats.push_back($urandom);
      track_depth = 1'b1;
      max_depth = 0;
      pl.delete();
      for (int f = 0; f < L; f++) pl.push_back(pats[f]);
      ate_send(PT_RT_MCAST, ch[9].node, ch, pl);
      wait_idle();
      track_depth = 1'b0;
      checks++;
      if (max_depth != 7) begin
        failures++;
        $display("edge router session: %0d unicast steps, expected 7", max_depth);
      end
      pl.delete();
      for (int f = 0; f < L; f++) pl.push_back(pats[L + f]);
      ate_send(PT_RT_MCAST, ch[9].node, ch, pl);
      wait_idle();
      for (int i = 0; i < RD; i++) ref_r[i] = '0;
      gold = '0;
      for (int t = 0; t < 2; t++) begin
        for (int f = 0; f < L; f++) begin
          logic [31:0] so;
          for (int i = 0; i < RD; i++) so[i] = ref_r[i][L-1];
          gold = mstep(gold, so);
          for (int i = 0; i < RD; i++) ref_r[i] = {ref_r[i][L-2:0], pats[t * L + f][i]};
        end
        begin
          logic [31:0] co;
          for (int i = 0; i < RD; i++) co[i] = ^ref_r[i];
          gold = mstep(gold, co);
        end
        for (int i = 0; i < RD; i++) ref_r[i] = ~{ref_r[i][0], ref_r[i][L-1:1]};
      end
      e = 1;
      repeat (5) @(negedge clk);
      wait_idle();
      e = 0;
      checks++;
      if (resp_src.size() != erut.size()) begin
        failures++;
        $display("edge router session: %0d responses", resp_src.size());
      end
      foreach (resp_src[k]) begin
        checks++;
        if (resp_sig[k] != gold) begin
          failures++;
          $display("router %0d: signature %h expected %h", resp_src[k], resp_sig[k], gold);
        end
      end
      foreach (erut[i]) begin
        checks++;
        if (got_rt_final[erut[i]] != 2 || rt_shifts[erut[i]] != 2 * L || rt_caps[erut[i]] != 2) begin
          failures++;
          $display("router %0d: %0d packets %0d shifts %0d captures", erut[i],
                   got_rt_final[erut[i]], rt_shifts[erut[i]], rt_caps[erut[i]]);
        end
        cnt_rt_final += got_rt_final[erut[i]];
      end
      resp_src.delete();
      resp_sig.delete();
      rt_test = '0;
      tport   = '0;
      cnt_rt_sessions++;
    end

    // ---------------- 3. core test session, class 1
    cores = '{nid(0,1), nid(2,3), nid(2,6), nid(4,4), nid(5,2), nid(5,6), nid(7,1), nid(7,5)};
    for (int n = 0; n < NN; n++) node_class[n] = 2'(n % 3 == 0 ? 2 : 0);
    foreach (cores[i]) node_class[cores[i]] = 2'd1;
    ch.delete();
    foreach (cores[i]) ch.push_back('{8'h0, addr_t'(((cores[i] % NX) << 4) | (cores[i] / NX))});
    @(negedge clk) class_c = 4'b0010;
    @(negedge clk);
    // two pattern loads and one flush load; a group load (LC shifts) spans two packets
    pats.delete();
    for (int k = 0; k < 3 * NG * LC; k++) pats.push_back((k >= 2 * NG * LC) ? 32'h0 : $urandom);
    track_depth = 1'b1;
    max_depth = 0;
    pl.delete();
    for (int f = 0; f < L; f++) pl.push_back(pats[f]);
    ate_send(PT_CORE_TEST, mk_addr(5, 2), ch, pl);
    wait_idle();
    track_depth = 1'b0;
    checks++;
    if (max_depth != 4) begin
      failures++;
      $display("core session: %0d unicast steps, expected 4", max_depth);
    end
    for (int t = 1; t < 3 * NG * LC / L; t++) begin
      pl.delete();
      for (int f = 0; f < L; f++) pl.push_back(pats[t * L + f]);
      ate_send(PT_CORE_TEST, mk_addr(5, 2), ch, pl);
    end
    wait_idle();
    // golden core signature
    for (int g = 0; g < NG; g++) for (int i = 0; i < NS; i++) ref_ch[g][i] = '0;
    gold = '0;
    for (int t = 0; t < 3; t++) begin
      for (int g = 0; g < NG; g++)
        for (int f = 0; f < LC; f++) begin
          logic [31:0] so, pt;
          pt = pats[(t * NG + g) * LC + f];
          for (int i = 0; i < NS; i++) so[i] = ref_ch[g][i][LC-1];
          gold = mstep(gold, so);
          for (int i = 0; i < NS; i++) ref_ch[g][i] = {ref_ch[g][i][LC-2:0], pt[i]};
        end
      for (int g = 0; g < NG; g++) for (int i = 0; i < NS; i++)
        ref_ch[g][i] = ~{ref_ch[g][i][0], ref_ch[g][i][LC-1:1]};
    end
    e = 1;
    repeat (5) @(negedge clk);
    wait_idle();
    e = 0;
    checks++;
    if (resp_src.size() != 8) begin
      failures++;
      $display("core session: %0d responses", resp_src.size());
    end
    foreach (resp_src[k]) begin
      int n;
      n = resp_src[k];
      checks++;
      if (node_class[n] != 2'd1) failures++;
      if (n == faulty_core) begin
        if (resp_sig[k] != gold) cnt_bad_core_found++;
        else failures++;
      end else if (resp_sig[k] != gold) begin
        failures++;
        $display("core %0d: signature %h expected %h", n, resp_sig[k], gold);
      end
    end
    for (int n = 0; n < NN; n++) begin
      checks++;
      if (node_class[n] == 2'd1) begin
        if (got_core_pkts[n] != 3 * NG * LC / L || core_shifts[n] != 3 * NG * LC || core_caps[n] != 3) begin
          failures++;
          $display("core %0d: %0d packets %0d shifts %0d captures", n, got_core_pkts[n],
                   core_shifts[n], core_caps[n]);
        end
        cnt_captures += core_caps[n];
        cnt_group_rotations += core_shifts[n] / LC;
      end else if (got_core_pkts[n] != 0 || core_shifts[n] != 0) begin
        failures++;
        $display("core %0d of another class was tested", n);
      end
    end
    class_c = '0;
    cnt_core_sessions++;

    // ---------------- 3b. core test session, one class of all 64 cores
    // Largest chain (64 entries) and largest packets (16 payload flits, so a
    // packet is 1 + 32 + 16 = 49 flits and fills a whole buffer slot). The
    // chains of the eight cores tested above are not cleared, so every core's
    // expected signature is worked out from its own starting state.
    begin
      logic [LC-1:0] st0 [NN][NG][NS];
      int pk0[NN], cp0[NN];
      int cp_before;
      localparam int LB = 16;
      for (int n = 0; n < NN; n++) begin
        node_class[n] = 2'd3;
        pk0[n] = got_core_pkts[n];
        cp0[n] = core_caps[n];
        for (int g = 0; g < NG; g++) for (int i = 0; i < NS; i++) st0[n][g][i] = cch[n][g][i];
      end
      cp_before = cnt_fwd_copies;
      ch.delete();
      for (int x = 0; x < NX; x++) for (int y = 0; y < NY; y++) ch.push_back('{8'h0, mk_addr(x, y)});
      @(negedge clk) class_c = 4'b1000;
      @(negedge clk);
      pats.delete();
      for (int k = 0; k < 3 * NG * LC; k++) pats.push_back((k >= 2 * NG * LC) ? 32'h0 : $urandom);
      track_depth = 1'b1;
      max_depth = 0;
      pl.delete();
      for (int f = 0; f < LB; f++) pl.push_back(pats[f]);
      ate_send(PT_CORE_TEST, mk_addr(3, 1), ch, pl);
      wait_idle();
      track_depth = 1'b0;
      checks++;
      if (max_depth != 7) begin
        failures++;
        $display("64-core session: %0d unicast steps, expected 7", max_depth);
      end
      for (int t = 1; t < 3 * NG * LC / LB; t++) begin
        pl.delete();
        for (int f = 0; f < LB; f++) pl.push_back(pats[t * LB + f]);
        ate_send(PT_CORE_TEST, mk_addr(3, 1), ch, pl);
      end
      wait_idle();
      // each packet reaches 63 cores by forwarding, one copy each
      checks++;
      if (cnt_fwd_copies - cp_before != (3 * NG * LC / LB) * (NN - 1)) begin
        failures++;
        $display("64-core session: %0d copies", cnt_fwd_copies - cp_before);
      end
      resp_src.delete();
      resp_sig.delete();
      e = 1;
      repeat (5) @(negedge clk);
      wait_idle();
      e = 0;
      checks++;
      if (resp_src.size() != NN) begin
        failures++;
        $display("64-core session: %0d responses", resp_src.size());
      end
      foreach (resp_src[k]) begin
        int n;
        logic [31:0] sig;
        n = resp_src[k];
        sig = '0;
        for (int g = 0; g < NG; g++) for (int i = 0; i < NS; i++) ref_ch[g][i] = st0[n][g][i];
        for (int t = 0; t < 3; t++) begin
          for (int g = 0; g < NG; g++)
            for (int f = 0; f < LC; f++) begin
              logic [31:0] so, pt;
              pt = pats[(t * NG + g) * LC + f];
              for (int i = 0; i < NS; i++) so[i] = ref_ch[g][i][LC-1];
              sig = mstep(sig, so);
              for (int i = 0; i < NS; i++) ref_ch[g][i] = {ref_ch[g][i][LC-2:0], pt[i]};
            end
          for (int g = 0; g < NG; g++) for (int i = 0; i < NS; i++)
            ref_ch[g][i] = ~{ref_ch[g][i][0], ref_ch[g][i][LC-1:1]};
        end
        checks++;
        if (n == faulty_core) begin
          if (resp_sig[k] != sig) cnt_bad_core_found++;
          else failures++;
        end else if (resp_sig[k] != sig) begin
          failures++;
          $display("64-core session, core %0d: signature %h expected %h", n, resp_sig[k], sig);
        end
      end
      for (int n = 0; n < NN; n++) begin
        checks++;
        if (got_core_pkts[n] - pk0[n] != 3 * NG * LC / LB || core_caps[n] - cp0[n] != 3) begin
          failures++;
          $display("64-core session, core %0d: %0d packets %0d captures", n,
                   got_core_pkts[n] - pk0[n], core_caps[n] - cp0[n]);
        end
        cnt_captures += core_caps[n] - cp0[n];
      end
      class_c = '0;
      cnt_core_sessions++;
    end

    // ---------------- 4. operational packets
    pl = '{32'h0A0A_0001, 32'h0A0A_0002};
    ch.delete();
    ate_send(PT_OPER, mk_addr(0, 0), ch, pl);
    @(negedge clk);
    pin_valid[nid(7,7)] = 1'b1;
    pin_flit[nid(7,7)]  = '{1'b1, 1'b0, mk_hdr(PT_OPER, mk_addr(0, 7), 8'd0, mk_addr(7, 7))};
    #1;
    while (!pin_ready[nid(7,7)]) @(negedge clk);
    @(negedge clk);
    pin_flit[nid(7,7)]  = '{1'b0, 1'b1, 32'h0B0B_0001};
    #1;
    while (!pin_ready[nid(7,7)]) @(negedge clk);
    @(negedge clk);
    pin_valid[nid(7,7)] = 1'b0;
    wait_idle();
    checks++;
    if (cnt_oper_flits_out != 5) begin
      failures++;
      $display("%0d operational flits reached processors, expected 5", cnt_oper_flits_out);
    end
    cnt_oper = cnt_oper_flits_out;

    // ---------------- mechanism counts
    $display("link faults found %0d, router sessions %0d, last-step router packets %0d,",
             cnt_link_faults, cnt_rt_sessions, cnt_rt_final);
    $display("faulty routers found %0d, core sessions %0d, multicast copies %0d,",
             cnt_bad_router_found, cnt_core_sessions, cnt_fwd_copies);
    $display("group rotations %0d, captures %0d, faulty cores found %0d,",
             cnt_group_rotations, cnt_captures, cnt_bad_core_found);
    $display("consumption buffer full %0d cycles, operational flits %0d, cycles %0d",
             cnt_buf_full, cnt_oper, cyc);
    checks++; if (cnt_link_faults == 0) failures++;
    checks++; if (cnt_rt_final == 0) failures++;
    checks++; if (cnt_bad_router_found == 0) failures++;
    checks++; if (cnt_fwd_copies == 0) failures++;
    checks++; if (cnt_group_rotations == 0) failures++;
    checks++; if (cnt_captures == 0) failures++;
    checks++; if (cnt_bad_core_found == 0) failures++;
    checks++; if (cnt_buf_full == 0) failures++;
    checks++; if (cnt_oper == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
