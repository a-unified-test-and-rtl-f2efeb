// tb_mcast_node_ctrl: sends test packets to one node and checks every copy it
// forwards (destination, type, handed-over chain, payload), the final unicast
// to the router under test in router-test mode, the payload stream to the DFT
// logic in core-test mode, and the pass-through of operational packets.
// The expected copies come from a reference of the halving procedure written
// here independently: the receiving side gets ceil(n/2) members, the sender
// keeps floor(n/2), the receiver is the member of the other part next to the
// sender. The first case is the eight-core example chain
// (0,1) (2,3) (2,6) (4,4) (5,2) (5,6) (7,1) (7,5) received by node (5,2).
module tb_mcast_node_ctrl;
  import noctest_pkg::*;
  logic clk = 0, rst_n = 1;
  addr_t my_addr;
  logic cin_valid = 0, cin_ready, inj_valid, inj_ready = 1, dft_valid, dft_test, dft_last;
  logic dft_ready = 1;
  flit_t cin_flit = '0, inj_flit;
  logic [31:0] dft_data;
  logic [15:0] n_forwarded;
  int checks = 0, failures = 0;

  mcast_node_ctrl #(.MAX_CHAIN(64), .MAX_PAY(16)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs
  flit_t exp_inj[$];
  logic [32:0] exp_dft[$];   // {test, data}
  flit_t got_inj[$];

  always @(posedge clk) if (rst_n) begin
    if (inj_valid && inj_ready) got_inj.push_back(inj_flit);
    if (dft_valid && dft_ready) begin
      checks++;
      if (exp_dft.size() == 0 || exp_dft[0] !== {dft_test, dft_data}) begin
        failures++;
        $display("dft flit mismatch %b %h", dft_test, dft_data);
      end
      if (exp_dft.size() != 0) void'(exp_dft.pop_front());
    end
  end

  task automatic send(input flit_t f[$]);
    foreach (f[i]) begin
      @(negedge clk);
      cin_valid = 1;
      cin_flit  = f[i];
      #1;
      while (!cin_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk) cin_valid = 0;
  endtask

  function automatic void build(output flit_t f[$], input ptype_e t, input addr_t dest,
                                input entry_t ch[$], input logic [31:0] pl[$]);
    f.delete();
    f.push_back('{1'b1, 1'b0, mk_hdr(t, dest, 8'(ch.size()), 8'h34)});
    for (int i = 0; i < ch.size(); i += 2)
      f.push_back('{1'b0, 1'b0, {(i + 1 < ch.size()) ? ch[i + 1] : 16'h0, ch[i]}});
    foreach (pl[i]) f.push_back('{1'b0, 1'b0, pl[i]});
    f[f.size() - 1].tail = 1'b1;
  endfunction

  // reference: copies the node at position p sends for chain ch
  task automatic expect_copies(input ptype_e t, input entry_t ch[$], input int p,
                               input logic [31:0] pl[$]);
    int lo, hi, n, keep, tl, th, tg;
    entry_t sub[$];
    flit_t f[$];
    lo = 0; hi = ch.size() - 1;
    while (hi > lo) begin
      n = hi - lo + 1;
      keep = n / 2;
      if (p - lo < keep) begin            // sender in the low part
        tl = lo + keep; th = hi; tg = tl; hi = lo + keep - 1;
      end else if (hi - p < keep) begin   // sender in the high part
        tl = lo; th = hi - keep; tg = th; lo = hi - keep + 1;
      end else begin                      // middle member of an odd part
        tl = lo + keep + 1; th = hi; tg = tl; hi = lo + keep;
      end
      sub.delete();
      for (int i = tl; i <= th; i++) sub.push_back(ch[i]);
      build(f, t, ch[tg].node, sub, pl);
      f[0].data[12:5] = my_addr;
      foreach (f[i]) exp_inj.push_back(f[i]);
    end
    if (t == PT_RT_MCAST) begin
      sub.delete();
      build(f, PT_RT_FINAL, ch[p].rut, sub, pl);
      f[0].data[12:5] = my_addr;
      foreach (f[i]) exp_inj.push_back(f[i]);
    end else begin
      foreach (pl[i]) exp_dft.push_back({1'b1, pl[i]});
    end
  endtask

  task automatic compare_inj();
    repeat (300) @(posedge clk);
    checks++;
    if (got_inj.size() != exp_inj.size()) begin
      failures++;
      $display("copies: %0d flits, expected %0d", got_inj.size(), exp_inj.size());
    end
    foreach (exp_inj[i]) begin
      if (i < got_inj.size()) begin
        checks++;
        if (got_inj[i] !== exp_inj[i]) begin
          failures++;
          $display("flit %0d: %h expected %h", i, got_inj[i], exp_inj[i]);
        end
      end
    end
    got_inj.delete();
    exp_inj.delete();
    checks++;
    if (exp_dft.size() != 0) begin
      failures++;
      $display("%0d DFT flits missing", exp_dft.size());
    end
  endtask

  initial begin
    entry_t ch[$];
    logic [31:0] pl[$];
    flit_t f[$];
    int n, p;
    addr_t used[$];
    my_addr = mk_addr(5, 2);
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1) eight-core example
    ch = '{ '{8'h0, mk_addr(0,1)}, '{8'h0, mk_addr(2,3)}, '{8'h0, mk_addr(2,6)},
            '{8'h0, mk_addr(4,4)}, '{8'h0, mk_addr(5,2)}, '{8'h0, mk_addr(5,6)},
            '{8'h0, mk_addr(7,1)}, '{8'h0, mk_addr(7,5)} };
    pl = '{32'h1111_0000, 32'h2222_0001, 32'h3333_0002};
    build(f, PT_CORE_TEST, my_addr, ch, pl);
    expect_copies(PT_CORE_TEST, ch, 4, pl);
    // the first copy must go to (4,4), the second to (7,1), the third to (5,6)
    checks++;
    if (exp_inj[0].data[28:21] != mk_addr(4,4)) failures++;
    send(f);
    compare_inj();
    checks++;
    if (n_forwarded != 3) failures++;

    // 2) random chains in both modes, with back-pressure on the injection side
    for (int r = 0; r < 60; r++) begin
      n = 1 + ($urandom % 40);
      used.delete();
      ch.delete();
      for (int i = 0; i < n; i++) ch.push_back('{8'(i + 100), 8'(2 * i + 1)});
      p = $urandom % n;
      my_addr = ch[p].node;
      pl.delete();
      for (int i = 0; i < 1 + ($urandom % 16); i++) pl.push_back($urandom);
      build(f, (r % 2) ? PT_RT_MCAST : PT_CORE_TEST, my_addr, ch, pl);
      expect_copies((r % 2) ? PT_RT_MCAST : PT_CORE_TEST, ch, p, pl);
      send(f);
      compare_inj();
    end

    // 3) an operational packet passes to the processor unchanged
    ch.delete();
    pl = '{32'hCAFE_0001, 32'hCAFE_0002};
    build(f, PT_OPER, my_addr, ch, pl);
    foreach (f[i]) exp_dft.push_back({1'b0, f[i].data});
    send(f);
    compare_inj();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) inj_ready = ($urandom % 4) != 0;
endmodule
