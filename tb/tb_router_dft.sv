// tb_router_dft: router DFT logic with a model of eight scan chains of five
// bits (capture inverts and rotates each chain, and presents the chain
// contents on the combinational outputs). The testbench sends test packets on
// the selected port while other ports carry traffic, and checks
//   - that flits of the test port never reach the switch while under test and
//     that the other ports pass through,
//   - that each payload flit shifts once, the header never shifts, and one
//     capture follows each packet,
//   - the signature in the response packet against a reference computed here,
//   - that after the test the test port passes to the switch again.
module tb_router_dft;
  import noctest_pkg::*;
  localparam int NP = 4, D = 8, CW = 8, L = 5;
  localparam logic [D-1:0] POLY = D'(32'h0040_0007);

  logic clk = 0, rst_n = 1;
  addr_t my_addr = 8'h33, ate_addr = 8'h30;
  logic rt_test = 0, e = 0;
  logic [1:0] tport = 2'd1;
  logic [D-1:0] xmask = '0;
  logic [15:0] shift_len = 16'(L);
  logic [NP-1:0] lin_valid = '0, lin_ready, sw_valid, sw_ready = '1;
  flit_t [NP-1:0] lin_flit, sw_flit;
  logic [D-1:0] scan_si, scan_so, sig;
  logic scan_se, scan_cap, resp_done;
  logic [CW-1:0] comb_out;
  logic pin_valid = 0, pin_ready, inj_valid, inj_ready = 1;
  flit_t pin_flit = '0, inj_flit;
  int checks = 0, failures = 0, shifts = 0, caps = 0, sw_flits = 0, leaks = 0;

  router_dft #(.NP(NP), .D(D), .CW(CW)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [L-1:0] chain [D];
  always_comb for (int i = 0; i < D; i++) begin
    scan_so[i]  = chain[i][L-1];
    comb_out[i] = ^chain[i];
  end
  always @(posedge clk) begin
    for (int i = 0; i < D; i++)
      if (scan_cap) chain[i] <= ~{chain[i][0], chain[i][L-1:1]};
      else if (scan_se) chain[i] <= {chain[i][L-2:0], scan_si[i]};
    if (scan_se) shifts++;
    if (scan_cap) caps++;
    for (int q = 0; q < NP; q++) if (sw_valid[q] && sw_ready[q]) begin
      sw_flits++;
      if (rt_test && q == int'(tport)) leaks++;
    end
  end

  flit_t inj_log[$];
  always @(posedge clk) if (inj_valid && inj_ready) inj_log.push_back(inj_flit);

  task automatic put(input int q, input flit_t f);
    @(negedge clk);
    lin_valid[q] = 1; lin_flit[q] = f;
    #1;
    while (!lin_ready[q]) @(negedge clk);
    @(posedge clk);
    @(negedge clk) lin_valid[q] = 0;
  endtask

  logic [L-1:0] rc [D];
  logic [D-1:0] rsig;
  function automatic logic [D-1:0] mstep(input logic [D-1:0] s, input logic [D-1:0] d);
    logic [D-1:0] r;
    r = s << 1;
    if (s[D-1]) r ^= POLY;
    return r ^ d;
  endfunction

  initial begin
    logic [D-1:0] pat, so, co;
    lin_flit = '0;
    for (int i = 0; i < D; i++) begin chain[i] = '0; rc[i] = '0; end
    rsig = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // not under test: port 1 goes to the switch
    put(1, '{1'b1, 1'b1, 32'h5});
    checks++;
    if (sw_flits != 1) failures++;
    @(negedge clk) rt_test = 1;
    for (int t = 0; t < 4; t++) begin
      put(1, '{1'b1, 1'b0, mk_hdr(PT_RT_FINAL, my_addr, 8'd0, 8'h32)});
      for (int f = 0; f < L; f++) begin
        pat = D'($urandom);
        for (int i = 0; i < D; i++) so[i] = rc[i][L-1];
        rsig = mstep(rsig, so);
        for (int i = 0; i < D; i++) rc[i] = {rc[i][L-2:0], pat[i]};
        put(1, '{1'b0, f == L - 1, 32'(pat)});
        // traffic on another port in between
        put(2, '{1'b1, 1'b1, 32'h9});
      end
      for (int i = 0; i < D; i++) co[i] = ^rc[i];
      rsig = mstep(rsig, co);
      for (int i = 0; i < D; i++) rc[i] = ~{rc[i][0], rc[i][L-1:1]};
    end
    repeat (3) @(negedge clk);
    checks++;
    if (shifts != 4 * L || caps != 4) begin
      failures++;
      $display("shifts %0d captures %0d", shifts, caps);
    end
    checks++;
    if (sig !== rsig) begin
      failures++;
      $display("signature %h expected %h", sig, rsig);
    end
    e = 1;
    repeat (5) @(negedge clk);
    e = 0;
    checks++;
    if (inj_log.size() != 2 || inj_log[1].data != 32'(rsig) || !inj_log[0].head) begin
      failures++;
      $display("response wrong, %0d flits", inj_log.size());
    end
    checks++;
    if (leaks != 0 || sw_flits != 1 + 4 * L) begin
      failures++;
      $display("switch flits %0d leaks %0d", sw_flits, leaks);
    end
    rt_test = 0;
    put(1, '{1'b1, 1'b1, 32'h5});
    checks++;
    if (sw_flits != 2 + 4 * L) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
