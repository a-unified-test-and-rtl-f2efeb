// tb_core_dft: core DFT logic with a model of the core's scan chains (three
// groups of eight chains, four bits long; capture inverts and rotates the
// chain). The testbench streams test packets, one per group, and checks
//   - that only the selected group shifts, the one-hot group order, the
//     capture cycle after the last group, and the signature of the response
//     packet against a reference computed here from the patterns sent;
//   - that test packets reach the processor instead when the class pin c is 0,
//     and operational flits always do;
//   - that processor packets pass to the injection side and are not cut by
//     the response packet.
module tb_core_dft;
  import noctest_pkg::*;
  localparam int NS = 8, NG = 3, L = 4;
  localparam logic [NS-1:0] POLY = NS'(32'h0040_0007);

  logic clk = 0, rst_n = 1;
  addr_t my_addr = 8'h52, ate_addr = 8'h30;
  logic c = 0, e = 0;
  logic [NS-1:0] xmask = '0;
  logic [15:0] shift_len = 16'(L);
  logic in_valid = 0, in_test = 0, in_last = 0, in_ready;
  logic [31:0] in_data = '0;
  logic proc_valid, proc_last, proc_ready = 1;
  logic [31:0] proc_data;
  logic pin_valid = 0, pin_ready, inj_valid, inj_ready = 1;
  flit_t pin_flit = '0, inj_flit;
  logic [NS-1:0] scan_si, sig;
  logic [NG-1:0] scan_se, grp;
  logic scan_cap, resp_done;
  logic [NG-1:0][NS-1:0] scan_so;
  int checks = 0, failures = 0, captures = 0, proc_flits = 0;

  core_dft #(.N_SI(NS), .N_GRP(NG)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scan chain model
  logic [L-1:0] chain [NG][NS];
  always_comb for (int g = 0; g < NG; g++) for (int i = 0; i < NS; i++) scan_so[g][i] = chain[g][i][L-1];
  always @(posedge clk) begin
    for (int g = 0; g < NG; g++)
      for (int i = 0; i < NS; i++) begin
        if (scan_cap) chain[g][i] <= ~{chain[g][i][0], chain[g][i][L-1:1]};
        else if (scan_se[g]) chain[g][i] <= {chain[g][i][L-2:0], scan_si[i]};
      end
    if (scan_cap) captures++;
    checks++;
    if (scan_cap && scan_se != 0) failures++;
    checks++;
    if (!$onehot0(scan_se)) failures++;
  end

  // reference
  logic [L-1:0] rc [NG][NS];
  logic [NS-1:0] rsig;
  function automatic logic [NS-1:0] mstep(input logic [NS-1:0] s, input logic [NS-1:0] d);
    logic [NS-1:0] r;
    r = s << 1;
    if (s[NS-1]) r ^= POLY;
    return r ^ d;
  endfunction

  // observe the injection side
  flit_t inj_log[$];
  always @(posedge clk) if (inj_valid && inj_ready) inj_log.push_back(inj_flit);
  always @(posedge clk) if (proc_valid && proc_ready) proc_flits++;

  task automatic put(input logic [31:0] d, input logic t, input logic last);
    @(negedge clk);
    in_valid = 1; in_data = d; in_test = t; in_last = last;
    #1;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    logic [NS-1:0] pat;
    logic [NS-1:0] comp;
    for (int g = 0; g < NG; g++) for (int i = 0; i < NS; i++) begin
      chain[g][i] = '0; rc[g][i] = '0;
    end
    rsig = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // class not under test: test flits go to the processor
    put(32'hAB, 1'b1, 1'b1);
    checks++;
    if (proc_flits != 1) failures++;
    c = 1;
    @(negedge clk);
    // three pattern loads, one packet per group
    for (int t = 0; t < 3; t++) begin
      for (int g = 0; g < NG; g++) begin
        checks++;
        if (grp != NG'(1 << g)) begin
          failures++;
          $display("group register %b, expected group %0d", grp, g);
        end
        for (int f = 0; f < L; f++) begin
          pat = NS'($urandom);
          comp = '0;
          for (int i = 0; i < NS; i++) comp[i] = rc[g][i][L-1];
          rsig = mstep(rsig, comp);
          for (int i = 0; i < NS; i++) rc[g][i] = {rc[g][i][L-2:0], pat[i]};
          put(32'(pat), 1'b1, f == L - 1);
        end
        // an operational flit in between goes to the processor
        put(32'h77, 1'b0, 1'b1);
      end
      for (int g = 0; g < NG; g++) for (int i = 0; i < NS; i++)
        rc[g][i] = ~{rc[g][i][0], rc[g][i][L-1:1]};
    end
    repeat (3) @(negedge clk);
    checks++;
    if (captures != 3) begin
      failures++;
      $display("captures %0d", captures);
    end
    checks++;
    if (sig !== rsig) begin
      failures++;
      $display("signature %h expected %h", sig, rsig);
    end
    // a processor packet is under way when e rises
    pin_valid = 1; pin_flit = '{1'b1, 1'b0, 32'h1};
    @(negedge clk);
    e = 1;
    pin_flit = '{1'b0, 1'b0, 32'h2};
    @(negedge clk);
    pin_flit = '{1'b0, 1'b1, 32'h3};
    @(negedge clk);
    pin_valid = 0;
    repeat (6) @(negedge clk);
    e = 0;
    checks++;
    if (inj_log.size() != 5) begin
      failures++;
      $display("%0d flits injected", inj_log.size());
      foreach (inj_log[i]) $display("  %b %b %h", inj_log[i].head, inj_log[i].tail, inj_log[i].data);
      $display("proc flits %0d", proc_flits);
    end else begin
      hdr_t rh;
      rh = inj_log[3].data;
      checks++;
      if (inj_log[2].data != 32'h3 || !inj_log[3].head ||
          rh.ptype != PT_RESP || rh.dest != ate_addr ||
          inj_log[4].data != 32'(rsig) || !inj_log[4].tail) begin
        failures++;
        $display("response packet wrong");
      end
    end
    checks++;
    if (proc_flits != 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
