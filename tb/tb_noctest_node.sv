// tb_noctest_node: one node's test logic with its links looped back (each
// outgoing port feeds the incoming port of the same number, port 2 with wire
// 4 stuck at 0). Checks, in order:
//   - link BIST: only port 2 is reported faulty;
//   - an operational packet from the network reaches the processor;
//   - a core test packet whose chain holds this node and (6,6): one copy goes
//     out to (6,6) with a one-entry chain, and the payload shifts the core's
//     first chain group;
//   - a router test packet arriving on the y- link while the router is under
//     test reaches the router's scan chains, not the switch, and is followed
//     by one capture; traffic on the x+ link still reaches the switch;
//   - pin e makes both the core and the router send their signatures, which
//     must equal the values on the status ports.
module tb_noctest_node;
  import noctest_pkg::*;
  localparam int NS = 32, NG = 4, RD = 32;
  logic clk = 0, rst_n = 1;
  addr_t my_addr = 8'h52, ate_addr = 8'h30;
  logic core_c = 0, e = 0, rt_test = 0, bist_start = 0;
  logic [1:0] tport = 2'd3;
  logic [3:0] port_en = 4'b1111;
  logic [NS-1:0] core_xmask = '0;
  logic [RD-1:0] rt_xmask = '0;
  logic [15:0] core_shift_len = 16'd2, rt_shift_len = 16'd3;
  logic net_in_valid = 0, net_in_ready, net_out_valid, net_out_ready = 1;
  flit_t net_in_flit = '0, net_out_flit;
  logic proc_valid, proc_last, proc_ready = 1, pin_valid = 0, pin_ready;
  logic [31:0] proc_data;
  flit_t pin_flit = '0;
  logic [NS-1:0] core_si;
  logic [NG-1:0] core_se;
  logic core_cap;
  logic [NG-1:0][NS-1:0] core_so = '0;
  logic [RD-1:0] rt_si, rt_so = '0, rt_comb = '0;
  logic rt_se, rt_cap;
  logic [3:0] lk_rx_valid, lk_rx_ready, lk_tx_valid, lk_tx_ready;
  flit_t [3:0] lk_rx_flit, lk_tx_flit, sw_in_flit, sw_out_flit;
  logic [3:0] sw_in_valid, sw_in_ready = '1, sw_out_valid, sw_out_ready;
  logic bist_done, core_resp_done, rt_resp_done;
  logic [3:0] link_fault;
  logic [NS-1:0] core_sig;
  logic [RD-1:0] rt_sig;
  logic [NG-1:0] core_grp;
  logic [15:0] n_forwarded;
  int checks = 0, failures = 0;

  noctest_node dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // loop-back links; router test traffic is injected on port 3 by the testbench
  logic ext3_valid = 0;
  flit_t ext3_flit = '0;
  always_comb begin
    for (int q = 0; q < 4; q++) begin
      lk_rx_valid[q] = lk_tx_valid[q];
      lk_rx_flit[q]  = lk_tx_flit[q];
      lk_tx_ready[q] = lk_rx_ready[q];
    end
    lk_rx_flit[2].data[4] = 1'b0;
    if (ext3_valid) begin
      lk_rx_valid[3] = 1'b1;
      lk_rx_flit[3]  = ext3_flit;
    end
  end
  logic sw0_valid = 0;
  flit_t sw0_flit = '0;
  always_comb begin
    sw_out_valid = '0;
    sw_out_flit  = '0;
    sw_out_valid[0] = sw0_valid;
    sw_out_flit[0]  = sw0_flit;
  end

  flit_t out_log[$];
  int proc_flits = 0, core_shifts = 0, rt_shifts = 0, rt_caps = 0, sw_flits = 0;
  always @(posedge clk) if (rst_n) begin
    if (net_out_valid && net_out_ready) out_log.push_back(net_out_flit);
    if (proc_valid && proc_ready) proc_flits++;
    if (core_se == 4'b0001) core_shifts++;
    else if (core_se != 0) failures++;
    if (rt_se) rt_shifts++;
    if (rt_cap) rt_caps++;
    for (int q = 0; q < 4; q++) if (sw_in_valid[q] && sw_in_ready[q]) sw_flits++;
  end

  task automatic net_put(input flit_t f);
    @(negedge clk);
    net_in_valid = 1; net_in_flit = f;
    #1;
    while (!net_in_ready) @(negedge clk);
    @(posedge clk);
    @(negedge clk) net_in_valid = 0;
  endtask

  initial begin
    hdr_t h;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // link BIST
    @(negedge clk) bist_start = 1;
    @(negedge clk) bist_start = 0;
    while (!bist_done) @(negedge clk);
    checks++;
    if (link_fault !== 4'b0100) begin
      failures++;
      $display("link faults %b", link_fault);
    end
    // operational packet
    net_put('{1'b1, 1'b0, mk_hdr(PT_OPER, my_addr, 8'd0, 8'h00)});
    net_put('{1'b0, 1'b1, 32'h1234});
    repeat (5) @(negedge clk);
    checks++;
    if (proc_flits != 2) failures++;
    // core test packet, chain {(5,2), (6,6)}
    core_c = 1;
    @(negedge clk);
    net_put('{1'b1, 1'b0, mk_hdr(PT_CORE_TEST, my_addr, 8'd2, ate_addr)});
    net_put('{1'b0, 1'b0, {16'(mk_addr(6,6)), 16'(my_addr)}});
    net_put('{1'b0, 1'b0, 32'hAAAA_0001});
    net_put('{1'b0, 1'b1, 32'hAAAA_0002});
    repeat (20) @(negedge clk);
    checks++;
    if (out_log.size() != 4) begin
      failures++;
      $display("copy has %0d flits", out_log.size());
    end else begin
      h = out_log[0].data;
      if (h.ptype != PT_CORE_TEST || h.dest != mk_addr(6,6) || h.nchain != 1 ||
          out_log[1].data[15:0] != 16'(mk_addr(6,6)) || out_log[3].data != 32'hAAAA_0002 ||
          !out_log[3].tail) begin
        failures++;
        $display("copy wrong");
      end
    end
    checks++;
    if (core_shifts != 2) failures++;
    out_log.delete();
    // router test packet on port 3, traffic on port 0
    rt_test = 1;
    @(negedge clk);
    for (int f = 0; f < 4; f++) begin
      ext3_valid = 1;
      ext3_flit = '{f == 0, f == 3, (f == 0) ? mk_hdr(PT_RT_FINAL, my_addr, 8'd0, 8'h51) : 32'(f)};
      sw0_valid = (f == 1);
      sw0_flit = '{1'b1, 1'b1, 32'h99};
      @(negedge clk);
    end
    ext3_valid = 0;
    sw0_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (rt_shifts != 3 || rt_caps != 1 || sw_flits != 1) begin
      failures++;
      $display("router test: %0d shifts %0d captures %0d switch flits", rt_shifts, rt_caps, sw_flits);
    end
    // responses
    e = 1;
    repeat (12) @(negedge clk);
    e = 0;
    checks++;
    if (out_log.size() != 4) begin
      failures++;
      $display("%0d response flits", out_log.size());
    end else begin
      logic [31:0] a, b;
      a = out_log[1].data;
      b = out_log[3].data;
      if (!((a == core_sig && b == rt_sig) || (a == rt_sig && b == core_sig))) begin
        failures++;
        $display("signatures wrong");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
