// tb_link_bist: four links with known defects are looped from the pattern
// output back into the checker: port 0 is good (two cycles of delay), port 1
// has wire 5 stuck at 0, port 2 has wires 3 and 4 shorted (wired-OR), port 3
// is open. A second run with four good links must report no fault, and a
// third run with only port 0 enabled ignores the others. The run time is
// checked as well: 2W+2 patterns, one cycle to start, one to raise done, plus
// the two-cycle link delay.
module tb_link_bist;
  localparam int NP = 4, W = 32;
  logic clk = 0, rst_n = 1, start = 0;
  logic [NP-1:0] port_en = '1, rx_valid, fault;
  logic tx_valid, busy, done;
  logic [W-1:0] tx_data;
  logic [NP-1:0][W-1:0] rx_data;
  int checks = 0, failures = 0;
  int defects = 1;

  link_bist #(.NP(NP), .W(W)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // links: two register stages
  logic [1:0] v_d;
  logic [W-1:0] d_d [2];
  always @(posedge clk) begin
    v_d  <= {v_d[0], tx_valid};
    d_d[0] <= tx_data;
    d_d[1] <= d_d[0];
  end
  always_comb begin
    for (int q = 0; q < NP; q++) begin
      rx_valid[q] = v_d[1];
      rx_data[q]  = d_d[1];
    end
    if (defects != 0) begin
      rx_data[1][5] = 1'b0;
      rx_data[2][3] = d_d[1][3] | d_d[1][4];
      rx_data[2][4] = d_d[1][3] | d_d[1][4];
      rx_valid[3]   = 1'b0;
    end
  end

  task automatic run(output int cycles);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    int cyc;
    v_d = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(cyc);
    checks++;
    if (fault !== 4'b1110) begin
      failures++;
      $display("defective links: fault=%b", fault);
    end
    defects = 0;
    run(cyc);
    checks++;
    if (fault !== 4'b0000) begin
      failures++;
      $display("good links: fault=%b", fault);
    end
    checks++;
    if (cyc != 2 * W + 2 + 2 + 2) begin  // patterns, start and done registers, link delay
      failures++;
      $display("good links took %0d cycles", cyc);
    end
    defects = 1;
    port_en = 4'b0001;
    run(cyc);
    checks++;
    if (fault !== 4'b0000) begin
      failures++;
      $display("port 0 only: fault=%b", fault);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
