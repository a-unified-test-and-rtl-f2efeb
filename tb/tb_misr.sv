// tb_misr: checks the signature register against a reference model computed in
// the testbench with the same polynomial, including masked (unknown) bits,
// hold cycles and clear.
module tb_misr;
  localparam logic [31:0] POLY = 32'h0040_0007;
  logic clk = 0, rst_n = 1, clr = 0, en = 0;
  logic [31:0] d = '0, xmask = '0, sig;
  logic [31:0] ref_sig;
  int checks = 0, failures = 0;

  misr #(.W(32), .POLY(POLY)) dut (.*);

  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  function automatic logic [31:0] step(input logic [31:0] s, input logic [31:0] din,
                                       input logic [31:0] m);
    logic [31:0] r;
    r = s << 1;
    if (s[31]) r ^= POLY;
    return r ^ (din & ~m);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_sig = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en    = ($urandom % 4) != 0;
      clr   = (i == 250);
      d     = $urandom;
      xmask = (i % 3 == 0) ? $urandom : '0;
      @(posedge clk);
      if (clr)     ref_sig = '0;
      else if (en) ref_sig = step(ref_sig, d, xmask);
      #1;
      checks++;
      if (sig !== ref_sig) begin
        failures++;
        $display("mismatch at %0d: %h vs %h", i, sig, ref_sig);
      end
    end
    // a masked bit must not change the signature
    @(negedge clk); clr = 1; en = 0; @(negedge clk); clr = 0;
    en = 1; d = 32'hFFFF_FFFF; xmask = 32'hFFFF_FFFF; @(negedge clk); en = 0;
    checks++;
    if (sig !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
