// tb_packet_buffer: pushes random packets through the buffer with random
// back-pressure, checks flit order against a queue, checks that no more than
// three packets are ever held and that a fourth head is refused while three
// are present.
module tb_packet_buffer;
  import noctest_pkg::*;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0, out_ready = 0, in_ready, out_valid;
  flit_t in_flit, out_flit;
  logic [1:0] npkts;
  int checks = 0, failures = 0, refused_heads = 0;
  flit_t q[$];

  packet_buffer #(.PKTS(3), .MAX_FLITS(6)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // producer: packets of 1..6 flits
  int plen = 0, ppos = 0, sent_pkts = 0;
  int held = 0;  // packets in the buffer, counted here independently of npkts
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) begin
        q.push_back(in_flit);
      end
      if (in_valid && !in_ready && in_flit.head && held == 3) refused_heads++;
      held += int'(in_valid && in_ready && in_flit.head) - int'(out_valid && out_ready && out_flit.tail);
      checks++;
      if (held > 3) begin
        failures++;
        $display("more than three packets held");
      end
    end
  end

  initial begin
    in_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 400; p++) begin
      plen = 1 + ($urandom % 6);
      for (int f = 0; f < plen; f++) begin
        @(negedge clk);
        in_valid = 1;
        in_flit.head = (f == 0);
        in_flit.tail = (f == plen - 1);
        in_flit.data = $urandom;
        #1;
        while (!in_ready) @(negedge clk);
        @(posedge clk);
        @(negedge clk) in_valid = 0;
        if ($urandom % 3 == 0) @(negedge clk);
      end
    end
    repeat (200) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
    checks++;
    if (refused_heads == 0) begin
      failures++;
      $display("the full case never happened");
    end
    $display("refused heads: %0d", refused_heads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer: slow in the first half to fill the buffer
  int cyc = 0;
  always @(negedge clk) begin
    cyc++;
    out_ready = (cyc < 3000) ? ($urandom % 8 == 0) : ($urandom % 2 == 0);
  end

  flit_t exp_f;
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && out_ready) begin
        checks++;
        if (q.size() == 0) begin
          failures++;
        end else begin
          exp_f = q.pop_front();
          if (exp_f !== out_flit) begin
            failures++;
            $display("flit mismatch %h %h", exp_f, out_flit);
          end
        end
      end
    end
  end
endmodule
