// tb_mcast_split: runs the multicast recursively with the split block for every
// chain length 1..64 and every starting position, and checks that every member
// of the chain receives the packet exactly once and that the number of unicast
// steps is ceil(log2 N). It also checks the two example trees worked out by
// hand: the eight-core tree (start at position 4: 4->3, then 3->1 and 4->6,
// then 1->0, 3->2, 4->5, 6->7) and the six-router tree (start at 3: 3->2, then
// 2->1 and 3->4, then 1->0 and 4->5).
module tb_mcast_split;
  logic [7:0] lo, hi, p, target, t_lo, t_hi, n_lo, n_hi;
  logic active;
  int checks = 0, failures = 0;

  mcast_split #(.IW(8)) dut (.*);

  typedef struct { int lo; int hi; int p; } job_t;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run the whole multicast; returns the number of steps; fills got[] and the send log
  int got[64];
  int log_src[$], log_dst[$], log_step[$];
  function automatic int clog2i(input int n);
    int r = 0;
    while ((1 << r) < n) r++;
    return r;
  endfunction

  task automatic run(input int n, input int start, output int steps);
    job_t cur[$], nxt[$];
    job_t j;
    for (int i = 0; i < 64; i++) got[i] = 0;
    log_src.delete(); log_dst.delete(); log_step.delete();
    got[start] = 1;
    cur.push_back('{0, n - 1, start});
    steps = 0;
    while (cur.size() > 0) begin
      nxt.delete();
      foreach (cur[k]) begin
        j = cur[k];
        lo = 8'(j.lo); hi = 8'(j.hi); p = 8'(j.p);
        #1;
        if (active) begin
          got[target]++;
          log_src.push_back(j.p); log_dst.push_back(int'(target)); log_step.push_back(steps + 1);
          // the target must lie in the handed-over part, the node in the part it keeps
          checks++;
          if (!(target >= t_lo && target <= t_hi && p >= n_lo && p <= n_hi &&
                n_lo == lo && t_hi == hi || target >= t_lo && target <= t_hi &&
                p >= n_lo && p <= n_hi && t_lo == lo && n_hi == hi)) failures++;
          nxt.push_back('{int'(t_lo), int'(t_hi), int'(target)});
          nxt.push_back('{int'(n_lo), int'(n_hi), j.p});
        end
      end
      if (nxt.size() > 0) steps++;
      cur = nxt;
    end
  endtask

  function automatic bit sent(input int s, input int d, input int st);
    foreach (log_src[i]) if (log_src[i] == s && log_dst[i] == d && log_step[i] == st) return 1;
    return 0;
  endfunction

  int steps;
  initial begin
    for (int n = 1; n <= 64; n++) begin
      for (int s = 0; s < n; s++) begin
        run(n, s, steps);
        for (int i = 0; i < n; i++) begin
          checks++;
          if (got[i] != 1) begin
            failures++;
            $display("n=%0d start=%0d: member %0d got %0d copies", n, s, i, got[i]);
          end
        end
        checks++;
        if (steps != clog2i(n)) begin
          failures++;
          $display("n=%0d start=%0d: %0d steps, expected %0d", n, s, steps, clog2i(n));
        end
      end
    end
    // eight-core example (steps counted after the tester's own unicast)
    run(8, 4, steps);
    checks++;
    if (!(sent(4,3,1) && sent(3,1,2) && sent(4,6,2) && sent(1,0,3) && sent(3,2,3) &&
          sent(4,5,3) && sent(6,7,3))) begin
      failures++;
      $display("eight-node example tree differs");
    end
    // six-router example
    run(6, 3, steps);
    checks++;
    if (!(sent(3,2,1) && sent(2,1,2) && sent(3,4,2) && sent(1,0,3) && sent(4,5,3))) begin
      failures++;
      $display("six-node example tree differs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
