// tb_hol_builder: the worked selection example, then random windows.
//
// Example (8 inputs, window 4; queue contents listed head first):
//   HM queues: {2,0} {1,1} {2,1} {0,2} {1,2,0,3} {2,0,1} {0,0} {0,1}
//   LM queues: {6,5} {4,4} {4,7} {4,4} {}        {5}     {6,5} {5,5}
// The heads give HOL1 = (2,1,2,0,1,2,0,0), which misses output 3; input 4
// holds a cell for 3 and its head (output 1) is requested twice, so HOL1
// becomes (2,1,2,0,3,2,0,0). HOL2 = (6,4,4,4,-,5,6,5) misses 7, found at
// input 2, giving (6,4,7,4,-,5,6,5).
// Random windows are then checked for properties that hold whatever the
// search order: each entry is a cell of its own window, the counters count
// the entries, every output covered by the heads stays covered, and no
// uncovered output could still be added (no input holds a cell for it while
// its own entry's output is requested more than once). In the random part
// some window cells are marked ineligible (beyond the input's window); they
// must never be chosen, and an input with an ineligible head offers nothing.
module tb_hol_builder;
  import sw_pkg::*;
  localparam int N = N_PORTS, W = 4, M = N / 2;
  cell_t win1 [N][W], win2 [N][W];
  logic ok1 [N][W], ok2 [N][W];
  logic h1_valid [N], h2_valid [N];
  logic [1:0] h1_idx [N], h2_idx [N];
  dest_t h1_dest [N], h2_dest [N];
  logic [3:0] nocc1 [M], nocc2 [M];
  logic [2:0] rpl1, rpl2;
  int checks = 0, failures = 0, n_rpl = 0;

  hol_builder #(.N(N), .W(W), .HALF(1'b0)) dut1 (
    .win(win1), .win_ok(ok1), .hol_valid(h1_valid), .hol_idx(h1_idx), .hol_dest(h1_dest),
    .nocc(nocc1), .n_replace(rpl1));
  hol_builder #(.N(N), .W(W), .HALF(1'b1)) dut2 (
    .win(win2), .win_ok(ok2), .hol_valid(h2_valid), .hol_idx(h2_idx), .hol_dest(h2_dest),
    .nocc(nocc2), .n_replace(rpl2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int q [N][$], input bit lm);
    for (int i = 0; i < N; i++)
      for (int k = 0; k < W; k++) begin
        cell_t c;
        c = CELL_NONE;
        if (k < q[i].size()) begin
          c.valid = 1'b1;
          c.dest  = dest_t'(q[i][k]);
          c.data  = 64'(i * 16 + k);
        end
        if (lm) win2[i][k] = c; else win1[i][k] = c;
      end
  endtask

  task automatic expect_vec(input string name, input logic v [N], input dest_t d [N],
                            input int exp [N]);
    for (int i = 0; i < N; i++) begin
      checks++;
      if ((exp[i] < 0 && v[i]) || (exp[i] >= 0 && (!v[i] || d[i] != dest_t'(exp[i])))) begin
        failures++;
        $display("FAIL %s[%0d]: got %0d (valid %b), want %0d", name, i, d[i], v[i], exp[i]);
      end
    end
  endtask

  task automatic check_props(input cell_t w [N][W], input logic ok [N][W], input logic v [N], input logic [1:0] idx [N],
                             input dest_t d [N], input logic [3:0] nocc [M], input int half);
    int cnt [M];
    bit head_cov [M];
    foreach (cnt[o]) begin cnt[o] = 0; head_cov[o] = 0; end
    for (int i = 0; i < N; i++) begin
      if (w[i][0].valid && ok[i][0]) head_cov[w[i][0].dest - half * M] = 1;
      checks++;
      if (v[i] !== (w[i][0].valid && ok[i][0])) begin failures++; $display("FAIL valid %0d", i); end
      if (v[i]) begin
        checks++;
        if (!w[i][idx[i]].valid || !ok[i][idx[i]] || w[i][idx[i]].dest != d[i]) begin
          failures++; $display("FAIL entry %0d is not its window cell", i);
        end
        cnt[d[i] - half * M]++;
      end
    end
    for (int o = 0; o < M; o++) begin
      checks++;
      if (nocc[o] != 4'(cnt[o])) begin failures++; $display("FAIL nocc[%0d]", o); end
      checks++;
      if (head_cov[o] && cnt[o] == 0) begin failures++; $display("FAIL output %0d lost", o); end
      if (cnt[o] == 0)
        for (int i = 0; i < N; i++)
          for (int k = 0; k < W; k++)
            if (w[i][k].valid && ok[i][k] && w[i][k].dest == dest_t'(o + half * M) && v[i]
                && cnt[d[i] - half * M] > 1) begin
              checks++; failures++;
              $display("FAIL output %0d could be covered from input %0d", o + half * M, i);
            end
    end
  endtask

  initial begin
    int hm [N][$], lm [N][$];
    int e1 [N], e2 [N];
    hm = '{'{2,0}, '{1,1}, '{2,1}, '{0,2}, '{1,2,0,3}, '{2,0,1}, '{0,0}, '{0,1}};
    lm = '{'{6,5}, '{4,4}, '{4,7}, '{4,4}, '{}, '{5}, '{6,5}, '{5,5}};
    load(hm, 0);
    load(lm, 1);
    foreach (ok1[i, k]) begin ok1[i][k] = 1; ok2[i][k] = 1; end
    #1;
    e1 = '{2,1,2,0,3,2,0,0};
    e2 = '{6,4,7,4,-1,5,6,5};
    expect_vec("HOL1", h1_valid, h1_dest, e1);
    expect_vec("HOL2", h2_valid, h2_dest, e2);
    checks++;
    if (h1_idx[4] != 2'd3 || h2_idx[2] != 2'd1 || rpl1 != 3'd1 || rpl2 != 3'd1) begin
      failures++;
      $display("FAIL replacement positions/counts: %0d %0d %0d %0d", h1_idx[4], h2_idx[2], rpl1, rpl2);
    end
    check_props(win1, ok1, h1_valid, h1_idx, h1_dest, nocc1, 0);
    check_props(win2, ok2, h2_valid, h2_idx, h2_dest, nocc2, 1);

    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < N; i++) begin
        int n1, n2;
        n1 = $urandom_range(0, W);
        n2 = $urandom_range(0, W);
        hm[i].delete(); lm[i].delete();
        for (int k = 0; k < n1; k++) hm[i].push_back($urandom_range(0, M - 1));
        for (int k = 0; k < n2; k++) lm[i].push_back($urandom_range(M, N - 1));
      end
      load(hm, 0);
      load(lm, 1);
      // eligibility: a prefix of each window, sometimes shortened
      foreach (ok1[i, k]) begin
        ok1[i][k] = (t % 2 == 0) || (k < int'($urandom_range(1, W)));
        ok2[i][k] = (t % 2 == 0) || (k < int'($urandom_range(1, W)));
      end
      #1;
      n_rpl += rpl1 + rpl2;
      check_props(win1, ok1, h1_valid, h1_idx, h1_dest, nocc1, 0);
      check_props(win2, ok2, h2_valid, h2_idx, h2_dest, nocc2, 1);
    end
    checks++;
    if (n_rpl == 0) begin failures++; $display("FAIL no replacement in random runs"); end
    $display("random replacements: %0d", n_rpl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
