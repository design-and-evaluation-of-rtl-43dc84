// tb_hol_mux: the worked example, then random candidate vectors.
//
// Example: HOL1 = (2,1,2,0,3,2,0,0), HOL2 = (6,4,7,4,-,5,6,5) with their
// occurrence counts must give the HOL vector (6,1,7,4,3,2,0,5).
// Random vectors are checked against a model written here: inputs are
// visited in order, a candidate whose output is taken drops out, the one with
// the smaller pending count wins (HOL1 on a tie), then both candidates'
// counts drop by one. Independently of the model, the result must address no
// output twice and every chosen output must be one of the input's candidates.
module tb_hol_mux;
  import sw_pkg::*;
  localparam int N = N_PORTS, M = N / 2;
  logic h1_valid [N], h2_valid [N];
  dest_t h1_dest [N], h2_dest [N];
  logic [3:0] nocc1 [M], nocc2 [M];
  src_e sel [N];
  dest_t sel_dest [N];
  logic [3:0] n_idle;
  int checks = 0, failures = 0, n_idle_seen = 0, n_ties = 0;

  hol_mux #(.N(N)) dut (
    .h1_valid(h1_valid), .h1_dest(h1_dest), .h2_valid(h2_valid), .h2_dest(h2_dest),
    .nocc1(nocc1), .nocc2(nocc2), .sel(sel), .sel_dest(sel_dest), .n_idle(n_idle));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_inputs(input int a [N], input int b [N]);
    for (int o = 0; o < M; o++) begin nocc1[o] = 0; nocc2[o] = 0; end
    for (int i = 0; i < N; i++) begin
      h1_valid[i] = a[i] >= 0;
      h1_dest[i]  = dest_t'(a[i] < 0 ? 0 : a[i]);
      h2_valid[i] = b[i] >= 0;
      h2_dest[i]  = dest_t'(b[i] < 0 ? M : b[i]);
      if (h1_valid[i]) nocc1[a[i]]++;
      if (h2_valid[i]) nocc2[b[i] - M]++;
    end
  endtask

  task automatic check(input int a [N], input int b [N]);
    int cnt [N];
    bit taken [N];
    int idle;
    for (int o = 0; o < N; o++) begin cnt[o] = 0; taken[o] = 0; end
    for (int i = 0; i < N; i++) begin
      if (a[i] >= 0) cnt[a[i]]++;
      if (b[i] >= 0) cnt[b[i]]++;
    end
    idle = 0;
    for (int i = 0; i < N; i++) begin
      int want;
      bit aok, bok;
      aok = a[i] >= 0 && !taken[a[i]];
      bok = b[i] >= 0 && !taken[b[i]];
      if (aok && bok) begin
        if (cnt[a[i]] == cnt[b[i]]) n_ties++;
        want = (cnt[a[i]] <= cnt[b[i]]) ? a[i] : b[i];
      end else if (aok) want = a[i];
      else if (bok) want = b[i];
      else want = -1;
      if (want >= 0) taken[want] = 1;
      else if (a[i] >= 0 || b[i] >= 0) idle++;
      if (a[i] >= 0) cnt[a[i]]--;
      if (b[i] >= 0) cnt[b[i]]--;
      checks++;
      if (want < 0 ? sel[i] != SRC_NONE
                   : (sel[i] != (want == a[i] ? SRC_HM : SRC_LM) || sel_dest[i] != dest_t'(want))) begin
        failures++;
        $display("FAIL input %0d: sel=%0d dest=%0d, want %0d", i, sel[i], sel_dest[i], want);
      end
    end
    checks++;
    if (n_idle != 4'(idle)) begin failures++; $display("FAIL n_idle %0d want %0d", n_idle, idle); end
    n_idle_seen += idle;
    // model-free properties
    for (int i = 0; i < N; i++) begin
      if (sel[i] == SRC_HM) begin
        checks++; if (!(a[i] >= 0 && sel_dest[i] == dest_t'(a[i]))) failures++;
      end
      if (sel[i] == SRC_LM) begin
        checks++; if (!(b[i] >= 0 && sel_dest[i] == dest_t'(b[i]))) failures++;
      end
      for (int j = i + 1; j < N; j++)
        if (sel[i] != SRC_NONE && sel[j] != SRC_NONE) begin
          checks++;
          if (sel_dest[i] == sel_dest[j]) begin failures++; $display("FAIL output twice"); end
        end
    end
  endtask

  initial begin
    int a [N], b [N], e [N];
    a = '{2,1,2,0,3,2,0,0};
    b = '{6,4,7,4,-1,5,6,5};
    e = '{6,1,7,4,3,2,0,5};
    set_inputs(a, b);
    #1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (sel[i] == SRC_NONE || sel_dest[i] != dest_t'(e[i])) begin
        failures++;
        $display("FAIL example input %0d: %0d, want %0d", i, sel_dest[i], e[i]);
      end
    end
    check(a, b);
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < N; i++) begin
        a[i] = ($urandom_range(0, 4) == 0) ? -1 : int'($urandom_range(0, M - 1));
        b[i] = ($urandom_range(0, 4) == 0) ? -1 : int'($urandom_range(M, N - 1));
      end
      set_inputs(a, b);
      #1;
      check(a, b);
    end
    checks++;
    if (n_idle_seen == 0 || n_ties == 0) begin
      failures++; $display("FAIL coverage: idle=%0d ties=%0d", n_idle_seen, n_ties);
    end
    $display("idle inputs=%0d ties=%0d", n_idle_seen, n_ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
