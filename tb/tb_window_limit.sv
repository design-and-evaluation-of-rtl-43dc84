// tb_window_limit: random arrival sequences at one input, split between its
// HM and LM queues, with random cells already taken out of the queues. Each
// queue window holds the oldest W remaining cells of its queue. A cell must
// be marked eligible exactly when fewer than W remaining cells of the input
// (both queues, windows and buffers) arrived before it; that rank is worked
// out here from the unwrapped arrival numbers. Stamps start just below the
// wrap of the 16-bit stamp counter half of the time, to test the modular
// comparison.
module tb_window_limit;
  import sw_pkg::*;
  localparam int W = 4;
  logic hm_valid [W], lm_valid [W], hm_ok [W], lm_ok [W];
  stamp_t hm_stamp [W], lm_stamp [W];
  int checks = 0, failures = 0, n_excluded = 0, n_wrap = 0;

  window_limit #(.W(W)) dut (.hm_valid(hm_valid), .hm_stamp(hm_stamp), .lm_valid(lm_valid),
                             .lm_stamp(lm_stamp), .hm_ok(hm_ok), .lm_ok(lm_ok));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int base, len;
      int hm [$], lm [$], all [$];
      base = (t % 2) ? 65536 - int'($urandom_range(1, 8)) : int'($urandom_range(0, 60000));
      len  = $urandom_range(0, 3 * W);
      hm.delete(); lm.delete();
      for (int a = base; a < base + len; a++)
        if ($urandom_range(0, 1)) hm.push_back(a); else lm.push_back(a);
      // cells already selected: remove a few from anywhere in the first W
      for (int r = 0; r < 2; r++) begin
        if (hm.size() > 0 && $urandom_range(0, 2) == 0) hm.delete($urandom_range(0, hm.size() < W ? hm.size() - 1 : W - 1));
        if (lm.size() > 0 && $urandom_range(0, 2) == 0) lm.delete($urandom_range(0, lm.size() < W ? lm.size() - 1 : W - 1));
      end
      all = {hm, lm};
      for (int k = 0; k < W; k++) begin
        hm_valid[k] = k < hm.size();
        lm_valid[k] = k < lm.size();
        hm_stamp[k] = hm_valid[k] ? stamp_t'(hm[k]) : stamp_t'($urandom);
        lm_stamp[k] = lm_valid[k] ? stamp_t'(lm[k]) : stamp_t'($urandom);
      end
      #1;
      for (int k = 0; k < W; k++) begin
        int rank;
        bit want;
        if (hm_valid[k]) begin
          rank = 0;
          foreach (all[j]) if (all[j] < hm[k]) rank++;
          want = rank < W;
          if (!want) n_excluded++;
          if (hm[k] >= 65536) n_wrap++;
        end else want = 0;
        checks++;
        if (hm_ok[k] !== want) begin failures++; $display("FAIL t=%0d HM slot %0d: ok=%b want %b", t, k, hm_ok[k], want); end
        if (lm_valid[k]) begin
          rank = 0;
          foreach (all[j]) if (all[j] < lm[k]) rank++;
          want = rank < W;
          if (!want) n_excluded++;
        end else want = 0;
        checks++;
        if (lm_ok[k] !== want) begin failures++; $display("FAIL t=%0d LM slot %0d: ok=%b want %b", t, k, lm_ok[k], want); end
      end
    end
    checks++;
    if (n_excluded == 0 || n_wrap == 0) begin failures++; $display("FAIL coverage"); end
    $display("excluded cells=%0d wrapped stamps=%0d", n_excluded, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
