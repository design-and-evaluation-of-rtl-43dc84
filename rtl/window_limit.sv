// window_limit: the selection window of one input, across its two queues.
//
// The window of W cells belongs to the input, not to each queue: only the W
// oldest cells the input holds, whichever queue (HM or LM) they went to, may
// be selected. This module ranks every window cell of the two queues by its
// arrival stamp and marks it eligible (hm_ok / lm_ok) when fewer than W
// cells of the input are older. Within a queue, cells are in arrival order,
// so the rank of HM cell k is k plus the number of LM window cells older
// than it, and the other way round.
//
// Combinational. Stamps are compared modulo 2**STAMP_W (see sw_pkg). Only the
// two queue windows are looked at: a cell still in a queue's buffer behind
// its window is never counted, which can make a newer cell eligible in the
// clock after a window has lost more cells than it has refilled.
// Ranking by arrival order follows the design's worked example, where each
// input's window of W cells is split by destination half; the stamps and
// the comparison are this implementation's.
module window_limit
  import sw_pkg::*;
#(
  parameter int W = 4,
  localparam int RK_W = $clog2(2 * W + 1)
) (
  input  logic   hm_valid [W],
  input  stamp_t hm_stamp [W],
  input  logic   lm_valid [W],
  input  stamp_t lm_stamp [W],
  output logic   hm_ok    [W],
  output logic   lm_ok    [W]
);
  // a is older than b
  function automatic logic older(stamp_t a, stamp_t b);
    stamp_t diff;
    diff = b - a;
    return diff != '0 && !diff[STAMP_W-1];
  endfunction

  always_comb begin
    logic [RK_W-1:0] rank;
    for (int k = 0; k < W; k++) begin
      rank = RK_W'(k);
      for (int j = 0; j < W; j++)
        if (lm_valid[j] && older(lm_stamp[j], hm_stamp[k])) rank += 1'b1;
      hm_ok[k] = hm_valid[k] && rank < RK_W'(W);
      rank = RK_W'(k);
      for (int j = 0; j < W; j++)
        if (hm_valid[j] && older(hm_stamp[j], lm_stamp[k])) rank += 1'b1;
      lm_ok[k] = lm_valid[k] && rank < RK_W'(W);
    end
  end
endmodule
