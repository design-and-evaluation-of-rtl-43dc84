// hol_builder: step 2 of the cell selection, for one half of the outputs.
//
// Two instances run in parallel: one over the HM queues (HALF = 0, outputs
// 0 .. N/2-1), producing the vector HOL1, and one over the LM queues
// (HALF = 1, outputs N/2 .. N-1), producing HOL2. Each starts from the cells
// at the heads of its N queues and counts, for every output of its half, how
// many heads are addressed to it (the occurrence counters Nocc). Then, for
// each output whose counter is 0, in increasing output order, it searches the
// windows of the queues, input 0 first and nearest the head first, for a
// cell addressed to that output whose own input currently offers a cell for
// an output with Nocc > 1. The first such cell replaces that input's entry;
// the counter of the displaced output drops by one and that of the newly
// covered output becomes 1. So outputs are only added, never lost.
//
// Only window cells marked eligible in win_ok (the W oldest cells of the
// input, see window_limit) are considered; an input whose head is not
// eligible offers nothing in this half.
//
// Outputs: per input, whether it offers a cell (hol_valid), the window
// position of that cell (hol_idx, 0 = head) and its destination; the final
// counters; and how many replacements were made this clock.
//
// Combinational, evaluated every clock on the current window contents. The
// counting and replace rule follow the design; the search order (lowest
// output, lowest input, nearest the head) and the condition that a
// replacement must stay within one input are this implementation's reading.
module hol_builder
  import sw_pkg::*;
#(
  parameter int N    = N_PORTS,
  parameter int W    = 4,
  parameter bit HALF = 1'b0,
  localparam int M     = N / 2,
  localparam int IDX_W = (W > 1) ? $clog2(W) : 1,
  localparam int CNT_W = $clog2(N + 1),
  localparam int RPL_W = $clog2(M + 1)
) (
  input  cell_t            win       [N][W],
  input  logic             win_ok    [N][W],
  output logic             hol_valid [N],
  output logic [IDX_W-1:0] hol_idx   [N],
  output dest_t            hol_dest  [N],
  output logic [CNT_W-1:0] nocc      [M],
  output logic [RPL_W-1:0] n_replace
);
  localparam int LW = LOG_N - 1;   // width of an output index within the half

  always_comb begin
    logic found;
    found = 1'b0;
    for (int o = 0; o < M; o++) nocc[o] = '0;
    for (int i = 0; i < N; i++) begin
      hol_valid[i] = win[i][0].valid && win_ok[i][0];
      hol_idx[i]   = '0;
      hol_dest[i]  = win[i][0].dest;
      if (hol_valid[i]) nocc[hol_dest[i][LW-1:0]] += 1'b1;
    end
    n_replace = '0;
    for (int o = 0; o < M; o++) begin
      if (nocc[o] == '0) begin
        found = 1'b0;
        for (int i = 0; i < N; i++)
          for (int k = 1; k < W; k++)
            if (!found && win[i][k].valid && win_ok[i][k] && win[i][k].dest == {HALF, LW'(o)}
                && hol_valid[i] && nocc[hol_dest[i][LW-1:0]] > CNT_W'(1)) begin
              found = 1'b1;
              nocc[hol_dest[i][LW-1:0]] -= 1'b1;
              nocc[o]     = CNT_W'(1);
              hol_idx[i]  = IDX_W'(k);
              hol_dest[i] = win[i][k].dest;
              n_replace  += 1'b1;
            end
      end
    end
  end
endmodule
