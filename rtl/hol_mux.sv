// hol_mux: step 3 of the cell selection (the MUX and NOCC blocks).
//
// Each input offers up to two cells: its HOL1 entry (an output in the upper
// half) and its HOL2 entry (an output in the lower half). The mux visits the
// inputs in order 0 .. N-1 and lets each send at most one of them, so that
// the resulting HOL vector is a partial permutation: no output is addressed
// twice. It keeps one occurrence counter per output (NOCC), loaded from the
// two step-2 counter sets, and one "taken" flag per output. At each input,
// a candidate whose output is already taken is out; of two remaining
// candidates the one whose output has the smaller counter wins (ties go to
// HOL1); if both are out, the input sends nothing this clock. The chosen
// output is marked taken and the counters of both candidates drop by one,
// since this input no longer competes for either output.
//
// Combinational. The least-counter rule and the idle input follow the
// design; decrementing both counters after each input, the tie rule and the
// visiting order are this implementation's reading, chosen because they
// reproduce the design's worked example.
module hol_mux
  import sw_pkg::*;
#(
  parameter int N = N_PORTS,
  localparam int M     = N / 2,
  localparam int CNT_W = $clog2(N + 1),
  localparam int IDL_W = $clog2(N + 1)
) (
  input  logic             h1_valid [N],
  input  dest_t            h1_dest  [N],
  input  logic             h2_valid [N],
  input  dest_t            h2_dest  [N],
  input  logic [CNT_W-1:0] nocc1    [M],
  input  logic [CNT_W-1:0] nocc2    [M],
  output src_e             sel      [N],
  output dest_t            sel_dest [N],
  output logic [IDL_W-1:0] n_idle          // inputs with a cell that send none
);
  always_comb begin
    logic [CNT_W-1:0] c [N];
    logic [N-1:0]     taken;
    logic             a_ok, b_ok;
    for (int o = 0; o < M; o++) begin
      c[o]     = nocc1[o];
      c[o + M] = nocc2[o];
    end
    taken  = '0;
    n_idle = '0;
    for (int i = 0; i < N; i++) begin
      a_ok = h1_valid[i] && !taken[h1_dest[i]];
      b_ok = h2_valid[i] && !taken[h2_dest[i]];
      sel[i]      = SRC_NONE;
      sel_dest[i] = '0;
      if (a_ok && (!b_ok || c[h1_dest[i]] <= c[h2_dest[i]])) begin
        sel[i]      = SRC_HM;
        sel_dest[i] = h1_dest[i];
      end else if (b_ok) begin
        sel[i]      = SRC_LM;
        sel_dest[i] = h2_dest[i];
      end
      if (sel[i] != SRC_NONE) taken[sel_dest[i]] = 1'b1;
      else if (h1_valid[i] || h2_valid[i]) n_idle += 1'b1;
      if (h1_valid[i]) c[h1_dest[i]] -= 1'b1;
      if (h2_valid[i]) c[h2_dest[i]] -= 1'b1;
    end
  end
endmodule
