// ib_switch: N x N input-buffered cell switch with window selection and a
// self-routing Benes network.
//
// Data path, one clock per cell slot:
//   1. aig splits the cells arriving at each input into that input's HM
//      queue (outputs 0 .. N/2-1) or LM queue (outputs N/2 .. N-1).
//      Cells are stamped with their arrival order at their input, and
//      window_limit lets only the W oldest cells of each input (over both
//      of its queues) take part in the selection.
//   2. Two hol_builder instances form HOL1 from the HM windows and HOL2 from
//      the LM windows in parallel, replacing heads of over-requested outputs
//      by window cells for outputs nobody requests.
//   3. hol_mux picks at most one of each input's two candidates, so that the
//      HOL vector is a partial permutation; the chosen cells leave their
//      queues at the clock edge and are loaded into the HOL register.
//   4. The HOL register drives benes_network, which self-routes every cell to
//      its output 2r-2 clocks later.
// A cell arriving on in_cell at edge t is in its queue's window after edge
// t+1, in the HOL register after edge t+2 at the earliest, and on out_cell
// after edge t+2+(2r-2): 7 clocks for N = 8 through an empty switch.
//
// Interface: in_cell[i] carries one cell per clock into input i; in_drop[i]
// flags a cell lost because its queue was full. out_cell[j] is what the
// network delivers to output j; out_valid[j] is set when it is a cell for j,
// out_misrouted[j] when a routing conflict left a cell for another output
// there (such cells are lost). sched_en = 0 holds the scheduler (queues
// fill, nothing is sent). n_replace, n_idle, n_beyond and n_conflict count,
// per clock, step-2 replacements, inputs holding cells that sent none,
// window cells held back because their input has W older cells, and
// elements of the network in conflict; se_crossed shows the network's element states
// (layout in benes_network).
//
// The structure (AIG, HM/LM buffers, per-input window, HOL1/HOL2, MUX with
// NOCC, HOL register, Benes network) follows the design. Queue depth, the sched_en hold input,
// the pipelining and the handling of routing conflicts are this
// implementation's choices.
module ib_switch
  import sw_pkg::*;
#(
  parameter int W      = 4,
  parameter int QDEPTH = 16,
  localparam int N     = N_PORTS,
  localparam int M     = N / 2,
  localparam int IDX_W = (W > 1) ? $clog2(W) : 1,
  localparam int CNT_W = $clog2(N + 1),
  localparam int RPL_W = $clog2(M + 1),
  localparam int PTR_W = $clog2(QDEPTH),
  localparam int NSE   = N * LOG_N - N / 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sched_en,
  input  cell_t      in_cell       [N],
  output logic       in_drop       [N],
  output cell_t      out_cell      [N],
  output logic       out_valid     [N],
  output logic       out_misrouted [N],
  output logic [3:0] n_replace,
  output logic [3:0] n_idle,
  output logic [7:0] n_beyond,
  output logic [7:0] n_conflict,
  output logic [NSE-1:0] se_crossed
);
  cell_t            hm_in [N], lm_in [N];
  cell_t            hm_win [N][W], lm_win [N][W];
  logic             hm_drop [N], lm_drop [N];
  logic             hm_deq [N], lm_deq [N];
  logic [PTR_W:0]   hm_cnt [N], lm_cnt [N];
  stamp_t           arr_stamp [N];
  stamp_t           hm_stamp [N][W], lm_stamp [N][W];
  logic             hm_vld [N][W], lm_vld [N][W];
  logic             hm_ok [N][W], lm_ok [N][W];

  logic             h1_valid [N], h2_valid [N];
  logic [IDX_W-1:0] h1_idx [N], h2_idx [N];
  dest_t            h1_dest [N], h2_dest [N];
  logic [CNT_W-1:0] nocc1 [M], nocc2 [M];
  logic [RPL_W-1:0] rpl1, rpl2;

  src_e             sel [N];
  dest_t            sel_dest [N];
  logic [CNT_W-1:0] idle;

  cell_t            hol_d [N], hol_q [N];

  // step 1: split arrivals
  aig #(.N(N)) u_aig (.in_cell(in_cell), .hm_cell(hm_in), .lm_cell(lm_in));

  // HM and LM cell buffers, one queue of each per input
  for (genvar i = 0; i < N; i++) begin : g_in
    cell_queue #(.W(W), .DEPTH(QDEPTH)) u_hm (
      .clk(clk), .rst_n(rst_n), .in_cell(hm_in[i]), .in_stamp(arr_stamp[i]),
      .drop(hm_drop[i]), .win(hm_win[i]), .win_stamp(hm_stamp[i]), .deq(hm_deq[i]), .deq_idx(h1_idx[i]), .buf_count(hm_cnt[i])
    );
    cell_queue #(.W(W), .DEPTH(QDEPTH)) u_lm (
      .clk(clk), .rst_n(rst_n), .in_cell(lm_in[i]), .in_stamp(arr_stamp[i]),
      .drop(lm_drop[i]), .win(lm_win[i]), .win_stamp(lm_stamp[i]), .deq(lm_deq[i]), .deq_idx(h2_idx[i]), .buf_count(lm_cnt[i])
    );
    assign in_drop[i] = hm_drop[i] || lm_drop[i];

    for (genvar k = 0; k < W; k++) begin : g_v
      assign hm_vld[i][k] = hm_win[i][k].valid;
      assign lm_vld[i][k] = lm_win[i][k].valid;
    end

    // the input's window: its W oldest cells over both queues
    window_limit #(.W(W)) u_wl (
      .hm_valid(hm_vld[i]), .hm_stamp(hm_stamp[i]), .lm_valid(lm_vld[i]), .lm_stamp(lm_stamp[i]),
      .hm_ok(hm_ok[i]), .lm_ok(lm_ok[i])
    );

    // arrival stamp: counts the cells presented at this input
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)                arr_stamp[i] <= '0;
      else if (in_cell[i].valid) arr_stamp[i] <= arr_stamp[i] + 1'b1;
  end

  // step 2: HOL1 and HOL2 in parallel
  hol_builder #(.N(N), .W(W), .HALF(1'b0)) u_hol1 (
    .win(hm_win), .win_ok(hm_ok), .hol_valid(h1_valid), .hol_idx(h1_idx), .hol_dest(h1_dest),
    .nocc(nocc1), .n_replace(rpl1)
  );
  hol_builder #(.N(N), .W(W), .HALF(1'b1)) u_hol2 (
    .win(lm_win), .win_ok(lm_ok), .hol_valid(h2_valid), .hol_idx(h2_idx), .hol_dest(h2_dest),
    .nocc(nocc2), .n_replace(rpl2)
  );

  // step 3: one cell per input, no output twice
  hol_mux #(.N(N)) u_mux (
    .h1_valid(h1_valid), .h1_dest(h1_dest), .h2_valid(h2_valid), .h2_dest(h2_dest),
    .nocc1(nocc1), .nocc2(nocc2), .sel(sel), .sel_dest(sel_dest), .n_idle(idle)
  );

  always_comb begin
    for (int i = 0; i < N; i++) begin
      hm_deq[i] = sched_en && sel[i] == SRC_HM;
      lm_deq[i] = sched_en && sel[i] == SRC_LM;
      if (hm_deq[i])      hol_d[i] = hm_win[i][h1_idx[i]];
      else if (lm_deq[i]) hol_d[i] = lm_win[i][h2_idx[i]];
      else                hol_d[i] = CELL_NONE;
    end
  end

  // HOL register: the partial permutation presented to the network
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) for (int i = 0; i < N; i++) hol_q[i] <= CELL_NONE;
    else        hol_q <= hol_d;

  benes_network #(.N(N)) u_benes (
    .clk(clk), .rst_n(rst_n), .in_cell(hol_q), .out_cell(out_cell), .conflicts(n_conflict),
    .se_crossed(se_crossed)
  );

  always_comb
    for (int j = 0; j < N; j++) begin
      out_valid[j]     = out_cell[j].valid && out_cell[j].dest == dest_t'(j);
      out_misrouted[j] = out_cell[j].valid && out_cell[j].dest != dest_t'(j);
    end

  assign n_replace = sched_en ? 4'(rpl1) + 4'(rpl2) : '0;
  assign n_idle    = sched_en ? 4'(idle) : '0;

  always_comb begin
    n_beyond = '0;
    for (int i = 0; i < N; i++)
      for (int k = 0; k < W; k++)
        n_beyond += 8'(hm_vld[i][k] && !hm_ok[i][k]) + 8'(lm_vld[i][k] && !lm_ok[i][k]);
  end

  // The HOL vector must never address one output twice.
  always_ff @(posedge clk)
    if (rst_n)
      for (int a = 0; a < N; a++)
        for (int b = a + 1; b < N; b++)
          assert (!(hol_d[a].valid && hol_d[b].valid && hol_d[a].dest == hol_d[b].dest))
            else $error("ib_switch: output %0d selected twice", hol_d[a].dest);
endmodule
