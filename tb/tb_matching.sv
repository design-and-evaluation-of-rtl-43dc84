// tb_matching: how close one selection comes to the best possible one.
//
// For 100 random trials, the switch (default size) is reset, each input is
// loaded with W = 4 cells of uniformly random destination while the
// scheduler is held, and the scheduler then runs for one clock. The number
// of cells that clock sends (counted where they leave the network, routed or
// misrouted, five clocks later) is compared with the size of a maximum
// matching between inputs and outputs over the same 32 window cells,
// computed here by augmenting paths. The selection can never beat the
// maximum; the testbench reports how often it equals it and the mean ratio.
module tb_matching;
  import sw_pkg::*;
  localparam int N = N_PORTS, W = 4, TRIALS = 100;
  logic clk = 0, rst_n = 0, sched_en = 0;
  cell_t in_cell [N], out_cell [N];
  logic in_drop [N], out_valid [N], out_misrouted [N];
  logic [3:0] n_replace, n_idle;
  logic [7:0] n_beyond, n_conflict;
  logic [19:0] se_crossed;
  int checks = 0, failures = 0;

  ib_switch dut (
    .clk(clk), .rst_n(rst_n), .sched_en(sched_en), .in_cell(in_cell), .in_drop(in_drop),
    .out_cell(out_cell), .out_valid(out_valid), .out_misrouted(out_misrouted),
    .n_replace(n_replace), .n_idle(n_idle), .n_beyond(n_beyond), .n_conflict(n_conflict),
    .se_crossed(se_crossed));

  always #5 clk = ~clk;

  initial begin
    repeat (TRIALS * 40 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit adj [N][N];
  int match_of_out [N];
  bit seen [N];

  function automatic bit augment(int i);
    for (int o = 0; o < N; o++)
      if (adj[i][o] && !seen[o]) begin
        seen[o] = 1;
        if (match_of_out[o] < 0 || augment(match_of_out[o])) begin
          match_of_out[o] = i;
          return 1;
        end
      end
    return 0;
  endfunction

  initial begin
    int n_opt = 0, sum_sel = 0, sum_max = 0;
    for (int i = 0; i < N; i++) in_cell[i] = CELL_NONE;
    for (int t = 0; t < TRIALS; t++) begin
      int mx, sel;
      rst_n = 0;
      sched_en = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      foreach (adj[i, o]) adj[i][o] = 0;
      for (int k = 0; k < W; k++) begin
        for (int i = 0; i < N; i++) begin
          in_cell[i].valid = 1'b1;
          in_cell[i].dest  = dest_t'($urandom_range(0, N - 1));
          in_cell[i].data  = 64'(i);
          adj[i][in_cell[i].dest] = 1;
        end
        @(negedge clk);
      end
      for (int i = 0; i < N; i++) in_cell[i] = CELL_NONE;
      repeat (3) @(negedge clk);
      sched_en = 1;
      @(negedge clk);
      sched_en = 0;
      repeat (4) @(negedge clk);
      sel = 0;
      for (int j = 0; j < N; j++) if (out_cell[j].valid) sel++;
      // maximum matching
      for (int o = 0; o < N; o++) match_of_out[o] = -1;
      mx = 0;
      for (int i = 0; i < N; i++) begin
        foreach (seen[o]) seen[o] = 0;
        if (augment(i)) mx++;
      end
      checks++;
      if (sel > mx || sel == 0) begin
        failures++; $display("FAIL trial %0d: selection %0d, maximum %0d", t, sel, mx);
      end
      if (sel == mx) n_opt++;
      sum_sel += sel;
      sum_max += mx;
    end
    $display("selection equal to a maximum matching in %0d of %0d trials; mean %0.2f of %0.2f cells",
             n_opt, TRIALS, real'(sum_sel) / TRIALS, real'(sum_max) / TRIALS);
    checks++;
    if (n_opt == 0) begin failures++; $display("FAIL never optimal"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
