// tb_ib_switch: end-to-end test of the switch at its default size (8x8,
// window 4, 16-cell buffers).
//  1. Latency: one cell through the empty switch takes 7 clocks.
//  2. The worked selection example: with the scheduler held, the 32 cells of
//     the example windows are loaded; one scheduling clock must then send
//     the HOL vector (6,1,7,4,3,2,0,5), with two step-2 replacements, and
//     those exact cells must reach outputs 0..7 five clocks later. The rest
//     is drained.
//  3. Random uniform traffic at several loads, including overload, against a
//     scoreboard: every cell that leaves must be the oldest outstanding cell
//     of its (input, output) pair, cells the switch reports dropped are
//     forgotten, and after the final drain no cell may be missing.
// Every mechanism must have occurred at least once: HM and LM traffic,
// step-2 replacement, an input left idle by step 3, a window cell held
// back because its input already had W older cells, a routing conflict with
// a misrouted cell, a drop on a full buffer and a held scheduler.
module tb_ib_switch;
  import sw_pkg::*;
  localparam int N = N_PORTS;
  logic clk = 0, rst_n = 0, sched_en = 0;
  cell_t in_cell [N], out_cell [N];
  logic in_drop [N], out_valid [N], out_misrouted [N];
  logic [3:0] n_replace, n_idle;
  logic [7:0] n_beyond;
  logic [7:0] n_conflict;
  logic [19:0] se_crossed;
  int checks = 0, failures = 0, cyc = 0;
  int ev_hm = 0, ev_lm = 0, ev_repl = 0, ev_idle = 0, ev_conf = 0, ev_mis = 0, ev_drop = 0,
      ev_hold = 0, ev_beyond = 0, delivered = 0, injected = 0;
  logic [63:0] expq [N][N][$];   // payloads outstanding per (input, output)
  int seq = 0;

  ib_switch dut (
    .clk(clk), .rst_n(rst_n), .sched_en(sched_en), .in_cell(in_cell), .in_drop(in_drop),
    .out_cell(out_cell), .out_valid(out_valid), .out_misrouted(out_misrouted),
    .n_replace(n_replace), .n_idle(n_idle), .n_beyond(n_beyond), .n_conflict(n_conflict), .se_crossed(se_crossed));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // payload: input number, running sequence number
  function automatic logic [63:0] tag(int i);
    return {32'(i), 32'(seq)};
  endfunction

  // sample at the end of each clock: inputs accepted, outputs delivered
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++)
      if (in_cell[i].valid) begin
        if (in_drop[i]) ev_drop++;
        else begin
          expq[i][in_cell[i].dest].push_back(in_cell[i].data);
          injected++;
          if (in_cell[i].dest < N / 2) ev_hm++; else ev_lm++;
        end
      end
    if (n_replace != 0) ev_repl++;
    if (n_idle != 0) ev_idle++;
    if (n_beyond != 0) ev_beyond++;
    if (n_conflict != 0) ev_conf++;
    if (!sched_en) ev_hold++;
    for (int j = 0; j < N; j++) begin
      checks++;
      if (out_valid[j] !== (out_cell[j].valid && out_cell[j].dest == dest_t'(j)) ||
          out_misrouted[j] !== (out_cell[j].valid && out_cell[j].dest != dest_t'(j))) begin
        failures++; $display("FAIL output flags at %0d", j);
      end
      if (out_cell[j].valid) begin
        int src;
        src = int'(out_cell[j].data[63:32]);
        checks++;
        if (src >= N || expq[src][out_cell[j].dest].size() == 0 ||
            expq[src][out_cell[j].dest][0] != out_cell[j].data) begin
          failures++;
          $display("FAIL clk %0d output %0d: unexpected cell %h", cyc, j, out_cell[j].data);
        end else void'(expq[src][out_cell[j].dest].pop_front());
        if (out_valid[j]) delivered++; else ev_mis++;
      end
    end
  end

  task automatic idle_inputs();
    for (int i = 0; i < N; i++) in_cell[i] = CELL_NONE;
  endtask

  function automatic int outstanding();
    int n = 0;
    foreach (expq[i, o]) n += expq[i][o].size();
    return n;
  endfunction

  initial begin
    int win_ex [N][$];
    int lat;
    idle_inputs();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. latency through the empty switch
    sched_en = 1;
    in_cell[3] = '{valid: 1'b1, dest: dest_t'(5), data: tag(3)};
    seq++;
    lat = 0;
    @(negedge clk);
    idle_inputs();
    while (!out_valid[5] && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    if (lat + 1 != 7) begin failures++; $display("FAIL latency %0d clocks, want 7", lat + 1); end

    // 2. worked example: windows listed newest first, head last
    sched_en = 0;
    win_ex = '{'{0,2,5,6}, '{4,4,1,1}, '{7,1,4,2}, '{4,2,4,0},
               '{3,0,2,1}, '{1,0,5,2}, '{5,6,0,0}, '{1,5,5,0}};
    for (int k = 3; k >= 0; k--) begin
      for (int i = 0; i < N; i++) begin
        in_cell[i].valid = 1'b1;
        in_cell[i].dest  = dest_t'(win_ex[i][k]);
        in_cell[i].data  = {32'(i), 32'(1000 + k)};
      end
      @(negedge clk);
    end
    idle_inputs();
    repeat (3) @(negedge clk);
    sched_en = 1;
    #1;
    checks++;
    if (n_replace != 4'd2) begin failures++; $display("FAIL example replacements %0d", n_replace); end
    @(negedge clk);
    sched_en = 0;
    repeat (4) @(negedge clk);
    #1;
    begin
      int exp_src [N];
      int exp_k [N];
      // output j receives the cell of input exp_src[j] at window slot exp_k[j]
      exp_src = '{6,1,5,4,3,7,0,2};
      exp_k   = '{3,3,3,0,2,2,3,0};
      for (int j = 0; j < N; j++) begin
        checks++;
        if (!out_valid[j] || out_cell[j].data != {32'(exp_src[j]), 32'(1000 + exp_k[j])}) begin
          failures++;
          $display("FAIL example output %0d: valid %b data %h", j, out_valid[j], out_cell[j].data);
        end
      end
    end
    @(negedge clk);
    sched_en = 1;
    repeat (40) @(negedge clk);
    checks++;
    if (outstanding() != 0) begin
      failures++; $display("FAIL example drain: %0d cells left", outstanding());
    end

    // 3. random uniform traffic at several loads
    for (int ph = 0; ph < 6; ph++) begin
      int load;
      load = (ph == 2 || ph == 4) ? 100 : 30 + 10 * ph;
      for (int t = 0; t < 1000; t++) begin
        sched_en = !(ph == 3 && t % 50 < 5);
        for (int i = 0; i < N; i++) begin
          in_cell[i].valid = ($urandom_range(0, 99) < load);
          in_cell[i].dest  = dest_t'($urandom_range(0, N - 1));
          in_cell[i].data  = tag(i);
          seq++;
        end
        @(negedge clk);
      end
    end
    idle_inputs();
    sched_en = 1;
    repeat (300) @(negedge clk);
    // misrouted cells were removed from the scoreboard too; nothing may be missing
    checks++;
    if (outstanding() != 0) begin
      failures++; $display("FAIL %0d cells never left the switch", outstanding());
    end
    $display("injected=%0d delivered=%0d misrouted=%0d dropped=%0d", injected, delivered, ev_mis, ev_drop);
    $display("clocks with: replacement=%0d idle input=%0d beyond window=%0d conflict=%0d hold=%0d; HM cells=%0d LM cells=%0d",
             ev_repl, ev_idle, ev_beyond, ev_conf, ev_hold, ev_hm, ev_lm);
    checks++;
    if (ev_hm == 0 || ev_lm == 0 || ev_repl == 0 || ev_idle == 0 || ev_conf == 0 || ev_mis == 0
        || ev_drop == 0 || ev_hold == 0 || ev_beyond == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
