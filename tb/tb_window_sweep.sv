// tb_window_sweep: throughput and cell loss of the 8x8 switch against the
// window width, under uniform traffic (every destination equally likely).
//
// Six switches, with window widths 1 (plain FIFO queues), 2, 4, 6, 8 and 10,
// receive the same cell stream in two runs:
//  a. ten batches of 800 cells (100 clocks with a cell on every input),
//     each followed by a drain: throughput = cells delivered to their own output / cells sent;
//     cell loss = cells misrouted by routing conflicts or dropped at full
//     buffers, over cells sent; switch delay = mean clocks from arrival to
//     departure of the delivered cells;
//  b. 2000 clocks at full load: delivered cells per output per clock, over
//     the last 1500 clocks (saturation throughput).
// Checks: in both runs every cell sent is accounted for (delivered,
// misrouted, dropped or, in run b, still queued), and a window of 2 or more
// never does worse than the FIFO switch at saturation.
module tb_window_sweep;
  import sw_pkg::*;
  localparam int N = N_PORTS, NW = 6;
  localparam int WS [NW] = '{1, 2, 4, 6, 8, 10};
  logic clk = 0, rst_n = 0, measuring = 0;
  cell_t in_cell [N];
  int checks = 0, failures = 0;
  int dlv [NW], mis [NW], drp [NW], dlv_sat [NW];
  longint dsum [NW];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar w = 0; w < NW; w++) begin : g_sw
    cell_t out_cell [N];
    logic in_drop [N], out_valid [N], out_misrouted [N];
    logic [3:0] n_replace, n_idle;
    logic [7:0] n_beyond;
    logic [7:0] n_conflict;
    logic [19:0] se_crossed;
    ib_switch #(.W(WS[w])) u_sw (
      .clk(clk), .rst_n(rst_n), .sched_en(1'b1), .in_cell(in_cell), .in_drop(in_drop),
      .out_cell(out_cell), .out_valid(out_valid), .out_misrouted(out_misrouted),
      .n_replace(n_replace), .n_idle(n_idle), .n_beyond(n_beyond), .n_conflict(n_conflict), .se_crossed(se_crossed));
    always @(negedge clk) if (rst_n)
      for (int j = 0; j < N; j++) begin
        if (out_valid[j]) begin
          dlv[w]++;
          dsum[w] += cyc - int'(out_cell[j].data[63:32]);
          if (measuring) dlv_sat[w]++;
        end
        if (out_misrouted[j]) mis[w]++;
        if (in_cell[j].valid && in_drop[j]) drp[w]++;
      end
  end

  task automatic clear();
    for (int w = 0; w < NW; w++) begin dlv[w] = 0; mis[w] = 0; drp[w] = 0; dlv_sat[w] = 0; dsum[w] = 0; end
  endtask

  task automatic send_full();
    for (int i = 0; i < N; i++)
      in_cell[i] = '{valid: 1'b1, dest: dest_t'($urandom_range(0, N - 1)), data: {32'(cyc), 32'(i)}};
  endtask

  task automatic idle();
    for (int i = 0; i < N; i++) in_cell[i] = CELL_NONE;
  endtask

  initial begin
    int sent;
    idle();
    clear();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // run a: ten batches of 800 cells, each followed by a drain
    sent = 0;
    for (int rep = 0; rep < 10; rep++) begin
      for (int t = 0; t < 100; t++) begin
        send_full();
        sent += N;
        @(negedge clk);
      end
      idle();
      repeat (400) @(negedge clk);
    end
    $display("run a: %0d cells in batches of 800, uniform destinations", sent);
    $display("  window  throughput  cell loss  delay(clocks)  (misrouted, dropped)");
    for (int w = 0; w < NW; w++) begin
      $display("  %6d  %9.3f  %9.3f  %12.2f  (%0d, %0d)", WS[w], real'(dlv[w]) / sent,
               real'(mis[w] + drp[w]) / sent, real'(dsum[w]) / dlv[w], mis[w], drp[w]);
      checks++;
      if (dlv[w] > 0 && real'(dsum[w]) / dlv[w] < 7.0) begin
        failures++; $display("FAIL window %0d: mean delay below the 7-clock minimum", WS[w]);
      end
      checks++;
      if (dlv[w] + mis[w] + drp[w] != sent) begin
        failures++; $display("FAIL window %0d: %0d cells unaccounted", WS[w], sent - dlv[w] - mis[w] - drp[w]);
      end
    end
    // run b: saturation
    clear();
    for (int t = 0; t < 2000; t++) begin
      send_full();
      measuring = (t >= 500);
      @(negedge clk);
    end
    measuring = 0;
    idle();
    $display("run b: full load, delivered cells per output per clock");
    for (int w = 0; w < NW; w++) begin
      $display("  window %2d: %6.3f   (misrouted %0d, dropped %0d of %0d)", WS[w],
               real'(dlv_sat[w]) / (1500.0 * N), mis[w], drp[w], 2000 * N);
      checks++;
      if (dlv[w] + mis[w] + drp[w] > 2000 * N) begin failures++; $display("FAIL accounting"); end
      if (w > 0) begin
        checks++;
        if (dlv_sat[w] < dlv_sat[0]) begin failures++; $display("FAIL window %0d below FIFO", WS[w]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
