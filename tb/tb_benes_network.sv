// tb_benes_network: the 8x8 network with its 4-clock pipeline.
//  1. The worked routing example P = (6,1,7,4,3,2,0,5): all eight cells
//     arrive at their outputs exactly 4 clocks later, and the element
//     states of stages 1-3 are the ones the routing rules give
//     (stage 1: straight, crossed, crossed, straight; stage 2: crossed,
//     crossed, straight, crossed; stage 3: crossed, crossed, straight,
//     crossed).
//  2. Bit-permute-complement permutations (identity, complement, bit
//     reversal, perfect shuffle and unshuffle, and their complements) route
//     with no conflict.
//  3. Random permutations and partial permutations, back to back: every cell
//     leaves exactly once, 4 clocks after it entered; when the network
//     reports no conflict for that permutation all cells reach their outputs.
module tb_benes_network;
  import sw_pkg::*;
  localparam int N = N_PORTS, LAT = 2 * LOG_N - 2;
  logic clk = 0, rst_n = 0;
  cell_t in_cell [N], out_cell [N];
  logic [7:0] conflicts;
  logic [19:0] se_crossed;
  int checks = 0, failures = 0, n_conf_perm = 0, n_clean_perm = 0;

  benes_network #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .in_cell(in_cell),
                              .out_cell(out_cell), .conflicts(conflicts), .se_crossed(se_crossed));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record of what entered, per clock
  typedef struct { int perm [N]; int t; } rec_t;
  int cyc = 0;
  int sent [int][N];       // clock -> destination per input (-1 none)
  int conf_sum [int];      // clock the permutation entered -> conflicts seen
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int bitrev(int x);
    return ((x & 1) << 2) | (x & 2) | ((x >> 2) & 1);
  endfunction

  task automatic drive(input int p [N]);
    for (int i = 0; i < N; i++) begin
      in_cell[i].valid = p[i] >= 0;
      in_cell[i].dest  = dest_t'(p[i] < 0 ? 0 : p[i]);
      in_cell[i].data  = {32'(cyc), 32'(i)};
    end
    sent[cyc] = p;
    conf_sum[cyc] = 0;
  endtask

  // check outputs every clock
  always @(negedge clk) if (rst_n) begin
    int got [N];
    // conflicts at stage s (s = 3..5) belong to the permutation that entered s-1 clocks ago
    if (conflicts != 0) begin
      // the last LOG_N stages sit at pipeline offsets 2, 3 and 4
      for (int s = 2; s <= LAT; s++) if (conf_sum.exists(cyc - s)) conf_sum[cyc - s] += 1;
    end
    for (int j = 0; j < N; j++)
      if (out_cell[j].valid) begin
        int t0, src;
        t0  = int'(out_cell[j].data[63:32]);
        src = int'(out_cell[j].data[31:0]);
        checks++;
        if (t0 != cyc - LAT || !sent.exists(t0) || sent[t0][src] != int'(out_cell[j].dest)) begin
          failures++;
          $display("FAIL clk %0d out %0d: cell from clk %0d input %0d", cyc, j, t0, src);
        end else sent[t0][src] = (out_cell[j].dest == dest_t'(j)) ? -2 : -3;
      end
    if (sent.exists(cyc - LAT)) begin
      bit all_ok, any_left;
      all_ok = 1; any_left = 0;
      foreach (sent[cyc - LAT][i]) begin
        if (sent[cyc - LAT][i] >= 0) any_left = 1;
        if (sent[cyc - LAT][i] == -3) all_ok = 0;
      end
      checks++;
      if (any_left) begin failures++; $display("FAIL clk %0d: a cell did not come out", cyc - LAT); end
      if (conf_sum[cyc - LAT] == 0) begin
        checks++;
        if (!all_ok) begin failures++; $display("FAIL misroute without conflict"); end
        n_clean_perm++;
      end else n_conf_perm++;
      sent.delete(cyc - LAT);
    end
  end

  initial begin
    int p [N];
    for (int i = 0; i < N; i++) in_cell[i] = CELL_NONE;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // 1. worked example
    @(negedge clk);
    p = '{6,1,7,4,3,2,0,5};
    drive(p);
    #1;
    checks++;
    if (se_crossed[3:0] != 4'b0110) begin failures++; $display("FAIL stage 1 states %b", se_crossed[3:0]); end
    @(negedge clk);
    for (int i = 0; i < N; i++) in_cell[i] = CELL_NONE;
    #1;
    checks++;
    if ({se_crossed[11:10], se_crossed[5:4]} != 4'b1011) begin
      failures++; $display("FAIL stage 2 states %b", {se_crossed[11:10], se_crossed[5:4]});
    end
    @(negedge clk);
    #1;
    checks++;
    if ({se_crossed[13:12], se_crossed[7:6]} != 4'b1011) begin
      failures++; $display("FAIL stage 3 states %b", {se_crossed[13:12], se_crossed[7:6]});
    end
    repeat (LAT) @(negedge clk);
    checks++;
    if (n_clean_perm != 1) begin failures++; $display("FAIL example not routed cleanly"); end
    // 2. BPC permutations
    for (int c = 0; c < 2; c++)
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        for (int i = 0; i < N; i++) begin
          int d;
          case (k)
            0: d = i;
            1: d = bitrev(i);
            2: d = ((i << 1) | (i >> 2)) & 7;
            default: d = ((i >> 1) | ((i & 1) << 2)) & 7;
          endcase
          p[i] = c ? d ^ 7 : d;
        end
        drive(p);
      end
    @(negedge clk);
    for (int i = 0; i < N; i++) in_cell[i] = CELL_NONE;
    repeat (LAT + 1) @(negedge clk);
    checks++;
    if (n_conf_perm != 0 || n_clean_perm != 9) begin
      failures++; $display("FAIL BPC permutations: clean=%0d conflicted=%0d", n_clean_perm, n_conf_perm);
    end
    // 3. random (partial) permutations, back to back
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) p[i] = i;
      p.shuffle();
      for (int i = 0; i < N; i++) if ($urandom_range(0, 3) == 0 && t % 2) p[i] = -1;
      drive(p);
    end
    @(negedge clk);
    for (int i = 0; i < N; i++) in_cell[i] = CELL_NONE;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (sent.size() != 0 || n_conf_perm == 0) begin
      failures++; $display("FAIL leftovers=%0d conflicted=%0d", sent.size(), n_conf_perm);
    end
    $display("permutations: clean=%0d with conflicts=%0d", n_clean_perm, n_conf_perm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
