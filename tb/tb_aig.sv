// tb_aig: random cells on all inputs; each must appear on exactly the HM
// side (destination below N/2) or the LM side (N/2 and above) of its own
// input, unchanged, and an idle input must write neither side.
module tb_aig;
  import sw_pkg::*;
  localparam int N = N_PORTS;
  cell_t in_cell [N], hm_cell [N], lm_cell [N];
  int checks = 0, failures = 0;

  aig #(.N(N)) dut (.in_cell(in_cell), .hm_cell(hm_cell), .lm_cell(lm_cell));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N; i++) begin
        in_cell[i].valid = ($urandom_range(0, 3) != 0);
        in_cell[i].dest  = dest_t'($urandom_range(0, N - 1));
        in_cell[i].data  = {$urandom, $urandom};
      end
      #1;
      for (int i = 0; i < N; i++) begin
        bit want_hm, want_lm;
        want_hm = in_cell[i].valid && (in_cell[i].dest < N / 2);
        want_lm = in_cell[i].valid && (in_cell[i].dest >= N / 2);
        checks++;
        if (hm_cell[i].valid !== want_hm || lm_cell[i].valid !== want_lm) begin
          failures++;
          $display("FAIL t=%0d in %0d dest %0d: hm=%b lm=%b", t, i, in_cell[i].dest,
                   hm_cell[i].valid, lm_cell[i].valid);
        end
        if (want_hm) begin
          checks++;
          if (hm_cell[i].dest !== in_cell[i].dest || hm_cell[i].data !== in_cell[i].data) failures++;
        end
        if (want_lm) begin
          checks++;
          if (lm_cell[i].dest !== in_cell[i].dest || lm_cell[i].data !== in_cell[i].data) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
