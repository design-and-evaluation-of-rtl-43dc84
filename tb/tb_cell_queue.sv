// tb_cell_queue: random arrivals and random removals from any window slot,
// against a queue model kept in the testbench (a buffer list and a window
// list). Every clock the window contents and the drop flag must match the
// model, and each window cell must carry the arrival stamp it was written
// with (the testbench writes the low 16 payload bits as stamp). A small buffer (DEPTH = 4) makes the queue run full and drop.
module tb_cell_queue;
  import sw_pkg::*;
  localparam int W = 4, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  cell_t in_cell, win [W];
  stamp_t win_stamp [W];
  logic drop, deq;
  logic [1:0] deq_idx;
  logic [2:0] buf_count;
  int checks = 0, failures = 0, n_drop = 0, n_mid = 0;
  cell_t mbuf [$], mwin [$];

  cell_queue #(.W(W), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .in_cell(in_cell), .in_stamp(in_cell.data[15:0]), .drop(drop),
    .win(win), .win_stamp(win_stamp),
    .deq(deq), .deq_idx(deq_idx), .buf_count(buf_count)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_cell = CELL_NONE; deq = 0; deq_idx = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      bit popd, model_drop;
      @(negedge clk);
      // compare window with the model
      for (int k = 0; k < W; k++) begin
        checks++;
        if (k < mwin.size()) begin
          if (!win[k].valid || win[k].dest !== mwin[k].dest || win[k].data !== mwin[k].data
              || win_stamp[k] !== mwin[k].data[15:0]) begin
            failures++;
            $display("FAIL t=%0d slot %0d differs", t, k);
          end
        end else if (win[k].valid) begin
          failures++;
          $display("FAIL t=%0d slot %0d should be empty", t, k);
        end
      end
      checks++;
      if (buf_count != 3'(mbuf.size())) begin
        failures++;
        $display("FAIL t=%0d buffer count %0d, model %0d", t, buf_count, mbuf.size());
      end
      // stimulus: arrivals faster than removals in some phases
      in_cell.valid = ($urandom_range(0, 99) < ((t / 500) % 2 ? 90 : 40));
      in_cell.dest  = dest_t'($urandom_range(0, N_PORTS - 1));
      in_cell.data  = {32'(t), $urandom};
      deq = (mwin.size() > 0) && ($urandom_range(0, 99) < 60);
      deq_idx = deq ? 2'($urandom_range(0, mwin.size() - 1)) : 2'd0;
      if (deq && deq_idx != 0) n_mid++;
      #1;
      // model update for this edge
      if (deq) mwin.delete(deq_idx);
      popd = (mwin.size() < W) && (mbuf.size() > 0);
      if (popd) mwin.push_back(mbuf.pop_front());
      model_drop = in_cell.valid && !((mbuf.size() + (popd ? 1 : 0)) < DEPTH || popd);
      checks++;
      if (drop !== model_drop) begin
        failures++;
        $display("FAIL t=%0d drop=%b model=%b", t, drop, model_drop);
      end
      if (in_cell.valid && !model_drop) mbuf.push_back(in_cell);
      if (model_drop) n_drop++;
    end
    checks++;
    if (n_drop == 0 || n_mid == 0) begin
      failures++;
      $display("FAIL coverage: drops=%0d mid-window removals=%0d", n_drop, n_mid);
    end
    $display("drops=%0d mid-window removals=%0d", n_drop, n_mid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
