// aig: input demultiplexer in front of the cell buffers.
//
// Every input port has two queues: HM, for cells bound to the upper half of
// the outputs (0 .. N/2-1), and LM, for the lower half (N/2 .. N-1). The AIG
// looks at the most significant destination bit of each arriving cell and
// presents the cell to the HM queue of its input when the bit is 0 and to the
// LM queue when it is 1 (step 1 of the selection process). An invalid input
// produces no write on either side.
//
// Purely combinational; one cell per input per clock. The bit test is the
// design's own rule as stated; implementing it as a plain demultiplexer is
// this implementation's choice.
module aig
  import sw_pkg::*;
#(
  parameter int N = N_PORTS
) (
  input  cell_t in_cell [N],
  output cell_t hm_cell [N],
  output cell_t lm_cell [N]
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      hm_cell[i] = in_cell[i];
      lm_cell[i] = in_cell[i];
      hm_cell[i].valid = in_cell[i].valid && !in_cell[i].dest[LOG_N-1];
      lm_cell[i].valid = in_cell[i].valid &&  in_cell[i].dest[LOG_N-1];
    end
  end
endmodule
