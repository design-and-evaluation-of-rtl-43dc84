// benes_se: 2x2 self-routing switching element of the Benes network.
//
// The element is either straight (in0->out0, in1->out1) or crossed, decided
// locally from one routing bit, bit BIT of the destination address.
//   LCR = 1 (the first r-1 stages, "least control routing"): the input whose
//     cell has the smaller destination address is the controlling input; it
//     is sent to out0 if its routing bit is 0 and to out1 if it is 1, and the
//     other cell takes the other output. With one cell, that cell controls.
//   LCR = 0 (the last r stages, omega rule): every cell wants out0 if its
//     routing bit is 0 and out1 if it is 1. If both cells want the same
//     output, the element is in conflict: in0 gets its way and the cell on
//     in1 is deflected to the other output (it will leave the network at a
//     wrong port). conflict reports this.
// Combinational. The two rules come from the design; the conflict policy is
// this implementation's choice (the design does not say what happens).
module benes_se
  import sw_pkg::*;
#(
  parameter bit LCR = 1'b0,
  parameter int BIT = 0
) (
  input  cell_t in0,
  input  cell_t in1,
  output cell_t out0,
  output cell_t out1,
  output logic  crossed,
  output logic  conflict
);
  always_comb begin
    crossed    = 1'b0;
    conflict = 1'b0;
    if (LCR) begin
      if (in0.valid && in1.valid)
        crossed = (in1.dest < in0.dest) ? !in1.dest[BIT] : in0.dest[BIT];
      else if (in0.valid)
        crossed = in0.dest[BIT];
      else if (in1.valid)
        crossed = !in1.dest[BIT];
    end else begin
      if (in0.valid)
        crossed = in0.dest[BIT];
      else if (in1.valid)
        crossed = !in1.dest[BIT];
      conflict = in0.valid && in1.valid && (in0.dest[BIT] == in1.dest[BIT]);
    end
    out0 = crossed ? in1 : in0;
    out1 = crossed ? in0 : in1;
  end
endmodule
