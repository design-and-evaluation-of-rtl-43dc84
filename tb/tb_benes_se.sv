// tb_benes_se: every pair of destinations and valid flags, for one element
// in least-control mode (routing bit 1) and one in omega mode (routing bit
// 2). Expected settings are worked out here from the routing rules:
// least control puts the cell with the smaller address on the output named
// by its bit; omega sends each cell by its own bit, in0 winning a conflict.
module tb_benes_se;
  import sw_pkg::*;
  cell_t a0, a1, l0, l1, o0, o1;
  logic lx, lc, ox, oc;
  int checks = 0, failures = 0;

  benes_se #(.LCR(1'b1), .BIT(1)) u_lcr (.in0(a0), .in1(a1), .out0(l0), .out1(l1), .crossed(lx), .conflict(lc));
  benes_se #(.LCR(1'b0), .BIT(2)) u_om  (.in0(a0), .in1(a1), .out0(o0), .out1(o1), .crossed(ox), .conflict(oc));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_route(input string m, input cell_t y0, input cell_t y1, input bit x);
    cell_t w0, w1;
    w0 = x ? a1 : a0;
    w1 = x ? a0 : a1;
    checks++;
    if (y0 !== w0 || y1 !== w1) begin
      failures++;
      $display("FAIL %s: in (%0d,%0d) valid (%b,%b) crossed expected %b", m, a0.dest, a1.dest,
               a0.valid, a1.valid, x);
    end
  endtask

  initial begin
    for (int v = 0; v < 4; v++)
      for (int d0 = 0; d0 < N_PORTS; d0++)
        for (int d1 = 0; d1 < N_PORTS; d1++) begin
          bit xl, xo, co;
          dest_t ctl;
          int ctl_in;
          if (v == 3 && d0 == d1) continue;
          a0 = '{valid: v[0], dest: dest_t'(d0), data: 64'(100 + d0)};
          a1 = '{valid: v[1], dest: dest_t'(d1), data: 64'(200 + d1)};
          // least control: controlling input and its bit
          if (v == 3) ctl_in = (d1 < d0) ? 1 : 0;
          else ctl_in = v[1] && !v[0] ? 1 : 0;
          ctl = ctl_in ? dest_t'(d1) : dest_t'(d0);
          xl = (v == 0) ? 0 : (ctl[1] != ctl_in[0]);
          // omega
          if (v[0]) xo = a0.dest[2];
          else if (v[1]) xo = !a1.dest[2];
          else xo = 0;
          co = (v == 3) && (a0.dest[2] == a1.dest[2]);
          #1;
          expect_route("lcr", l0, l1, xl);
          expect_route("omega", o0, o1, xo);
          checks++;
          if (lc !== 1'b0 || oc !== co) begin failures++; $display("FAIL conflict flag"); end
          // a lone or controlling cell always reaches the output its bit names
          if (v == 3 && !co) begin
            checks++;
            if (o0.dest[2] !== 1'b0 || o1.dest[2] !== 1'b1) begin failures++; $display("FAIL omega misroute"); end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
