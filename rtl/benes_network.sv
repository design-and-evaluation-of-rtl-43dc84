// benes_network: N x N Benes network, self-routing, built recursively.
//
// An N x N Benes network is a column of N/2 2x2 elements, two N/2 x N/2
// Benes networks, and a second column of N/2 elements: input element j sends
// its upper output to input j of the upper subnetwork and its lower output to
// input j of the lower one; output element j takes output j of each
// subnetwork. A 2 x 2 network is one element. For N = 8 this gives the
// 2 log2(N) - 1 = 5 stages of 4 elements (N log2 N - N/2 = 20 elements).
//
// Routing needs no controller. Stage s (1 .. 2r-1, r = log2 N) uses
// destination bit X_s for s <= r-1 and X_(2r-s) for s >= r, where X_1 is the
// least significant bit; in this recursion both columns at recursion depth d
// use bit d-1 and the middle stage uses the most significant bit. The first
// r-1 stages use least control routing, the last r the omega rule (see
// benes_se). Permutations of the bit-permute-complement class route without
// conflict; other ones may leave cells at a wrong output, which conflicts
// counts (elements in conflict, summed over the network, this clock).
// se_crossed shows the state of every element (1 = crossed) this clock:
// bits [0, N/2) are the first column, then the upper and the lower
// subnetwork (same layout, recursively), then the last column. As the
// stages are pipelined, the bits belong to different permutations.
//
// Timing: a register follows every stage but the last, so a cell presented
// at in[] appears at out[] 2r-2 clocks later (4 for N = 8), and a new
// permutation can enter every clock. DEPTH is the recursion depth and must
// stay 0 at the top. The topology and routing follow the design; the
// pipeline registers and their number are this implementation's choice.
//
// Lint note: when this module is linted as a top of its own, Verilator
// reports up_out, lo_out, up_cfl, lo_cfl, up_x and lo_x as undriven. They
// are driven by the two recursive subnetwork instances; the report comes
// from how the tool elaborates a module that instantiates itself, and does
// not appear when the network is linted inside ib_switch or simulated.
module benes_network
  import sw_pkg::*;
#(
  parameter int N     = N_PORTS,
  parameter int DEPTH = 0,
  localparam int CFL_W = 8,
  localparam int NSE   = N * $clog2(N) - N / 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cell_t            in_cell  [N],
  output cell_t            out_cell [N],
  output logic [CFL_W-1:0] conflicts,
  output logic [NSE-1:0]   se_crossed
);
  if (N == 2) begin : g_leaf
    logic crossed, conflict;
    benes_se #(.LCR(1'b0), .BIT(DEPTH)) u_se (
      .in0(in_cell[0]), .in1(in_cell[1]),
      .out0(out_cell[0]), .out1(out_cell[1]),
      .crossed(crossed), .conflict(conflict)
    );
    assign conflicts  = CFL_W'(conflict);
    assign se_crossed = crossed;
  end else begin : g_rec
    localparam int H   = N / 2;
    localparam int NSH = H * $clog2(H) - H / 2;
    cell_t            s1_out [N];     // first column outputs
    cell_t            up_in [H], lo_in [H], up_out [H], lo_out [H];
    cell_t            up_q [H], lo_q [H];
    logic             s1_crossed [H];
    logic             s3_crossed [H], s3_cfl [H];
    logic [CFL_W-1:0] up_cfl, lo_cfl;
    logic [NSH-1:0]   up_x, lo_x;

    for (genvar j = 0; j < H; j++) begin : g_col
      benes_se #(.LCR(1'b1), .BIT(DEPTH)) u_in (
        .in0(in_cell[2*j]), .in1(in_cell[2*j+1]),
        .out0(s1_out[2*j]), .out1(s1_out[2*j+1]),
        .crossed(s1_crossed[j]), .conflict()
      );
      benes_se #(.LCR(1'b0), .BIT(DEPTH)) u_out (
        .in0(up_q[j]), .in1(lo_q[j]),
        .out0(out_cell[2*j]), .out1(out_cell[2*j+1]),
        .crossed(s3_crossed[j]), .conflict(s3_cfl[j])
      );
    end

    // pipeline register after the first column
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int j = 0; j < H; j++) begin
          up_in[j] <= CELL_NONE;
          lo_in[j] <= CELL_NONE;
        end
      end else begin
        for (int j = 0; j < H; j++) begin
          up_in[j] <= s1_out[2*j];
          lo_in[j] <= s1_out[2*j+1];
        end
      end
    end

    benes_network #(.N(H), .DEPTH(DEPTH + 1)) u_upper (
      .clk(clk), .rst_n(rst_n), .in_cell(up_in), .out_cell(up_out), .conflicts(up_cfl),
      .se_crossed(up_x)
    );
    benes_network #(.N(H), .DEPTH(DEPTH + 1)) u_lower (
      .clk(clk), .rst_n(rst_n), .in_cell(lo_in), .out_cell(lo_out), .conflicts(lo_cfl),
      .se_crossed(lo_x)
    );

    // pipeline register in front of the last column
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int j = 0; j < H; j++) begin
          up_q[j] <= CELL_NONE;
          lo_q[j] <= CELL_NONE;
        end
      end else begin
        up_q <= up_out;
        lo_q <= lo_out;
      end
    end

    always_comb
      for (int j = 0; j < H; j++) begin
        se_crossed[j]                = s1_crossed[j];
        se_crossed[H + 2*NSH + j]    = s3_crossed[j];
      end
    assign se_crossed[H +: NSH]       = up_x;
    assign se_crossed[H + NSH +: NSH] = lo_x;

    // Conflicts of the first column are impossible (LCR never conflicts);
    // those of the last column are counted.
    always_comb begin
      conflicts = up_cfl + lo_cfl;
      for (int j = 0; j < H; j++) conflicts += CFL_W'(s3_cfl[j]);
    end
  end
endmodule
