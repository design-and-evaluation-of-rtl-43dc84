// cell_queue: one input queue (the HM or the LM queue of one input port).
//
// The queue is a circular cell buffer, managed only by a read and a write
// pointer, followed by a selection window of W registers holding the W
// oldest cells; win[0] is the head of the queue. The scheduler may take any
// one cell out of the window per clock (deq, deq_idx), not only the head:
// the cells behind it close the gap, keeping the window in arrival order.
// Each clock the window refills with one cell from the buffer head when it
// has room, and one arriving cell is written at the buffer tail. A cell that
// arrives while the buffer is full is dropped and reported on drop (cell
// loss).
//
// Timing: an arriving cell is written at the clock edge that samples it and
// enters the window at the next edge at the earliest, so it can be selected
// one clock after it was written. Window occupancy is always contiguous from
// win[0].
//
// The pointer-managed buffer and the window depth W come from the design; the
// buffer depth DEPTH, the one-cell-per-clock refill and the drop-on-full
// policy are choices of this implementation. In hardware the buffer is a
// two-port memory (one write and one read per clock). Each cell carries an
// arrival stamp (in_stamp, win_stamp) through the queue, used to rank the
// cells of one input across its two queues.
module cell_queue
  import sw_pkg::*;
#(
  parameter int W     = 4,
  parameter int DEPTH = 16,
  localparam int IDX_W = (W > 1) ? $clog2(W) : 1,
  localparam int PTR_W = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cell_t            in_cell,    // .valid = write request
  input  stamp_t           in_stamp,   // arrival stamp of in_cell
  output logic             drop,       // arriving cell lost, buffer full
  output cell_t            win [W],    // selection window, [0] = head
  output stamp_t           win_stamp [W],
  input  logic             deq,        // remove win[deq_idx] at this edge
  input  logic [IDX_W-1:0] deq_idx,
  output logic [PTR_W:0]   buf_count   // cells in the buffer behind the window
);
  typedef struct packed {
    stamp_t stamp;
    dest_t  dest;
    data_t  data;
  } entry_t;

  entry_t           mem [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;
  logic [PTR_W:0]   cnt;
  cell_t            win_q [W];
  stamp_t           stamp_q [W];

  cell_t            win_d [W];
  stamp_t           stamp_d [W];
  logic             pop, push;
  int unsigned      n_after;

  assign win       = win_q;
  assign win_stamp = stamp_q;
  assign buf_count = cnt;

  always_comb begin
    // close the gap left by the removed cell
    for (int k = 0; k < W; k++) begin
      if (deq && k >= int'(deq_idx)) begin
        win_d[k]   = (k + 1 < W) ? win_q[(k + 1) % W] : CELL_NONE;
        stamp_d[k] = (k + 1 < W) ? stamp_q[(k + 1) % W] : '0;
      end else begin
        win_d[k]   = win_q[k];
        stamp_d[k] = stamp_q[k];
      end
    end
    n_after = 0;
    for (int k = 0; k < W; k++)
      if (win_d[k].valid) n_after++;
    // refill from the buffer head
    pop = (n_after < W) && (cnt != 0);
    if (pop) begin
      for (int k = 0; k < W; k++)
        if (k == int'(n_after)) begin
          win_d[k].valid = 1'b1;
          win_d[k].dest  = mem[rd_ptr].dest;
          win_d[k].data  = mem[rd_ptr].data;
          stamp_d[k]     = mem[rd_ptr].stamp;
        end
    end
    push = in_cell.valid && ((cnt < (PTR_W+1)'(DEPTH)) || pop);
    drop = in_cell.valid && !push;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
      for (int k = 0; k < W; k++) begin
        win_q[k]   <= CELL_NONE;
        stamp_q[k] <= '0;
      end
    end else begin
      win_q   <= win_d;
      stamp_q <= stamp_d;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
      if (push) wr_ptr <= wr_ptr + 1'b1;
      cnt <= cnt + (PTR_W+1)'(push) - (PTR_W+1)'(pop);
    end
  end

  always_ff @(posedge clk)
    if (push) mem[wr_ptr] <= '{stamp: in_stamp, dest: in_cell.dest, data: in_cell.data};

  // The window must be filled from win[0] without holes.
  always_ff @(posedge clk)
    if (rst_n)
      for (int k = 1; k < W; k++)
        assert (!(win_q[k].valid && !win_q[k-1].valid))
          else $error("cell_queue: hole in window at %0d", k);

  // A removal may only name an occupied window slot.
  always_ff @(posedge clk)
    if (rst_n && deq)
      assert (win_q[deq_idx].valid) else $error("cell_queue: dequeue of empty slot");
endmodule
