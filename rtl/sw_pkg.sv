// sw_pkg: constants and types shared by the input-buffered packet switch.
//
// A cell is a fixed-size packet that crosses the switch as one word: a valid
// flag, its destination output port and a 64-bit payload (the 64-bit data
// bus of the reference design). The switch size N_PORTS = 8 is the 8x8
// configuration the design is evaluated in; LOG_N is the destination width
// and also r, the dimension of the Benes network (2r-1 stages).
// Changing N_PORTS here resizes every block (it must be a power of two, >= 4).
package sw_pkg;
  localparam int N_PORTS = 8;
  localparam int LOG_N   = $clog2(N_PORTS);
  localparam int DATA_W  = 64;
  // Arrival stamps order the cells of one input across its two queues.
  // They are compared modulo 2**STAMP_W, which is exact while no cell waits
  // more than 2**(STAMP_W-1) arrivals at its input.
  localparam int STAMP_W = 16;

  typedef logic [LOG_N-1:0]  dest_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [STAMP_W-1:0] stamp_t;

  typedef struct packed {
    logic  valid;
    dest_t dest;
    data_t data;
  } cell_t;

  // Which of an input's two queues the selection takes a cell from.
  typedef enum logic [1:0] {
    SRC_NONE = 2'd0,
    SRC_HM   = 2'd1,   // queue of cells for outputs 0 .. N/2-1
    SRC_LM   = 2'd2    // queue of cells for outputs N/2 .. N-1
  } src_e;

  localparam cell_t CELL_NONE = '0;
endpackage
