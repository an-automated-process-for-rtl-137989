// cameron_pkg: types and constants shared by the two-FPGA window-generator
// system (CPE0 reads the image and streams it over the crossbar, PEx computes
// and stores the results).
//
// The crossbar is 36 bits wide: 32 data bits plus four tag bits at the top,
// ValidData (35), Start/Stop (34), DontStore (33) and LastCol (32). Both local
// memories are organised as 32-bit words; pixels are 8 bits, four to a word.
// These widths and bit positions follow the board and protocol description.
// Pixel 0 of a word sitting in bits 7:0, the order of the run-time constants
// and the 18/17-bit word addresses (1 MB and 0.5 MB of 32-bit words) are
// choices of this design.
package cameron_pkg;

  localparam int XBAR_W       = 36;
  localparam int WORD_W       = 32;
  localparam int PIX_W        = 8;
  localparam int PIX_PER_WORD = WORD_W / PIX_W;
  localparam int CPE0_AW      = 18;   // 1 MB of 32-bit words
  localparam int PEX_AW       = 17;   // 0.5 MB of 32-bit words
  localparam int N_CONST      = 6;    // run-time constants (input nodes)
  localparam int KERN_ROWS    = 3;    // window of the inner loop body
  localparam int KERN_COLS    = 3;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [PIX_W-1:0]  pix_t;

  // One crossbar transfer. Field order puts ValidData at bit 35.
  typedef struct packed {
    logic  valid;      // 35: data on the crossbar is legal (0 = NULL)
    logic  startstop;  // 34: first and last column of the image
    logic  dontstore;  // 33: result of this time step is not stored
    logic  lastcol;    // 32: last column of a row of windows
    word_t data;       // one window column, row i in bits 8i+7:8i
  } xbar_t;

  // Run-time constants, in the order they are fetched and sent.
  typedef enum logic [2:0] {
    C_DST_ADDR = 3'd0,
    C_DST_ROWS = 3'd1,
    C_DST_COLS = 3'd2,
    C_SRC_ADDR = 3'd3,
    C_SRC_ROWS = 3'd4,
    C_SRC_COLS = 3'd5
  } const_idx_e;

  typedef struct packed {
    word_t dst_addr;
    word_t dst_rows;
    word_t dst_cols;
    word_t src_addr;
    word_t src_rows;
    word_t src_cols;
  } rt_const_t;

  // Store request from a collector lane to the memory arbiter.
  typedef struct packed {
    logic              req;
    logic [PEX_AW-1:0] addr;
    word_t             data;
  } wr_req_t;

  // Which inner loop body PEx instantiates.
  typedef enum logic [0:0] {
    ILB_PREWITT   = 1'b0,
    ILB_THRESHOLD = 1'b1
  } ilb_sel_e;

  // Write one constant into the record.
  function automatic rt_const_t set_const(rt_const_t c, logic [2:0] idx, word_t v);
    rt_const_t r;
    r = c;
    case (idx)
      C_DST_ADDR: r.dst_addr = v;
      C_DST_ROWS: r.dst_rows = v;
      C_DST_COLS: r.dst_cols = v;
      C_SRC_ADDR: r.src_addr = v;
      C_SRC_ROWS: r.src_rows = v;
      default:    r.src_cols = v;
    endcase
    return r;
  endfunction

  // NULL cycles XBar adds after each frame so that stores cannot overrun the
  // single memory write port. A frame occupies PIX_PER_WORD crossbar cycles;
  // each result lane can complete at most two words in it (one full word and
  // the partial word closing a row), and the arbiter writes one per cycle.
  function automatic int nulls_per_frame(int lanes);
    int need;
    need = 2 * lanes;
    return (need > PIX_PER_WORD) ? need - PIX_PER_WORD : 0;
  endfunction

endpackage
