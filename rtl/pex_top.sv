// pex_top: everything on the processing FPGA (PEx).
//
// The distribute half of the window generator turns the crossbar stream
// into a sliding window. TILE_ROWS inner loop bodies (one without
// stripmining, two for the 4x3 stripmined Prewitt) each see a 3x3 part of
// the window, lane l using window rows l*STEP .. l*STEP+2; the window is
// therefore WIN_ROWS = 3 + (TILE_ROWS-1)*STEP rows high. One collector with
// a lane per tile row packs the results, and the memory arbiter writes them
// into PEx memory. APP selects the inner loop body: the Prewitt edge
// detector or the threshold example. done rises when the collector has seen
// the end of data and the last word is written.
// Timing: a crossbar column is in the window one cycle after it arrives; the
// ILB is combinational and the collector samples its output in that cycle.
module pex_top
  import cameron_pkg::*;
#(
  parameter ilb_sel_e APP       = ILB_PREWITT,
  parameter int       TILE_ROWS = 1,
  parameter int       STEP      = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  xbar_t             xbar_in,
  output logic              mem_we,
  output logic [PEX_AW-1:0] mem_addr,
  output word_t             mem_wdata,
  output logic              done
);

  localparam int WIN_ROWS = KERN_ROWS + (TILE_ROWS - 1) * STEP;

  rt_const_t consts;
  logic      consts_valid;
  pix_t [0:0][WIN_ROWS-1:0][KERN_COLS-1:0] window;
  logic      store_data, row_end, data_end;
  word_t     strip;
  pix_t [TILE_ROWS-1:0] results;
  wr_req_t [TILE_ROWS-1:0] wr_req;
  logic [TILE_ROWS-1:0] wr_gnt;
  logic      coll_done, arb_idle;

  window_gen_distribute #(.WIN_ROWS(WIN_ROWS), .WIN_COLS(KERN_COLS)) u_dist (
    .clk, .rst_n, .xbar_in, .consts, .consts_valid, .window,
    .store_data, .row_end, .data_end, .strip
  );

  for (genvar l = 0; l < TILE_ROWS; l++) begin : g_ilb
    pix_t [KERN_ROWS-1:0][KERN_COLS-1:0] sub;
    for (genvar r = 0; r < KERN_ROWS; r++) begin : g_row
      assign sub[r] = window[0][l*STEP + r];
    end
    if (APP == ILB_PREWITT) begin : g_prewitt
      ilb_prewitt u_ilb (.window(sub), .result(results[l]));
    end else begin : g_thresh
      ilb_threshold u_ilb (.window(sub), .result(results[l]));
    end
  end

  collector #(.LANES(TILE_ROWS)) u_coll (
    .clk, .rst_n, .consts, .store_data, .row_end, .data_end, .strip,
    .results, .wr_req, .wr_gnt, .done(coll_done)
  );

  mem_arb #(.N_REQ(TILE_ROWS)) u_arb (
    .clk, .rst_n, .wr_req, .wr_gnt, .mem_we, .mem_addr, .mem_wdata, .idle(arb_idle)
  );

  assign done = coll_done && arb_idle && consts_valid;

endmodule
