// wildforce_top: the two-FPGA system, CPE0 and one processing element PEx.
//
// CPE0 reads the run-time constants and the image from its local memory and
// sends window columns over the 36-bit crossbar; PEx forms the sliding
// window, runs the inner loop body (Prewitt by default), and stores the
// result image in its own local memory. Each side has its own memory, so
// reading and writing never contend. PEx returns done to CPE0, and done is
// brought out for the host, as is finished, CPE0's end of run. The board memories and the host are outside this
// module: the CPE0 read port and the PEx write port are top-level ports, and
// the crossbar word is brought out as xbar for observation. One clock and
// one active-low reset serve both FPGAs.
//
// Parameters: APP selects the inner loop body, TILE_ROWS = 2 gives the 4x3
// stripmined configuration with two inner loop bodies, STEP is the window
// step, NULLS_PER_FRAME the NULL cycles added after each crossbar frame.
module wildforce_top
  import cameron_pkg::*;
#(
  parameter ilb_sel_e APP             = ILB_PREWITT,
  parameter int       TILE_ROWS       = 1,
  parameter int       STEP            = 1,
  parameter int       NULLS_PER_FRAME = nulls_per_frame(TILE_ROWS)
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               cpe0_mem_rd_en,
  output logic [CPE0_AW-1:0] cpe0_mem_addr,
  input  word_t              cpe0_mem_rdata,
  output logic               pex_mem_we,
  output logic [PEX_AW-1:0]  pex_mem_addr,
  output word_t              pex_mem_wdata,
  output xbar_t              xbar,
  output logic               done,
  output logic               finished
);

  cpe0_top #(.TILE_ROWS(TILE_ROWS), .STEP(STEP), .NULLS_PER_FRAME(NULLS_PER_FRAME)) u_cpe0 (
    .clk, .rst_n, .mem_rd_en(cpe0_mem_rd_en), .mem_addr(cpe0_mem_addr),
    .mem_rdata(cpe0_mem_rdata), .xbar_out(xbar), .done_in(done), .ready(), .finished
  );

  pex_top #(.APP(APP), .TILE_ROWS(TILE_ROWS), .STEP(STEP)) u_pex (
    .clk, .rst_n, .xbar_in(xbar), .mem_we(pex_mem_we), .mem_addr(pex_mem_addr),
    .mem_wdata(pex_mem_wdata), .done
  );

endmodule
