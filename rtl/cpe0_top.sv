// cpe0_top: everything on the control FPGA (CPE0).
//
// After reset the constant grabber owns the CPE0 memory read port and
// fetches the run-time constants; when it raises ready the read half of the
// window generator takes the port over, sends the constants on the crossbar
// and then streams the image. The strip height and stepping are derived from
// the tile and step parameters the same way pex_top derives its window, and
// NULLS_PER_FRAME defaults to the rate rule in cameron_pkg. N_GEN > 1 builds
// the dot form, N_GEN generators interleaved on the crossbar, whose further
// source addresses are fetched from words DOT_ADDR_BASE onwards. done_in is the
// done signal returned from PEx; finished is high once the run is over.
module cpe0_top
  import cameron_pkg::*;
#(
  parameter int TILE_ROWS       = 1,
  parameter int STEP            = 1,
  parameter int NULLS_PER_FRAME = nulls_per_frame(TILE_ROWS),
  parameter logic [CPE0_AW-1:0] CONST_ADDR [N_CONST] = '{18'd0, 18'd1, 18'd2, 18'd3, 18'd4, 18'd5},
  parameter int                 N_GEN         = 1,
  parameter logic [CPE0_AW-1:0] DOT_ADDR_BASE = 18'd6
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               mem_rd_en,
  output logic [CPE0_AW-1:0] mem_addr,
  input  word_t              mem_rdata,
  output xbar_t              xbar_out,
  input  logic               done_in,
  output logic               ready,
  output logic               finished
);

  localparam int WIN_ROWS = KERN_ROWS + (TILE_ROWS - 1) * STEP;

  rt_const_t          consts;
  word_t [N_GEN-1:0]  gen_src;
  logic               cg_rd_en, wg_rd_en;
  logic [CPE0_AW-1:0] cg_addr, wg_addr;

  const_grabber #(.CONST_ADDR(CONST_ADDR), .N_GEN(N_GEN), .DOT_ADDR_BASE(DOT_ADDR_BASE)) u_cg (
    .clk, .rst_n, .mem_rd_en(cg_rd_en), .mem_addr(cg_addr), .mem_rdata,
    .consts, .gen_src, .ready
  );

  window_gen_read #(
    .WIN_ROWS(WIN_ROWS), .STRIP_ADV(TILE_ROWS * STEP), .COL_STEP(STEP),
    .NULLS_PER_FRAME(NULLS_PER_FRAME), .N_GEN(N_GEN)
  ) u_read (
    .clk, .rst_n, .ready, .consts, .gen_src, .done(done_in),
    .mem_rd_en(wg_rd_en), .mem_addr(wg_addr), .mem_rdata, .xbar_out, .finished
  );

  assign mem_rd_en = ready ? wg_rd_en : cg_rd_en;
  assign mem_addr  = ready ? wg_addr  : cg_addr;

endmodule
