// tb_prewitt_stripmine: the two evaluated Prewitt configurations side by
// side on the same 256 x 256 random image: one inner loop body, and 4x3
// stripmining with two inner loop bodies (a 2 x 1 result tile per window
// position). Both result images are checked in full. Stripmining halves the
// number of strips, so the second run must take at most 55% of the cycles
// of the first: doubling the parallelism about doubles the rate.
`timescale 1ns/1ps
module tb_prewitt_stripmine;
  import cameron_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 256;
  logic               rst_n [2];
  logic               rd_en [2];
  logic [CPE0_AW-1:0] raddr [2];
  word_t              rdata [2];
  logic               we    [2];
  logic [PEX_AW-1:0]  waddr [2];
  word_t              wdata [2];
  xbar_t              xb    [2];
  logic               done  [2];
  logic               fin   [2];
  int                 bchk  [2];
  int                 bfail [2];
  int                 bcyc  [2];
  logic               bcomp [2];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < 2; g++) begin : g_sys
    wildforce_top #(.APP(ILB_PREWITT), .TILE_ROWS(g + 1)) dut (
      .clk, .rst_n(rst_n[g]), .cpe0_mem_rd_en(rd_en[g]), .cpe0_mem_addr(raddr[g]),
      .cpe0_mem_rdata(rdata[g]), .pex_mem_we(we[g]), .pex_mem_addr(waddr[g]),
      .pex_mem_wdata(wdata[g]), .xbar(xb[g]), .done(done[g]), .finished(fin[g]));
    wf_bench #(.APP(ILB_PREWITT), .ROWS(N), .COLS(N), .SEED(5), .MAX_CYC(150000)) bench (
      .clk, .rst_n(rst_n[g]), .cpe0_mem_rd_en(rd_en[g]), .cpe0_mem_addr(raddr[g]),
      .cpe0_mem_rdata(rdata[g]), .pex_mem_we(we[g]), .pex_mem_addr(waddr[g]),
      .pex_mem_wdata(wdata[g]), .done(done[g]), .checks(bchk[g]), .failures(bfail[g]),
      .cycles(bcyc[g]), .complete(bcomp[g]));
  end

  initial begin
    #1;
    wait (bcomp[0] && bcomp[1]);
    for (int g = 0; g < 2; g++) begin
      checks   += bchk[g];
      failures += bfail[g];
      $display("inner loop bodies %0d: %0d cycles", g + 1, bcyc[g]);
    end
    checks++;
    if (real'(bcyc[1]) > 0.55 * real'(bcyc[0])) begin
      failures++;
      $display("FAIL: stripmining did not double the rate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
