// tb_wildforce_full: one complete Prewitt run of wildforce_top with every
// parameter at its default (one inner loop body, window step 1), on a
// 512 x 512 random image. The bench checks all 510 x 510 results and the
// number of writes; this test also checks the run time: once streaming, the
// crossbar carries one column per cycle, so the run must end within
// 510 strips x 512 columns plus a small per-strip allowance.
`timescale 1ns/1ps
module tb_wildforce_full;
  import cameron_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int ROWS = 512, COLS = 512;
  logic               rst_n;
  logic               rd_en;
  logic [CPE0_AW-1:0] raddr;
  word_t              rdata;
  logic               we;
  logic [PEX_AW-1:0]  waddr;
  word_t              wdata;
  xbar_t              xb;
  logic               done, fin;
  int                 bchk, bfail, bcyc;
  logic               bcomp;
  int checks = 0, failures = 0;

  wildforce_top dut (
    .clk, .rst_n, .cpe0_mem_rd_en(rd_en), .cpe0_mem_addr(raddr), .cpe0_mem_rdata(rdata),
    .pex_mem_we(we), .pex_mem_addr(waddr), .pex_mem_wdata(wdata), .xbar(xb), .done,
    .finished(fin));

  wf_bench #(.APP(ILB_PREWITT), .STEP(1), .ROWS(ROWS), .COLS(COLS), .SRC_ADDR(64),
             .DST_ADDR(1024), .SEED(7), .MAX_CYC(400000)) bench (
    .clk, .rst_n, .cpe0_mem_rd_en(rd_en), .cpe0_mem_addr(raddr), .cpe0_mem_rdata(rdata),
    .pex_mem_we(we), .pex_mem_addr(waddr), .pex_mem_wdata(wdata), .done,
    .checks(bchk), .failures(bfail), .cycles(bcyc), .complete(bcomp));

  initial begin
    #1;
    wait (bcomp);
    checks   = bchk;
    failures = bfail;
    $display("run of %0d x %0d took %0d cycles", ROWS, COLS, bcyc);
    checks++;
    if (bcyc > (ROWS - 2) * COLS + 2 * (ROWS - 2) + 50) begin
      failures++;
      $display("FAIL: too slow");
    end
    checks++;
    if (!fin) begin failures++; $display("FAIL: CPE0 not finished"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
