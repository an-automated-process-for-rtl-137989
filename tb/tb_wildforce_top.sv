// tb_wildforce_top: end-to-end test of the two-FPGA system.
//
// Three systems run side by side on small random images:
//   d0  Prewitt, no stripmining, 9 x 12 image (partial last word per row)
//   d1  Prewitt, 4x3 stripmining (two inner loop bodies), 9 x 16 image, so
//       the second lane of the last strip has no row to write
//   d2  threshold example, window step 2, two extra NULLs per frame, 10 x 12
// Each bench checks every result word and the number of writes. On top of
// that the test counts the mechanisms of the protocol from the crossbar and
// the internals and fails any that never occurred: constants sent, NULLs
// while waiting, throttling NULLs, DontStore columns, stepped DontStore,
// LastCol, Start/Stop, a frame fetched while another is sent (double
// buffering), simultaneous store requests from two lanes, and the result
// rate of one column per cycle for d0.
`timescale 1ns/1ps
module tb_wildforce_top;
  import cameron_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ systems
  logic               rst_n [3];
  logic               rd_en [3];
  logic [CPE0_AW-1:0] raddr [3];
  word_t              rdata [3];
  logic               we    [3];
  logic [PEX_AW-1:0]  waddr [3];
  word_t              wdata [3];
  xbar_t              xb    [3];
  logic               done  [3];
  logic               fin   [3];
  int                 bchk  [3];
  int                 bfail [3];
  int                 bcyc  [3];
  logic               bcomp [3];

  wildforce_top #(.APP(ILB_PREWITT), .TILE_ROWS(1), .STEP(1)) d0 (
    .clk, .rst_n(rst_n[0]), .cpe0_mem_rd_en(rd_en[0]), .cpe0_mem_addr(raddr[0]),
    .cpe0_mem_rdata(rdata[0]), .pex_mem_we(we[0]), .pex_mem_addr(waddr[0]),
    .pex_mem_wdata(wdata[0]), .xbar(xb[0]), .done(done[0]), .finished(fin[0]));
  wf_bench #(.APP(ILB_PREWITT), .STEP(1), .ROWS(9), .COLS(12), .SEED(11)) b0 (
    .clk, .rst_n(rst_n[0]), .cpe0_mem_rd_en(rd_en[0]), .cpe0_mem_addr(raddr[0]),
    .cpe0_mem_rdata(rdata[0]), .pex_mem_we(we[0]), .pex_mem_addr(waddr[0]),
    .pex_mem_wdata(wdata[0]), .done(done[0]), .checks(bchk[0]), .failures(bfail[0]),
    .cycles(bcyc[0]), .complete(bcomp[0]));

  wildforce_top #(.APP(ILB_PREWITT), .TILE_ROWS(2), .STEP(1)) d1 (
    .clk, .rst_n(rst_n[1]), .cpe0_mem_rd_en(rd_en[1]), .cpe0_mem_addr(raddr[1]),
    .cpe0_mem_rdata(rdata[1]), .pex_mem_we(we[1]), .pex_mem_addr(waddr[1]),
    .pex_mem_wdata(wdata[1]), .xbar(xb[1]), .done(done[1]), .finished(fin[1]));
  wf_bench #(.APP(ILB_PREWITT), .STEP(1), .ROWS(9), .COLS(16), .SEED(22)) b1 (
    .clk, .rst_n(rst_n[1]), .cpe0_mem_rd_en(rd_en[1]), .cpe0_mem_addr(raddr[1]),
    .cpe0_mem_rdata(rdata[1]), .pex_mem_we(we[1]), .pex_mem_addr(waddr[1]),
    .pex_mem_wdata(wdata[1]), .done(done[1]), .checks(bchk[1]), .failures(bfail[1]),
    .cycles(bcyc[1]), .complete(bcomp[1]));

  wildforce_top #(.APP(ILB_THRESHOLD), .TILE_ROWS(1), .STEP(2), .NULLS_PER_FRAME(2)) d2 (
    .clk, .rst_n(rst_n[2]), .cpe0_mem_rd_en(rd_en[2]), .cpe0_mem_addr(raddr[2]),
    .cpe0_mem_rdata(rdata[2]), .pex_mem_we(we[2]), .pex_mem_addr(waddr[2]),
    .pex_mem_wdata(wdata[2]), .xbar(xb[2]), .done(done[2]), .finished(fin[2]));
  wf_bench #(.APP(ILB_THRESHOLD), .STEP(2), .ROWS(10), .COLS(12), .SEED(33)) b2 (
    .clk, .rst_n(rst_n[2]), .cpe0_mem_rd_en(rd_en[2]), .cpe0_mem_addr(raddr[2]),
    .cpe0_mem_rdata(rdata[2]), .pex_mem_we(we[2]), .pex_mem_addr(waddr[2]),
    .pex_mem_wdata(wdata[2]), .done(done[2]), .checks(bchk[2]), .failures(bfail[2]),
    .cycles(bcyc[2]), .complete(bcomp[2]));

  // ------------------------------------------------------- mechanism counts
  int n_const [3], n_null_run [3], n_dontstore [3], n_lastcol [3], n_startstop [3];
  int n_valid_cols [3];
  logic in_run [3];
  int n_dbuf, n_both_req, n_step_skip, n_cols0, first_col0, last_col0;

  initial begin
    for (int i = 0; i < 3; i++) begin
      n_const[i] = 0; n_null_run[i] = 0; n_dontstore[i] = 0; n_lastcol[i] = 0;
      n_startstop[i] = 0; n_valid_cols[i] = 0; in_run[i] = 1'b0;
    end
    n_dbuf = 0; n_both_req = 0; n_step_skip = 0; n_cols0 = 0; first_col0 = -1; last_col0 = -1;
  end

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < 3; i++) begin
      if (rst_n[i]) begin
        if (xb[i].valid && !in_run[i] && !xb[i].startstop && n_startstop[i] == 0) n_const[i]++;
        if (xb[i].valid && xb[i].startstop) begin
          n_startstop[i]++;
          in_run[i] = (n_startstop[i] == 1);
        end
        if (in_run[i] && !xb[i].valid) n_null_run[i]++;
        if (xb[i].valid && n_startstop[i] > 0) begin
          n_valid_cols[i]++;
          if (xb[i].dontstore) n_dontstore[i]++;
          if (xb[i].lastcol) n_lastcol[i]++;
        end
      end
    end
    if (xb[0].valid && n_startstop[0] > 0) begin
      if (first_col0 < 0) first_col0 = cyc;
      last_col0 = cyc;
    end
    // a frame is fetched from memory while XbarOut is being sent
    if (d0.u_cpe0.u_read.mem_rd_en && d0.u_cpe0.u_read.sending) n_dbuf++;
    if (d1.u_pex.wr_req[0].req && d1.u_pex.wr_req[1].req) n_both_req++;
    // stepped windows: a full window that is not stored
    if (d2.u_pex.u_dist.row_end == 1'b0 && xb[2].valid && xb[2].dontstore &&
        d2.u_cpe0.u_read.col_cnt > 3) n_step_skip++;
  end

  task automatic expect_event(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never happened: %s", what);
    end else $display("  %-34s %0d", what, n);
  endtask

  initial begin
    #1;
    wait (bcomp[0] && bcomp[1] && bcomp[2]);
    for (int i = 0; i < 3; i++) begin
      checks   += bchk[i];
      failures += bfail[i];
      $display("system %0d: %0d cycles, %0d checks, %0d failures", i, bcyc[i], bchk[i], bfail[i]);
      checks++;
      if (n_const[i] != N_CONST) begin failures++; $display("FAIL: d%0d sent %0d constants", i, n_const[i]); end
      checks++;
      if (n_startstop[i] != 2) begin failures++; $display("FAIL: d%0d %0d Start/Stop tags", i, n_startstop[i]); end
      checks++;
      if (!fin[i]) begin failures++; $display("FAIL: d%0d CPE0 did not finish", i); end
    end
    // rows of windows: (9-2)=7 strips of 12 columns, 4 strips of 16, 4 of 12
    checks++;
    if (n_lastcol[0] != 7 || n_lastcol[1] != 4 || n_lastcol[2] != 4) begin
      failures++;
      $display("FAIL: LastCol counts %0d %0d %0d", n_lastcol[0], n_lastcol[1], n_lastcol[2]);
    end
    // d0 streams one column per cycle once running: 7 strips x 12 columns,
    // with at most one NULL per strip boundary
    checks++;
    if (n_valid_cols[0] != 84 || last_col0 - first_col0 + 1 > 84 + 7) begin
      failures++;
      $display("FAIL: d0 sent %0d columns in %0d cycles", n_valid_cols[0], last_col0 - first_col0 + 1);
    end
    expect_event("constants sent (d0)",            n_const[0]);
    expect_event("NULLs while running (d2)",       n_null_run[2]);
    expect_event("throttling NULLs (d2)",          n_null_run[2] - n_null_run[0]);
    expect_event("DontStore columns (d0)",         n_dontstore[0]);
    expect_event("stepped DontStore columns (d2)", n_step_skip);
    expect_event("LastCol (d1)",                   n_lastcol[1]);
    expect_event("Start/Stop (d0)",                n_startstop[0]);
    expect_event("fetch during send (d0)",         n_dbuf);
    expect_event("two lanes requesting (d1)",      n_both_req);
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
