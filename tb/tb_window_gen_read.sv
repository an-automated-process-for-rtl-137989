// tb_window_gen_read: four configurations of the read half, each with its
// own memory model.
//   cfg 0: 3-row columns, strip step 1, window step 1, no extra NULLs,
//          8 x 16 image (6 strips)
//   cfg 1: 4-row columns (stripmined), strips 2 rows apart, window step 2,
//          one extra NULL per frame, 9 x 12 image (4 strips)
//   cfg 2: two generators joined by dot (second image at word 300),
//          6 x 8 images, columns of the two interleaved
//   cfg 3: the element generator, a 1 x 1 window over a 5 x 8 image: one
//          pixel per crossbar word, no DontStore, one strip per image row
// The crossbar stream is compared, valid word by valid word, with an
// expected sequence built from the image: the six constants, then for every
// strip every column with its ValidData, Start/Stop, DontStore and LastCol
// tags. It also checks the NULL count of cfg 1 (at least one per frame),
// the rate of cfg 0 (one column per cycle after the first frame) and that
// finished waits for done.
`timescale 1ns/1ps
module tb_window_gen_read;
  import cameron_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 4;
  localparam int WR  [NCFG] = '{3, 4, 3, 1};
  localparam int KH  [NCFG] = '{3, 3, 3, 1};   // window height and width
  localparam int KW  [NCFG] = '{3, 3, 3, 1};
  localparam int ADV [NCFG] = '{1, 2, 1, 1};
  localparam int STP [NCFG] = '{1, 2, 1, 1};
  localparam int NUL [NCFG] = '{0, 1, 0, 0};
  localparam int NG  [NCFG] = '{1, 1, 2, 1};
  localparam int R   [NCFG] = '{8, 9, 6, 5};
  localparam int C   [NCFG] = '{16, 12, 8, 8};
  localparam int SRC = 20, SRC2 = 300;

  int checks [NCFG];
  int failures [NCFG];
  logic finished_ok [NCFG];
  logic done_all [NCFG];
  logic done_in = 1'b0;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    rt_const_t          consts;
    word_t [NG[g]-1:0]  gen_src;
    logic               ready = 1'b0;
    logic               rd_en;
    logic [CPE0_AW-1:0] addr;
    word_t              rdata;
    xbar_t              xo;
    logic               finished;
    word_t              mem [512];
    xbar_t              exp_q [$];
    xbar_t              xr;
    int                 nnull = 0, nvalid = 0, first_cyc = -1, last_cyc = -1, cyc = 0;

    window_gen_read #(.WIN_ROWS(WR[g]), .STRIP_ADV(ADV[g]), .COL_STEP(STP[g]),
                      .NULLS_PER_FRAME(NUL[g]), .N_GEN(NG[g]),
                      .WIN_H(KH[g]), .WIN_W(KW[g])) dut (
      .clk, .rst_n, .ready, .consts, .gen_src, .done(done_in), .mem_rd_en(rd_en), .mem_addr(addr),
      .mem_rdata(rdata), .xbar_out(xo), .finished);

    always_ff @(posedge clk) if (rd_en) rdata <= mem[addr[8:0]];

    function automatic int px(int gen, int r, int c);
      word_t w;
      w = mem[((gen == 0) ? SRC : SRC2) + r * (C[g] / 4) + c / 4];
      return int'(w[(c % 4) * 8 +: 8]);
    endfunction

    initial begin
      xbar_t x;
      checks[g] = 0; failures[g] = 0; done_all[g] = 1'b0; finished_ok[g] = 1'b0;
      for (int i = 0; i < 512; i++) mem[i] = $urandom();
      consts = '{dst_addr: 32'd5, dst_rows: 32'd6, dst_cols: 32'd7, src_addr: SRC,
                 src_rows: R[g], src_cols: C[g]};
      gen_src[0] = SRC;
      if (NG[g] > 1) gen_src[NG[g]-1] = SRC2;
      // expected stream
      for (int i = 0; i < N_CONST; i++) begin
        x = '0; x.valid = 1; x.dontstore = 1;
        x.data = consts[(N_CONST - 1 - i) * 32 +: 32];
        exp_q.push_back(x);
      end
      for (int r0 = 0; r0 + KH[g] <= R[g]; r0 += ADV[g]) begin
        for (int c = 0; c < C[g]; c++)
          for (int gen = 0; gen < NG[g]; gen++) begin
            x = '0;
            x.valid = 1;
            for (int i = 0; i < WR[g]; i++) x.data[i*8 +: 8] = 8'(px(gen, r0 + i, c));
            if (gen == NG[g] - 1) begin
              x.lastcol = (c == C[g] - 1);
              x.dontstore = !(c >= KW[g] - 1 && (c - KW[g] + 1) % STP[g] == 0);
            end else x.dontstore = 1;
            x.startstop = (gen == 0 && r0 == 0 && c == 0) || (r0 + ADV[g] + KH[g] > R[g] && x.lastcol);
            exp_q.push_back(x);
          end
      end
      wait (rst_n);
      @(negedge clk) ready = 1'b1;
    end

    always @(posedge clk) if (rst_n) begin
      cyc <= cyc + 1;
      if (xo.valid) begin
        checks[g]++;
        if (exp_q.size() == 0) begin
          failures[g]++;
          $display("cfg %0d: extra crossbar word %h", g, xo);
        end else begin
          xr = exp_q.pop_front();
          if (xo !== xr) begin
            failures[g]++;
            if (failures[g] < 8) $display("cfg %0d: got %h expected %h", g, xo, xr);
          end
        end
        if (nvalid == N_CONST) first_cyc <= cyc;
        last_cyc <= cyc;
        nvalid <= nvalid + 1;
        if (xr.startstop && nvalid > N_CONST) done_all[g] <= 1'b1;
      end else if (nvalid > N_CONST && !done_all[g]) nnull <= nnull + 1;
    end
  end

  initial begin
    int frames1, cols0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_all[0] && done_all[1] && done_all[2] && done_all[3]);
    repeat (5) @(posedge clk);
    for (int g = 0; g < NCFG; g++) begin
      checks[g]++;
      if (g_cfg[0].finished || g_cfg[1].finished || g_cfg[2].finished || g_cfg[3].finished) begin failures[g]++; $display("finished before done"); end
    end
    done_in = 1'b1;
    repeat (2) @(posedge clk);
    checks[0]++;
    if (!(g_cfg[0].finished && g_cfg[1].finished && g_cfg[2].finished && g_cfg[3].finished)) begin failures[0]++; $display("finished missing"); end
    checks[0]++;
    if (g_cfg[0].exp_q.size() != 0 || g_cfg[1].exp_q.size() != 0 || g_cfg[2].exp_q.size() != 0 ||
        g_cfg[3].exp_q.size() != 0) begin
      failures[0]++; $display("missing crossbar words %0d %0d", g_cfg[0].exp_q.size(), g_cfg[1].exp_q.size());
    end
    // cfg 1: 4 strips x 3 frames, at least NULLS_PER_FRAME after each
    frames1 = 4 * 3;
    checks[1]++;
    if (g_cfg[1].nnull < frames1 - 1) begin failures[1]++; $display("cfg 1: only %0d NULLs", g_cfg[1].nnull); end
    // cfg 2 also streams without gaps: 4 strips x 8 columns x 2 generators
    checks[2]++;
    if (g_cfg[2].last_cyc - g_cfg[2].first_cyc + 1 != 64) begin
      failures[2]++;
      $display("cfg 2: 64 columns took %0d cycles", g_cfg[2].last_cyc - g_cfg[2].first_cyc + 1);
    end
    // cfg 3 streams one pixel per cycle: 5 rows x 8 pixels
    checks[3]++;
    if (g_cfg[3].last_cyc - g_cfg[3].first_cyc + 1 != 40) begin
      failures[3]++;
      $display("cfg 3: 40 pixels took %0d cycles", g_cfg[3].last_cyc - g_cfg[3].first_cyc + 1);
    end
    // cfg 0 runs at one column per cycle: 6 strips x 16 columns
    cols0 = 6 * 16;
    checks[0]++;
    if (g_cfg[0].last_cyc - g_cfg[0].first_cyc + 1 != cols0) begin
      failures[0]++;
      $display("cfg 0: %0d columns took %0d cycles", cols0, g_cfg[0].last_cyc - g_cfg[0].first_cyc + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2] + checks[3], failures[0] + failures[1] + failures[2] + failures[3]);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2] + checks[3], failures[0] + failures[1] + failures[2] + failures[3] + 1);
    $finish;
  end
endmodule
