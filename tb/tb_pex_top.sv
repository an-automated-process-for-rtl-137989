// tb_pex_top: PEx on its own, fed with a crossbar stream built here from a
// random image, with random NULLs between columns.
//   cfg 0: Prewitt, one inner loop body, 7 x 12 image
//   cfg 1: threshold example, tile of two rows (4-row columns), 8 x 8 image
// The writes to PEx memory are compared with a reference result image,
// row-aligned at word 50; done must follow the last write.
`timescale 1ns/1ps
module tb_pex_top;
  import cameron_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 2;
  localparam int T [NCFG] = '{1, 2};
  localparam int R [NCFG] = '{7, 8};
  localparam int C [NCFG] = '{12, 8};
  localparam int DST = 50;

  int checks [NCFG];
  int failures [NCFG];
  logic fin [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam ilb_sel_e APP = ilb_sel_e'(g);
    localparam int WR = 3 + T[g] - 1;
    localparam int DR = R[g] - 2, DC = C[g] - 2, DP = (DC + 3) / 4;
    xbar_t xin;
    logic we;
    logic [PEX_AW-1:0] addr;
    word_t wdata;
    logic done;
    int img [10][12];
    word_t mem [128];
    int n_wr;

    pex_top #(.APP(APP), .TILE_ROWS(T[g])) dut (.clk, .rst_n, .xbar_in(xin), .mem_we(we),
                                               .mem_addr(addr), .mem_wdata(wdata), .done);

    always @(posedge clk) if (rst_n && we) begin
      mem[addr[6:0]] <= wdata;
      n_wr <= n_wr + 1;
    end

    function automatic int ref_at(int y, int x);
      int sh, sv, s;
      sh = 0; sv = 0; s = 0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          sh += (i - 1) * img[y + i][x + j];
          sv += (j - 1) * img[y + i][x + j];
          s  += img[y + i][x + j];
        end
      if (APP == ILB_PREWITT) return int'($floor($sqrt(real'(sh * sh + sv * sv)))) / 8;
      s = s % 256;
      return (s > 100) ? s - 100 : s;
    endfunction

    function automatic xbar_t const_word(int v);
      xbar_t x;
      x = '0;
      x.valid = 1'b1;
      x.dontstore = 1'b1;
      x.data = word_t'(v);
      return x;
    endfunction

    xbar_t stream [$];

    initial begin
      xbar_t x;
      word_t e;
      int nstrips, bad;
      checks[g] = 0; failures[g] = 0; fin[g] = 1'b0; n_wr = 0;
      xin = '0;
      for (int i = 0; i < 128; i++) mem[i] = '0;
      for (int r = 0; r < R[g] + 2; r++) for (int c = 0; c < C[g]; c++) img[r][c] = $urandom() % 256;
      wait (rst_n);
      // constants: dst addr, rows, cols, src addr, rows, cols
      stream.push_back(const_word(DST));
      stream.push_back(const_word(DR));
      stream.push_back(const_word(DC));
      stream.push_back(const_word(0));
      stream.push_back(const_word(R[g]));
      stream.push_back(const_word(C[g]));
      nstrips = 0;
      for (int r0 = 0; r0 + 3 <= R[g]; r0 += T[g]) nstrips++;
      for (int s = 0; s < nstrips; s++)
        for (int c = 0; c < C[g]; c++) begin
          x = '0; x.valid = 1;
          for (int i = 0; i < WR; i++) x.data[i*8 +: 8] = 8'(img[s * T[g] + i][c]);
          x.lastcol = (c == C[g] - 1);
          x.startstop = (s == 0 && c == 0) || (s == nstrips - 1 && x.lastcol);
          x.dontstore = (c < 2);
          stream.push_back(x);
        end
      foreach (stream[i]) begin
        @(negedge clk) xin = stream[i];
        while ($urandom() % 4 == 0) @(negedge clk) xin = '0;
      end
      @(negedge clk) xin = '0;
      for (int t = 0; t < 50 && !done; t++) @(negedge clk);
      checks[g]++;
      if (!done) begin failures[g]++; $display("cfg %0d: no done", g); end
      checks[g]++;
      if (n_wr != DR * DP) begin failures[g]++; $display("cfg %0d: %0d writes", g, n_wr); end
      bad = 0;
      for (int y = 0; y < DR; y++)
        for (int w = 0; w < DP; w++) begin
          e = '0;
          for (int b = 0; b < 4; b++) if (w * 4 + b < DC) e[b*8 +: 8] = 8'(ref_at(y, w * 4 + b));
          checks[g]++;
          if (mem[DST + y * DP + w] != e) begin
            failures[g]++;
            bad = bad + 1;
            if (bad < 6) $display("cfg %0d row %0d word %0d: %h vs %h", g, y, w, mem[DST + y * DP + w], e);
          end
        end
      fin[g] = 1'b1;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1]);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1] + 1);
    $finish;
  end
endmodule
