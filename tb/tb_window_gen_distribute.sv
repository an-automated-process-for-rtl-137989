// tb_window_gen_distribute: feeds a 4-row-column stream (as for the
// stripmined generator) with random NULLs: the constants, a stray valid word
// before Start that must be ignored, then two strips of 8 columns with their
// tags. After every valid column it compares the window with a reference
// shift register kept here, and store_data, row_end, data_end and strip with
// the tags that were sent. A second instance with two generators joined by
// dot gets interleaved columns (generator 0, generator 1, ...) and must keep
// one sliding window per generator. A third instance is the element
// generator's distribute half, a 1 x 1 window: each pixel must appear as the
// window one cycle after it arrives, with store_data set.
`timescale 1ns/1ps
module tb_window_gen_distribute;
  import cameron_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  xbar_t     xin;
  rt_const_t consts;
  logic      consts_valid;
  pix_t [0:0][3:0][2:0] window;
  logic      store_data, row_end, data_end;
  word_t     strip;
  int checks = 0, failures = 0;

  xbar_t     xin2;
  rt_const_t consts2;
  logic      cv2;
  pix_t [1:0][2:0][2:0] window2;
  logic      sd2, re2, de2;
  word_t     strip2;

  xbar_t     xin1;
  rt_const_t consts1;
  logic      cv1;
  pix_t [0:0][0:0][0:0] window1;
  logic      sd1, re1, de1;
  word_t     strip1;

  window_gen_distribute #(.WIN_ROWS(1), .WIN_COLS(1)) dut1 (
    .clk, .rst_n, .xbar_in(xin1), .consts(consts1), .consts_valid(cv1), .window(window1),
    .store_data(sd1), .row_end(re1), .data_end(de1), .strip(strip1));

  window_gen_distribute #(.WIN_ROWS(3), .WIN_COLS(3), .N_GEN(2)) dut2 (
    .clk, .rst_n, .xbar_in(xin2), .consts(consts2), .consts_valid(cv2), .window(window2),
    .store_data(sd2), .row_end(re2), .data_end(de2), .strip(strip2));

  window_gen_distribute #(.WIN_ROWS(4), .WIN_COLS(3)) dut (
    .clk, .rst_n, .xbar_in(xin), .consts, .consts_valid, .window,
    .store_data, .row_end, .data_end, .strip);

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  word_t cols [$];
  int    n_strip = 0;

  task automatic send(xbar_t x);
    @(negedge clk) xin = x;
    // random NULLs between words
    while ($urandom() % 3 == 0) begin
      @(negedge clk) xin = '0;
    end
  endtask

  task automatic send_col(word_t d, logic ss, logic ds, logic lc);
    xbar_t x;
    x = '{valid: 1'b1, startstop: ss, dontstore: ds, lastcol: lc, data: d};
    @(negedge clk) xin = x;
    @(negedge clk) xin = '0;
    cols.push_back(d);
    if (cols.size() > 3) void'(cols.pop_front());
    for (int c = 0; c < cols.size(); c++)
      for (int r = 0; r < 4; r++)
        chk($sformatf("window[%0d][%0d]", r, 3 - cols.size() + c),
            window[0][r][3 - cols.size() + c] == cols[c][r*8 +: 8]);
    chk("store_data", store_data == !ds);
    chk("row_end", row_end == lc);
    chk("strip", strip == word_t'(n_strip));
    if (lc) n_strip++;
    repeat ($urandom() % 2) begin
      @(negedge clk);
      chk("flags are one cycle", !store_data && !row_end);
    end
  endtask

  // two generators: 6 constants, then 6 image columns, each as a column of
  // generator 0 followed by one of generator 1
  task automatic dot_test();
    xbar_t x;
    word_t c0 [$], c1 [$];
    for (int i = 0; i < N_CONST; i++) begin
      @(negedge clk) xin2 = '{valid: 1'b1, startstop: 1'b0, dontstore: 1'b1, lastcol: 1'b0, data: 32'(i)};
    end
    for (int c = 0; c < 6; c++)
      for (int g = 0; g < 2; g++) begin
        x.valid     = 1'b1;
        x.data      = $urandom() & 32'h00ffffff;
        x.startstop = (g == 0 && c == 0) || (g == 1 && c == 5);
        x.dontstore = (g == 0) || c < 2;
        x.lastcol   = (g == 1 && c == 5);
        @(negedge clk) xin2 = x;
        @(negedge clk) xin2 = '0;
        if (g == 0) begin c0.push_back(x.data); if (c0.size() > 3) void'(c0.pop_front()); end
        else        begin c1.push_back(x.data); if (c1.size() > 3) void'(c1.pop_front()); end
        chk("dot: store only after the last generator", sd2 == (g == 1 && c >= 2));
        chk("dot: row end", re2 == (g == 1 && c == 5));
        chk("dot: data end", de2 == (g == 1 && c == 5));
        if (c >= 2)
          for (int k = 0; k < 3; k++)
            for (int r = 0; r < 3; r++) begin
              chk("dot: window 0", window2[0][r][k] == c0[k][r*8 +: 8]);
              if (g == 1) chk("dot: window 1", window2[1][r][k] == c1[k][r*8 +: 8]);
            end
      end
  endtask

  // element generator: 6 constants, then a 2 x 4 image, pixel by pixel
  task automatic element_test();
    xbar_t x;
    for (int i = 0; i < N_CONST; i++) begin
      @(negedge clk) xin1 = '{valid: 1'b1, startstop: 1'b0, dontstore: 1'b1, lastcol: 1'b0, data: 32'(i)};
    end
    for (int p = 0; p < 8; p++) begin
      x = '{valid: 1'b1, startstop: (p == 0 || p == 7), dontstore: 1'b0,
            lastcol: (p % 4 == 3), data: 32'($urandom() & 32'hff)};
      @(negedge clk) xin1 = x;
      @(negedge clk) xin1 = '0;
      chk("element: pixel", window1[0][0][0] == x.data[7:0]);
      chk("element: stored", sd1);
      chk("element: row end", re1 == x.lastcol);
      chk("element: data end", de1 == (p == 7));
      chk("element: strip", strip1 == word_t'(p / 4));
    end
  endtask

  initial begin
    xbar_t x;
    xin = '0;
    xin1 = '0;
    xin2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk("constants not yet valid", !consts_valid);
    for (int i = 0; i < N_CONST; i++) begin
      x = '{valid: 1'b1, startstop: 1'b0, dontstore: 1'b1, lastcol: 1'b0, data: 32'(100 + i)};
      send(x);
    end
    @(negedge clk) xin = '0;
    chk("constants valid", consts_valid);
    chk("dst_addr", consts.dst_addr == 100);
    chk("dst_cols", consts.dst_cols == 102);
    chk("src_cols", consts.src_cols == 105);
    // a valid word before Start is not data
    x = '{valid: 1'b1, startstop: 1'b0, dontstore: 1'b0, lastcol: 1'b0, data: 32'h5a5a5a5a};
    send(x);
    @(negedge clk) xin = '0;
    @(negedge clk);
    chk("stray word not stored", !store_data);
    for (int s = 0; s < 2; s++) begin
      cols.delete();
      for (int c = 0; c < 8; c++) begin
        logic last;
        last = (s == 1 && c == 7);
        send_col($urandom(), (s == 0 && c == 0) || last, c < 2, c == 7);
      end
    end
    @(negedge clk);
    chk("strip count", strip == 2);
    dot_test();
    element_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // data_end exactly once, in the cycle after the last column
  int n_end = 0;
  always @(posedge clk) if (rst_n && data_end) n_end++;

  initial begin
    wait (rst_n);
    @(negedge clk);
    wait (strip == 2);
    @(negedge clk);
    checks++;
    if (n_end != 1) begin failures++; $display("FAIL: data_end seen %0d times", n_end); end
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
