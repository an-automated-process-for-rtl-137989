// wf_bench: board-side model and checker for one wildforce_top.
//
// Holds behavioural models of the two board memories (CPE0: 2**18 words,
// read data one cycle after the read enable; PEx: 2**17 words, written on
// the clock edge), plays the host by loading the run-time constants at words
// 0..5 and an image of ROWS x COLS random pixels at SRC_ADDR, and, when the
// design signals done, compares the result image at DST_ADDR with a
// reference computed here from the image: Prewitt with a floating-point
// square root, or the threshold example. Results are row-aligned:
// row y starts at DST_ADDR + y*ceil(dst_cols/4), four pixels a word.
module wf_bench
  import cameron_pkg::*;
#(
  parameter ilb_sel_e APP      = ILB_PREWITT,
  parameter int       STEP     = 1,
  parameter int       ROWS     = 8,
  parameter int       COLS     = 8,
  parameter int       SRC_ADDR = 16,
  parameter int       DST_ADDR = 40,
  parameter int       SEED     = 1,
  parameter int       MAX_CYC  = 100000
) (
  input  logic               clk,
  output logic               rst_n,
  input  logic               cpe0_mem_rd_en,
  input  logic [CPE0_AW-1:0] cpe0_mem_addr,
  output word_t              cpe0_mem_rdata,
  input  logic               pex_mem_we,
  input  logic [PEX_AW-1:0]  pex_mem_addr,
  input  word_t              pex_mem_wdata,
  input  logic               done,
  output int                 checks,
  output int                 failures,
  output int                 cycles,
  output logic               complete
);

  localparam int DROWS = (ROWS - KERN_ROWS) / STEP + 1;
  localparam int DCOLS = (COLS - KERN_COLS) / STEP + 1;
  localparam int DPITCH = (DCOLS + 3) / 4;

  word_t cpe0_mem [2**CPE0_AW];
  word_t pex_mem  [2**PEX_AW];
  int    wr_count;
  int    wr_outside;

  always_ff @(posedge clk) begin
    if (cpe0_mem_rd_en) cpe0_mem_rdata <= cpe0_mem[cpe0_mem_addr];
    if (rst_n && pex_mem_we) pex_mem[pex_mem_addr] <= pex_mem_wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_count   <= 0;
      wr_outside <= 0;
    end else if (pex_mem_we) begin
      wr_count <= wr_count + 1;
      if (int'(pex_mem_addr) < DST_ADDR || int'(pex_mem_addr) >= DST_ADDR + DROWS * DPITCH)
        wr_outside <= wr_outside + 1;
    end
  end

  function automatic int pix(int r, int c);
    word_t w;
    w = cpe0_mem[SRC_ADDR + r * (COLS / 4) + c / 4];
    return int'(w[(c % 4) * 8 +: 8]);
  endfunction

  function automatic int expect_at(int y, int x);
    int r0, c0, s, sh, sv;
    r0 = y * STEP;
    c0 = x * STEP;
    if (APP == ILB_PREWITT) begin
      sh = 0;
      sv = 0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          sh += (i - 1) * pix(r0 + i, c0 + j);
          sv += (j - 1) * pix(r0 + i, c0 + j);
        end
      return int'($floor($sqrt(real'(sh * sh + sv * sv)))) / 8;
    end else begin
      s = 0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) s += pix(r0 + i, c0 + j);
      s = s % 256;
      return (s > 100) ? s - 100 : s;
    end
  endfunction

  initial begin
    int unsigned rnd;
    word_t w, e;
    checks   = 0;
    failures = 0;
    complete = 1'b0;
    cycles   = 0;
    rst_n    = 1'b0;
    rnd      = $urandom(SEED);
    for (int i = 0; i < 2**CPE0_AW; i++) cpe0_mem[i] = '0;
    for (int i = 0; i < 2**PEX_AW; i++) pex_mem[i] = '0;
    cpe0_mem[0] = DST_ADDR;
    cpe0_mem[1] = DROWS;
    cpe0_mem[2] = DCOLS;
    cpe0_mem[3] = SRC_ADDR;
    cpe0_mem[4] = ROWS;
    cpe0_mem[5] = COLS;
    for (int i = 0; i < ROWS * COLS / 4; i++) cpe0_mem[SRC_ADDR + i] = $urandom();
    // words just past the image, read by a stripmined last strip
    for (int i = 0; i < 2 * COLS / 4; i++) cpe0_mem[SRC_ADDR + ROWS * COLS / 4 + i] = $urandom();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!done && cycles < MAX_CYC) begin
      @(posedge clk);
      cycles++;
    end
    repeat (2) @(posedge clk);
    if (!done) begin
      $display("bench: no done after %0d cycles", cycles);
      failures++;
    end
    for (int y = 0; y < DROWS; y++)
      for (int xw = 0; xw < DPITCH; xw++) begin
        w = pex_mem[DST_ADDR + y * DPITCH + xw];
        e = '0;
        for (int b = 0; b < 4; b++)
          if (xw * 4 + b < DCOLS) e[b*8 +: 8] = 8'(expect_at(y, xw * 4 + b));
        checks++;
        if (w !== e) begin
          failures++;
          if (failures < 10) $display("bench: row %0d word %0d got %h expected %h", y, xw, w, e);
        end
      end
    checks++;
    if (wr_count != DROWS * DPITCH) begin
      failures++;
      $display("bench: %0d writes, expected %0d", wr_count, DROWS * DPITCH);
    end
    checks++;
    if (wr_outside != 0) begin
      failures++;
      $display("bench: %0d writes outside the result array", wr_outside);
    end
    complete = 1'b1;
  end

endmodule
