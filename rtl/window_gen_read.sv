// window_gen_read: the CPE0 ("read") half of the window generator.
//
// It streams a row-major image out of CPE0 memory as window columns on the
// 36-bit crossbar. Two state machines share three buffers:
//   * ReadData fetches one frame, one 32-bit word (four pixels) from each of
//     the WIN_ROWS image rows the current strip of windows covers, into
//     TmpBuf. A complete frame moves to InBuff as soon as InBuff is free, so
//     one frame waits in CPE0 while the next is fetched (double buffering).
//   * XBar first sends the N_CONST run-time constants, then takes each frame
//     from InBuff into XbarOut, transposed from rows into four columns, and
//     sends one column per cycle with its tag bits. When no frame is ready it
//     sends NULLs (ValidData = 0), and after every frame it adds
//     NULLS_PER_FRAME NULLs to hold the window rate under the store rate.
// With N_GEN > 1 generators joined by the dot operator, every generator has
// its own TmpBuf, InBuff and XbarOut; a frame holds one word per row for each
// generator, and XBar interleaves them: column 0 of generator 0, column 0 of
// generator 1, ..., then column 1 of generator 0, and so on. All generators
// walk images of the same size; gen_src[g] gives generator g's image.
// A strip is WIN_ROWS rows high and covers the full image width; the next
// strip starts STRIP_ADV rows lower. Strips continue while a full
// WIN_H-high window still fits in the image. WIN_H x WIN_W is the size of
// one window (3 x 3 for the inner loop bodies here); with WIN_ROWS = 1 and a
// 1 x 1 window the same block is the element generator, which streams the
// image pixel by pixel.
//
// Tags (carried by the column of the last generator; the columns of the
// other generators carry DontStore only): LastCol marks the last column of a strip, Start/Stop the first column
// of the first strip and the last column of the last strip, and DontStore
// every column before the first full window of a strip (WIN_W-1 columns) and, for a column step
// COL_STEP > 1, the columns between stepped windows.
//
// Interface: starts when ready rises, finishes (finished = 1) after the
// collector on PEx reports done. Memory reads have one cycle of latency.
// Timing: ReadData needs N_GEN*WIN_ROWS cycles per frame (the first read of
// a frame overlaps the capture of the last word of the previous one) and
// XBar 4*N_GEN, so with WIN_ROWS <= 4 and NULLS_PER_FRAME = 0 the crossbar
// carries one column per cycle once the pipeline is full. The two machines, the buffers and the tags follow the described
// design; the frame-per-row-word layout, the tag rules for Start/Stop, the
// strip stepping and the requirement that image widths are multiples of four
// pixels are choices of this design.
module window_gen_read
  import cameron_pkg::*;
#(
  parameter int WIN_ROWS        = 3,  // pixels per crossbar column, <= 4
  parameter int STRIP_ADV       = 1,  // rows between strips
  parameter int COL_STEP        = 1,  // window step along a row
  parameter int NULLS_PER_FRAME = 0,
  parameter int N_GEN           = 1,  // generators joined by dot
  parameter int WIN_H           = KERN_ROWS, // height of one window
  parameter int WIN_W           = KERN_COLS  // width of one window
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ready,
  input  rt_const_t          consts,
  input  word_t [N_GEN-1:0]  gen_src,
  input  logic               done,
  output logic               mem_rd_en,
  output logic [CPE0_AW-1:0] mem_addr,
  input  word_t              mem_rdata,
  output xbar_t              xbar_out,
  output logic               finished
);

  localparam int RI_W = $clog2(WIN_ROWS + 1);
  localparam int GI_W = (N_GEN > 1) ? $clog2(N_GEN) : 1;

  typedef struct packed {
    logic last_frame;   // last word of the row
    logic first_strip;
    logic last_strip;
  } frame_meta_t;

  typedef enum logic [2:0] {RD_IDLE, RD_READ, RD_CAP, RD_HOLD, RD_DONE} rd_state_e;
  typedef enum logic [2:0] {XB_WAIT, XB_CONST, XB_RUN, XB_END, XB_FIN} xb_state_e;

  // ------------------------------------------------------------ ReadData
  rd_state_e   rd_state;
  word_t       pitch;                 // words per image row
  word_t       r0;                    // first row of the current strip
  word_t       k;                     // word index within the row
  word_t       row_off;               // offset of word 0 of row r0
  word_t       rd_ptr;                // address being requested
  logic [RI_W-1:0] ri;                // row of the frame being requested
  logic [GI_W-1:0] gi;                // generator being read
  logic [RI_W-1:0] cap_i;
  logic [GI_W-1:0] cap_g;
  logic        cap_v;
  word_t       tmpbuf [N_GEN][WIN_ROWS];
  word_t       inbuf  [N_GEN][WIN_ROWS];
  frame_meta_t inbuf_meta;
  logic        inbuf_full;
  logic        rd_xfer;               // frame moves TmpBuf -> InBuff
  logic        xb_take;               // XBar empties InBuff
  word_t       frame_w [N_GEN][WIN_ROWS];
  frame_meta_t cur_meta;
  logic        strip_end, image_end;
  word_t       next_ptr;              // word 0 of the next frame
  logic        rd_ahead;              // first read of the next frame
  logic [RI_W-1:0] rd_i;              // row of the word read this cycle
  logic [GI_W-1:0] rd_g;
  rd_state_e   rd_next;               // state after the early read

  assign pitch     = consts.src_cols >> 2;
  assign strip_end = (k == pitch - 1);
  assign image_end = strip_end && (r0 + word_t'(STRIP_ADV + WIN_H) > consts.src_rows);
  assign cur_meta  = '{last_frame: strip_end, first_strip: (r0 == 0),
                       last_strip: (r0 + word_t'(STRIP_ADV + WIN_H) > consts.src_rows)};

  always_comb begin
    for (int g = 0; g < N_GEN; g++)
      for (int i = 0; i < WIN_ROWS; i++)
        frame_w[g][i] = (rd_state == RD_CAP && g == N_GEN - 1 && i == WIN_ROWS - 1)
                        ? mem_rdata : tmpbuf[g][i];
  end

  // The first word of the next frame is read in the cycle the finished
  // frame leaves TmpBuf, so a frame costs N_GEN*WIN_ROWS cycles.
  assign rd_xfer   = (rd_state == RD_CAP || rd_state == RD_HOLD) && (!inbuf_full || xb_take);
  assign rd_ahead  = rd_xfer && !image_end;
  assign next_ptr  = strip_end ? gen_src[0] + row_off + word_t'(STRIP_ADV) * pitch
                               : gen_src[0] + row_off + k + 1;
  assign mem_rd_en = (rd_state == RD_READ) || rd_ahead;
  assign mem_addr  = rd_ahead ? next_ptr[CPE0_AW-1:0] : rd_ptr[CPE0_AW-1:0];
  assign rd_i      = rd_ahead ? '0 : ri;
  assign rd_g      = rd_ahead ? '0 : gi;
  // a one-word frame is complete with the early read itself
  assign rd_next   = (WIN_ROWS == 1 && N_GEN == 1) ? RD_CAP : RD_READ;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_state   <= RD_IDLE;
      r0         <= '0;
      k          <= '0;
      row_off    <= '0;
      rd_ptr     <= '0;
      ri         <= '0;
      gi         <= '0;
      cap_i      <= '0;
      cap_g      <= '0;
      cap_v      <= 1'b0;
      inbuf_full <= 1'b0;
      inbuf_meta <= '0;
      for (int g = 0; g < N_GEN; g++)
        for (int i = 0; i < WIN_ROWS; i++) begin
          tmpbuf[g][i] <= '0;
          inbuf[g][i]  <= '0;
        end
    end else begin
      cap_v <= mem_rd_en;
      cap_i <= rd_i;
      cap_g <= rd_g;
      if (cap_v) tmpbuf[cap_g][cap_i] <= mem_rdata;

      if (rd_xfer)      inbuf_full <= 1'b1;
      else if (xb_take) inbuf_full <= 1'b0;

      unique case (rd_state)
        RD_IDLE: if (ready) begin
          r0       <= '0;
          k        <= '0;
          row_off  <= '0;
          rd_ptr   <= gen_src[0];
          ri       <= '0;
          gi       <= '0;
          rd_state <= RD_READ;
        end
        RD_READ: begin
          if (ri == RI_W'(WIN_ROWS - 1)) begin
            ri <= '0;
            if (gi == GI_W'(N_GEN - 1)) begin
              rd_state <= RD_CAP;
            end else begin
              gi     <= gi + 1'b1;
              rd_ptr <= gen_src[int'(gi) + 1] + row_off + k;
            end
          end else begin
            ri     <= ri + 1'b1;
            rd_ptr <= rd_ptr + pitch;
          end
        end
        RD_CAP, RD_HOLD: begin
          if (rd_xfer) begin
            for (int g = 0; g < N_GEN; g++)
              for (int i = 0; i < WIN_ROWS; i++) inbuf[g][i] <= frame_w[g][i];
            inbuf_meta <= cur_meta;
            // row 0 of generator 0 is being read now (rd_ahead); set up the
            // read after it
            ri     <= (WIN_ROWS > 1) ? RI_W'(1) : '0;
            gi     <= (WIN_ROWS > 1 || N_GEN == 1) ? '0 : GI_W'(1);
            rd_ptr <= (WIN_ROWS > 1) ? next_ptr + pitch
                                     : next_ptr - gen_src[0] + gen_src[N_GEN > 1 ? 1 : 0];
            if (image_end) begin
              rd_state <= RD_DONE;
            end else if (strip_end) begin
              k        <= '0;
              r0       <= r0 + word_t'(STRIP_ADV);
              row_off  <= row_off + word_t'(STRIP_ADV) * pitch;
              rd_state <= rd_next;
            end else begin
              k        <= k + 1;
              rd_state <= rd_next;
            end
          end else begin
            rd_state <= RD_HOLD;
          end
        end
        default: ;  // RD_DONE: stay until the next reset
      endcase
    end
  end

  // ---------------------------------------------------------------- XBar
  xb_state_e   xb_state;
  logic [2:0]  cidx;
  word_t       xbout [N_GEN][WIN_ROWS]; // XbarOut: frame being sent, by row
  frame_meta_t xb_meta;
  logic        sending;
  logic [1:0]  j;                     // column of the frame sent next
  logic [GI_W-1:0] xg;                // generator whose column is sent next
  logic        last_g;
  int unsigned null_cnt;
  word_t       col_cnt;               // image column sent next
  int unsigned phase;                 // position within the column step

  // Column jj of a frame held as rows: row i's pixel jj goes to bits 8i+7:8i.
  function automatic word_t column_of(word_t rows [WIN_ROWS], logic [1:0] jj);
    word_t c;
    c = '0;
    for (int i = 0; i < WIN_ROWS; i++) c[i*PIX_W +: PIX_W] = rows[i][int'(jj)*PIX_W +: PIX_W];
    return c;
  endfunction

  function automatic xbar_t tag_column(word_t data, frame_meta_t m, logic [1:0] jj,
                                       word_t c, int unsigned ph, logic first_g, logic lst_g);
    xbar_t x;
    x.valid     = 1'b1;
    x.lastcol   = lst_g && m.last_frame && (jj == 2'd3);
    x.startstop = (first_g && m.first_strip && c == 0) || (m.last_strip && x.lastcol);
    x.dontstore = !(lst_g && c >= word_t'(WIN_W - 1) && ph == 0);
    x.data      = data;
    return x;
  endfunction

  assign last_g = (xg == GI_W'(N_GEN - 1));

  assign xb_take  = (xb_state == XB_RUN) && !sending && null_cnt == 0 && inbuf_full;
  assign finished = (xb_state == XB_FIN);

  // A column goes out this cycle; adv_last when it closes a strip.
  logic adv, adv_last;
  // (counted on the column of the last generator)
  assign adv      = (xb_state == XB_RUN) && last_g &&
                    (sending || (N_GEN == 1 && null_cnt == 0 && inbuf_full));
  assign adv_last = sending && xb_meta.last_frame && (j == 2'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_cnt <= '0;
      phase   <= 0;
    end else if (adv) begin
      if (adv_last) begin
        col_cnt <= '0;
        phase   <= 0;
      end else begin
        col_cnt <= col_cnt + 1;
        if (col_cnt >= word_t'(WIN_W - 1))
          phase <= (phase == unsigned'(COL_STEP - 1)) ? 0 : phase + 1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xb_state <= XB_WAIT;
      cidx     <= '0;
      sending  <= 1'b0;
      j        <= '0;
      xg       <= '0;
      null_cnt <= 0;
      xb_meta  <= '0;
      xbar_out <= '0;
      for (int g = 0; g < N_GEN; g++)
        for (int i = 0; i < WIN_ROWS; i++) xbout[g][i] <= '0;
    end else begin
      xbar_out <= '0;  // NULL unless set below
      unique case (xb_state)
        XB_WAIT: if (ready) xb_state <= XB_CONST;
        XB_CONST: begin
          xbar_out.valid     <= 1'b1;
          xbar_out.dontstore <= 1'b1;
          xbar_out.data      <= consts[(N_CONST - 1 - int'(cidx)) * WORD_W +: WORD_W];
          cidx <= cidx + 3'd1;
          if (cidx == 3'(N_CONST - 1)) xb_state <= XB_RUN;
        end
        XB_RUN: begin
          if (sending) begin
            xbar_out <= tag_column(column_of(xbout[xg], j), xb_meta, j, col_cnt, phase,
                                   xg == '0, last_g);
            xg <= last_g ? '0 : xg + 1'b1;
            if (last_g) j <= j + 2'd1;
            if (last_g && j == 2'd3) begin
              sending  <= 1'b0;
              null_cnt <= NULLS_PER_FRAME;
              if (xb_meta.last_frame && xb_meta.last_strip) xb_state <= XB_END;
            end
          end else if (null_cnt != 0) begin
            null_cnt <= null_cnt - 1;
          end else if (inbuf_full) begin
            // take the frame and send its first column in the same cycle
            for (int g = 0; g < N_GEN; g++)
              for (int i = 0; i < WIN_ROWS; i++) xbout[g][i] <= inbuf[g][i];
            xb_meta  <= inbuf_meta;
            xbar_out <= tag_column(column_of(inbuf[0], 2'd0), inbuf_meta, 2'd0, col_cnt, phase,
                                   1'b1, N_GEN == 1);
            sending  <= 1'b1;
            j        <= (N_GEN == 1) ? 2'd1 : 2'd0;
            xg       <= (N_GEN == 1) ? '0 : GI_W'(1);
          end
        end
        XB_END: if (done) xb_state <= XB_FIN;
        default: ;  // XB_FIN
      endcase
    end
  end

endmodule
