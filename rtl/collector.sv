// collector: gathers inner-loop-body results into memory words (WRITE-VAL).
//
// One lane per row of the result tile (LANES = 1 without stripmining). When
// store_data is high, each lane whose result row exists puts its 8-bit
// result into the next byte of its word buffer (byte 0 = bits 7:0). A full
// word, and at row_end the partial word closing the row, is queued with its
// address for the memory arbiter. Result row y starts at word
//   dst_addr + y * ceil(dst_cols / 4),
// so every row starts on a word boundary; lane l of strip s writes row
// s*LANES + l and drops its values when that row is not below dst_rows.
// Each lane queues at most one word per cycle in a FIFO_DEPTH-entry queue and
// holds wr_req until the arbiter grants it. done rises once data_end has
// been seen and every queue is empty, and stays high until reset.
// Buffering results into words and instantiating tile buffers follows the
// described design; the row-aligned result layout, the queues and the done
// rule are choices of this design.
module collector
  import cameron_pkg::*;
#(
  parameter int LANES      = 1,
  parameter int FIFO_DEPTH = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  rt_const_t            consts,
  input  logic                 store_data,
  input  logic                 row_end,
  input  logic                 data_end,
  input  word_t                strip,
  input  pix_t [LANES-1:0]     results,
  output wr_req_t [LANES-1:0]  wr_req,
  input  logic [LANES-1:0]     wr_gnt,
  output logic                 done
);

  localparam int PTR_W = (FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1;

  word_t out_pitch;
  assign out_pitch = (consts.dst_cols + 3) >> 2;

  logic seen_end;
  logic [LANES-1:0] lane_empty;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    word_t      buf_w;        // word being filled
    logic [1:0] bp;           // next byte position
    word_t      wi;           // word index within the row
    word_t      row_base;     // first word address of this lane's row
    logic       row_ok;
    // queue of finished words
    logic [PEX_AW-1:0] q_addr [FIFO_DEPTH];
    word_t             q_data [FIFO_DEPTH];
    logic [PTR_W-1:0]  rd_p, wr_p;
    logic [PTR_W:0]    cnt;
    // next-state of the word buffer
    word_t      nbuf;
    logic [1:0] nbp;
    logic       push;
    word_t      push_data;

    assign row_ok = (strip * LANES + word_t'(l)) < consts.dst_rows;

    always_comb begin
      nbuf      = buf_w;
      nbp       = bp;
      push      = 1'b0;
      push_data = '0;
      if (store_data && row_ok) begin
        nbuf[int'(bp)*PIX_W +: PIX_W] = results[l];
        nbp = bp + 2'd1;
        if (bp == 2'd3) begin
          push      = 1'b1;
          push_data = nbuf;
          nbuf      = '0;
        end
      end
      if (row_end && row_ok && nbp != 2'd0) begin
        push      = 1'b1;
        push_data = nbuf;
        nbuf      = '0;
        nbp       = 2'd0;
      end
    end

    logic pop;
    assign pop = wr_gnt[l] && cnt != 0;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        buf_w    <= '0;
        bp       <= '0;
        wi       <= '0;
        row_base <= '0;
        rd_p     <= '0;
        wr_p     <= '0;
        cnt      <= '0;
        for (int i = 0; i < FIFO_DEPTH; i++) begin
          q_addr[i] <= '0;
          q_data[i] <= '0;
        end
      end else begin
        buf_w <= nbuf;
        bp    <= nbp;
        if (!consts_seen) begin
          row_base <= consts.dst_addr + word_t'(l) * out_pitch;
        end else if (row_end) begin
          row_base <= row_base + word_t'(LANES) * out_pitch;
          wi       <= '0;
        end else if (push) begin
          wi <= wi + 1;
        end
        if (push) begin
          q_addr[wr_p] <= PEX_AW'(row_base + wi);
          q_data[wr_p] <= push_data;
          wr_p <= (wr_p == PTR_W'(FIFO_DEPTH - 1)) ? '0 : wr_p + 1'b1;
        end
        if (pop) rd_p <= (rd_p == PTR_W'(FIFO_DEPTH - 1)) ? '0 : rd_p + 1'b1;
        cnt <= cnt + (PTR_W+1)'(push) - (PTR_W+1)'(pop);
      end
    end

    assign wr_req[l].req  = (cnt != 0);
    assign wr_req[l].addr = q_addr[rd_p];
    assign wr_req[l].data = q_data[rd_p];
    assign lane_empty[l]  = (cnt == 0);

    // The window generator throttles itself so the queue never overflows.
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(push && !pop && cnt == (PTR_W+1)'(FIFO_DEPTH)));
  end

  // Row bases are loaded from the constants until the first store or row end.
  logic consts_seen;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      consts_seen <= 1'b0;
      seen_end    <= 1'b0;
    end else begin
      if (store_data || row_end) consts_seen <= 1'b1;
      if (data_end) seen_end <= 1'b1;
    end
  end

  assign done = seen_end && (&lane_empty);

endmodule
