// const_grabber: fetches the run-time constants from CPE0 memory after reset.
//
// The host writes the constants (result address and size, source address and
// size) into CPE0 memory, then resets the board. This block then reads one
// word per cycle from a compile-time table of addresses, CONST_ADDR, collects
// the words into an rt_const_t record and raises ready, which stays high until
// the next reset. Until ready is high it owns the CPE0 memory read port.
//
// With N_GEN > 1 (several window generators joined by the dot operator) it
// also fetches the source address of each further generator, from words
// DOT_ADDR_BASE, DOT_ADDR_BASE+1, ...; gen_src[g] is the source address of
// generator g, gen_src[0] being the one in consts.
//
// Timing: the memory returns read data one cycle after mem_rd_en (synchronous
// SRAM). With N = N_CONST + N_GEN - 1 words to fetch, ready rises N+1 cycles
// after reset is released. The fetch itself follows the described behaviour; the read
// latency, the table layout and the one-word-per-cycle rate are this design's
// choices.
module const_grabber
  import cameron_pkg::*;
#(
  parameter logic [CPE0_AW-1:0] CONST_ADDR [N_CONST] = '{18'd0, 18'd1, 18'd2, 18'd3, 18'd4, 18'd5},
  parameter int                 N_GEN         = 1,
  parameter logic [CPE0_AW-1:0] DOT_ADDR_BASE = 18'd6
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               mem_rd_en,
  output logic [CPE0_AW-1:0] mem_addr,
  input  word_t              mem_rdata,
  output rt_const_t          consts,
  output word_t [N_GEN-1:0]  gen_src,
  output logic               ready
);

  localparam int N_WORDS = N_CONST + N_GEN - 1;
  localparam int IDX_W   = $clog2(N_WORDS + 1);

  logic [IDX_W-1:0] rd_idx;    // next word to request
  logic [IDX_W-1:0] cap_idx;   // word whose data arrives this cycle
  logic             cap_vld;
  word_t            dot_src [N_GEN];

  assign mem_rd_en = (rd_idx < IDX_W'(N_WORDS));
  always_comb begin
    if (rd_idx < IDX_W'(N_CONST)) mem_addr = CONST_ADDR[int'(rd_idx)];
    else                          mem_addr = DOT_ADDR_BASE + CPE0_AW'(rd_idx - IDX_W'(N_CONST));
  end

  always_comb begin
    gen_src[0] = consts.src_addr;
    for (int g = 1; g < N_GEN; g++) gen_src[g] = dot_src[g];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_idx  <= '0;
      cap_idx <= '0;
      cap_vld <= 1'b0;
      consts  <= '0;
      ready   <= 1'b0;
      for (int g = 0; g < N_GEN; g++) dot_src[g] <= '0;
    end else begin
      cap_vld <= mem_rd_en;
      cap_idx <= rd_idx;
      if (mem_rd_en) rd_idx <= rd_idx + 1'b1;
      if (cap_vld) begin
        if (cap_idx < IDX_W'(N_CONST)) consts <= set_const(consts, 3'(cap_idx), mem_rdata);
        else dot_src[int'(cap_idx) - N_CONST + 1] <= mem_rdata;
        if (cap_idx == IDX_W'(N_WORDS - 1)) ready <= 1'b1;
      end
    end
  end

endmodule
