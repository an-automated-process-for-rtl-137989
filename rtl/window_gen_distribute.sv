// window_gen_distribute: the PEx ("distribute") half of the window generator.
//
// A single state machine reads the crossbar. It first stores the N_CONST
// run-time constants, then waits for the first column flagged Start/Stop and
// from there shifts every valid column into a WIN_COLS-deep shift register of
// window columns: the older columns move one place towards index 0 and the
// new column takes the last place, so window[r][c] is the pixel of window row
// r and window column c, column WIN_COLS-1 being the newest. The second
// Start/Stop column ends the data. With N_GEN > 1 generators joined by the
// dot operator the columns arrive interleaved, one per generator in turn,
// and each goes to that generator's own shift register, window[g].
// With WIN_ROWS = WIN_COLS = 1 it is the receiving half of the element
// generator: the window is the single pixel just received.
//
// Registered with the shift, it produces
//   store_data  ValidData && !DontStore: the ILB output of this window is kept
//   row_end     LastCol of the column just shifted in: a row of windows ends
//   data_end    the column just shifted in was the last of the image
//   strip       number of the strip (row of windows) the window belongs to
// Timing: a column on xbar_in appears in window one cycle later, together
// with its flags; the inner loop body after it is combinational.
// The shift register, the constant phase and StoreData follow the described
// design; the constant order and the use of the second Start/Stop as end of
// data are choices of this design.
module window_gen_distribute
  import cameron_pkg::*;
#(
  parameter int WIN_ROWS = 3,
  parameter int WIN_COLS = KERN_COLS,
  parameter int N_GEN    = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  xbar_t     xbar_in,
  output rt_const_t consts,
  output logic      consts_valid,
  output pix_t [N_GEN-1:0][WIN_ROWS-1:0][WIN_COLS-1:0] window,
  output logic      store_data,
  output logic      row_end,
  output logic      data_end,
  output word_t     strip
);

  typedef enum logic [1:0] {D_CONST, D_WAIT_START, D_RUN, D_END} d_state_e;

  localparam int GI_W = (N_GEN > 1) ? $clog2(N_GEN) : 1;

  d_state_e   state;
  logic [2:0] cidx;
  logic       shift;
  logic [GI_W-1:0] dg;   // generator of the next data column

  assign shift = xbar_in.valid && ((state == D_WAIT_START && xbar_in.startstop) || state == D_RUN);
  assign consts_valid = (state != D_CONST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= D_CONST;
      cidx       <= '0;
      dg         <= '0;
      consts     <= '0;
      window     <= '0;
      store_data <= 1'b0;
      row_end    <= 1'b0;
      data_end   <= 1'b0;
      strip      <= '0;
    end else begin
      store_data <= shift && !xbar_in.dontstore;
      row_end    <= shift && xbar_in.lastcol;
      data_end   <= shift && state == D_RUN && xbar_in.startstop;
      if (row_end) strip <= strip + 1;

      if (shift) begin
        for (int c = 0; c < WIN_COLS - 1; c++)
          for (int r = 0; r < WIN_ROWS; r++) window[dg][r][c] <= window[dg][r][c+1];
        for (int r = 0; r < WIN_ROWS; r++)
          window[dg][r][WIN_COLS-1] <= xbar_in.data[r*PIX_W +: PIX_W];
        dg <= (dg == GI_W'(N_GEN - 1)) ? '0 : dg + 1'b1;
      end

      unique case (state)
        D_CONST: if (xbar_in.valid) begin
          consts <= set_const(consts, cidx, xbar_in.data);
          cidx   <= cidx + 3'd1;
          if (cidx == 3'(N_CONST - 1)) state <= D_WAIT_START;
        end
        D_WAIT_START: if (shift) state <= D_RUN;
        D_RUN: if (shift && xbar_in.startstop) state <= D_END;
        default: ;  // D_END: hold until the next reset
      endcase
    end
  end

endmodule
