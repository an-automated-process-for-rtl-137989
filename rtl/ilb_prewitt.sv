// ilb_prewitt: inner loop body of the Prewitt edge detector.
//
// For a 3x3 window w of uint8 pixels (w[r][c], row r, column c):
//   sh = sum(w * H), H = rows (-1 -1 -1), (0 0 0), (+1 +1 +1)  -> row 2 - row 0
//   sv = sum(w * V), V = columns -1, 0, +1                     -> col 2 - col 0
//   result = floor(sqrt(sh*sh + sv*sv)) / 8, as uint8.
// Because the masks hold only -1, 0 and +1 there are no multiplies in the
// convolutions: four partial sums of three pixels and two differences, ten
// additions/subtractions in all. sh and sv are 11-bit signed, the squares
// 22-bit, the root 11-bit unsigned (at most 1082), so the result is at most
// 135 and fits the uint8 output. Purely combinational, as in the original
// flow; the square root is the shift-and-add isqrt. Masks, widths and the
// divide by eight follow the described program; the adder arrangement is
// this design's.
module ilb_prewitt
  import cameron_pkg::*;
(
  input  pix_t [KERN_ROWS-1:0][KERN_COLS-1:0] window,
  output pix_t                                result
);

  logic signed [10:0] sh, sv;
  logic        [9:0]  top, bot, lft, rgt;   // sums of three pixels
  logic        [21:0] sq_sum;
  logic        [10:0] mag;

  assign top = 10'(window[0][0]) + 10'(window[0][1]) + 10'(window[0][2]);
  assign bot = 10'(window[2][0]) + 10'(window[2][1]) + 10'(window[2][2]);
  assign lft = 10'(window[0][0]) + 10'(window[1][0]) + 10'(window[2][0]);
  assign rgt = 10'(window[0][2]) + 10'(window[1][2]) + 10'(window[2][2]);
  assign sh  = signed'({1'b0, bot}) - signed'({1'b0, top});
  assign sv  = signed'({1'b0, rgt}) - signed'({1'b0, lft});

  // squares of values of at most 765 in magnitude: sum below 2**21
  assign sq_sum = 22'(unsigned'(22'(sh * sh))) + 22'(unsigned'(22'(sv * sv)));

  isqrt #(.IN_W(22), .OUT_W(11)) u_sqrt (
    .radicand (sq_sum),
    .root     (mag)
  );

  assign result = pix_t'(mag >> 3);

endmodule
