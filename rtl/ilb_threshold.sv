// ilb_threshold: inner loop body of the introductory example program.
//
// For each 3x3 window of uint8 pixels: s = array sum of the window kept as a
// uint8 (it wraps at 256, as the sum component is generated with an 8-bit
// output), result = s - 100 when s > 100, otherwise s. Purely combinational,
// built from the same four dataflow nodes the compiler emits: the array sum,
// an unsigned compare with 100, a subtract of 100 and a selector.
module ilb_threshold
  import cameron_pkg::*;
(
  input  pix_t [KERN_ROWS-1:0][KERN_COLS-1:0] window,
  output pix_t                                result
);

  pix_t usum_many8_out;
  logic ugt9_out;
  pix_t usub10_out;

  usum_many #(.N_VALS(KERN_ROWS * KERN_COLS), .IN_W(PIX_W), .OUT_W(PIX_W)) u_sum (
    .vals   (window),
    .result (usum_many8_out)
  );

  assign ugt9_out   = (usum_many8_out > 8'd100);
  assign usub10_out = usum_many8_out - 8'd100;
  assign result     = ugt9_out ? usub10_out : usum_many8_out;

endmodule
