// isqrt: combinational integer square root, floor(sqrt(radicand)).
//
// Digit-by-digit (restoring) method: one result bit per step from the most
// significant, using only shifts, additions/subtractions and bit operations,
// no multiplier. OUT_W = IN_W/2
// bits hold the root. The root is needed by the gradient magnitude; the
// method is this design's choice of a shift-and-add square root.
module isqrt #(
  parameter int IN_W  = 22,
  parameter int OUT_W = (IN_W + 1) / 2
) (
  input  logic [IN_W-1:0]  radicand,
  output logic [OUT_W-1:0] root
);

  localparam int W = 2 * OUT_W;

  always_comb begin
    logic [W-1:0]   rem;
    logic [W-1:0]   x;
    logic [W-1:0]   bitv;
    logic [OUT_W-1:0] q;
    x    = W'(radicand);
    rem  = '0;
    q    = '0;
    for (int i = OUT_W - 1; i >= 0; i--) begin
      // bring down the next two radicand bits
      rem  = {rem[W-3:0], x[2*i+1 -: 2]};
      bitv = W'({q, 2'b01});
      if (rem >= bitv) begin
        rem = rem - bitv;
        q   = {q[OUT_W-2:0], 1'b1};
      end else begin
        q   = {q[OUT_W-2:0], 1'b0};
      end
    end
    root = q;
  end

endmodule
