// usum_many: library component that sums N_VALS unsigned values.
//
// Combinational. Each of the N_VALS inputs is IN_W bits wide; the sum is
// returned modulo 2**OUT_W, so with OUT_W = IN_W the result wraps exactly as
// an array sum held in a value of the input type does. The generic names
// mirror the component's (number of values, input size, output size); the
// adder chain inside is this design's own.
module usum_many #(
  parameter int N_VALS = 9,
  parameter int IN_W   = 8,
  parameter int OUT_W  = 8
) (
  input  logic [N_VALS-1:0][IN_W-1:0] vals,
  output logic [OUT_W-1:0]            result
);

  always_comb begin
    result = '0;
    for (int i = 0; i < N_VALS; i++) result = result + OUT_W'(vals[i]);
  end

endmodule
