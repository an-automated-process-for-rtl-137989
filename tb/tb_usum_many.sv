// tb_usum_many: random vectors against an integer sum taken modulo 2**OUT_W,
// for the 9 x 8-bit -> 8-bit instance and a wide 9 x 8-bit -> 12-bit one.
`timescale 1ns/1ps
module tb_usum_many;
  logic [8:0][7:0] vals;
  logic [7:0]  r8;
  logic [11:0] r12;
  int checks = 0, failures = 0;

  usum_many #(.N_VALS(9), .IN_W(8), .OUT_W(8))  dut8  (.vals, .result(r8));
  usum_many #(.N_VALS(9), .IN_W(8), .OUT_W(12)) dut12 (.vals, .result(r12));

  initial begin
    int s;
    for (int t = 0; t < 2000; t++) begin
      s = 0;
      for (int i = 0; i < 9; i++) begin
        vals[i] = (t == 0) ? 8'hff : 8'($urandom());
        s += int'(vals[i]);
      end
      #1;
      checks += 2;
      if (int'(r8) != s % 256) begin failures++; $display("8-bit sum %0d expected %0d", r8, s % 256); end
      if (int'(r12) != s) begin failures++; $display("12-bit sum %0d expected %0d", r12, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
