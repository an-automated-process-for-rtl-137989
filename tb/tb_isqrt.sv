// tb_isqrt: exhaustive over small values, random and boundary values up to
// 2**22-1, checking r*r <= x < (r+1)*(r+1).
`timescale 1ns/1ps
module tb_isqrt;
  logic [21:0] x;
  logic [10:0] r;
  int checks = 0, failures = 0;

  isqrt #(.IN_W(22), .OUT_W(11)) dut (.radicand(x), .root(r));

  task automatic check(input int v);
    longint rr;
    x = 22'(v);
    #1;
    rr = longint'(r);
    checks++;
    if (!(rr * rr <= longint'(v) && (rr + 1) * (rr + 1) > longint'(v))) begin
      failures++;
      if (failures < 10) $display("sqrt(%0d) gave %0d", v, r);
    end
  endtask

  initial begin
    for (int v = 0; v < 5000; v++) check(v);
    for (int k = 1; k < 2048; k++) begin check(k * k); check(k * k - 1); end
    for (int t = 0; t < 5000; t++) check(int'($urandom() % (1 << 22)));
    check((1 << 22) - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
