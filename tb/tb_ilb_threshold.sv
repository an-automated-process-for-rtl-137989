// tb_ilb_threshold: random and corner windows (sums around 100 and wrap at
// 256) against s = sum mod 256; s > 100 ? s - 100 : s.
`timescale 1ns/1ps
module tb_ilb_threshold;
  import cameron_pkg::*;
  pix_t [2:0][2:0] w;
  pix_t res;
  int checks = 0, failures = 0;

  ilb_threshold dut (.window(w), .result(res));

  task automatic check();
    int s, e;
    s = 0;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) s += int'(w[i][j]);
    s = s % 256;
    e = (s > 100) ? s - 100 : s;
    #1;
    checks++;
    if (int'(res) != e) begin failures++; $display("window sum %0d: got %0d expected %0d", s, res, e); end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          w[i][j] = (t < 1000) ? pix_t'($urandom() % 24) : pix_t'($urandom());
      check();
    end
    w = '0; w[1][1] = 8'd100; check();
    w[1][1] = 8'd101; check();
    w = '0; w[0][0] = 8'd200; w[2][2] = 8'd56; check();   // wraps to 0
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
