// tb_ilb_prewitt: random, flat and maximum-edge windows against the Prewitt
// magnitude computed with full 3x3 mask products and a real square root.
`timescale 1ns/1ps
module tb_ilb_prewitt;
  import cameron_pkg::*;
  pix_t [2:0][2:0] w;
  pix_t res;
  int checks = 0, failures = 0;

  ilb_prewitt dut (.window(w), .result(res));

  // H is the row-gradient mask, V the column-gradient mask
  localparam int H [3][3] = '{'{-1, -1, -1}, '{0, 0, 0}, '{1, 1, 1}};
  localparam int V [3][3] = '{'{-1, 0, 1}, '{-1, 0, 1}, '{-1, 0, 1}};

  task automatic check();
    int sh, sv, e;
    sh = 0; sv = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        sh += H[i][j] * int'(w[i][j]);
        sv += V[i][j] * int'(w[i][j]);
      end
    e = int'($floor($sqrt(real'(sh * sh + sv * sv)))) / 8;
    #1;
    checks++;
    if (int'(res) != e) begin
      failures++;
      if (failures < 10) $display("sh %0d sv %0d: got %0d expected %0d", sh, sv, res, e);
    end
  endtask

  initial begin
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) w[i][j] = pix_t'($urandom());
      check();
    end
    w = '0; check();
    w = {9{8'd77}}; check();
    // strongest edge: corner of 255s, sh = sv = 765
    w = '0; w[2] = {3{8'hff}}; w[0][2] = 8'hff; w[1][2] = 8'hff; check();
    w = '0; w[0] = {3{8'hff}}; w[1][0] = 8'hff; w[2][0] = 8'hff; check();
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
