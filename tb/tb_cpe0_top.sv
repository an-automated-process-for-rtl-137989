// tb_cpe0_top: CPE0 on its own with a memory model. The constants sit at
// words 0..5 and a 6 x 8 image at word 16. The test checks that the first
// six reads go to the constant table, that the crossbar then carries the six
// constants and the 4 strips x 8 columns of the image with their tags in
// order, and that finished follows the done returned from PEx.
`timescale 1ns/1ps
module tb_cpe0_top;
  import cameron_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int R = 6, C = 8, SRC = 16;
  logic               rd_en;
  logic [CPE0_AW-1:0] addr;
  word_t              rdata;
  xbar_t              xo;
  logic               done_in = 1'b0, ready, finished;
  word_t              mem [64];
  xbar_t              exp_q [$];
  int checks = 0, failures = 0;
  int n_reads = 0;
  logic seen_stop = 1'b0;

  cpe0_top dut (.clk, .rst_n, .mem_rd_en(rd_en), .mem_addr(addr), .mem_rdata(rdata),
                .xbar_out(xo), .done_in, .ready, .finished);

  always_ff @(posedge clk) if (rd_en) rdata <= mem[addr[5:0]];

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic int px(int r, int c);
    return int'(mem[SRC + r * (C / 4) + c / 4][(c % 4) * 8 +: 8]);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (rd_en) begin
      if (n_reads < N_CONST) chk("constant read address", int'(addr) == n_reads);
      else chk("image read address", int'(addr) >= SRC && int'(addr) < SRC + R * C / 4);
      n_reads <= n_reads + 1;
    end
    if (xo.valid) begin
      xbar_t e;
      if (exp_q.size() == 0) chk("extra crossbar word", 1'b0);
      else begin
        e = exp_q.pop_front();
        chk($sformatf("crossbar %h expected %h", xo, e), xo == e);
        if (e.startstop && e.lastcol) seen_stop <= 1'b1;
      end
    end
  end

  initial begin
    xbar_t x;
    for (int i = 0; i < 64; i++) mem[i] = $urandom();
    mem[0] = 32'd3; mem[1] = 32'd4; mem[2] = 32'd6; mem[3] = SRC; mem[4] = R; mem[5] = C;
    for (int i = 0; i < N_CONST; i++) begin
      x = '0; x.valid = 1; x.dontstore = 1; x.data = mem[i];
      exp_q.push_back(x);
    end
    for (int r0 = 0; r0 + 3 <= R; r0++)
      for (int c = 0; c < C; c++) begin
        x = '0; x.valid = 1;
        for (int i = 0; i < 3; i++) x.data[i*8 +: 8] = 8'(px(r0 + i, c));
        x.lastcol = (c == C - 1);
        x.startstop = (r0 == 0 && c == 0) || (r0 == R - 3 && x.lastcol);
        x.dontstore = (c < 2);
        exp_q.push_back(x);
      end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (seen_stop);
    repeat (4) @(negedge clk);
    chk("not finished before done", !finished);
    chk("all words sent", exp_q.size() == 0);
    done_in = 1'b1;
    repeat (2) @(negedge clk);
    chk("finished", finished);
    chk("ready", ready);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
