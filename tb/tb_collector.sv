// tb_collector: a two-lane collector (tile of two result rows) with 3 result
// rows of 6 columns at word 10, so strip 1 lane 1 has no row and must drop
// its values. Each row of windows is eight time steps, the first two marked
// not-to-store; grants come at random (three cycles in four) to the lowest
// requesting lane. The words written are compared with a memory image built
// here, the write count is checked, and done must rise only after the end
// of data and the last write.
`timescale 1ns/1ps
module tb_collector;
  import cameron_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  rt_const_t consts;
  logic store_data = 0, row_end = 0, data_end = 0;
  word_t strip = 0;
  pix_t [1:0] results;
  wr_req_t [1:0] wr_req;
  logic [1:0] gnt;
  logic done;
  int checks = 0, failures = 0;
  word_t mem [64];
  word_t exp_mem [64];
  int n_wr = 0;
  logic grant_ok;

  collector #(.LANES(2)) dut (.clk, .rst_n, .consts, .store_data, .row_end, .data_end,
                              .strip, .results, .wr_req, .wr_gnt(gnt), .done);

  always_comb begin
    gnt = '0;
    if (grant_ok) begin
      if (wr_req[0].req) gnt = 2'b01;
      else if (wr_req[1].req) gnt = 2'b10;
    end
  end

  always @(posedge clk) begin
    grant_ok <= ($urandom() % 4 != 0);
    for (int l = 0; l < 2; l++)
      if (rst_n && gnt[l]) begin
        mem[wr_req[l].addr[5:0]] <= wr_req[l].data;
        n_wr <= n_wr + 1;
      end
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    int row;
    grant_ok = 1'b1;
    for (int i = 0; i < 64; i++) begin mem[i] = '0; exp_mem[i] = '0; end
    consts = '0;
    consts.dst_addr = 10; consts.dst_rows = 3; consts.dst_cols = 6;
    results = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 2; s++) begin
      for (int c = 0; c < 8; c++) begin
        @(negedge clk);
        strip = s;
        store_data = (c >= 2);
        row_end = (c == 7);
        data_end = (s == 1 && c == 7);
        results[0] = pix_t'($urandom());
        results[1] = pix_t'($urandom());
        if (store_data)
          for (int l = 0; l < 2; l++) begin
            row = s * 2 + l;
            if (row < 3) exp_mem[10 + row * 2 + (c - 2) / 4][((c - 2) % 4) * 8 +: 8] = results[l];
          end
        @(negedge clk);
        store_data = 0; row_end = 0; data_end = 0;
        if (s == 0) chk("no done before end", !done);
      end
    end
    for (int t = 0; t < 30 && !done; t++) @(negedge clk);
    chk("done", done);
    chk("three rows of two words written", n_wr == 6);
    for (int i = 0; i < 64; i++) chk($sformatf("word %0d: %h vs %h", i, mem[i], exp_mem[i]), mem[i] == exp_mem[i]);
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
