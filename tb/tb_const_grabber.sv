// tb_const_grabber: the constants sit at a scattered address table; the test
// checks that each field gets the word at its table address, that ready
// rises exactly N_CONST+1 cycles after reset and that reading then stops.
// A second instance for three dot-joined generators must also fetch the two
// extra source addresses from words 20 and 21, and is ready two cycles later.
`timescale 1ns/1ps
module tb_const_grabber;
  import cameron_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam logic [CPE0_AW-1:0] TABLE [N_CONST] = '{18'd100, 18'd7, 18'd3, 18'd250, 18'd64, 18'd9};
  logic               rd_en;
  logic [CPE0_AW-1:0] addr;
  word_t              rdata;
  rt_const_t          consts;
  logic               ready;
  word_t              mem [256];
  logic               rd_en3;
  logic [CPE0_AW-1:0] addr3;
  word_t              rdata3;
  rt_const_t          consts3;
  word_t [2:0]        gen_src3;
  logic               ready3;

  const_grabber #(.CONST_ADDR(TABLE), .N_GEN(3), .DOT_ADDR_BASE(18'd20)) dut3 (
    .clk, .rst_n, .mem_rd_en(rd_en3), .mem_addr(addr3), .mem_rdata(rdata3),
    .consts(consts3), .gen_src(gen_src3), .ready(ready3));

  always_ff @(posedge clk) if (rd_en3) rdata3 <= mem[addr3[7:0]];
  int checks = 0, failures = 0;

  const_grabber #(.CONST_ADDR(TABLE)) dut (.clk, .rst_n, .mem_rd_en(rd_en), .mem_addr(addr),
                                          .mem_rdata(rdata), .consts, .ready);

  always_ff @(posedge clk) if (rd_en) rdata <= mem[addr[7:0]];

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n, reads_after;
    for (int i = 0; i < 256; i++) mem[i] = 32'hdead0000 + i;
    mem[100] = 32'd500; mem[7] = 32'd30; mem[3] = 32'd40;
    mem[250] = 32'd1000; mem[64] = 32'd32; mem[9] = 32'd44;
    mem[20] = 32'd2000; mem[21] = 32'd3000;
    repeat (2) @(posedge clk);
    chk("ready low in reset", !ready);
    @(negedge clk) rst_n = 1'b1;
    n = 0;
    while (!ready && n < 50) begin @(negedge clk); n++; end
    chk($sformatf("ready after %0d cycles, expected %0d", n, N_CONST + 1), n == N_CONST + 1);
    chk("dst_addr", consts.dst_addr == 500);
    chk("dst_rows", consts.dst_rows == 30);
    chk("dst_cols", consts.dst_cols == 40);
    chk("src_addr", consts.src_addr == 1000);
    chk("src_rows", consts.src_rows == 32);
    chk("src_cols", consts.src_cols == 44);
    chk("dot instance not ready yet", !ready3);
    @(negedge clk);
    @(negedge clk);
    chk("dot instance ready two cycles later", ready3);
    chk("dot instance constants", consts3 == consts);
    chk("generator 0 source", gen_src3[0] == 1000);
    chk("generator 1 source", gen_src3[1] == 2000);
    chk("generator 2 source", gen_src3[2] == 3000);
    reads_after = 0;
    repeat (10) begin @(negedge clk); if (rd_en) reads_after++; chk("ready stays", ready); end
    chk("no reads after ready", reads_after == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
