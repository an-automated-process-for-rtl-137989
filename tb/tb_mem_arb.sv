// tb_mem_arb: three requesters raise random requests and hold them until
// granted. Each cycle the test checks that the grant goes to the lowest
// pending requester (or to none), and that the granted address and data are
// written to memory in the next cycle; idle is checked against the request
// state. Every request must eventually be served.
`timescale 1ns/1ps
module tb_mem_arb;
  import cameron_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  wr_req_t [2:0] req;
  logic [2:0] gnt;
  logic we;
  logic [PEX_AW-1:0] addr;
  word_t wdata;
  logic idle;
  int checks = 0, failures = 0;
  int served [3];
  int issued [3];

  mem_arb #(.N_REQ(3)) dut (.clk, .rst_n, .wr_req(req), .wr_gnt(gnt), .mem_we(we),
                            .mem_addr(addr), .mem_wdata(wdata), .idle);

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    logic exp_we;
    logic [PEX_AW-1:0] exp_addr;
    word_t exp_data;
    int winner;
    req = '0;
    for (int i = 0; i < 3; i++) begin served[i] = 0; issued[i] = 0; end
    exp_we = 1'b0; exp_addr = '0; exp_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      chk($sformatf("write of last grant we=%0d/%0d addr %h/%h", we, exp_we, addr, exp_addr), we == exp_we && (!we || (addr == exp_addr && wdata == exp_data)));
      // new requests on idle requesters
      for (int i = 0; i < 3; i++)
        if (!req[i].req && t < 560 && $urandom() % 3 == 0) begin
          req[i].req  = 1'b1;
          req[i].addr = PEX_AW'($urandom());
          req[i].data = $urandom();
          issued[i]++;
        end
      #1;
      winner = -1;
      for (int i = 2; i >= 0; i--) if (req[i].req) winner = i;
      chk("priority grant", gnt == ((winner < 0) ? 3'b000 : 3'(1 << winner)));
      chk("idle", idle == (winner < 0 && !we));
      exp_we = (winner >= 0);
      if (winner >= 0) begin
        exp_addr = req[winner].addr;
        exp_data = req[winner].data;
      end
      @(posedge clk);
      #1;
      if (winner >= 0) begin
        served[winner]++;
        req[winner].req = 1'b0;
      end
    end
    for (int i = 0; i < 3; i++) chk($sformatf("requester %0d served", i), served[i] == issued[i] && served[i] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
