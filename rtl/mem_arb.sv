// mem_arb: the single writer of the PEx result memory.
//
// N_REQ store requests (one per collector lane, possibly from several
// collectors) compete for the memory write port. A fixed-priority encoder
// grants the lowest-numbered pending request each cycle (wr_gnt is
// combinational, one-hot or zero); the granted address and data are
// registered and written to memory in the following cycle. idle is high when
// nothing is pending and no write is in flight. The priority encoder follows
// the described design; the registered write port is this design's choice.
module mem_arb
  import cameron_pkg::*;
#(
  parameter int N_REQ = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  wr_req_t [N_REQ-1:0]  wr_req,
  output logic [N_REQ-1:0]     wr_gnt,
  output logic                 mem_we,
  output logic [PEX_AW-1:0]    mem_addr,
  output word_t                mem_wdata,
  output logic                 idle
);

  logic any_req;

  always_comb begin
    wr_gnt  = '0;
    any_req = 1'b0;
    for (int i = 0; i < N_REQ; i++) begin
      if (wr_req[i].req && !any_req) begin
        wr_gnt[i] = 1'b1;
        any_req   = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_we    <= 1'b0;
      mem_addr  <= '0;
      mem_wdata <= '0;
    end else begin
      mem_we <= any_req;
      for (int i = 0; i < N_REQ; i++) begin
        if (wr_gnt[i]) begin
          mem_addr  <= wr_req[i].addr;
          mem_wdata <= wr_req[i].data;
        end
      end
    end
  end

  assign idle = !any_req && !mem_we;

  a_onehot_gnt: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(wr_gnt));

endmodule
