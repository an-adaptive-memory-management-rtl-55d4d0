// dram_model: behavioural main memory for simulation only. Accepts one
// 64-byte block request at a time (ready when idle) and returns the block
// LAT cycles later as eight words of the tb_net_pkg memory image (or of an
// address pattern when RAW). Counts
// the requests it served.
module dram_model
  import cynapse_pkg::*;
#(
  parameter int LAT = 4,
  parameter bit RAW = 1'b0   // 1: word = address pattern instead of the network
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mem_req,
  output logic             mem_ready,
  input  baddr_t           mem_addr,
  output logic             mem_resp,
  output logic [BLK_W-1:0] mem_rdata,
  output int               reads
);
  int     cnt;
  baddr_t a_q;
  assign mem_ready = cnt == 0;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= 0; mem_resp <= 1'b0; mem_rdata <= '0; reads <= 0; a_q <= '0;
    end else begin
      mem_resp <= 1'b0;
      if (cnt == 0 && mem_req) begin
        cnt <= LAT; a_q <= mem_addr; reads <= reads + 1;
      end else if (cnt == 1) begin
        for (int i = 0; i < BLK_WORDS; i++)
          mem_rdata[i*DATA_W +: DATA_W] <= RAW ? {7'h55, {a_q, 3'(i)}, 7'h2A, {a_q, 3'(i)}}
                                               : tb_net_pkg::net_word({a_q, 3'(i)});
        mem_resp <= 1'b1;
        cnt <= 0;
      end else if (cnt > 1) begin
        cnt <= cnt - 1;
      end
    end
  end
endmodule
