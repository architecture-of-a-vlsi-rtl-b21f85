// tb_mem_model: behavioural main memory for the cache testbenches.
//
// Answers each word read after LAT clock cycles: with mem_req high, mem_ack
// rises LAT cycles after the request began and stays high one cycle, with
// mem_rdata = prog_word(mem_addr). The requester must hold mem_req and
// mem_addr until mem_ack. Not synthesizable intent, test use only.
module tb_mem_model
  import icache_pkg::*;
#(
  parameter int LAT = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   mem_req,
  input  waddr_t mem_addr,
  output logic   mem_ack,
  output instr_t mem_rdata
);
  int cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= 0; mem_ack <= 1'b0; mem_rdata <= '0;
    end else if (mem_req && !mem_ack) begin
      if (cnt == LAT - 1) begin
        cnt       <= 0;
        mem_ack   <= 1'b1;
        mem_rdata <= tb_icache_pkg::prog_word(mem_addr);
      end else cnt <= cnt + 1;
    end else begin
      mem_ack <= 1'b0;
    end
  end
endmodule
