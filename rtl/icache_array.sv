// icache_array: tag, data and valid storage of one cache chip, with its row
// decoder and output word multiplexer.
//
// The chip is direct mapped internally: each of the BLOCKS entries holds one
// address tag, one valid bit and a block of WPB instructions (64 bits by
// default), and tag and data sit in the same rows so one decoder serves both.
// Reading is combinational from rd_idx: the row decoder selects an entry and
// the multiplexer picks word rd_wsel of its block. A refill writes a whole
// entry (tag, full block, valid set) on the rising clock edge when wr_en is
// high. Valid bits are cleared by reset and by inval, the invalidation the
// document expects at start-up and on process switches; tag and data cells
// are plain memory with no reset. The fault-tolerant bits, which sit in a
// column next to the valid bits on the real chip, are kept in fault_chain
// because they are loaded as a shift register.
module icache_array
  import icache_pkg::*;
#(
  parameter int unsigned NBLK = BLOCKS,
  parameter int unsigned TW   = TAG_W,
  parameter int unsigned NW   = WPB,
  parameter int unsigned DW   = INSTR_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    inval,      // clear every valid bit
  // read port (combinational)
  input  logic [$clog2(NBLK)-1:0] rd_idx,
  input  logic [$clog2(NW)-1:0]   rd_wsel,
  output logic                    rd_valid,
  output logic [TW-1:0]           rd_tag,
  output logic [DW-1:0]           rd_word,
  // refill port (one whole block per write)
  input  logic                    wr_en,
  input  logic [$clog2(NBLK)-1:0] wr_idx,
  input  logic [TW-1:0]           wr_tag,
  input  logic [NW*DW-1:0]        wr_block
);

  logic [TW-1:0]    tag_mem  [NBLK];
  logic [NW*DW-1:0] data_mem [NBLK];
  logic [NBLK-1:0]  valid;

  always_ff @(posedge clk) begin
    if (wr_en) begin
      tag_mem[wr_idx]  <= wr_tag;
      data_mem[wr_idx] <= wr_block;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      valid <= '0;
    else if (inval)  valid <= '0;
    else if (wr_en)  valid[wr_idx] <= 1'b1;
  end

  logic [NW*DW-1:0] rd_block;
  always_comb begin
    rd_valid = valid[rd_idx];
    rd_tag   = tag_mem[rd_idx];
    rd_block = data_mem[rd_idx];
    rd_word  = rd_block[rd_wsel*DW +: DW];
  end

endmodule
