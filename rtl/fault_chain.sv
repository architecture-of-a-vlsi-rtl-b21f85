// fault_chain: the fault-tolerant bits of one cache chip.
//
// Each block has a second invalid bit that, when set, marks the block as
// permanently unusable: an access to it is always a miss and the word comes
// from main memory instead. Following the document, the bits are loaded at
// power-up through a shift register, one bit per block. While shift is high,
// every rising clock edge moves sin into block 0's bit, each bit one block
// up, and the bit of the last block out on sout, so chips can be
// daisy-chained. After NBLK shifts the first bit shifted in sits at block
// NBLK-1. The bits have no reset: they hold whatever was last shifted in,
// as the loading procedure is the only thing that defines them.
module fault_chain #(
  parameter int unsigned NBLK = icache_pkg::BLOCKS
) (
  input  logic            clk,
  input  logic            shift,
  input  logic            sin,
  output logic            sout,
  output logic [NBLK-1:0] fault
);

  always_ff @(posedge clk) begin
    if (shift) fault <= {fault[NBLK-2:0], sin};
  end

  assign sout = fault[NBLK-1];

endmodule
