// remote_pc: the Remote Program Counter (RPC) of one cache chip.
//
// The chip keeps its own copy of the low program-counter bits so that it can
// start reading the next instruction before the CPU's address has crossed
// the pads. Only the RPC_W bits that address the chip's own words are kept
// (7 bits for 64 blocks of two words), because the tag is always checked
// against the CPU's real address: the RPC only has to guess the index.
//
// Each time the CPU accepts an instruction (take high), the register loads
// the prediction for the next fetch, formed from the low bits of the address
// just fetched (cur) and the instruction itself:
//   * PC-relative call, or PC-relative jump whose condition is "always":
//     cur + word offset of the jump (the offset is a byte offset; its bits
//     above the chip's word range do not change the index);
//   * PC-relative conditional jump with the "likely" bit set: the same;
//   * anything else: cur + 1, the next sequential word.
// This is the register, adder and multiplexer the document adds to the chip.
// Which opcodes and bit positions denote these jumps is set in icache_pkg and
// is this design's own choice. Reset clears the register (assumed).
// Timing: one clock edge from take to the new rpc value. Only offset bits
// 8:2 reach the adder; the rest cannot change a 7-bit word index, so lint
// reports them unused.
module remote_pc
  import icache_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   take,        // CPU accepted an instruction this cycle
  input  rpc_t   cur,         // low bits of the address of that instruction
  input  instr_t instr,       // the instruction itself
  output rpc_t   rpc,         // predicted low address bits of the next fetch
  output logic   jump_pred    // instr is predicted as a taken jump or call
);

  logic [6:0]        opc;
  logic [3:0]        cond;
  logic              likely;
  logic [OFFS_W-1:0] offs;
  rpc_t              seq_next, jmp_next;

  always_comb begin
    opc    = instr[OPC_LSB +: 7];
    cond   = instr[COND_LSB +: 4];
    likely = instr[LIKELY_BIT];
    offs   = instr[OFFS_W-1:0];
    jump_pred = (opc == OP_CALLR) ||
                ((opc == OP_JMPR) && ((cond == COND_ALW) || likely));
    seq_next = cur + rpc_t'(1);
    jmp_next = cur + offs[2 +: RPC_W];    // byte offset -> word offset
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    rpc <= '0;
    else if (take) rpc <= jump_pred ? jmp_next : seq_next;
  end

endmodule
