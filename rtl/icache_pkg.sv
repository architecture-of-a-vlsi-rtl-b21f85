// icache_pkg: sizes, address fields and instruction fields shared by the
// RISC II instruction cache modules.
//
// One cache chip holds 64 blocks of 64 bits, i.e. two 32-bit instructions
// per block. The CPU sends a 30-bit word address. Its low 7 bits name a word
// on the chip (6 bits of block index, 1 bit of word in block) and the upper
// 23 bits form the address tag, so a block entry is 23 tag bits + 64 data
// bits, as the document counts it. The Remote Program Counter is 7 bits wide,
// exactly enough to address the 128 words of one chip.
//
// The jump-recognition fields below follow the RISC I/II long-immediate
// format (7-bit opcode, condition in the destination field, 19-bit PC-relative
// offset). The document does not print the encodings: the opcode values, the
// position of the "likely" bit and the code for "always" are this design's
// own choices and can be changed here in one place.
package icache_pkg;

  // ---- cache geometry (document: 64 blocks x 64 bits, 30-bit bus, 7-bit RPC)
  localparam int unsigned ADDR_W    = 30;                 // CPU word address
  localparam int unsigned INSTR_W   = 32;
  localparam int unsigned BLOCKS    = 64;
  localparam int unsigned WPB       = 2;                  // words per block
  localparam int unsigned IDX_W     = $clog2(BLOCKS);     // 6
  localparam int unsigned WSEL_W    = $clog2(WPB);        // 1
  localparam int unsigned RPC_W     = IDX_W + WSEL_W;     // 7
  localparam int unsigned TAG_W     = ADDR_W - RPC_W;     // 23

  typedef logic [ADDR_W-1:0]  waddr_t;
  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [TAG_W-1:0]   tag_t;
  typedef logic [IDX_W-1:0]   idx_t;
  typedef logic [RPC_W-1:0]   rpc_t;

  // ---- instruction fields used by the jump predictor (encodings assumed)
  localparam logic [6:0] OP_JMPR  = 7'h13;   // PC-relative conditional jump
  localparam logic [6:0] OP_CALLR = 7'h09;   // PC-relative call
  localparam logic [3:0] COND_ALW = 4'hF;    // "always" condition code
  localparam int unsigned OPC_LSB    = 25;   // opcode  = instr[31:25]
  localparam int unsigned LIKELY_BIT = 24;   // unused bit of a jump = likely
  localparam int unsigned COND_LSB   = 19;   // cond    = instr[22:19]
  localparam int unsigned OFFS_W     = 19;   // offset  = instr[18:0], bytes

  // Controller states of one chip.
  typedef enum logic [2:0] {
    ST_PREDICT,   // array read at the RPC index, compared with the CPU address
    ST_RETRY,     // second full cycle: array read at the real CPU index
    ST_MISS,      // nobody hit: wait for chip select / token holder to act
    ST_FILL,      // reading the block (or, for a faulty block, the word)
    ST_DELIVER    // refilled or bypassed word sent to the CPU
  } state_t;

  // Splitting helpers for a CPU word address.
  function automatic tag_t addr_tag(waddr_t a);
    return a[ADDR_W-1:RPC_W];
  endfunction
  function automatic idx_t addr_idx(waddr_t a);
    return a[RPC_W-1:WSEL_W];
  endfunction
  function automatic rpc_t addr_rpc(waddr_t a);
    return a[RPC_W-1:0];
  endfunction

endpackage
