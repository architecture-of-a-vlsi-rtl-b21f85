// icache_chip: one RISC II instruction cache chip.
//
// 64 blocks of two 32-bit instructions, direct mapped inside the chip, with
// a 23-bit tag, a valid bit and a fault-tolerant bit per block. Several chips
// can share one CPU bus to make a larger cache:
//   * direct mapped (assoc_mode = 0): an external decoder drives cs; only
//     the selected chip can hit and only it refills on a miss;
//   * associative (assoc_mode = 1): every chip looks up every address, the
//     one that holds it answers, and on a miss the chip holding the token
//     refills and then passes the token on (token_out to the next chip's
//     token_in). start_token says which chip holds it after reset.
//
// Fetch timing. The array is read at the index predicted by the Remote PC
// while the CPU's address is still on its way, and the tag is compared with
// the CPU's real address. A correct guess that hits sends the instruction in
// the same cycle the CPU presents the address (ready). A wrong guess costs
// one more cycle in which the array is read at the real index. A miss reads
// the block from memory over mem_req/mem_addr/mem_ack/mem_rdata, one 32-bit
// word per handshake, stores it and then sends the word. A block whose fault
// bit is set is never stored: the requested word alone is read and passed
// to the CPU, so a faulty block behaves as a permanent miss.
//
// The CPU side is a request/ready pair: the CPU holds cpu_req and cpu_addr
// until bus_ready, the OR of the ready outputs of all chips. bus_instr is the
// instruction the CPU takes in that cycle; every chip snoops it so that all
// Remote PCs follow the same program flow. For a single chip, tie bus_ready
// to ready and bus_instr to instr_out.
//
// The fault bits are loaded serially (ft_shift, ft_in, ft_out daisy chain)
// at power-up. Both expansion modes, the bypass, the 7-bit Remote PC and the
// 64 x 64-bit array follow the document; the handshakes, the mode pin and
// snooping of the shared instruction bus are this design's own choices. The
// document's 16-bit short instructions are not supported. Most bits of
// mem_addr are cpu_addr passed straight through: a refill always reads the
// block the CPU is asking for.
module icache_chip
  import icache_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // configuration
  input  logic   assoc_mode,
  input  logic   cs,
  input  logic   start_token,
  input  logic   token_in,
  output logic   token_out,
  // invalidation and fault-bit loading
  input  logic   inval,
  input  logic   ft_shift,
  input  logic   ft_in,
  output logic   ft_out,
  // CPU side
  input  logic   cpu_req,
  input  waddr_t cpu_addr,
  input  logic   bus_ready,
  input  instr_t bus_instr,
  output logic   ready,
  output instr_t instr_out,
  // memory side
  output logic   mem_req,
  output waddr_t mem_addr,
  input  logic   mem_ack,
  input  instr_t mem_rdata,
  // events, for measurement
  output logic   ev_mispredict,
  output logic   ev_fill,
  output logic   ev_bypass,
  output logic   ev_jump
);

  // ---------------------------------------------------------------- RPC
  rpc_t rpc;
  logic jump_pred;

  remote_pc u_rpc (
    .clk, .rst_n,
    .take  (bus_ready),
    .cur   (addr_rpc(cpu_addr)),
    .instr (bus_instr),
    .rpc, .jump_pred
  );

  // ---------------------------------------------------------------- array
  logic            use_cpu_idx;
  idx_t            rd_idx;
  logic            rd_wsel;
  logic            rd_valid;
  tag_t            rd_tag;
  instr_t          rd_word;
  logic            fill_we;
  logic [BLOCKS-1:0] fault;
  instr_t          fbuf [WPB];

  assign rd_idx  = use_cpu_idx ? addr_idx(cpu_addr) : rpc[RPC_W-1:WSEL_W];
  assign rd_wsel = use_cpu_idx ? cpu_addr[0]        : rpc[0];

  icache_array u_array (
    .clk, .rst_n, .inval,
    .rd_idx, .rd_wsel, .rd_valid, .rd_tag, .rd_word,
    .wr_en    (fill_we),
    .wr_idx   (addr_idx(cpu_addr)),
    .wr_tag   (addr_tag(cpu_addr)),
    .wr_block ({mem_rdata, fbuf[0]})
  );

  fault_chain u_fault (
    .clk, .shift(ft_shift), .sin(ft_in), .sout(ft_out), .fault
  );

  // ---------------------------------------------------------------- compare
  logic active, pred_match, tag_hit;

  assign active     = assoc_mode || cs;
  assign pred_match = (rpc == addr_rpc(cpu_addr));

  tag_compare u_cmp (
    .en         (active),
    .stored_tag (rd_tag),
    .cpu_tag    (addr_tag(cpu_addr)),
    .valid      (rd_valid),
    .fault      (fault[rd_idx]),
    .hit        (tag_hit)
  );

  // ---------------------------------------------------------------- control
  logic   token;
  logic   responsible, from_buf, bypass, buf_we, token_pass;
  logic   wcnt;

  assign responsible = assoc_mode ? token : cs;

  icache_ctrl u_ctrl (
    .clk, .rst_n,
    .cpu_req, .pred_match, .tag_hit,
    .blk_fault (fault[addr_idx(cpu_addr)]),
    .responsible, .bus_ready, .assoc_mode, .mem_ack,
    .state(), .use_cpu_idx, .ready, .from_buf, .mem_req, .bypass, .wcnt,
    .buf_we, .fill_we, .token_pass, .ev_mispredict
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          token <= start_token;
    else if (token_in)   token <= 1'b1;   // a one-chip ring passes to itself
    else if (token_pass) token <= 1'b0;
  end
  assign token_out = token_pass;

  // refill buffer: word wcnt of the block, or the requested word on a bypass
  always_ff @(posedge clk) begin
    if (buf_we) fbuf[bypass ? cpu_addr[0] : wcnt] <= mem_rdata;
  end

  assign mem_addr  = bypass ? cpu_addr : {cpu_addr[ADDR_W-1:1], wcnt};
  assign instr_out = from_buf ? fbuf[cpu_addr[0]] : rd_word;
  assign ev_fill   = fill_we;
  assign ev_bypass = buf_we && bypass;
  assign ev_jump   = bus_ready && jump_pred;

endmodule
