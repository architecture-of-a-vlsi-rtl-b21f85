// icache_system: a RISC II instruction cache built from NCHIPS identical
// cache chips on one CPU bus.
//
// Cache size is bought chip by chip. All chips see the CPU's 30-bit word
// address; the mode input picks how addresses are shared among them:
//   * assoc_mode = 0, direct mapped: chip_select_dec decodes the address
//     bits just above a chip's 7 word-address bits into one chip select, so
//     every word has exactly one chip it can be cached in;
//   * assoc_mode = 1, associative: every chip looks up every address, and
//     a token travels round a ring (chip i's token_out feeds chip i+1's
//     token_in, the last chip feeds chip 0) to name the chip that refills on
//     the next miss. start_token[i] is chip i's start pin; exactly one bit
//     should be set.
// The chips' instruction outputs are OR-ed onto one bus (only one chip is
// ready in any cycle); bus_ready and the bus instruction go back to every
// chip so their Remote PCs stay in step. Memory requests are OR-ed in the
// same way: only one chip refills at a time. The fault-bit shift registers
// are chained chip 0 first, so NCHIPS*64 shifts load them all.
//
// CPU interface: hold cpu_req and cpu_addr until cpu_ready; cpu_instr is
// valid in that cycle. Memory interface: mem_addr is valid while mem_req is
// high; mem_ack with mem_rdata ends one word read. The ev_* outputs pulse
// once per event (prediction miss, block refill, bypass of a faulty block,
// predicted jump) for measurement.
module icache_system
  import icache_pkg::*;
#(
  parameter int unsigned NCHIPS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              assoc_mode,
  input  logic [NCHIPS-1:0] start_token,
  input  logic              inval,
  input  logic              ft_shift,
  input  logic              ft_in,
  output logic              ft_out,
  input  logic              cpu_req,
  input  waddr_t            cpu_addr,
  output logic              cpu_ready,
  output instr_t            cpu_instr,
  output logic              mem_req,
  output waddr_t            mem_addr,
  input  logic              mem_ack,
  input  instr_t            mem_rdata,
  output logic              ev_mispredict,
  output logic              ev_fill,
  output logic              ev_bypass,
  output logic              ev_jump
);

  localparam int unsigned SEL_W = (NCHIPS > 1) ? $clog2(NCHIPS) : 1;

  logic [NCHIPS-1:0] cs, ready, tok_out, ft_chain, mreq;
  logic [NCHIPS-1:0] e_mis, e_fill, e_byp, e_jmp;
  instr_t            instr [NCHIPS];
  waddr_t            maddr [NCHIPS];

  chip_select_dec #(.N(NCHIPS), .SEL_W(SEL_W)) u_dec (
    .field (cpu_addr[RPC_W +: SEL_W]),
    .cs
  );

  for (genvar i = 0; i < NCHIPS; i++) begin : g_chip
    icache_chip u_chip (
      .clk, .rst_n,
      .assoc_mode,
      .cs          (cs[i]),
      .start_token (start_token[i]),
      .token_in    (tok_out[(i + NCHIPS - 1) % NCHIPS]),
      .token_out   (tok_out[i]),
      .inval,
      .ft_shift,
      .ft_in       ((i == 0) ? ft_in : ft_chain[(i + NCHIPS - 1) % NCHIPS]),
      .ft_out      (ft_chain[i]),
      .cpu_req, .cpu_addr,
      .bus_ready   (cpu_ready),
      .bus_instr   (cpu_instr),
      .ready       (ready[i]),
      .instr_out   (instr[i]),
      .mem_req     (mreq[i]),
      .mem_addr    (maddr[i]),
      .mem_ack     (mem_ack && mreq[i]),
      .mem_rdata,
      .ev_mispredict (e_mis[i]),
      .ev_fill     (e_fill[i]),
      .ev_bypass   (e_byp[i]),
      .ev_jump     (e_jmp[i])
    );
  end

  always_comb begin
    cpu_instr = '0;
    mem_addr  = '0;
    for (int i = 0; i < NCHIPS; i++) begin
      if (ready[i]) cpu_instr |= instr[i];
      if (mreq[i])  mem_addr  |= maddr[i];
    end
  end

  assign cpu_ready     = |ready;
  assign mem_req       = |mreq;
  assign ft_out        = ft_chain[NCHIPS-1];
  assign ev_mispredict = e_mis[0];   // every chip sees the same prediction
  assign ev_fill       = |e_fill;
  assign ev_bypass     = |e_byp;
  assign ev_jump       = e_jmp[0];

  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ready));
  a_one_mem:    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(mreq));

endmodule
