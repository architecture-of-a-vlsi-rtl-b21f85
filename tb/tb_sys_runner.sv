// tb_sys_runner: one multi-chip cache system with its CPU model, memory
// model and checking reference, for the chip-count sweep. It runs the same
// deterministic program first direct mapped, then (after an invalidation)
// associative, checks every instruction and its cycle count as
// tb_icache_system does, and reports misses and correct predictions of each
// mode. The program is the same for every instance, so the miss counts of
// instances with different NCHIPS can be compared.
module tb_sys_runner
  import icache_pkg::*;
  import tb_icache_pkg::*;
#(
  parameter int N       = 4,
  parameter int FETCHES = 6000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   miss_direct,
  output int   miss_assoc,
  output int   predok_direct,
  output int   predok_assoc
);
  localparam int LAT     = 2;
  localparam int WIN     = 4096;     // program window, words

  logic rst_n = 0;
  logic assoc_mode = 0, inval = 0, ft_shift = 0, ft_in = 0, ft_out;
  logic [N-1:0] start_token = N'(1);
  logic cpu_req = 0, cpu_ready;
  waddr_t cpu_addr = '0;
  instr_t cpu_instr;
  logic mem_req, mem_ack;
  waddr_t mem_addr;
  instr_t mem_rdata;
  logic ev_mispredict, ev_fill, ev_bypass, ev_jump;

  icache_system #(.NCHIPS(N)) dut (.*);
  tb_mem_model #(.LAT(LAT)) u_mem (.clk, .rst_n, .mem_req, .mem_addr, .mem_ack, .mem_rdata);

  // reference model
  logic   m_valid [N][BLOCKS];
  tag_t   m_tag   [N][BLOCKS];
  logic   m_fault [N][BLOCKS];
  int     m_token;
  logic [6:0] m_rpc;
  // mechanism counters
  int n_pred_hit, n_retry_hit, n_fill, n_bypass, n_token, n_jump_pred, n_interrupt;
  int n_inval, n_other_chip, n_mispredict_ev, n_fill_ev, n_bypass_ev, n_jump_ev;
  int fills_per_chip [N];
  int n_ft_out;


  always @(posedge clk) if (rst_n) begin
    n_mispredict_ev += int'(ev_mispredict);
    n_fill_ev       += int'(ev_fill);
    n_bypass_ev     += int'(ev_bypass);
    n_jump_ev       += int'(ev_jump);
  end

  int unsigned seq = 0;
  function automatic int unsigned rnd();
    seq++;
    return mix(seq ^ 32'h9e3779b9);
  endfunction

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int sel_chip(waddr_t a);
    return int'(a[RPC_W +: 3]) % N;
  endfunction

  // one fetch: returns after the CPU took the instruction
  task automatic fetch(waddr_t a, output instr_t got);
    int   cyc, exp_cyc, hit_chip, p, owner;
    logic predok, hit;
    idx_t idx;
    idx = addr_idx(a);
    predok = (m_rpc == a[6:0]);
    hit = 1'b0; hit_chip = -1;
    for (int c = 0; c < N; c++)
      if ((assoc_mode || c == sel_chip(a)) && m_valid[c][idx] && !m_fault[c][idx] &&
          m_tag[c][idx] == addr_tag(a)) begin
        hit = 1'b1; hit_chip = c;
      end
    p = predok ? 1 : 2;
    owner = assoc_mode ? m_token : sel_chip(a);
    if (hit) exp_cyc = p;
    else exp_cyc = p + 1 + (m_fault[owner][idx] ? 1 : 2) * (LAT + 1) + 1;

    @(negedge clk);
    cpu_req = 1; cpu_addr = a;
    cyc = 0;
    do begin
      @(posedge clk);
      cyc++;
    end while (!cpu_ready && cyc < 100);
    got = cpu_instr;
    @(negedge clk);
    cpu_req = 0;

    chk(got == prog_word(a), $sformatf("instruction at %h: got %h expected %h", a, got, prog_word(a)));
    chk(cyc == exp_cyc, $sformatf("cycles for %h: %0d expected %0d (hit=%0b predok=%0b)",
                                  a, cyc, exp_cyc, hit, predok));
    // update the model
    if (!hit) begin if (assoc_mode) miss_assoc++; else miss_direct++; end
    if (predok) begin if (assoc_mode) predok_assoc++; else predok_direct++; end
    if (hit) begin
      if (predok) n_pred_hit++; else n_retry_hit++;
      if (assoc_mode && hit_chip != 0) n_other_chip++;
    end else begin
      if (m_fault[owner][idx]) n_bypass++;
      else begin
        m_valid[owner][idx] = 1'b1;
        m_tag[owner][idx]   = addr_tag(a);
        n_fill++;
        fills_per_chip[owner]++;
      end
      if (assoc_mode) begin
        m_token = (m_token + 1) % N;
        n_token++;
      end
    end
    m_rpc = predict_next(a, got);
    if (predict_taken(got)) n_jump_pred++;
  endtask

  task automatic run_program(waddr_t base, int count);
    waddr_t pc;
    instr_t ins;
    pc = base;
    for (int k = 0; k < count; k++) begin
      fetch(pc, ins);
      if (rnd() % 64 == 0) begin
        pc = base + waddr_t'(rnd() % WIN);          // interrupt
        n_interrupt++;
      end else if (ins[31:25] == OP_CALLR ||
                   (ins[31:25] == OP_JMPR && (ins[22:19] == COND_ALW || (rnd() % 2) == 1)))
        pc = pc + waddr_t'(jump_words(ins));
      else
        pc = pc + 1;
      if (pc < base || pc >= base + waddr_t'(WIN)) pc = base + waddr_t'(rnd() % WIN);
      if (rnd() % 16 == 0) repeat (rnd() % 3) @(posedge clk);   // CPU idle cycles
    end
  endtask

  task automatic invalidate();
    @(negedge clk); inval = 1;
    @(negedge clk); inval = 0;
    for (int c = 0; c < N; c++) for (int b = 0; b < BLOCKS; b++) m_valid[c][b] = 1'b0;
    n_inval++;
  endtask

  initial begin
    int s;
    done = 1'b0; checks = 0; failures = 0;
    miss_direct = 0; miss_assoc = 0; predok_direct = 0; predok_assoc = 0;
    s = 0;
    for (int c = 0; c < N; c++) begin
      fills_per_chip[c] = 0;
      for (int b = 0; b < BLOCKS; b++) begin
        m_valid[c][b] = 1'b0;
        m_tag[c][b]   = '0;
        m_fault[c][b] = 1'b0;
      end
    end
    // load the fault bits: the last one shifted in lands in chip 0 block 0
    repeat (2) @(posedge clk);
    for (int p = N * BLOCKS - 1; p >= 0; p--) begin
      @(negedge clk);
      ft_shift = 1; ft_in = m_fault[p / BLOCKS][p % BLOCKS];
      s++;
      if (s > BLOCKS * (N - 1) && ft_out == m_fault[N-1][BLOCKS-1 - (s - 1 - BLOCKS*(N-1))]) n_ft_out++;
    end
    @(negedge clk); ft_shift = 0;
    rst_n = 1;
    m_token = 0; m_rpc = '0;

    // direct mapped
    seq = 0;
    assoc_mode = 0;
    run_program(30'h0001_2000, FETCHES);
    invalidate();
    seq = 0;
    assoc_mode = 1;
    run_program(30'h0001_2000, FETCHES);
    chk(n_fill > 0 && n_pred_hit > 0 && n_retry_hit > 0, "refills, predicted and retried hits all seen");
    chk(n_fill_ev == n_fill, "fill events match the model");
    done = 1'b1;
  end
endmodule
