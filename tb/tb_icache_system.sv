// tb_icache_system: end-to-end test of the multi-chip instruction cache at
// its default size (four chips of 64 blocks x 64 bits).
//
// A CPU model fetches a program whose words are prog_word(address), follows
// its jumps and calls (conditional jumps taken at random, whatever their
// likely bit), and now and then jumps somewhere unpredictable, as an
// interrupt would. Main memory is tb_mem_model with a latency of 2 cycles.
// Fault bits are loaded serially with a random pattern first.
//
// For every fetch the testbench checks the instruction and the number of
// cycles from request to delivery against its own model of the cache: which
// blocks every chip holds, where the token is, and what the Remote PC
// predicts. Expected cycles (request cycle and delivery cycle included):
//   hit at the predicted index          1
//   hit after a misprediction           2
//   miss                                p + 1 + w*(LAT+1) + 1
// where p is 1 or 2 as above and w is 2 for a refill or 1 for a bypass.
// The run goes through direct-mapped mode, then (after an invalidation)
// associative mode, and counts each mechanism; one that never happened is a
// failure.
module tb_icache_system;
  import icache_pkg::*;
  import tb_icache_pkg::*;

  localparam int N       = 4;        // the top's default chip count
  localparam int LAT     = 2;
  localparam int FETCHES = 4000;     // per mode
  localparam int WIN     = 1024;     // program window, words

  logic clk = 0, rst_n = 0;
  logic assoc_mode = 0, inval = 0, ft_shift = 0, ft_in = 0, ft_out;
  logic [N-1:0] start_token = 4'b0001;
  logic cpu_req = 0, cpu_ready;
  waddr_t cpu_addr = '0;
  instr_t cpu_instr;
  logic mem_req, mem_ack;
  waddr_t mem_addr;
  instr_t mem_rdata;
  logic ev_mispredict, ev_fill, ev_bypass, ev_jump;

  icache_system dut (.*);
  tb_mem_model #(.LAT(LAT)) u_mem (.clk, .rst_n, .mem_req, .mem_addr, .mem_ack, .mem_rdata);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
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

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_mispredict_ev += int'(ev_mispredict);
    n_fill_ev       += int'(ev_fill);
    n_bypass_ev     += int'(ev_bypass);
    n_jump_ev       += int'(ev_jump);
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int sel_chip(waddr_t a);
    return int'(a[8:7]) % N;
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
      if ($urandom % 64 == 0) begin
        pc = base + waddr_t'($urandom % WIN);          // interrupt
        n_interrupt++;
      end else if (ins[31:25] == OP_CALLR ||
                   (ins[31:25] == OP_JMPR && (ins[22:19] == COND_ALW || ($urandom % 2) == 1)))
        pc = pc + waddr_t'(jump_words(ins));
      else
        pc = pc + 1;
      if (pc < base || pc >= base + waddr_t'(WIN)) pc = base + waddr_t'($urandom % WIN);
      if ($urandom % 16 == 0) repeat ($urandom % 3) @(posedge clk);   // CPU idle cycles
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
    s = 0;
    for (int c = 0; c < N; c++) begin
      fills_per_chip[c] = 0;
      for (int b = 0; b < BLOCKS; b++) begin
        m_valid[c][b] = 1'b0;
        m_tag[c][b]   = '0;
        m_fault[c][b] = ($urandom % 12 == 0);
      end
    end
    // make one index faulty in every chip: that address can never be cached
    for (int c = 0; c < N; c++) m_fault[c][5] = 1'b1;
    // load the fault bits: the last one shifted in lands in chip 0 block 0
    repeat (2) @(posedge clk);
    for (int p = N * BLOCKS - 1; p >= 0; p--) begin
      @(negedge clk);
      ft_shift = 1; ft_in = m_fault[p / BLOCKS][p % BLOCKS];
      s++;
      if (s > BLOCKS * (N - 1) && ft_out == m_fault[N-1][BLOCKS-1 - (s - 1 - BLOCKS*(N-1))]) n_ft_out++;
    end
    @(negedge clk); ft_shift = 0;
    chk(n_ft_out > 0, "fault chain serial output seen");
    rst_n = 1;
    m_token = 0; m_rpc = '0;

    // direct mapped
    assoc_mode = 0;
    run_program(30'h0001_2000, FETCHES);
    for (int c = 0; c < N; c++)
      chk(fills_per_chip[c] > 0, $sformatf("direct mode refilled chip %0d", c));
    // switch to associative mapping: contents must be invalidated first
    invalidate();
    assoc_mode = 1;
    run_program(30'h0002_7000, FETCHES);
    // an invalidation in the middle of a program
    invalidate();
    run_program(30'h0002_7000, FETCHES / 4);

    $display("pred_hit=%0d retry_hit=%0d fill=%0d bypass=%0d token=%0d jump_pred=%0d interrupt=%0d other_chip=%0d inval=%0d",
             n_pred_hit, n_retry_hit, n_fill, n_bypass, n_token, n_jump_pred, n_interrupt, n_other_chip, n_inval);
    chk(n_pred_hit > 0,   "a predicted hit happened");
    chk(n_retry_hit > 0,  "a misprediction with a hit on retry happened");
    chk(n_fill > 0,       "a refill happened");
    chk(n_bypass > 0,     "a faulty-block bypass happened");
    chk(n_token > 0,      "the token was passed");
    chk(n_jump_pred > 0,  "a jump was predicted");
    chk(n_interrupt > 0,  "an unpredicted jump happened");
    chk(n_other_chip > 0, "a chip other than chip 0 hit in associative mode");
    chk(n_inval > 0,      "an invalidation happened");
    chk(n_fill_ev == n_fill,     $sformatf("fill events %0d vs model %0d", n_fill_ev, n_fill));
    chk(n_bypass_ev == n_bypass, $sformatf("bypass events %0d vs model %0d", n_bypass_ev, n_bypass));
    chk(n_jump_ev == n_jump_pred, $sformatf("jump events %0d vs model %0d", n_jump_ev, n_jump_pred));
    chk(n_mispredict_ev > 0, "misprediction events counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
