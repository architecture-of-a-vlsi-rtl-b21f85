// tb_icache_ctrl: directed checks of the chip controller, cycle by cycle.
// Each scenario sets the inputs for one cycle, checks the outputs of that
// cycle and the state reached after the clock edge:
//   predicted hit (0 extra cycles), misprediction then hit (1 extra cycle),
//   miss and two-word refill with token pass, bypass of a faulty block,
//   a miss served by another chip, a retry cut short by another chip, and
//   a request withdrawn before the refill.
module tb_icache_ctrl;
  import icache_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cpu_req, pred_match, tag_hit, blk_fault, responsible, bus_ready, assoc_mode, mem_ack;
  state_t state;
  logic use_cpu_idx, ready, from_buf, mem_req, bypass, buf_we, fill_we, token_pass, ev_mispredict;
  logic wcnt;
  int checks = 0, failures = 0;

  icache_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (state=%s)", what, state.name()); end
  endtask

  // one cycle: drive inputs, check outputs {ready, mem_req, buf_we, fill_we,
  // token_pass, use_cpu_idx}, then check the next state
  task automatic cyc(logic req, logic pm, logic th, logic bf, logic resp, logic br, logic ack,
                     logic [5:0] outs, state_t nxt, string what);
    @(negedge clk);
    cpu_req = req; pred_match = pm; tag_hit = th; blk_fault = bf;
    responsible = resp; bus_ready = br; mem_ack = ack;
    #1;
    chk({ready, mem_req, buf_we, fill_we, token_pass, use_cpu_idx} == outs,
        $sformatf("%s: outputs %b, expected %b", what,
                  {ready, mem_req, buf_we, fill_we, token_pass, use_cpu_idx}, outs));
    @(posedge clk); #1;
    chk(state == nxt, $sformatf("%s: next state", what));
  endtask

  initial begin
    {cpu_req, pred_match, tag_hit, blk_fault, responsible, bus_ready, mem_ack} = '0;
    assoc_mode = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    //                req pm th bf rs br ack  rdy mrq bwe fwe tok cpu
    // 1. predicted hit: ready in the first cycle
    cyc(1, 1, 1, 0, 1, 1, 0, 6'b100000, ST_PREDICT, "predicted hit");
    // idle cycle: nothing happens
    cyc(0, 0, 0, 0, 1, 0, 0, 6'b000000, ST_PREDICT, "idle");
    // 2. misprediction, then hit at the real index: one extra cycle
    cyc(1, 0, 0, 0, 1, 0, 0, 6'b000000, ST_RETRY,   "mispredict");
    cyc(1, 0, 1, 0, 1, 1, 0, 6'b100001, ST_PREDICT, "retry hit");
    // 3. miss with correct index, this chip refills two words, passes token
    cyc(1, 1, 0, 0, 1, 0, 0, 6'b000000, ST_MISS,    "predicted miss");
    cyc(1, 1, 0, 0, 1, 0, 0, 6'b000001, ST_FILL,    "miss, responsible");
    cyc(1, 1, 0, 0, 1, 0, 0, 6'b010001, ST_FILL,    "fill wait");
    chk(wcnt == 1'b0 && !bypass, "first word requested");
    cyc(1, 1, 0, 0, 1, 0, 1, 6'b011001, ST_FILL,    "fill word 0");
    chk(wcnt == 1'b1, "second word requested");
    cyc(1, 1, 0, 0, 1, 0, 1, 6'b011101, ST_DELIVER, "fill word 1 writes");
    cyc(1, 1, 0, 0, 1, 1, 0, 6'b100011, ST_PREDICT, "deliver with token pass");
    chk(from_buf == 1'b0, "from_buf only while delivering");
    // 4. faulty block: bypass one word, no array write
    cyc(1, 0, 0, 1, 1, 0, 0, 6'b000000, ST_RETRY,   "mispredict (faulty)");
    cyc(1, 0, 0, 1, 1, 0, 0, 6'b000001, ST_MISS,    "retry miss (faulty)");
    cyc(1, 0, 0, 1, 1, 0, 0, 6'b000001, ST_FILL,    "start bypass");
    chk(bypass == 1'b1, "bypass flag set");
    cyc(1, 0, 0, 1, 1, 0, 1, 6'b011001, ST_DELIVER, "bypass word, no write");
    // direct mode: no token pass
    assoc_mode = 0;
    cyc(1, 0, 0, 1, 1, 1, 0, 6'b100001, ST_PREDICT, "deliver bypass, no token");
    // 5. miss served by another chip: wait, never request memory
    cyc(1, 1, 0, 0, 0, 0, 0, 6'b000000, ST_MISS,    "miss, not responsible");
    cyc(1, 1, 0, 0, 0, 0, 0, 6'b000001, ST_MISS,    "waiting");
    cyc(1, 1, 0, 0, 0, 0, 0, 6'b000001, ST_MISS,    "waiting");
    cyc(1, 1, 0, 0, 0, 1, 0, 6'b000001, ST_PREDICT, "other chip delivered");
    // 6. mispredict, another chip hits in the retry cycle
    cyc(1, 0, 0, 0, 0, 0, 0, 6'b000000, ST_RETRY,   "mispredict 2");
    cyc(1, 0, 0, 0, 0, 1, 0, 6'b000001, ST_PREDICT, "other chip hit in retry");
    // 7. another chip hit in the predict cycle
    cyc(1, 0, 0, 0, 0, 1, 0, 6'b000000, ST_PREDICT, "other chip hit first");
    // 8. the CPU withdraws its request before a refill starts
    cyc(1, 0, 0, 0, 1, 0, 0, 6'b000000, ST_RETRY,   "mispredict 3");
    cyc(0, 0, 0, 0, 1, 0, 0, 6'b000001, ST_PREDICT, "withdrawn in retry");
    cyc(1, 1, 0, 0, 0, 0, 0, 6'b000000, ST_MISS,    "miss 4");
    cyc(0, 1, 0, 0, 0, 0, 0, 6'b000001, ST_PREDICT, "withdrawn in miss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
