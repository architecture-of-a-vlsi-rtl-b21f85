// tb_remote_pc: checks the Remote PC's prediction rule.
// Feeds ordinary instructions, unconditional jumps, calls, and conditional
// jumps with and without the likely bit, with positive and negative offsets
// and wrap-around of the 7-bit register, and compares the register after
// each accepted instruction with values written out by hand or computed by
// the testbench's prediction helper. Also checks that the register holds
// while take is low and that the update takes exactly one clock edge.
module tb_remote_pc;
  import icache_pkg::*;
  import tb_icache_pkg::*;
  logic clk = 0, rst_n = 0, take = 0, jump_pred;
  rpc_t cur, rpc;
  instr_t instr;
  int checks = 0, failures = 0;

  remote_pc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (rpc=%0d)", what, rpc); end
  endtask

  task automatic step(rpc_t c, instr_t i, rpc_t expect_rpc, string what);
    rpc_t old_rpc;
    @(negedge clk);
    old_rpc = rpc;
    take = 1; cur = c; instr = i;
    #1;
    chk(rpc == old_rpc, {what, ": no change before the clock edge"});
    @(posedge clk); #1;
    take = 0;
    chk(rpc == expect_rpc, what);
  endtask

  initial begin
    cur = '0; instr = '0;
    repeat (2) @(posedge clk);
    #1 chk(rpc == 7'd0, "reset value");
    rst_n = 1;
    // hand-worked cases
    step(7'd5,   32'h0200_0000,                               7'd6,   "sequential");
    step(7'd127, 32'h0200_0000,                               7'd0,   "sequential wrap");
    step(7'd10,  make_jump(OP_JMPR, COND_ALW, 1'b0, 12),      7'd22,  "jump always +12");
    step(7'd10,  make_jump(OP_JMPR, COND_ALW, 1'b0, -12),     7'd126, "jump always -12 wraps");
    step(7'd40,  make_jump(OP_CALLR, 4'h0, 1'b0, 100),        7'd12,  "call +100 wraps");
    step(7'd40,  make_jump(OP_JMPR, 4'h3, 1'b1, 5),           7'd45,  "likely conditional");
    step(7'd40,  make_jump(OP_JMPR, 4'h3, 1'b0, 5),           7'd41,  "unlikely conditional");
    // hold while take is low
    repeat (3) @(posedge clk);
    #1 chk(rpc == 7'd41, "holds without take");
    // random cases against the testbench's helper
    for (int k = 0; k < 300; k++) begin
      waddr_t a;
      instr_t i;
      a = waddr_t'({$urandom});
      i = prog_word(a);
      step(a[6:0], i, predict_next(a, i), $sformatf("random %0d", k));
      checks++;
      if (jump_pred != predict_taken(i)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
