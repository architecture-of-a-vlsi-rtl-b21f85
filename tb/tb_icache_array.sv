// tb_icache_array: checks the tag/data/valid array of one chip.
// After reset no entry is valid; random block writes are read back through
// the word multiplexer and compared with a shadow copy kept by the
// testbench; invalidation clears every valid bit but leaves later refills
// working.
module tb_icache_array;
  import icache_pkg::*;
  logic clk = 0, rst_n = 0, inval = 0, wr_en = 0;
  idx_t rd_idx, wr_idx;
  logic rd_wsel, rd_valid;
  tag_t rd_tag, wr_tag;
  instr_t rd_word;
  logic [63:0] wr_block;
  tag_t        sh_tag  [BLOCKS];
  logic [63:0] sh_data [BLOCKS];
  logic        sh_val  [BLOCKS];
  int checks = 0, failures = 0;

  icache_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_all();
    for (int b = 0; b < BLOCKS; b++) begin
      for (int w = 0; w < 2; w++) begin
        rd_idx = idx_t'(b); rd_wsel = 1'(w);
        #1;
        chk(rd_valid == sh_val[b], $sformatf("valid of block %0d", b));
        if (sh_val[b]) begin
          chk(rd_tag == sh_tag[b], $sformatf("tag of block %0d", b));
          chk(rd_word == sh_data[b][w*32 +: 32], $sformatf("word %0d of block %0d", w, b));
        end
      end
    end
  endtask

  initial begin
    for (int b = 0; b < BLOCKS; b++) sh_val[b] = 1'b0;
    rd_idx = '0; rd_wsel = 0; wr_idx = '0; wr_tag = '0; wr_block = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      wr_en = 1; wr_idx = idx_t'($urandom); wr_tag = tag_t'($urandom);
      wr_block = {$urandom, $urandom};
      sh_val[wr_idx] = 1'b1; sh_tag[wr_idx] = wr_tag; sh_data[wr_idx] = wr_block;
      @(negedge clk); wr_en = 0;
      if (k % 50 == 49) check_all();
    end
    // invalidate everything
    @(negedge clk); inval = 1; @(negedge clk); inval = 0;
    for (int b = 0; b < BLOCKS; b++) sh_val[b] = 1'b0;
    check_all();
    // one refill after invalidation
    @(negedge clk);
    wr_en = 1; wr_idx = 6'd17; wr_tag = 23'h1234; wr_block = 64'hdeadbeef_0badf00d;
    sh_val[17] = 1'b1; sh_tag[17] = wr_tag; sh_data[17] = wr_block;
    @(negedge clk); wr_en = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
