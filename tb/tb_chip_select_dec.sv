// tb_chip_select_dec: checks that every field value raises exactly one chip
// select, the one numbered field mod N, for N = 4 and N = 3.
module tb_chip_select_dec;
  logic [1:0] f4, f3;
  logic [3:0] cs4;
  logic [2:0] cs3;
  int checks = 0, failures = 0;

  chip_select_dec #(.N(4)) d4 (.field(f4), .cs(cs4));
  chip_select_dec #(.N(3)) d3 (.field(f3), .cs(cs3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      f4 = 2'(v); f3 = 2'(v);
      #1;
      checks++;
      if (cs4 != 4'(1 << v)) begin failures++; $display("FAIL N=4 field=%0d cs=%b", v, cs4); end
      checks++;
      if (cs3 != 3'(1 << (v % 3))) begin failures++; $display("FAIL N=3 field=%0d cs=%b", v, cs3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
