// tb_expansion_sweep: the chip-count sweep of the expansible cache.
//
// Runs one deterministic synthetic program (8000 fetches over a 4096-word
// window) on systems of 1, 2, 4 and 8 chips, each direct mapped and then
// associative, with every instruction and cycle count checked by
// tb_sys_runner. Prints the miss fraction of each configuration and the
// fraction of fetches whose address the Remote PC predicted. The program is
// synthetic, so the fractions show the trend, not the figures of a real
// compiler run. Checks that eight chips miss less often than one in both
// mappings.
module tb_expansion_sweep;
  localparam int F = 8000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic d1, d2, d4, d8;
  int c[4], f[4], md[4], ma[4], pd[4], pa[4];
  int checks = 0, failures = 0;

  tb_sys_runner #(.N(1), .FETCHES(F)) r1 (.clk, .done(d1), .checks(c[0]), .failures(f[0]), .miss_direct(md[0]), .miss_assoc(ma[0]), .predok_direct(pd[0]), .predok_assoc(pa[0]));
  tb_sys_runner #(.N(2), .FETCHES(F)) r2 (.clk, .done(d2), .checks(c[1]), .failures(f[1]), .miss_direct(md[1]), .miss_assoc(ma[1]), .predok_direct(pd[1]), .predok_assoc(pa[1]));
  tb_sys_runner #(.N(4), .FETCHES(F)) r4 (.clk, .done(d4), .checks(c[2]), .failures(f[2]), .miss_direct(md[2]), .miss_assoc(ma[2]), .predok_direct(pd[2]), .predok_assoc(pa[2]));
  tb_sys_runner #(.N(8), .FETCHES(F)) r8 (.clk, .done(d8), .checks(c[3]), .failures(f[3]), .miss_direct(md[3]), .miss_assoc(ma[3]), .predok_direct(pd[3]), .predok_assoc(pa[3]));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n[4];
    n = '{1, 2, 4, 8};
    wait (d1 && d2 && d4 && d8);
    $display("chips  miss(assoc)  miss(direct)  predicted(direct)");
    for (int i = 0; i < 4; i++) begin
      checks   += c[i];
      failures += f[i];
      $display("%5d  %11.3f  %12.3f  %17.3f", n[i], real'(ma[i]) / F, real'(md[i]) / F, real'(pd[i]) / F);
    end
    checks++;
    if (!(md[3] < md[0])) begin failures++; $display("FAIL direct: 8 chips do not miss less than 1"); end
    checks++;
    if (!(ma[3] < ma[0])) begin failures++; $display("FAIL assoc: 8 chips do not miss less than 1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
