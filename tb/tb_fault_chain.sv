// tb_fault_chain: checks the fault-bit shift register.
// Shifts 64 random bits in, compares the parallel bits and the serial output
// with a queue model after every shift, and checks the bits hold while
// shift is low.
module tb_fault_chain;
  localparam int N = 64;
  logic clk = 0, shift = 0, sin = 0, sout;
  logic [N-1:0] fault, model;
  int checks = 0, failures = 0;

  fault_chain #(.NBLK(N)) dut (.clk, .shift, .sin, .sout, .fault);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    // load 2*N bits; the model is a queue with the newest bit at block 0
    for (int k = 0; k < 2 * N; k++) begin
      @(negedge clk);
      shift = 1; sin = 1'($urandom);
      @(posedge clk); #1;
      model = (k == 0) ? {N{1'bx}} : model;
      if (k == 0) model = '0;
      model = {model[N-2:0], sin};
      if (k >= N - 1) begin
        chk(fault == model, $sformatf("parallel bits after shift %0d", k));
        chk(sout == model[N-1], "serial out");
      end
    end
    // hold
    @(negedge clk); shift = 0; sin = ~sin;
    repeat (5) @(posedge clk);
    #1 chk(fault == model, "bits hold while shift is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
