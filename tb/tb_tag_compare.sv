// tb_tag_compare: checks the tag comparator on random and corner cases.
// A hit is expected only with enable, valid, no fault and equal tags.
module tb_tag_compare;
  localparam int TW = 23;
  logic en, valid, fault, hit;
  logic [TW-1:0] st, ct;
  int checks = 0, failures = 0;

  tag_compare #(.TW(TW)) dut (.en, .stored_tag(st), .cpu_tag(ct), .valid, .fault, .hit);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      logic exp_hit;
      {en, valid, fault} = 3'($urandom);
      st = TW'($urandom);
      case (k % 3)
        0: ct = st;
        1: ct = st ^ (TW'(1) << ($urandom % TW));   // one bit differs
        default: ct = TW'($urandom);
      endcase
      #1;
      exp_hit = 1'b0;
      if (en == 1'b1 && valid == 1'b1 && fault == 1'b0 && st === ct) exp_hit = 1'b1;
      checks++;
      if (hit !== exp_hit) begin
        failures++;
        $display("FAIL en=%b v=%b f=%b st=%h ct=%h hit=%b", en, valid, fault, st, ct, hit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
