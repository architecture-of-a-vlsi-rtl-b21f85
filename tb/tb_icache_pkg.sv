// tb_icache_pkg: test program and reference helpers shared by the cache
// testbenches.
//
// prog_word(a) is the instruction stored in main memory at word address a.
// It is a fixed pseudo-random function of the address, so a testbench can
// check every delivered instruction without storing a program. About one
// word in eight is an unconditional PC-relative jump, one in eight a
// conditional jump (likely bit set on half of them) and one in sixteen a
// PC-relative call; the rest are ordinary instructions whose opcode is
// neither jump nor call. Jump offsets are small (within +-60 words) so that
// programs loop over a working set that fits in a few cache chips.
//
// predict_next() is the testbench's own statement of the prediction rule:
// the next fetch is expected at the jump target for calls, unconditional
// jumps and likely conditional jumps, and at the next word otherwise.
package tb_icache_pkg;
  import icache_pkg::*;

  function automatic logic [31:0] mix(logic [31:0] x);
    x = x ^ (x >> 16);
    x = x * 32'h7feb352d;
    x = x ^ (x >> 15);
    x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  function automatic instr_t make_jump(logic [6:0] opc, logic [3:0] cond,
                                       logic likely, int words);
    instr_t i;
    logic [18:0] byte_off;
    byte_off = 19'(words * 4);
    i = '0;
    i[31:25] = opc;
    i[24]    = likely;
    i[22:19] = cond;
    i[18:0]  = byte_off;
    return i;
  endfunction

  function automatic instr_t prog_word(waddr_t a);
    logic [31:0] h;
    int          off;
    h   = mix({2'b0, a} ^ 32'h5bd1e995);
    off = int'(h[13:8]) - 32;                 // -32 .. +31 words
    if (off == 0) off = 3;
    case (h[3:0])
      4'd0, 4'd1: return make_jump(OP_JMPR, COND_ALW, 1'b0, off);
      4'd2:       return make_jump(OP_JMPR, 4'h2, 1'b1, off);
      4'd3:       return make_jump(OP_JMPR, 4'h3, 1'b0, off);
      4'd4:       return make_jump(OP_CALLR, 4'h0, 1'b0, off);
      default: begin
        // ordinary instruction: any opcode except the jump and call ones
        instr_t i;
        i = h ^ {a[29:0], 2'b0};
        if (i[31:25] == OP_JMPR || i[31:25] == OP_CALLR) i[31:25] = 7'h01;
        return i;
      end
    endcase
  endfunction

  // Is instruction i a jump or call the cache should predict as taken?
  function automatic logic predict_taken(instr_t i);
    if (i[31:25] == OP_CALLR) return 1'b1;
    if (i[31:25] == OP_JMPR && (i[22:19] == COND_ALW || i[24])) return 1'b1;
    return 1'b0;
  endfunction

  function automatic int jump_words(instr_t i);
    logic signed [18:0] b;
    b = i[18:0];
    return int'(b) / 4;
  endfunction

  function automatic logic [6:0] predict_next(waddr_t a, instr_t i);
    if (predict_taken(i)) return 7'(int'(a[6:0]) + jump_words(i));
    return 7'(a[6:0] + 7'd1);
  endfunction

endpackage
