// icache_ctrl: the controller of one cache chip (the PLA of the chip plan).
//
// It sequences one instruction fetch at a time. Every chip on the bus runs
// the same sequence in step, because each sees the same CPU address and the
// same bus_ready (some chip delivered an instruction this cycle).
//
//   PREDICT  The array is read at the index held in the Remote PC. If that
//            index equals the CPU's and the tag hits, the instruction is
//            sent at once (ready). If the index was right but the tag
//            missed, the access is a miss (MISS). If the index was wrong,
//            one more full cycle is taken (RETRY).
//   RETRY    The array is read at the CPU's own index; a hit is sent.
//   MISS     No chip hit. The chip responsible for the miss (the selected
//            chip when direct mapped, the token holder when associative)
//            starts a memory read; the others wait for bus_ready.
//   FILL     Reads the block's words from memory, one mem_req/mem_ack per
//            word, lowest word first, and writes the entry on the last one.
//            If the block's fault-tolerant bit is set the block is never
//            written: only the requested word is read (bypass).
//   DELIVER  Sends the word from the refill buffer. When associative, the
//            token is passed to the next chip in the same cycle.
//
// A cycle in which another chip delivers returns every chip to PREDICT, and
// so does withdrawing cpu_req before a refill has started.
// Skipping RETRY when the index was predicted correctly, the word order of
// the refill and reading all words before delivering are this design's own
// choices; the document gives the one extra cycle for a misprediction, the
// refill on a miss, the bypass for faulty blocks and the token.
module icache_ctrl
  import icache_pkg::*;
#(
  parameter int unsigned NW = WPB
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cpu_req,     // CPU holds a fetch address
  input  logic                  pred_match,  // RPC index == CPU index
  input  logic                  tag_hit,     // comparator, for the row read now
  input  logic                  blk_fault,   // fault bit of the CPU's row
  input  logic                  responsible, // this chip refills on a miss
  input  logic                  bus_ready,   // some chip delivers this cycle
  input  logic                  assoc_mode,  // token passing enabled
  input  logic                  mem_ack,     // memory word available
  output state_t                state,
  output logic                  use_cpu_idx, // read the array at the CPU index
  output logic                  ready,       // this chip drives the instruction
  output logic                  from_buf,    // ...from the refill buffer
  output logic                  mem_req,
  output logic                  bypass,      // current refill is a bypass
  output logic [$clog2(NW)-1:0] wcnt,        // word being read from memory
  output logic                  buf_we,      // store mem_rdata in buffer[wcnt]
  output logic                  fill_we,     // write the refilled entry
  output logic                  token_pass,
  output logic                  ev_mispredict
);

  state_t nstate;
  logic   last_word;

  assign last_word = bypass || (wcnt == ($clog2(NW))'(NW-1));

  always_comb begin
    nstate        = state;
    use_cpu_idx   = (state != ST_PREDICT);
    ready         = 1'b0;
    from_buf      = 1'b0;
    mem_req       = 1'b0;
    buf_we        = 1'b0;
    fill_we       = 1'b0;
    token_pass    = 1'b0;
    ev_mispredict = 1'b0;
    unique case (state)
      ST_PREDICT: if (cpu_req) begin
        ev_mispredict = !pred_match;
        if (pred_match && tag_hit) ready = 1'b1;
        else if (bus_ready)        nstate = ST_PREDICT;
        else if (pred_match)       nstate = ST_MISS;
        else                       nstate = ST_RETRY;
      end
      ST_RETRY: begin
        if (!cpu_req) nstate = ST_PREDICT;      // request withdrawn
        else if (tag_hit) begin
          ready  = 1'b1;
          nstate = ST_PREDICT;
        end else if (bus_ready) nstate = ST_PREDICT;
        else                    nstate = ST_MISS;
      end
      ST_MISS: begin
        if (bus_ready || !cpu_req) nstate = ST_PREDICT;
        else if (responsible) nstate = ST_FILL;
      end
      ST_FILL: begin
        mem_req = 1'b1;
        if (mem_ack) begin
          buf_we = 1'b1;
          if (last_word) begin
            fill_we = !bypass;
            nstate  = ST_DELIVER;
          end
        end
      end
      ST_DELIVER: begin
        ready      = 1'b1;
        from_buf   = 1'b1;
        token_pass = assoc_mode;
        nstate     = ST_PREDICT;
      end
      default: nstate = ST_PREDICT;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_PREDICT;
      wcnt   <= '0;
      bypass <= 1'b0;
    end else begin
      state <= nstate;
      if (state == ST_MISS && nstate == ST_FILL) begin
        wcnt   <= '0;
        bypass <= blk_fault;
      end else if (state == ST_FILL && mem_ack && !last_word) begin
        wcnt <= wcnt + 1'b1;
      end
    end
  end

  // A refill never starts while another chip is delivering.
  a_fill_alone: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state == ST_FILL) |-> !(bus_ready && !ready));

endmodule
