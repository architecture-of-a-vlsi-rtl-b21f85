// tag_compare: the comparator of one cache chip.
//
// A block supplies a hit only when its stored tag equals the tag bits of the
// real address sent by the CPU, its valid bit is set and its fault-tolerant
// bit is clear. Comparing against the CPU's address rather than the
// predicted one is what lets the Remote Program Counter guess freely: a
// wrong guess can only cost time, never deliver a wrong instruction. The
// enable input carries the chip-level conditions (chip selected, predicted
// index equal to the real one). Purely combinational.
module tag_compare #(
  parameter int unsigned TW = icache_pkg::TAG_W
) (
  input  logic          en,
  input  logic [TW-1:0] stored_tag,
  input  logic [TW-1:0] cpu_tag,
  input  logic          valid,
  input  logic          fault,
  output logic          hit
);

  assign hit = en && valid && !fault && (stored_tag == cpu_tag);

endmodule
