// chip_select_dec: the external decoder of a direct-mapped multi-chip cache.
//
// Direct mapping across chips means a word can live in one chip only. The
// decoder takes the SEL_W address bits just above the bits a chip uses for
// its own index and word select, and raises exactly one of the N chip-select
// lines: chip (field mod N). With N a power of two, the case the document
// recommends for direct mapping, this is a plain binary decoder (2 address
// bits to 4 selects in the document's example). Which address bits feed it
// is this design's own choice. Combinational.
module chip_select_dec #(
  parameter int unsigned N     = 4,
  parameter int unsigned SEL_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [SEL_W-1:0] field,
  output logic [N-1:0]     cs
);

  always_comb begin
    cs = '0;
    cs[int'(field) % N] = 1'b1;
  end

endmodule
