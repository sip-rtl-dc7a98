// sip_addr_gen: address of element `index` of a list in memory.
//
// addr = base + index * size. The data size is always a power of two, so
// the multiply is a left shift by log2(size) followed by one adder, as the
// document describes. The shift amount is taken from the highest set bit of
// `size`; a size that is not a power of two is therefore rounded down to
// one. A size of zero gives a shift of zero (element size one byte).
//
// Purely combinational; addresses wrap modulo 2^32.
module sip_addr_gen
  import sip_pkg::*;
(
  input  word_t base,
  input  word_t index,
  input  word_t size,
  output word_t addr
);

  logic [$clog2(XLEN)-1:0] shamt;

  always_comb begin
    shamt = '0;
    for (int i = 0; i < XLEN; i++) begin
      if (size[i]) shamt = i[$clog2(XLEN)-1:0];
    end
  end

  assign addr = base + (index << shamt);

endmodule
