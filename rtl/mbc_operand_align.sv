// mbc_operand_align: 32-bit comparator that orders two operands.
//
// Addition and multiplication are commutative, so the glue logic can always
// treat the larger operand as the first one. `larger` is max(a, b), `smaller` is
// min(a, b) and `swapped` says that b was the larger one. For multiplication
// the smaller operand then bounds the inner partial-product loop.
// Purely combinational, unsigned compare (the published scheme asks for a
// 32-bit comparator; signedness is not stated, unsigned is this design's
// choice and gives the same low 32 product bits).
module mbc_operand_align #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] larger,
  output logic [W-1:0] smaller,
  output logic         swapped
);

  assign swapped = b > a;
  assign larger     = swapped ? b : a;
  assign smaller   = swapped ? a : b;

endmodule
