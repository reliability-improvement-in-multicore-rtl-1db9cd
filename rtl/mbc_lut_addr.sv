// mbc_lut_addr: forms the virtual LUT word address of one slice pair.
//
// Address = {table, larger slice, smaller slice}. Ordering the two 8-bit
// slices with a small comparator exploits commutativity: F(x,y) and F(y,x)
// share one word, so only half of each table is referenced and loaded.
// Combinational. The ordering idea is from the published scheme; the bit
// layout is this design's (see mbc_pkg).
module mbc_lut_addr
  import mbc_pkg::*;
(
  input  mbc_op_e             table_sel,
  input  logic [SLICE_W-1:0]  x,
  input  logic [SLICE_W-1:0]  y,
  output logic [VA_W-1:0]     va
);

  logic xy_swap;
  assign xy_swap = y > x;
  assign va = {table_sel, (xy_swap ? y : x), (xy_swap ? x : y)};

endmodule
