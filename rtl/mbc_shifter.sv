// mbc_shifter: 32-bit left shifter that gives a partial product its weight.
//
// A slice product Xi*Yj looked up from the MUL table has weight
// 2^(8*(i+j)); the glue logic shifts it by that amount before it is added to
// the running product. Bits shifted past bit 31 are dropped, since the
// multiplier returns the low 32 bits. Combinational.
module mbc_shifter #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]         din,
  input  logic [$clog2(W)-1:0] shamt,
  output logic [W-1:0]         dout
);

  assign dout = din << shamt;

endmodule
