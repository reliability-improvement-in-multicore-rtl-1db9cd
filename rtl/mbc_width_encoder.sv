// mbc_width_encoder: 32-bit priority encoder that measures operand width.
//
// The glue logic uses it to skip the slices of narrow operands, so that a
// narrow add or multiply needs fewer table lookups. It finds the most
// significant set bit of `value` and reports the significant width in bits
// (0 for zero, 32 for a set bit 31) and in 8-bit slices (rounded up).
// Purely combinational. The published scheme names a 32-bit priority encoder
// for this purpose; the output encoding is this design's choice.
module mbc_width_encoder #(
  parameter int unsigned W       = 32,
  parameter int unsigned SLICE_W = 8
) (
  input  logic [W-1:0]                      value,
  output logic                              nonzero,
  output logic [$clog2(W+1)-1:0]            width,    // significant bits
  output logic [$clog2(W/SLICE_W+1)-1:0]    nslices   // ceil(width / SLICE_W)
);

  always_comb begin
    width = '0;
    for (int unsigned i = 0; i < W; i++) begin
      if (value[i]) width = ($clog2(W+1))'(i + 1);
    end
  end

  assign nonzero = |value;
  assign nslices = ($clog2(W/SLICE_W+1))'((int'(width) + SLICE_W - 1) / SLICE_W);

endmodule
