// mbc_pkg: types, sizes and lookup-table formats shared by the memory-based
// computing (MBC) blocks.
//
// A failing or overheated integer adder or multiplier is replaced by table
// lookups. Both 32-bit operands are cut into four 8-bit slices; a slice pair
// (Xi, Yi) addresses one word of the ADD table or of the MUL table. Because
// addition and multiplication are commutative, the larger slice always forms
// the high address byte, so only half of each table is ever referenced.
//
// Virtual LUT word address (17 bits):  {table, larger slice, smaller slice}
//   table = 0: ADD word = {14'b0, c1, s1[7:0], c0, s0[7:0]}
//              (sum and carry of x+y+0 and of x+y+1: both carry-select inputs)
//   table = 1: MUL word = {16'b0, x*y}
// Pages are 1024 words; a virtual page number (VPN) is the upper 7 bits.
// The word formats, the page size and the physical address width are this
// design's own choices; the slice width, the carry-select scheme and the
// commutative ordering follow the published scheme.
package mbc_pkg;

  localparam int unsigned XLEN       = 32;  // operand width
  localparam int unsigned SLICE_W    = 8;   // bit-slice width
  localparam int unsigned NSLICE     = XLEN / SLICE_W;
  localparam int unsigned WORD_W     = 32;  // LUT word width
  localparam int unsigned VA_W       = 1 + 2 * SLICE_W;  // 17
  localparam int unsigned PAGE_OFF_W = 10;  // 1024 words per page
  localparam int unsigned VPN_W      = VA_W - PAGE_OFF_W; // 7
  localparam int unsigned PA_W       = 24;  // physical word address
  localparam int unsigned PPN_W      = PA_W - PAGE_OFF_W; // 14

  typedef enum logic {
    OP_ADD = 1'b0,
    OP_MUL = 1'b1
  } mbc_op_e;

  typedef struct packed {
    logic [13:0]        pad;
    logic               c1;
    logic [SLICE_W-1:0] s1;
    logic               c0;
    logic [SLICE_W-1:0] s0;
  } add_entry_t;

  // Contents of one LUT word, as the operating system writes it into main
  // memory when it loads a table page.
  function automatic logic [WORD_W-1:0] lut_word(input logic [VA_W-1:0] va);
    logic [SLICE_W-1:0] x, y;
    logic [SLICE_W:0]   r0, r1;
    add_entry_t         e;
    x = va[2*SLICE_W-1:SLICE_W];
    y = va[SLICE_W-1:0];
    if (va[VA_W-1] == OP_MUL) begin
      return {16'b0, 16'(x) * 16'(y)};
    end
    r0 = {1'b0, x} + {1'b0, y};
    r1 = {1'b0, x} + {1'b0, y} + 9'd1;
    e.pad = '0;
    e.c0  = r0[SLICE_W];
    e.s0  = r0[SLICE_W-1:0];
    e.c1  = r1[SLICE_W];
    e.s1  = r1[SLICE_W-1:0];
    return e;
  endfunction

endpackage
