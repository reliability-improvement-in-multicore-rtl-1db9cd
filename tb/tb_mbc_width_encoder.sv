// Self-checking testbench for mbc_width_encoder: random values of every
// width are compared with a width computed by a shift loop.
module tb_mbc_width_encoder;
  logic [31:0] value;
  logic        nonzero;
  logic [5:0]  width;
  logic [2:0]  nslices;
  int checks = 0, failures = 0;

  mbc_width_encoder dut (.value, .nonzero, .width, .nslices);

  function automatic int ref_width(logic [31:0] v);
    int w = 0;
    while (v != 0) begin v = v >> 1; w++; end
    return w;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int sh = $urandom_range(0, 32);
      value = (sh == 32) ? 32'd0 : ($urandom() | 32'h8000_0000) >> sh;
      #1;
      checks++;
      if (int'(width) != ref_width(value) || int'(nslices) != (ref_width(value) + 7) / 8 ||
          nonzero != (value != 0)) begin
        failures++;
        $display("FAIL value=%h width=%0d nslices=%0d", value, width, nslices);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
