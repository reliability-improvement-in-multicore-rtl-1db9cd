// Self-checking testbench for mbc_lut_addr: both orders of a slice pair must
// give the same word address, with the larger slice in the high byte and the
// table bit on top.
module tb_mbc_lut_addr;
  import mbc_pkg::*;
  mbc_op_e     table_sel;
  logic [7:0]  x, y;
  logic [16:0] va, va_sw;
  int checks = 0, failures = 0;

  mbc_lut_addr dut (.table_sel, .x, .y, .va);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      logic [7:0] hi, lo;
      table_sel = mbc_op_e'(i[0]);
      x = 8'($urandom());
      y = (i % 7 == 0) ? x : 8'($urandom());
      #1;
      hi = (x > y) ? x : y;
      lo = (x > y) ? y : x;
      checks++;
      if (va != {table_sel, hi, lo}) begin
        failures++;
        $display("FAIL x=%h y=%h va=%h", x, y, va);
      end
      va_sw = va;
      {x, y} = {y, x};
      #1;
      checks++;
      if (va != va_sw) begin
        failures++;
        $display("FAIL commutative x=%h y=%h", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
