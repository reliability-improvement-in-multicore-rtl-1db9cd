// Self-checking testbench for mbc_operand_align: random and equal operand
// pairs; the larger must come out first.
module tb_mbc_operand_align;
  logic [31:0] a, b, larger, smaller;
  logic        swapped;
  int checks = 0, failures = 0;

  mbc_operand_align dut (.a, .b, .larger, .smaller, .swapped);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = $urandom() >> $urandom_range(0, 31);
      b = (i % 10 == 0) ? a : $urandom() >> $urandom_range(0, 31);
      if (i % 10 == 1) begin a = 32'h8000_0000 | $urandom(); b = $urandom() >> 1; end  // top bit decides
      if (i % 10 == 2) begin a = $urandom() >> 1; b = 32'h8000_0000 | $urandom(); end
      #1;
      checks++;
      if (larger != ((a >= b) ? a : b) || smaller != ((a >= b) ? b : a) || swapped != (b > a)) begin
        failures++;
        $display("FAIL a=%h b=%h larger=%h smaller=%h", a, b, larger, smaller);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
