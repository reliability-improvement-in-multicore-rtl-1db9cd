// Self-checking testbench for mbc_shifter: every shift amount with random
// data, against multiplication by a power of two.
module tb_mbc_shifter;
  logic [31:0] din, dout;
  logic [4:0]  shamt;
  int checks = 0, failures = 0;

  mbc_shifter dut (.din, .shamt, .dout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      logic [63:0] prod;
      din   = $urandom();
      shamt = 5'(i % 32);
      #1;
      prod = 64'(din) * (64'd1 << shamt);
      checks++;
      if (dout != prod[31:0]) begin
        failures++;
        $display("FAIL din=%h shamt=%0d dout=%h", din, shamt, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
