// Self-checking testbench for mbc_glue_logic.
//
// A responder stands in for the cache: it answers each accepted lookup one
// cycle later with the table word for that virtual address. Results are
// compared with a+b and the low 32 bits of a*b. With the responder always
// ready the latency is checked: 1 cycle for a zero operand, n cycles and n
// lookups for an add whose wider operand has n non-zero 8-bit slices (4 for
// full width). A second phase holds `lreq_ready` low at random and delays
// the answers.
module tb_mbc_glue_logic;
  import mbc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, in_ready, done, carry_out;
  mbc_op_e op;
  logic [31:0] a, b, result;
  logic lreq_valid, lreq_ready, lresp_valid;
  logic [16:0] lreq_va;
  logic [31:0] lresp_data;
  int checks = 0, failures = 0;
  int lookups = 0;
  bit stall_mode = 0;

  mbc_glue_logic dut (.*);

  always #5 clk = ~clk;

  // in-order responder: one cycle after the request, or (stall_mode) after
  // a random extra delay
  logic [31:0] q_data [$];
  int          q_due  [$];
  int          now = 0;
  always @(posedge clk) begin
    now++;
    lresp_valid <= 1'b0;
    if (lreq_valid && lreq_ready) begin
      int due;
      due = now + (stall_mode ? $urandom_range(0, 4) : 0);
      if (q_due.size() > 0 && due <= q_due[q_due.size() - 1]) due = q_due[q_due.size() - 1] + 1;
      q_data.push_back(lut_word(lreq_va));
      q_due.push_back(due);
      lookups <= lookups + 1;
    end
    if (q_due.size() > 0 && q_due[0] <= now) begin
      lresp_valid <= 1'b1;
      lresp_data  <= q_data.pop_front();
      void'(q_due.pop_front());
    end
  end
  always @(negedge clk) lreq_ready = stall_mode ? ($urandom_range(0, 2) != 0) : 1'b1;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int nsl(logic [31:0] v);
    int n = 0;
    for (int i = 0; i < 4; i++) if (v[8*i +: 8] != 0) n = i + 1;
    return n;
  endfunction

  // run one operation; returns cycles and lookups used
  task automatic run(input mbc_op_e o, input logic [31:0] x, input logic [31:0] y,
                     output int cycles, output int nlook);
    logic [31:0] expect_r;
    logic [32:0] full;
    int l0;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    start = 1; op = o; a = x; b = y;
    l0 = lookups;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
      if (cycles > 2000) break;
    end
    full = 33'(x) + 33'(y);
    expect_r = (o == OP_ADD) ? full[31:0] : x * y;
    checks++;
    if (!done || result != expect_r) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h result=%h expected=%h", o.name(), x, y, result, expect_r);
    end
    if (o == OP_ADD && x != 0 && y != 0) begin
      checks++;
      if (carry_out != full[32]) begin
        failures++;
        $display("FAIL carry a=%h b=%h", x, y);
      end
    end
    @(posedge clk);
    #1;
    nlook = lookups - l0;
  endtask

  function automatic logic [31:0] rnd_operand();
    case ($urandom_range(0, 5))
      0: return 32'($urandom_range(0, 255));
      1: return 32'($urandom_range(0, 65535));
      2: return 32'hFFFF_FFFF;
      3: return 32'd0;
      default: return $urandom() >> $urandom_range(0, 31);
    endcase
  endfunction

  int cyc, nl;
  initial begin
    start = 0; op = OP_ADD; a = 0; b = 0; lresp_valid = 0; lresp_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // zero operand: one cycle, no lookup
    run(OP_ADD, 32'h0, 32'h1234_5678, cyc, nl);
    checks++; if (cyc != 1 || nl != 0) begin failures++; $display("FAIL zero add cyc=%0d nl=%0d", cyc, nl); end
    run(OP_MUL, 32'h1234_5678, 32'h0, cyc, nl);
    checks++; if (cyc != 1 || nl != 0) begin failures++; $display("FAIL zero mul cyc=%0d nl=%0d", cyc, nl); end

    // full width: 4 cycles, 4 lookups, carries ripple through every slice
    run(OP_ADD, 32'hFFFF_FFFF, 32'h0000_0001, cyc, nl);
    checks++; if (cyc != 4 || nl != 4) begin failures++; $display("FAIL full add cyc=%0d nl=%0d", cyc, nl); end
    run(OP_ADD, 32'h8000_0000, 32'h8000_0001, cyc, nl);
    checks++; if (cyc != 4 || nl != 4) begin failures++; $display("FAIL full add2 cyc=%0d", cyc); end

    // narrow operands: fewer lookups; carry out of the top slice kept
    run(OP_ADD, 32'h0000_00FF, 32'h0000_0001, cyc, nl);
    checks++; if (cyc != 1 || nl != 1) begin failures++; $display("FAIL 8-bit add cyc=%0d nl=%0d", cyc, nl); end
    run(OP_ADD, 32'h0000_FFFF, 32'h0000_00FF, cyc, nl);
    checks++; if (cyc != 2 || nl != 2) begin failures++; $display("FAIL 16-bit add cyc=%0d nl=%0d", cyc, nl); end

    // random, latency law
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] x, y;
      mbc_op_e o;
      x = rnd_operand(); y = rnd_operand();
      o = mbc_op_e'($urandom_range(0, 1));
      run(o, x, y, cyc, nl);
      if (o == OP_ADD && x != 0 && y != 0) begin
        checks++;
        if (cyc != nsl(x | y) || nl != nsl(x | y)) begin
          failures++;
          $display("FAIL add timing a=%h b=%h cyc=%0d nl=%0d", x, y, cyc, nl);
        end
      end
    end

    // lookup port held off at random
    stall_mode = 1;
    for (int i = 0; i < 2000; i++) begin
      run(mbc_op_e'($urandom_range(0, 1)), rnd_operand(), rnd_operand(), cyc, nl);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
