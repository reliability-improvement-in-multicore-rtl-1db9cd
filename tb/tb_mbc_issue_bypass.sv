// Self-checking testbench for mbc_issue_bypass.
//
// Random adds and multiplies are issued under random defect masks and
// temperatures around the 100 C threshold. A stand-in for the glue logic
// answers bypassed operations after a random delay. Checked: the path taken
// (functional unit unless every unit of the kind is defective or the
// temperature is above 100), the unit chosen (lowest-numbered working one),
// the result and ADD carry out, the one-cycle functional-unit latency, the stall while an
// operation is in the MBC path, and one os_load_req pulse per kind.
module tb_mbc_issue_bypass;
  import mbc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  mbc_op_e in_op;
  logic [31:0] in_a, in_b;
  logic [5:0] add_defect;
  logic [1:0] mul_defect;
  logic [7:0] temp;
  logic out_valid, out_via_mbc, out_carry, mbc_carry;
  logic [31:0] out_result;
  logic [2:0] out_unit;
  logic [1:0] os_load_req;
  logic mbc_start, mbc_ready, mbc_done;
  mbc_op_e mbc_op;
  logic [31:0] mbc_a, mbc_b, mbc_result;
  int checks = 0, failures = 0;
  int n_fu = 0, n_mbc_defect = 0, n_mbc_hot = 0, n_load_req [2];

  mbc_issue_bypass dut (.*);

  always #5 clk = ~clk;

  // glue-logic stand-in
  int gcnt = 0;
  logic [31:0] gres;
  logic        gcarry;
  assign mbc_ready = (gcnt == 0);
  always_ff @(posedge clk) begin
    if (gcnt == 0 && mbc_start) begin
      gcnt <= $urandom_range(1, 6);
      gres <= (mbc_op == OP_ADD) ? mbc_a + mbc_b : mbc_a * mbc_b;
      gcarry <= (mbc_op == OP_ADD) && (33'(mbc_a) + 33'(mbc_b) > 33'hFFFF_FFFF);
    end else if (gcnt > 0) gcnt <= gcnt - 1;
  end
  assign mbc_done   = (gcnt == 1);
  assign mbc_result = gres;
  assign mbc_carry  = gcarry;

  always @(posedge clk) if (rst_n) begin
    if (os_load_req[0]) n_load_req[0]++;
    if (os_load_req[1]) n_load_req[1]++;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_load_req[0] = 0; n_load_req[1] = 0;
    in_valid = 0; in_op = OP_ADD; in_a = 0; in_b = 0;
    add_defect = 0; mul_defect = 0; temp = 8'd50;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      bit exp_mbc, hot;
      int exp_unit, cyc;
      logic [31:0] exp_r;
      logic        exp_c;
      // defect masks: mostly some units broken, sometimes all
      add_defect = ($urandom_range(0, 3) == 0) ? 6'h3F : 6'($urandom());
      mul_defect = ($urandom_range(0, 3) == 0) ? 2'h3 : 2'($urandom());
      temp       = 8'($urandom_range(90, 110));
      if (i < 200) begin add_defect = 6'h00; mul_defect = 2'b00; temp = 8'd40; end
      in_op = mbc_op_e'($urandom_range(0, 1));
      in_a = $urandom(); in_b = $urandom() >> $urandom_range(0, 31);
      in_valid = 1;
      hot = temp > 8'd100;
      exp_unit = -1;
      if (in_op == OP_ADD) begin
        for (int u = 5; u >= 0; u--) if (!add_defect[u]) exp_unit = u;
      end else begin
        for (int u = 1; u >= 0; u--) if (!mul_defect[u]) exp_unit = u;
      end
      exp_mbc = hot || exp_unit < 0;
      exp_r = (in_op == OP_ADD) ? in_a + in_b : in_a * in_b;
      exp_c = (in_op == OP_ADD) && (33'(in_a) + 33'(in_b) > 33'hFFFF_FFFF);
      @(posedge clk);
      checks++;
      if (!in_ready || mbc_start != exp_mbc) begin
        failures++;
        $display("FAIL issue i=%0d ready=%b start=%b exp_mbc=%b", i, in_ready, mbc_start, exp_mbc);
      end
      #1 in_valid = 0;
      cyc = 0;  // out_valid already high here: result one cycle after issue
      while (!out_valid) begin
        @(negedge clk);
        cyc++;
        checks++;
        if (in_ready && !out_valid) begin failures++; $display("FAIL not stalled"); end
        if (cyc > 20) break;
      end
      checks++;
      if (!out_valid || out_result != exp_r || out_carry != exp_c || out_via_mbc != exp_mbc ||
          (!exp_mbc && (cyc != 0 || int'(out_unit) != exp_unit))) begin
        failures++;
        $display("FAIL result i=%0d via_mbc=%b unit=%0d cyc=%0d r=%h exp=%h",
                 i, out_via_mbc, out_unit, cyc, out_result, exp_r);
      end
      if (!exp_mbc) n_fu++; else if (hot) n_mbc_hot++; else n_mbc_defect++;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
    end
    checks++;
    if (n_load_req[0] != 1 || n_load_req[1] != 1) begin
      failures++;
      $display("FAIL os_load_req counts %0d %0d", n_load_req[0], n_load_req[1]);
    end
    checks++;
    if (n_fu == 0 || n_mbc_hot == 0 || n_mbc_defect == 0) begin
      failures++;
      $display("FAIL coverage fu=%0d hot=%0d defect=%0d", n_fu, n_mbc_hot, n_mbc_defect);
    end
    $display("fu=%0d mbc_hot=%0d mbc_defect=%0d", n_fu, n_mbc_hot, n_mbc_defect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
