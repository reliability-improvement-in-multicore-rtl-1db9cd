// End-to-end testbench for mbc_multicore at its default parameters
// (2 cores, 6 adders and 2 multipliers per core, 100 C threshold,
// 1024-word L1 and 16384-word L2 MBC caches, 32-entry mapping tables).
//
// All cores run at once, each with its own operation stream, in front of a
// main-memory model and an operating-system pager that loads table pages on
// demand. Operand widths are skewed towards narrow values. Phases:
//   1. all units working and cool: functional units only;
//   2. 4 of 6 adders and 1 of 2 multipliers defective: still functional
//      units (working units remain);
//   3. even-numbered cores above 100 C, odd-numbered cores with every adder
//      and multiplier defective: all bypass to memory-based computation;
//   4. MBC caches and mapping tables flushed mid-run, then phase 3 again;
//   5. all cores cool and repaired.
// Every result is compared with a+b or the low 32 bits of a*b, the ADD
// carry out with bit 32 of a+b, and the path (unit or MBC) with the
// expected one. A full-width add whose words are in
// the L1 MBC cache must take 4 cycles. Each mechanism must occur at least
// once: unit path, thermal bypass, defect bypass, zero-operand shortcut,
// narrow add, MBC multiply, page fault, L1 hit and miss, L2 hit and miss,
// cores contending for the L2, OS load request, flush.
module tb_mbc_multicore;
  import mbc_pkg::*;
  localparam int NC = 2;

  logic clk = 0, rst_n = 0;
  logic [NC-1:0] in_valid, in_ready, out_valid, out_via_mbc, out_carry;
  mbc_op_e in_op [NC];
  logic [31:0] in_a [NC], in_b [NC], out_result [NC];
  logic [5:0] add_defect [NC];
  logic [1:0] mul_defect [NC];
  logic [7:0] temp [NC];
  logic [2:0] out_unit [NC];
  logic [1:0] os_load_req [NC];
  logic mbc_flush;
  logic [NC-1:0] map_miss, map_fill_valid;
  logic [6:0] map_miss_vpn [NC], map_fill_vpn [NC];
  logic [13:0] map_fill_ppn [NC];
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  logic [23:0] mem_req_addr;
  logic [31:0] mem_resp_data;
  logic [31:0] l1_hits [NC], l1_misses [NC], l2_hits, l2_misses;

  mbc_multicore dut (.*);

  logic load_valid;
  logic [13:0] load_ppn;
  logic [6:0] load_vpn;
  int unsigned faults, pages_loaded, mem_reads;

  mbc_os_pager #(.N_CORES(NC)) u_os (
    .clk, .rst_n, .map_miss, .miss_vpn(map_miss_vpn),
    .fill_valid(map_fill_valid), .fill_vpn(map_fill_vpn), .fill_ppn(map_fill_ppn),
    .load_valid, .load_ppn, .load_vpn, .faults, .pages_loaded
  );
  mbc_main_memory u_mem (
    .clk, .rst_n, .load_valid, .load_ppn, .load_vpn,
    .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_addr(mem_req_addr),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data), .reads(mem_reads)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_fu = 0, n_hot = 0, n_defect = 0, n_zero = 0, n_narrow = 0, n_mul_mbc = 0;
  int n_contend = 0, n_load_req = 0, n_flush = 0, n_fast_full = 0;

  always @(posedge clk) if (rst_n) begin
    if ($countones(dut.l2_req_valid) > 1) n_contend++;
    for (int c = 0; c < NC; c++) if (os_load_req[c] != 0) n_load_req++;
  end

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rnd();
    case ($urandom_range(0, 9))
      0, 1, 2, 3: return 32'($urandom_range(0, 255));   // narrow operands dominate
      4:          return 32'd0;
      5, 6:       return 32'($urandom_range(0, 65535));
      default:    return $urandom() >> $urandom_range(0, 8);
    endcase
  endfunction

  task automatic run(input int c, input mbc_op_e o, input logic [31:0] x,
                     input logic [31:0] y, input bit exp_mbc, output int cycles);
    logic [31:0] exp_r;
    logic        exp_c;
    @(negedge clk);
    in_valid[c] = 1; in_op[c] = o; in_a[c] = x; in_b[c] = y;
    @(posedge clk);
    while (!in_ready[c]) @(posedge clk);
    #1 in_valid[c] = 0;
    cycles = 1;
    while (!out_valid[c] && cycles < 10000) begin @(posedge clk); #1; cycles++; end
    exp_r = (o == OP_ADD) ? x + y : x * y;
    exp_c = (o == OP_ADD) && (33'(x) + 33'(y) > 33'hFFFF_FFFF);
    checks++;
    if (!out_valid[c] || out_result[c] != exp_r || out_carry[c] != exp_c ||
        out_via_mbc[c] != exp_mbc) begin
      failures++;
      $display("FAIL core %0d %s a=%h b=%h r=%h exp=%h via_mbc=%b exp_mbc=%b",
               c, o.name(), x, y, out_result[c], exp_r, out_via_mbc[c], exp_mbc);
    end
    if (!exp_mbc) n_fu++;
    else begin
      if (x == 0 || y == 0) n_zero++;
      else if (o == OP_ADD && (x | y) < 32'h0100_0000) n_narrow++;
      if (o == OP_MUL) n_mul_mbc++;
    end
    @(negedge clk);
  endtask

  task automatic stream(input int c, input int n, input bit exp_mbc);
    int cyc;
    for (int i = 0; i < n; i++) begin
      mbc_op_e o;
      o = mbc_op_e'($urandom_range(0, 1));
      run(c, o, rnd(), rnd(), exp_mbc, cyc);
      if (exp_mbc && c % 2 == 0) n_hot++;
      if (exp_mbc && c % 2 == 1) n_defect++;
    end
  endtask

  // one stream per core, all at once
  task automatic all_cores(input int n, input bit exp_mbc);
    for (int c = 0; c < NC; c++) begin
      fork
        automatic int cc = c;
        stream(cc, n, exp_mbc);
      join_none
    end
    wait fork;
  endtask

  task automatic full_width_latency(input int c);
    int c1, c2;
    run(c, OP_ADD, 32'hDEAD_BEEF, 32'h1357_9BDF, 1, c1);
    run(c, OP_ADD, 32'hDEAD_BEEF, 32'h1357_9BDF, 1, c2);
    checks++;
    if (c2 != 4) begin
      failures++;
      $display("FAIL core %0d full-width add with L1 hits took %0d cycles", c, c2);
    end else n_fast_full++;
  endtask

  initial begin
    in_valid = '0; mbc_flush = 0;
    for (int c = 0; c < NC; c++) begin
      in_op[c] = OP_ADD; in_a[c] = 0; in_b[c] = 0;
      add_defect[c] = '0; mul_defect[c] = '0; temp[c] = 8'd70;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. healthy
    all_cores(100, 0);
    // 2. 4 adders and 1 multiplier defective in each core
    for (int c = 0; c < NC; c++) begin add_defect[c] = 6'b011110; mul_defect[c] = 2'b01; end
    all_cores(100, 0);
    // 3. even cores hot, odd cores fully defective
    for (int c = 0; c < NC; c++) begin
      if (c % 2 == 0) temp[c] = 8'd104;
      else begin add_defect[c] = '1; mul_defect[c] = '1; end
    end
    full_width_latency(0);
    all_cores(600, 1);
    full_width_latency(NC - 1);
    // 4. flush, run again
    @(negedge clk); mbc_flush = 1; @(negedge clk); mbc_flush = 0; n_flush++;
    all_cores(300, 1);
    // 5. cool and repaired
    for (int c = 0; c < NC; c++) begin
      temp[c] = 8'd95; add_defect[c] = '0; mul_defect[c] = '0;
    end
    all_cores(50, 0);

    begin
      string names [16];
      int    counts [16];
      names[0] = "functional unit";    counts[0] = n_fu;
      names[1] = "thermal bypass";     counts[1] = n_hot;
      names[2] = "defect bypass";      counts[2] = n_defect;
      names[3] = "zero shortcut";      counts[3] = n_zero;
      names[4] = "narrow add";         counts[4] = n_narrow;
      names[5] = "MBC multiply";       counts[5] = n_mul_mbc;
      names[6] = "page fault";         counts[6] = int'(faults);
      names[7] = "L1 hit";             counts[7] = 0;
      names[8] = "L1 miss";            counts[8] = 0;
      for (int c = 0; c < NC; c++) begin
        counts[7] += int'(l1_hits[c]);
        counts[8] += int'(l1_misses[c]);
      end
      names[9] = "L2 hit";             counts[9] = int'(l2_hits);
      names[10] = "L2 miss";           counts[10] = int'(l2_misses);
      names[11] = "L2 contention";     counts[11] = n_contend;
      names[12] = "OS load request";   counts[12] = n_load_req;
      names[13] = "flush";             counts[13] = n_flush;
      names[14] = "4-cycle full add";  counts[14] = n_fast_full;
      names[15] = "memory reads";      counts[15] = int'(mem_reads);
      for (int k = 0; k < 16; k++) begin
        $display("  %-18s %0d", names[k], counts[k]);
        checks++;
        if (counts[k] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", names[k]);
        end
      end
      checks++;
      if (int'(l2_misses) != int'(mem_reads) || n_load_req != 2 * NC) begin
        failures++;
        $display("FAIL l2 misses %0d vs memory reads %0d, load requests %0d",
                 l2_misses, mem_reads, n_load_req);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
