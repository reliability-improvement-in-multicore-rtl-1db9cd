// Self-checking testbench for mbc_core_path: one core, its L1 MBC cache
// connected straight to a main-memory model, and an operating-system pager
// that answers mapping-table misses.
//
// Phase 1: working units, cool: every result from the functional units.
// Phase 2: all adders and multipliers defective: random adds and
// multiplies computed by table lookup, compared with a+b and a*b (and the
// ADD carry out with bit 32 of a+b).
// Phase 3: units repaired but temperature 105 C: bypassed again.
// Timing: a full-width add repeated after its words are in the L1 MBC cache
// must finish 4 cycles after issue; the first one (page faults, L1 misses)
// must take longer.
module tb_mbc_core_path;
  import mbc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  mbc_op_e in_op;
  logic [31:0] in_a, in_b;
  logic [5:0] add_defect;
  logic [1:0] mul_defect;
  logic [7:0] temp;
  logic out_valid, out_via_mbc, out_carry;
  logic [31:0] out_result;
  logic [2:0] out_unit;
  logic [1:0] os_load_req;
  logic mbc_flush;
  logic map_miss, map_fill_valid;
  logic [6:0] map_miss_vpn, map_fill_vpn;
  logic [13:0] map_fill_ppn;
  logic l2_req_valid, l2_req_ready, l2_resp_valid;
  logic [23:0] l2_req_addr;
  logic [31:0] l2_resp_data, l1_hits, l1_misses;
  int checks = 0, failures = 0;

  mbc_core_path dut (.*);

  // operating system and main memory
  logic load_valid;
  logic [13:0] load_ppn;
  logic [6:0] load_vpn;
  logic [0:0] fill_v;
  logic [6:0] miss_vpn_a [1], fill_vpn_a [1];
  logic [13:0] fill_ppn_a [1];
  int unsigned faults, pages_loaded, mem_reads;
  assign miss_vpn_a[0]  = map_miss_vpn;
  assign map_fill_valid = fill_v[0];
  assign map_fill_vpn   = fill_vpn_a[0];
  assign map_fill_ppn   = fill_ppn_a[0];

  mbc_os_pager #(.N_CORES(1)) u_os (
    .clk, .rst_n, .map_miss(map_miss), .miss_vpn(miss_vpn_a),
    .fill_valid(fill_v), .fill_vpn(fill_vpn_a), .fill_ppn(fill_ppn_a),
    .load_valid, .load_ppn, .load_vpn, .faults, .pages_loaded
  );
  mbc_main_memory u_mem (
    .clk, .rst_n, .load_valid, .load_ppn, .load_vpn,
    .req_valid(l2_req_valid), .req_ready(l2_req_ready), .req_addr(l2_req_addr),
    .resp_valid(l2_resp_valid), .resp_data(l2_resp_data), .reads(mem_reads)
  );

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input mbc_op_e o, input logic [31:0] x, input logic [31:0] y,
                     input bit exp_mbc, output int cycles);
    logic [31:0] exp_r;
    logic        exp_c;
    @(negedge clk);
    in_valid = 1; in_op = o; in_a = x; in_b = y;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
    cycles = 1;
    while (!out_valid && cycles < 5000) begin @(posedge clk); #1; cycles++; end
    exp_r = (o == OP_ADD) ? x + y : x * y;
    exp_c = (o == OP_ADD) && (33'(x) + 33'(y) > 33'hFFFF_FFFF);
    checks++;
    if (!out_valid || out_result != exp_r || out_carry != exp_c || out_via_mbc != exp_mbc) begin
      failures++;
      $display("FAIL %s a=%h b=%h r=%h exp=%h via_mbc=%b", o.name(), x, y, out_result, exp_r, out_via_mbc);
    end
    @(negedge clk);
  endtask

  function automatic logic [31:0] rnd();
    case ($urandom_range(0, 3))
      0: return 32'($urandom_range(0, 255));
      1: return 32'($urandom_range(0, 65535));
      default: return $urandom() >> $urandom_range(0, 31);
    endcase
  endfunction

  int cyc, cyc_first, cyc_again;
  initial begin
    in_valid = 0; in_op = OP_ADD; in_a = 0; in_b = 0; mbc_flush = 0;
    add_defect = '0; mul_defect = '0; temp = 8'd60;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) run(mbc_op_e'(i % 2), rnd(), rnd(), 0, cyc);

    add_defect = '1; mul_defect = '1;
    run(OP_ADD, 32'h89AB_CDEF, 32'h7654_3211, 1, cyc_first);
    run(OP_ADD, 32'h89AB_CDEF, 32'h7654_3211, 1, cyc_again);
    checks++;
    if (cyc_again != 4 || cyc_first <= 4) begin
      failures++;
      $display("FAIL latency first=%0d again=%0d", cyc_first, cyc_again);
    end
    for (int i = 0; i < 400; i++) run(mbc_op_e'($urandom_range(0, 1)), rnd(), rnd(), 1, cyc);

    add_defect = '0; mul_defect = '0; temp = 8'd105;
    for (int i = 0; i < 200; i++) run(mbc_op_e'($urandom_range(0, 1)), rnd(), rnd(), 1, cyc);
    temp = 8'd100;   // at the threshold, not above: units used again
    for (int i = 0; i < 20; i++) run(mbc_op_e'($urandom_range(0, 1)), rnd(), rnd(), 0, cyc);

    checks++;
    if (faults == 0 || pages_loaded == 0 || l1_hits == 0 || l1_misses == 0 ||
        l1_misses != 32'(mem_reads)) begin
      failures++;
      $display("FAIL counters faults=%0d pages=%0d hits=%0d misses=%0d reads=%0d",
               faults, pages_loaded, l1_hits, l1_misses, mem_reads);
    end
    $display("faults=%0d pages=%0d l1 hits=%0d misses=%0d first=%0d again=%0d",
             faults, pages_loaded, l1_hits, l1_misses, cyc_first, cyc_again);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
