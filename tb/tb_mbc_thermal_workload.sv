// Thermal-management workload for mbc_multicore at its default parameters.
//
// Each of the two cores runs its own stream of integer adds and multiplies
// while a simple thermal model heats its integer execution unit: every
// operation done in a functional unit adds 0.6 C, and every cycle the
// temperature relaxes 1/256 of the way towards an 85 C ambient. Run only on
// the functional units this settles far above 100 C. The design moves the
// work into the memory hierarchy whenever the unit is above 100 C, the unit
// cools, and work moves back: the temperature must stay close to the
// threshold and the cores must switch between the two paths many times.
//
// Operands follow a narrow-width-heavy mix (about 6% zero, 34% of 1-8 bits,
// 13% of 9-16 bits, the rest mostly 29-32 bits: over 40% of operands are
// 8 bits or narrower), and 3 in 4 operations reuse one of 16 recent
// operand pairs, standing in for the value locality of real programs.
// Checked: every result and ADD carry out, both paths used on each core, at
// least 10 path switches per core, and a peak temperature below 103 C after
// the first crossing (the sensor reads whole degrees, so the bypass starts at
// 101 C).
// Reported: share of operations done in memory and cycles per operation.
module tb_mbc_thermal_workload;
  import mbc_pkg::*;
  localparam int NC = 2;
  localparam int N_OPS = 4000;

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

  // thermal model, milli-degrees C
  int t_mc [NC];
  int peak_mc [NC];
  bit crossed [NC];
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) begin
      t_mc[c] = t_mc[c] - (t_mc[c] - 85000) / 256;
      if (out_valid[c] && !out_via_mbc[c]) t_mc[c] += 600;
      if (t_mc[c] > 100000) crossed[c] = 1;
      else if (crossed[c] && t_mc[c] > peak_mc[c]) peak_mc[c] = t_mc[c];
      if (crossed[c] && t_mc[c] > peak_mc[c]) peak_mc[c] = t_mc[c];
      temp[c] = 8'(t_mc[c] / 1000);
    end
  end

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] operand();
    int r;
    r = $urandom_range(0, 99);
    if (r < 6)  return 32'd0;
    if (r < 40) return 32'($urandom_range(1, 255));
    if (r < 53) return 32'($urandom_range(256, 65535));
    if (r < 55) return 32'($urandom_range(65536, 32'h0FFF_FFFF));
    return 32'h1000_0000 | ($urandom() >> $urandom_range(0, 3));
  endfunction

  int n_mbc [NC], n_fu [NC], switches [NC], cycles_total [NC];

  task automatic core_stream(input int c);
    logic [31:0] pa [16], pb [16];
    mbc_op_e     po [16];
    bit last_mbc = 0;
    for (int k = 0; k < 16; k++) begin
      pa[k] = operand(); pb[k] = operand(); po[k] = mbc_op_e'($urandom_range(0, 1));
    end
    for (int i = 0; i < N_OPS; i++) begin
      logic [31:0] x, y, exp_r;
      mbc_op_e o;
      int cyc, k;
      if ($urandom_range(0, 3) != 0) begin
        k = $urandom_range(0, 15);
        x = pa[k]; y = pb[k]; o = po[k];
      end else begin
        x = operand(); y = operand(); o = mbc_op_e'($urandom_range(0, 1));
        k = $urandom_range(0, 15);
        pa[k] = x; pb[k] = y; po[k] = o;
      end
      @(negedge clk);
      in_valid[c] = 1; in_op[c] = o; in_a[c] = x; in_b[c] = y;
      cyc = 0;
      @(posedge clk);
      while (!in_ready[c]) begin @(posedge clk); cyc++; end
      #1 in_valid[c] = 0;
      cyc++;
      while (!out_valid[c] && cyc < 20000) begin @(posedge clk); #1; cyc++; end
      exp_r = (o == OP_ADD) ? x + y : x * y;
      checks++;
      if (!out_valid[c] || out_result[c] != exp_r ||
          out_carry[c] != ((o == OP_ADD) && (33'(x) + 33'(y) > 33'hFFFF_FFFF))) begin
        failures++;
        $display("FAIL core %0d %s a=%h b=%h r=%h exp=%h", c, o.name(), x, y, out_result[c], exp_r);
      end
      if (out_via_mbc[c]) n_mbc[c]++; else n_fu[c]++;
      if (i > 0 && out_via_mbc[c] != last_mbc) switches[c]++;
      last_mbc = out_via_mbc[c];
      cycles_total[c] += cyc + 1;
    end
  endtask

  initial begin
    in_valid = '0; mbc_flush = 0;
    for (int c = 0; c < NC; c++) begin
      in_op[c] = OP_ADD; in_a[c] = 0; in_b[c] = 0;
      add_defect[c] = '0; mul_defect[c] = '0;
      t_mc[c] = 85000; peak_mc[c] = 0; crossed[c] = 0; temp[c] = 8'd85;
      n_mbc[c] = 0; n_fu[c] = 0; switches[c] = 0; cycles_total[c] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NC; c++) begin
      fork
        automatic int cc = c;
        core_stream(cc);
      join_none
    end
    wait fork;
    for (int c = 0; c < NC; c++) begin
      $display("core %0d: %0d ops, %0d in memory (%0d%%), %0d path switches, %0d.%02d cycles/op, peak %0d.%03d C",
               c, N_OPS, n_mbc[c], 100 * n_mbc[c] / N_OPS, switches[c],
               cycles_total[c] / N_OPS, (100 * cycles_total[c] / N_OPS) % 100,
               peak_mc[c] / 1000, peak_mc[c] % 1000);
      checks++;
      if (n_mbc[c] == 0 || n_fu[c] == 0 || switches[c] < 10) begin
        failures++;
        $display("FAIL core %0d never alternated between the paths", c);
      end
      checks++;
      if (peak_mc[c] >= 103000) begin
        failures++;
        $display("FAIL core %0d overheated: %0d mC", c, peak_mc[c]);
      end
    end
    $display("L1 hits %0d/%0d, misses %0d/%0d; L2 hits %0d misses %0d; page faults %0d",
             l1_hits[0], l1_hits[1], l1_misses[0], l1_misses[1], l2_hits, l2_misses, faults);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
