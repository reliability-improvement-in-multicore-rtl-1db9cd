// Self-checking testbench for mbc_cache (the L1 MBC cache): a small cache in
// front of a memory whose word at address A is A*7+1, after a latency of
// 5 cycles. Checks data, one-cycle hits, back-to-back hits at one per cycle,
// conflict eviction, flush, the hit/miss counters, and hit or miss for 400
// random reads against a model of the direct-mapped tags.
module tb_mbc_cache;
  localparam int AW = 24;
  logic clk = 0, rst_n = 0, flush = 0;
  logic req_valid, req_ready, resp_valid;
  logic [AW-1:0] req_addr;
  logic [31:0] resp_data;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  logic [AW-1:0] mem_req_addr;
  logic [31:0] mem_resp_data;
  logic [31:0] hit_count, miss_count;
  int checks = 0, failures = 0;
  int mem_reads = 0;

  mbc_cache #(.DEPTH(16), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  // memory: one request at a time, 5-cycle latency
  int mcnt = 0;
  logic [AW-1:0] maddr;
  assign mem_req_ready = (mcnt == 0);
  always_ff @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (mcnt == 0 && mem_req_valid) begin
      mcnt <= 1; maddr <= mem_req_addr; mem_reads <= mem_reads + 1;
    end else if (mcnt == 5) begin
      mcnt <= 0; mem_resp_valid <= 1'b1; mem_resp_data <= 32'(maddr) * 7 + 1;
    end else if (mcnt != 0) mcnt <= mcnt + 1;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one read; returns cycles from request to response
  task automatic read(input logic [AW-1:0] addr, output int cycles);
    cycles = 0;
    @(negedge clk);
    req_valid = 1; req_addr = addr;
    while (!req_ready) begin @(negedge clk); end
    @(negedge clk);
    req_valid = 0;
    cycles = 1;
    while (!resp_valid) begin @(negedge clk); cycles++; end
    checks++;
    if (resp_data != 32'(addr) * 7 + 1) begin
      failures++;
      $display("FAIL addr=%h data=%h", addr, resp_data);
    end
  endtask

  int cyc, m0;
  initial begin
    req_valid = 0; req_addr = 0; mem_resp_valid = 0; mem_resp_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    read(24'h000003, cyc);
    checks++; if (cyc < 6) begin failures++; $display("FAIL miss too fast %0d", cyc); end
    read(24'h000003, cyc);
    checks++; if (cyc != 1) begin failures++; $display("FAIL hit latency %0d", cyc); end
    // fill lines 0..15, then stream them back to back
    for (int i = 0; i < 16; i++) read(24'h000100 + 24'(i), cyc);
    m0 = mem_reads;
    @(negedge clk);
    begin
      int got = 0, t = 0;
      for (int i = 0; i < 16; i++) begin
        req_valid = 1; req_addr = 24'h000100 + 24'(i);
        @(negedge clk);
        t++;
        if (resp_valid) begin
          got++;
          checks++;
          if (resp_data != 32'(24'h000100 + 24'(i)) * 7 + 1) failures++;
        end
      end
      req_valid = 0;
      @(negedge clk);
      if (resp_valid) got++;  // no extra response may follow
      checks++;
      if (got != 16 || t != 16 || !req_ready) begin
        failures++;
        $display("FAIL streaming got=%0d t=%0d", got, t);
      end
    end
    checks++; if (mem_reads != m0) begin failures++; $display("FAIL streamed hits went to memory"); end
    // conflicting address evicts line 3
    read(24'h000013, cyc);
    read(24'h000003, cyc);
    checks++; if (cyc == 1) begin failures++; $display("FAIL evicted line hit"); end
    // flush
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    read(24'h000003, cyc);
    checks++; if (cyc == 1) begin failures++; $display("FAIL hit after flush"); end
    checks++;
    if (hit_count + miss_count != 32'd37 || miss_count != 32'(mem_reads)) begin
      failures++;
      $display("FAIL counters hit=%0d miss=%0d reads=%0d", hit_count, miss_count, mem_reads);
    end
    // random reads over four times the cache size, against a model of the
    // direct-mapped tags: hit (1 cycle) exactly when the model holds the line
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    begin
      bit          mvalid [16];
      logic [AW-1:0] mtag [16];
      int exp_hits = 0;
      for (int l = 0; l < 16; l++) begin mvalid[l] = 0; mtag[l] = '0; end
      m0 = mem_reads;
      for (int i = 0; i < 400; i++) begin
        logic [AW-1:0] a;
        bit exp_hit;
        a = AW'($urandom_range(0, 63));
        exp_hit = mvalid[a[3:0]] && mtag[a[3:0]] == a;
        read(a, cyc);
        checks++;
        if ((cyc == 1) != exp_hit) begin
          failures++;
          if (failures < 10) $display("FAIL addr=%h hit=%0b expected %0b", a, cyc == 1, exp_hit);
        end
        if (exp_hit) exp_hits++;
        mvalid[a[3:0]] = 1; mtag[a[3:0]] = a;
      end
      checks++;
      if (mem_reads - m0 != 400 - exp_hits) begin
        failures++;
        $display("FAIL random phase memory reads %0d, expected %0d", mem_reads - m0, 400 - exp_hits);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
