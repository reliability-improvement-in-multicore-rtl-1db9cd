// Self-checking testbench for mbc_l2_shared: three requesters read random
// addresses at the same time from a shared L2 in front of a memory whose
// word at address A is A*3+5 (6-cycle latency). Every answer must reach the
// port that asked, with the right word; words fetched once must hit
// afterwards; under constant contention every grant must go to the port
// after the previous one (round robin).
module tb_mbc_l2_shared;
  localparam int N = 3, AW = 24;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [N-1:0] up_req_valid, up_req_ready, up_resp_valid;
  logic [AW-1:0] up_req_addr [N];
  logic [31:0] up_resp_data;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  logic [AW-1:0] mem_req_addr;
  logic [31:0] mem_resp_data;
  logic [31:0] hit_count, miss_count;
  int checks = 0, failures = 0;
  int mem_reads = 0;
  int served [N];

  mbc_l2_shared #(.N_PORTS(N), .DEPTH(256), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  int mcnt = 0;
  logic [AW-1:0] maddr;
  assign mem_req_ready = (mcnt == 0);
  always_ff @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (mcnt == 0 && mem_req_valid) begin
      mcnt <= 1; maddr <= mem_req_addr; mem_reads <= mem_reads + 1;
    end else if (mcnt == 6) begin
      mcnt <= 0; mem_resp_valid <= 1'b1; mem_resp_data <= 32'(maddr) * 3 + 5;
    end else if (mcnt != 0) mcnt <= mcnt + 1;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // grant order under contention
  int last_grant = -1, rot_ok = 0, rot_bad = 0;
  always @(posedge clk) begin
    if (rst_n && (up_req_valid & up_req_ready) != 0) begin
      int g;
      g = -1;
      for (int p = 0; p < N; p++) if (up_req_ready[p] && up_req_valid[p]) g = p;
      if (&up_req_valid && last_grant >= 0) begin
        // every grant under full contention is checked
        checks++;
        if (g == (last_grant + 1) % N) rot_ok++;
        else begin
          rot_bad++;
          failures++;
          if (rot_bad <= 5) $display("FAIL grant to port %0d after port %0d", g, last_grant);
        end
      end
      last_grant = g;
    end
  end

  task automatic requester(input int p, input int n, input int span);
    for (int i = 0; i < n; i++) begin
      logic [AW-1:0] addr;
      addr = AW'($urandom_range(0, span - 1)) + AW'(p * 16);
      @(negedge clk);
      up_req_valid[p] = 1; up_req_addr[p] = addr;
      @(posedge clk);
      while (!up_req_ready[p]) @(posedge clk);
      #1 up_req_valid[p] = 0;
      while (!up_resp_valid[p]) @(posedge clk);
      checks++;
      served[p]++;
      if (up_resp_data != 32'(addr) * 3 + 5) begin
        failures++;
        $display("FAIL port %0d addr=%h data=%h", p, addr, up_resp_data);
      end
    end
  endtask

  initial begin
    up_req_valid = '0;
    for (int p = 0; p < N; p++) begin up_req_addr[p] = '0; served[p] = 0; end
    mem_resp_valid = 0; mem_resp_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      requester(0, 300, 40);
      requester(1, 300, 40);
      requester(2, 300, 40);
    join
    checks++;
    if (hit_count + miss_count != 32'd900 || miss_count != 32'(mem_reads) || hit_count == 0) begin
      failures++;
      $display("FAIL counters hit=%0d miss=%0d reads=%0d", hit_count, miss_count, mem_reads);
    end
    // addresses 0..71 fit in 256 lines: each fetched from memory once
    checks++;
    if (mem_reads > 72) begin failures++; $display("FAIL refetch %0d", mem_reads); end
    checks++;
    if (rot_ok == 0 || rot_bad != 0) begin
      failures++;
      $display("FAIL round robin ok=%0d bad=%0d", rot_ok, rot_bad);
    end
    $display("served %0d %0d %0d, rotations %0d", served[0], served[1], served[2], rot_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
