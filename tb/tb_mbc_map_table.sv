// Self-checking testbench for mbc_map_table: misses before a fill, hits with
// the filled page afterwards, overwrite of an existing VPN, round-robin
// replacement when full, and flush; then 400 random fills and lookups
// compared with a reference model of the table.
module tb_mbc_map_table;
  localparam int E = 4;
  logic clk = 0, rst_n = 0, flush = 0;
  logic lookup_valid;
  logic [6:0] lookup_vpn, miss_vpn, fill_vpn;
  logic hit, miss, fill_valid;
  logic [13:0] ppn, fill_ppn;
  int checks = 0, failures = 0;
  // reference model: entries filled in round-robin order, a refill of a
  // present page rewrites that entry, flush clears the valid bits only
  bit          mv [E];
  logic [6:0]  mvpn [E];
  logic [13:0] mppn [E];
  int          mptr = 0;

  mbc_map_table #(.ENTRIES(E)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill(input logic [6:0] v, input logic [13:0] p);
    @(negedge clk);
    fill_valid = 1; fill_vpn = v; fill_ppn = p;
    @(negedge clk);
    fill_valid = 0;
    begin
      int k;
      k = -1;
      for (int e = 0; e < E; e++) if (mv[e] && mvpn[e] == v) k = e;
      if (k < 0) begin k = mptr; mptr = (mptr + 1) % E; end
      mv[k] = 1; mvpn[k] = v; mppn[k] = p;
    end
  endtask

  // lookup checked against the model
  task automatic model_lookup(input logic [6:0] v);
    bit          h = 0;
    logic [13:0] p = '0;
    for (int e = 0; e < E; e++) if (mv[e] && mvpn[e] == v) begin h = 1; p = mppn[e]; end
    expect_lookup(v, h, p);
  endtask

  task automatic expect_lookup(input logic [6:0] v, input logic exp_hit, input logic [13:0] exp_ppn);
    lookup_valid = 1; lookup_vpn = v;
    #1;
    checks++;
    if (hit != exp_hit || miss != !exp_hit || (exp_hit && ppn != exp_ppn) || miss_vpn != v) begin
      failures++;
      $display("FAIL vpn=%0d hit=%b ppn=%0d (exp %b %0d)", v, hit, ppn, exp_hit, exp_ppn);
    end
  endtask

  initial begin
    lookup_valid = 0; lookup_vpn = 0; fill_valid = 0; fill_vpn = 0; fill_ppn = 0;
    for (int e = 0; e < E; e++) begin mv[e] = 0; mvpn[e] = '0; mppn[e] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    expect_lookup(7'd3, 0, 0);
    fill(7'd3, 14'd100);
    expect_lookup(7'd3, 1, 14'd100);
    expect_lookup(7'd4, 0, 0);
    fill(7'd3, 14'd101);                 // overwrite same VPN
    expect_lookup(7'd3, 1, 14'd101);
    fill(7'd10, 14'd10); fill(7'd11, 14'd11); fill(7'd12, 14'd12);
    expect_lookup(7'd10, 1, 14'd10);
    expect_lookup(7'd12, 1, 14'd12);
    expect_lookup(7'd3, 1, 14'd101);
    fill(7'd13, 14'd13);                 // table full: replaces the oldest (vpn 3)
    expect_lookup(7'd13, 1, 14'd13);
    expect_lookup(7'd3, 0, 0);
    expect_lookup(7'd11, 1, 14'd11);
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    for (int e = 0; e < E; e++) mv[e] = 0;
    expect_lookup(7'd13, 0, 0);
    expect_lookup(7'd10, 0, 0);
    // random fills and lookups over 8 pages (twice the table size)
    for (int i = 0; i < 400; i++) begin
      logic [6:0] v;
      v = 7'($urandom_range(0, 7));
      model_lookup(v);
      if (!hit || $urandom_range(0, 7) == 0) fill(v, 14'($urandom()));
      model_lookup(7'($urandom_range(0, 7)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
