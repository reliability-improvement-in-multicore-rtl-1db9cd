// mbc_map_table: MBC mapping table, a small fully associative translation
// buffer from virtual LUT pages to physical pages.
//
// The glue logic addresses the lookup tables virtually; the operating system
// places the table pages in main memory and owns the translation. A lookup
// compares the VPN with every valid entry in the same cycle (no added
// latency). A miss is reported on `miss`/`miss_vpn` and the requester waits:
// the translation is written through the fill port (`fill_valid`,
// `fill_vpn`, `fill_ppn`) by the page-fault path, after which the lookup
// hits. A fill for a VPN already present overwrites that entry, otherwise it
// replaces entries round-robin. `flush` invalidates everything.
// The published scheme only names this table and the page-fault step; the
// size, the full associativity and the replacement order are this design's.
module mbc_map_table #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned VPN_W   = 7,
  parameter int unsigned PPN_W   = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  // lookup
  input  logic             lookup_valid,
  input  logic [VPN_W-1:0] lookup_vpn,
  output logic             hit,
  output logic [PPN_W-1:0] ppn,
  output logic             miss,
  output logic [VPN_W-1:0] miss_vpn,
  // fill
  input  logic             fill_valid,
  input  logic [VPN_W-1:0] fill_vpn,
  input  logic [PPN_W-1:0] fill_ppn
);

  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [ENTRIES-1:0] valid_q;
  logic [VPN_W-1:0]   vpn_q [ENTRIES];
  logic [PPN_W-1:0]   ppn_q [ENTRIES];
  logic [IW-1:0]      victim_q;

  always_comb begin
    hit = 1'b0;
    ppn = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && vpn_q[i] == lookup_vpn) begin
        hit = 1'b1;
        ppn = ppn_q[i];
      end
    end
  end

  assign miss     = lookup_valid && !hit;
  assign miss_vpn = lookup_vpn;

  // entry a fill writes: the matching one, else the round-robin victim
  logic          fill_match;
  logic [IW-1:0] fill_idx;
  always_comb begin
    fill_match = 1'b0;
    fill_idx   = victim_q;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && vpn_q[i] == fill_vpn) begin
        fill_match = 1'b1;
        fill_idx   = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q  <= '0;
      victim_q <= '0;
    end else if (flush) begin
      valid_q  <= '0;
    end else if (fill_valid) begin
      valid_q[fill_idx] <= 1'b1;
      if (!fill_match) begin
        victim_q <= (int'(victim_q) == ENTRIES - 1) ? '0 : victim_q + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fill_valid && !flush) begin
      vpn_q[fill_idx] <= fill_vpn;
      ppn_q[fill_idx] <= fill_ppn;
    end
  end

endmodule
