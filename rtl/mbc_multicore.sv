// mbc_multicore: multicore memory-based computing subsystem (top level).
//
// N_CORES cores each own an integer execution stage that can hand its adds
// and multiplies to memory-based computation, a glue logic, an MBC mapping
// table and a private L1 MBC cache (mbc_core_path). The L1 MBC caches miss
// into one L2 MBC cache shared by all cores (mbc_l2_shared), which misses
// into main memory through the `mem_*` port. Main memory, the operating
// system that places the result tables there, and the rest of each core
// (fetch, out-of-order issue, the conventional L1 instruction/data caches
// and the L2 I+D cache) are outside this block; per-core signals are
// brought out as arrays indexed by core. Each result comes with the path
// that computed it (`out_via_mbc`) and, for an ADD, the carry out of bit 31
// (`out_carry`, the C_OUT of the carry-select scheme).
//
// Timing: see mbc_core_path (4 cycles for a full-width add that hits in the
// L1 MBC cache). An L1 miss that hits in L2 adds a few cycles; an L2 miss
// adds the main-memory latency. Two cores are the default, one of the two
// multicore configurations the scheme was evaluated with (2 and 4).
module mbc_multicore
  import mbc_pkg::*;
#(
  parameter int unsigned N_CORES     = 2,
  parameter int unsigned N_ADD       = 6,
  parameter int unsigned N_MUL       = 2,
  parameter int unsigned TEMP_TH     = 100,
  parameter int unsigned L1_DEPTH    = 1024,
  parameter int unsigned L2_DEPTH    = 16384,
  parameter int unsigned MAP_ENTRIES = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // per-core issue
  input  logic [N_CORES-1:0] in_valid,
  output logic [N_CORES-1:0] in_ready,
  input  mbc_op_e            in_op      [N_CORES],
  input  logic [XLEN-1:0]    in_a       [N_CORES],
  input  logic [XLEN-1:0]    in_b       [N_CORES],
  input  logic [N_ADD-1:0]   add_defect [N_CORES],
  input  logic [N_MUL-1:0]   mul_defect [N_CORES],
  input  logic [7:0]         temp       [N_CORES],
  // per-core result
  output logic [N_CORES-1:0] out_valid,
  output logic [XLEN-1:0]    out_result [N_CORES],
  output logic [N_CORES-1:0] out_carry,
  output logic [N_CORES-1:0] out_via_mbc,
  output logic [2:0]         out_unit   [N_CORES],
  output logic [1:0]         os_load_req [N_CORES],
  // operating system: table translations
  input  logic               mbc_flush,
  output logic [N_CORES-1:0] map_miss,
  output logic [VPN_W-1:0]   map_miss_vpn [N_CORES],
  input  logic [N_CORES-1:0] map_fill_valid,
  input  logic [VPN_W-1:0]   map_fill_vpn [N_CORES],
  input  logic [PPN_W-1:0]   map_fill_ppn [N_CORES],
  // main memory
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic [PA_W-1:0]    mem_req_addr,
  input  logic               mem_resp_valid,
  input  logic [WORD_W-1:0]  mem_resp_data,
  // statistics
  output logic [31:0]        l1_hits   [N_CORES],
  output logic [31:0]        l1_misses [N_CORES],
  output logic [31:0]        l2_hits,
  output logic [31:0]        l2_misses
);

  logic [N_CORES-1:0] l2_req_valid, l2_req_ready, l2_resp_valid;
  logic [PA_W-1:0]    l2_req_addr [N_CORES];
  logic [WORD_W-1:0]  l2_resp_data;

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    mbc_core_path #(
      .N_ADD(N_ADD), .N_MUL(N_MUL), .TEMP_TH(TEMP_TH),
      .L1_DEPTH(L1_DEPTH), .MAP_ENTRIES(MAP_ENTRIES)
    ) u_core (
      .clk, .rst_n,
      .in_valid(in_valid[c]), .in_ready(in_ready[c]), .in_op(in_op[c]),
      .in_a(in_a[c]), .in_b(in_b[c]),
      .add_defect(add_defect[c]), .mul_defect(mul_defect[c]), .temp(temp[c]),
      .out_valid(out_valid[c]), .out_result(out_result[c]), .out_carry(out_carry[c]),
      .out_via_mbc(out_via_mbc[c]), .out_unit(out_unit[c]),
      .os_load_req(os_load_req[c]),
      .mbc_flush,
      .map_miss(map_miss[c]), .map_miss_vpn(map_miss_vpn[c]),
      .map_fill_valid(map_fill_valid[c]), .map_fill_vpn(map_fill_vpn[c]),
      .map_fill_ppn(map_fill_ppn[c]),
      .l2_req_valid(l2_req_valid[c]), .l2_req_ready(l2_req_ready[c]),
      .l2_req_addr(l2_req_addr[c]),
      .l2_resp_valid(l2_resp_valid[c]), .l2_resp_data(l2_resp_data),
      .l1_hits(l1_hits[c]), .l1_misses(l1_misses[c])
    );
  end

  mbc_l2_shared #(.N_PORTS(N_CORES), .DEPTH(L2_DEPTH), .AW(PA_W), .DW(WORD_W)) u_l2 (
    .clk, .rst_n, .flush(mbc_flush),
    .up_req_valid(l2_req_valid), .up_req_ready(l2_req_ready),
    .up_req_addr(l2_req_addr),
    .up_resp_valid(l2_resp_valid), .up_resp_data(l2_resp_data),
    .mem_req_valid, .mem_req_ready, .mem_req_addr,
    .mem_resp_valid, .mem_resp_data,
    .hit_count(l2_hits), .miss_count(l2_misses)
  );

endmodule
