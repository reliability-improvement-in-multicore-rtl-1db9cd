// mbc_core_path: one core's integer execution stage with its private MBC
// resources.
//
// Chain: issue stage (mbc_issue_bypass) -> glue logic (mbc_glue_logic),
// which forms virtual LUT addresses -> MBC mapping table (mbc_map_table),
// which translates the LUT page in the same cycle -> private L1 MBC cache
// (mbc_cache) -> `l2_*` port towards the shared L2 MBC cache.
//
// A lookup whose page is not in the mapping table is held back and
// `map_miss`/`map_miss_vpn` stay high until the operating system's
// page-fault path writes the translation through `map_fill_*`. With all
// pages mapped and all words in the L1 MBC cache, a full-width add costs
// 4 cycles after issue (one lookup per 8-bit slice). `out_carry` is the
// carry out of bit 31 of an ADD, whichever path computed it.
// The structure follows the published multicore figure; the dedicated
// (rather than carved out of the L1 data cache) MBC cache is this design's
// choice, one of the two the scheme allows.
module mbc_core_path
  import mbc_pkg::*;
#(
  parameter int unsigned N_ADD      = 6,
  parameter int unsigned N_MUL      = 2,
  parameter int unsigned TEMP_TH    = 100,
  parameter int unsigned L1_DEPTH   = 1024,
  parameter int unsigned MAP_ENTRIES = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // issue
  input  logic              in_valid,
  output logic              in_ready,
  input  mbc_op_e           in_op,
  input  logic [XLEN-1:0]   in_a,
  input  logic [XLEN-1:0]   in_b,
  input  logic [N_ADD-1:0]  add_defect,
  input  logic [N_MUL-1:0]  mul_defect,
  input  logic [7:0]        temp,
  // result
  output logic              out_valid,
  output logic [XLEN-1:0]   out_result,
  output logic              out_carry,
  output logic              out_via_mbc,
  output logic [2:0]        out_unit,
  output logic [1:0]        os_load_req,
  // operating system: table translations
  input  logic              mbc_flush,
  output logic              map_miss,
  output logic [VPN_W-1:0]  map_miss_vpn,
  input  logic              map_fill_valid,
  input  logic [VPN_W-1:0]  map_fill_vpn,
  input  logic [PPN_W-1:0]  map_fill_ppn,
  // towards the shared L2 MBC cache
  output logic              l2_req_valid,
  input  logic              l2_req_ready,
  output logic [PA_W-1:0]   l2_req_addr,
  input  logic              l2_resp_valid,
  input  logic [WORD_W-1:0] l2_resp_data,
  // statistics
  output logic [31:0]       l1_hits,
  output logic [31:0]       l1_misses
);

  logic            g_start, g_ready, g_done, g_cout;
  mbc_op_e         g_op;
  logic [XLEN-1:0] g_a, g_b, g_result;
  logic            lreq_valid, lreq_ready, lresp_valid;
  logic [VA_W-1:0] lreq_va;
  logic [WORD_W-1:0] lresp_data;
  logic            map_hit;
  logic [PPN_W-1:0] map_ppn;
  logic            c_req_ready;

  mbc_issue_bypass #(.N_ADD(N_ADD), .N_MUL(N_MUL), .TEMP_W(8), .TEMP_TH(TEMP_TH)) u_issue (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_op, .in_a, .in_b,
    .add_defect, .mul_defect, .temp,
    .out_valid, .out_result, .out_carry, .out_via_mbc, .out_unit, .os_load_req,
    .mbc_start(g_start), .mbc_op(g_op), .mbc_a(g_a), .mbc_b(g_b),
    .mbc_ready(g_ready), .mbc_done(g_done), .mbc_result(g_result), .mbc_carry(g_cout)
  );

  mbc_glue_logic u_glue (
    .clk, .rst_n,
    .start(g_start), .op(g_op), .a(g_a), .b(g_b),
    .in_ready(g_ready), .done(g_done), .result(g_result), .carry_out(g_cout),
    .lreq_valid, .lreq_ready, .lreq_va, .lresp_valid, .lresp_data
  );

  mbc_map_table #(.ENTRIES(MAP_ENTRIES), .VPN_W(VPN_W), .PPN_W(PPN_W)) u_map (
    .clk, .rst_n, .flush(mbc_flush),
    .lookup_valid(lreq_valid), .lookup_vpn(lreq_va[VA_W-1:PAGE_OFF_W]),
    .hit(map_hit), .ppn(map_ppn), .miss(map_miss), .miss_vpn(map_miss_vpn),
    .fill_valid(map_fill_valid), .fill_vpn(map_fill_vpn), .fill_ppn(map_fill_ppn)
  );

  assign lreq_ready = map_hit && c_req_ready;

  mbc_cache #(.DEPTH(L1_DEPTH), .AW(PA_W), .DW(WORD_W)) u_l1 (
    .clk, .rst_n, .flush(mbc_flush),
    .req_valid(lreq_valid && map_hit), .req_ready(c_req_ready),
    .req_addr({map_ppn, lreq_va[PAGE_OFF_W-1:0]}),
    .resp_valid(lresp_valid), .resp_data(lresp_data),
    .mem_req_valid(l2_req_valid), .mem_req_ready(l2_req_ready),
    .mem_req_addr(l2_req_addr),
    .mem_resp_valid(l2_resp_valid), .mem_resp_data(l2_resp_data),
    .hit_count(l1_hits), .miss_count(l1_misses)
  );

endmodule
