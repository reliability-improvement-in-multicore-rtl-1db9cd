// mbc_l2_shared: the L2 MBC cache shared by all cores, with its arbiter.
//
// Each core's L1 MBC cache sends its misses here. A round-robin arbiter
// picks one requesting core, forwards its request to a single mbc_cache
// instance and routes the answer back to that core; one request is in
// flight at a time, so the port order is also the answer order. Misses of
// the L2 go to main memory through the `mem_*` port. Sharing lets every core
// reuse table words another core has already brought on chip.
// Ports are arrays indexed by core. The sharing follows the published
// architecture; the arbitration policy and the one-request-in-flight rule
// are this design's choices.
module mbc_l2_shared #(
  parameter int unsigned N_PORTS = 2,
  parameter int unsigned DEPTH   = 16384,
  parameter int unsigned AW      = 24,
  parameter int unsigned DW      = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                flush,
  // from the cores' L1 MBC caches
  input  logic [N_PORTS-1:0]  up_req_valid,
  output logic [N_PORTS-1:0]  up_req_ready,
  input  logic [AW-1:0]       up_req_addr  [N_PORTS],
  output logic [N_PORTS-1:0]  up_resp_valid,
  output logic [DW-1:0]       up_resp_data,
  // to main memory
  output logic                mem_req_valid,
  input  logic                mem_req_ready,
  output logic [AW-1:0]       mem_req_addr,
  input  logic                mem_resp_valid,
  input  logic [DW-1:0]       mem_resp_data,
  // statistics
  output logic [31:0]         hit_count,
  output logic [31:0]         miss_count
);

  localparam int unsigned PW = (N_PORTS > 1) ? $clog2(N_PORTS) : 1;

  logic          busy_q;
  logic [PW-1:0] owner_q;
  logic [PW-1:0] rr_q;      // port with the highest priority next
  logic          grant_any;
  logic [PW-1:0] grant;

  logic          c_req_valid, c_req_ready, c_resp_valid;
  logic [AW-1:0] c_req_addr;
  logic [DW-1:0] c_resp_data;

  // round robin: first requester at or after rr_q
  always_comb begin
    grant_any = 1'b0;
    grant     = '0;
    for (int unsigned k = 0; k < N_PORTS; k++) begin
      int unsigned p;
      p = (int'(rr_q) + k) % N_PORTS;
      if (!grant_any && up_req_valid[p]) begin
        grant_any = 1'b1;
        grant     = PW'(p);
      end
    end
  end

  assign c_req_valid = !busy_q && grant_any;
  assign c_req_addr  = up_req_addr[grant];

  always_comb begin
    up_req_ready = '0;
    up_req_ready[grant] = !busy_q && grant_any && c_req_ready;
  end

  always_comb begin
    up_resp_valid = '0;
    up_resp_valid[owner_q] = c_resp_valid;
  end
  assign up_resp_data = c_resp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      owner_q <= '0;
      rr_q    <= '0;
    end else begin
      if (c_req_valid && c_req_ready) begin
        busy_q  <= 1'b1;
        owner_q <= grant;
        rr_q    <= (int'(grant) == N_PORTS - 1) ? '0 : grant + 1'b1;
      end else if (c_resp_valid) begin
        busy_q <= 1'b0;
      end
    end
  end

  mbc_cache #(.DEPTH(DEPTH), .AW(AW), .DW(DW)) u_cache (
    .clk, .rst_n, .flush,
    .req_valid(c_req_valid), .req_ready(c_req_ready), .req_addr(c_req_addr),
    .resp_valid(c_resp_valid), .resp_data(c_resp_data),
    .mem_req_valid, .mem_req_ready, .mem_req_addr,
    .mem_resp_valid, .mem_resp_data,
    .hit_count, .miss_count
  );

endmodule
