// mbc_cache: read-only, direct-mapped cache of lookup-table words.
//
// Used as each core's private L1 MBC cache and, larger, as the shared L2 MBC
// cache. The tables are only ever read by the glue logic, so the cache has
// no write path: a miss fetches the word from the next level and installs it.
//
// Upstream: a request is taken when `req_valid && req_ready`; a hit answers
// with `resp_valid`/`resp_data` on the next cycle and the cache can take a
// new request every cycle, so back-to-back slice lookups that hit stream at
// one per cycle. A miss drops `req_ready`, sends one request downstream
// (`mem_req_*`, valid/ready), waits for `mem_resp_valid`, installs the word
// and answers one cycle later. Responses cannot be refused.
// `flush` invalidates all lines (when tables are unloaded or remapped).
// `hit_count`/`miss_count` count accepted requests for statistics.
// The published scheme gives the cache's role, not its organisation: the
// direct mapping, one-word lines, sizes and handshakes are this design's.
module mbc_cache #(
  parameter int unsigned DEPTH = 1024,   // lines, one word each
  parameter int unsigned AW    = 24,     // word address width
  parameter int unsigned DW    = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          flush,
  // upstream
  input  logic          req_valid,
  output logic          req_ready,
  input  logic [AW-1:0] req_addr,
  output logic          resp_valid,
  output logic [DW-1:0] resp_data,
  // downstream
  output logic          mem_req_valid,
  input  logic          mem_req_ready,
  output logic [AW-1:0] mem_req_addr,
  input  logic          mem_resp_valid,
  input  logic [DW-1:0] mem_resp_data,
  // statistics
  output logic [31:0]   hit_count,
  output logic [31:0]   miss_count
);

  localparam int unsigned IW = $clog2(DEPTH);
  localparam int unsigned TW = AW - IW;

  typedef enum logic [1:0] {C_IDLE, C_MISS_REQ, C_MISS_WAIT} cstate_e;

  cstate_e        state_q;
  logic [DEPTH-1:0] valid_q;
  logic [TW-1:0]  tag_mem  [DEPTH];
  logic [DW-1:0]  data_mem [DEPTH];
  logic [AW-1:0]  miss_addr_q;
  logic           resp_valid_q;
  logic [DW-1:0]  resp_data_q;

  logic [IW-1:0]  idx;
  logic [TW-1:0]  tag;
  logic           lookup_hit;
  logic           accept;

  assign idx        = req_addr[IW-1:0];
  assign tag        = req_addr[AW-1:IW];
  assign lookup_hit = valid_q[idx] && (tag_mem[idx] == tag);
  assign req_ready  = (state_q == C_IDLE);
  assign accept     = req_valid && req_ready;

  assign mem_req_valid = (state_q == C_MISS_REQ);
  assign mem_req_addr  = miss_addr_q;
  assign resp_valid    = resp_valid_q;
  assign resp_data     = resp_data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= C_IDLE;
      valid_q      <= '0;
      resp_valid_q <= 1'b0;
      hit_count    <= '0;
      miss_count   <= '0;
    end else begin
      resp_valid_q <= 1'b0;
      if (flush) valid_q <= '0;
      unique case (state_q)
        C_IDLE: begin
          if (accept) begin
            if (lookup_hit) begin
              resp_valid_q <= 1'b1;
              hit_count    <= hit_count + 1;
            end else begin
              state_q    <= C_MISS_REQ;
              miss_count <= miss_count + 1;
            end
          end
        end
        C_MISS_REQ: begin
          if (mem_req_ready) state_q <= C_MISS_WAIT;
        end
        C_MISS_WAIT: begin
          if (mem_resp_valid) begin
            resp_valid_q <= 1'b1;
            state_q      <= C_IDLE;
            if (!flush) valid_q[miss_addr_q[IW-1:0]] <= 1'b1;
          end
        end
        default: state_q <= C_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state_q == C_IDLE && accept) begin
      miss_addr_q <= req_addr;
      resp_data_q <= data_mem[idx];
    end
    if (state_q == C_MISS_WAIT && mem_resp_valid) begin
      resp_data_q                   <= mem_resp_data;
      data_mem[miss_addr_q[IW-1:0]] <= mem_resp_data;
      tag_mem[miss_addr_q[IW-1:0]]  <= miss_addr_q[AW-1:IW];
    end
  end

endmodule
