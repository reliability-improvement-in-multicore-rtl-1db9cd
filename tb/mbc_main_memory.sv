// mbc_main_memory: behavioural model of main memory holding the result
// tables, for testbenches only (not synthesizable design content).
//
// Instead of storing every word, the model remembers which virtual table
// page the operating system has loaded into each physical page
// (`load_valid`, `load_ppn`, `load_vpn`) and computes a word on read with
// mbc_pkg::lut_word. A read of a page that was never loaded returns
// 32'hDEAD_BEEF. One request at a time: `req_ready` is high while idle, and
// the word comes back on `resp_valid` LATENCY cycles after the request.
module mbc_main_memory
  import mbc_pkg::*;
#(
  parameter int unsigned LATENCY = 10,
  parameter int unsigned NPAGES  = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load_valid,
  input  logic [PPN_W-1:0]  load_ppn,
  input  logic [VPN_W-1:0]  load_vpn,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [PA_W-1:0]   req_addr,
  output logic              resp_valid,
  output logic [WORD_W-1:0] resp_data,
  output int unsigned       reads
);

  logic             loaded [NPAGES];
  logic [VPN_W-1:0] page_vpn [NPAGES];
  logic             busy;
  int unsigned      cnt;
  logic [PA_W-1:0]  addr_q;

  assign req_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      resp_valid <= 1'b0;
      resp_data  <= '0;
      cnt        <= 0;
      reads      <= 0;
      for (int i = 0; i < NPAGES; i++) loaded[i] <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      if (load_valid && int'(load_ppn) < NPAGES) begin
        loaded[int'(load_ppn)]   <= 1'b1;
        page_vpn[int'(load_ppn)] <= load_vpn;
      end
      if (!busy && req_valid) begin
        busy   <= 1'b1;
        addr_q <= req_addr;
        cnt    <= 1;
        reads  <= reads + 1;
      end else if (busy) begin
        if (cnt >= LATENCY - 1) begin
          int unsigned p;
          p          = int'(addr_q[PA_W-1:PAGE_OFF_W]);
          busy       <= 1'b0;
          resp_valid <= 1'b1;
          resp_data  <= (p < NPAGES && loaded[p]) ?
                        lut_word({page_vpn[p], addr_q[PAGE_OFF_W-1:0]}) : 32'hDEAD_BEEF;
        end
        cnt <= cnt + 1;
      end
    end
  end
endmodule
