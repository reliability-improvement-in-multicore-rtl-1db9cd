// mbc_os_pager: behavioural model of the operating system's page-fault
// path for the MBC tables, for testbenches only.
//
// When a core's mapping table misses (`map_miss[c]`), the model waits
// FAULT_CYCLES cycles, loads the missing table page into main memory if no
// core has loaded it yet (`load_*`, picking physical pages PPN_BASE,
// PPN_BASE+1, ... in order of first use), and then writes the translation
// into that core's mapping table (`fill_*[c]`, one-cycle pulse). All cores
// share one placement, so a page loaded for one core is found on chip by
// the others. Faults are served one at a time, cores taken in turn.
module mbc_os_pager
  import mbc_pkg::*;
#(
  parameter int unsigned N_CORES      = 2,
  parameter int unsigned FAULT_CYCLES = 20,
  parameter int unsigned PPN_BASE     = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_CORES-1:0] map_miss,
  input  logic [VPN_W-1:0]   miss_vpn [N_CORES],
  output logic [N_CORES-1:0] fill_valid,
  output logic [VPN_W-1:0]   fill_vpn [N_CORES],
  output logic [PPN_W-1:0]   fill_ppn [N_CORES],
  output logic               load_valid,
  output logic [PPN_W-1:0]   load_ppn,
  output logic [VPN_W-1:0]   load_vpn,
  output int unsigned        faults,
  output int unsigned        pages_loaded
);

  logic             placed [1 << VPN_W];
  logic [PPN_W-1:0] where  [1 << VPN_W];
  int unsigned      cnt;
  int               cur;
  int               last;   // core served last
  logic [PPN_W-1:0] next_ppn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_valid   <= '0;
      load_valid   <= 1'b0;
      load_ppn     <= '0;
      load_vpn     <= '0;
      cnt          <= 0;
      cur          <= -1;
      last         <= N_CORES - 1;
      faults       <= 0;
      pages_loaded <= 0;
      next_ppn     <= PPN_W'(PPN_BASE);
      for (int i = 0; i < (1 << VPN_W); i++) placed[i] <= 1'b0;
      for (int c = 0; c < N_CORES; c++) begin
        fill_vpn[c] <= '0;
        fill_ppn[c] <= '0;
      end
    end else begin
      fill_valid <= '0;
      load_valid <= 1'b0;
      if (cur < 0) begin
        // a fill being written this cycle still shows as a miss: skip it
        if (fill_valid == '0)
          for (int k = N_CORES - 1; k >= 0; k--) begin
            int c;
            c = (last + 1 + k) % N_CORES;
            if (map_miss[c]) cur <= c;
          end
        cnt <= 0;
      end else if (cnt < FAULT_CYCLES) begin
        cnt <= cnt + 1;
      end else if (cnt == FAULT_CYCLES) begin
        logic [VPN_W-1:0] v;
        v = miss_vpn[cur];
        if (!placed[v]) begin
          placed[v]    <= 1'b1;
          where[v]     <= next_ppn;
          load_valid   <= 1'b1;
          load_ppn     <= next_ppn;
          load_vpn     <= v;
          next_ppn     <= next_ppn + 1'b1;
          pages_loaded <= pages_loaded + 1;
        end
        cnt <= cnt + 1;
      end else begin
        logic [VPN_W-1:0] v;
        v = miss_vpn[cur];
        fill_valid[cur] <= 1'b1;
        fill_vpn[cur]   <= v;
        fill_ppn[cur]   <= where[v];
        faults          <= faults + 1;
        cur             <= -1;
        last            <= cur;
      end
    end
  end
endmodule
