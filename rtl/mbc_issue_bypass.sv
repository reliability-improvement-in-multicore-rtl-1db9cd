// mbc_issue_bypass: integer execution stage of one core with the MBC bypass.
//
// An integer ADD or MUL arriving at issue normally goes to a working
// functional unit of its kind (N_ADD adders and N_MUL multipliers, each
// with a defect flag). If no unit of that kind is usable - all are marked
// defective, or the integer execution unit's temperature is above TEMP_TH -
// the operation bypasses the functional units and is sent to the MBC glue
// logic instead. The operands are the same either way, so software does not
// see the difference, only a longer latency.
//
// Interface: `in_valid`/`in_ready` take one operation; its result appears
// on `out_valid`/`out_result` (never refused), with `out_via_mbc` telling
// which path computed it and `out_unit` which functional unit was used.
// `out_carry` is the carry out of bit 31 of an ADD (0 for MUL), from the
// adder or from the glue logic's top slice.
// Functional units answer one cycle after issue. While an operation is in
// the MBC path the stage accepts nothing else (in order, one at a time).
// `os_load_req[op]` pulses the first time an operation kind is bypassed
// after reset: the indication to the operating system to load that
// operation's result tables.
// The bypass conditions (defect, temperature above a threshold of 100 C)
// and the unit counts (6 adders, 2 multipliers) follow the published
// scheme; the single-issue stall and the interface are this design's.
module mbc_issue_bypass
  import mbc_pkg::*;
#(
  parameter int unsigned N_ADD   = 6,
  parameter int unsigned N_MUL   = 2,
  parameter int unsigned TEMP_W  = 8,
  parameter int unsigned TEMP_TH = 100   // degrees C
) (
  input  logic              clk,
  input  logic              rst_n,
  // issue
  input  logic              in_valid,
  output logic              in_ready,
  input  mbc_op_e           in_op,
  input  logic [XLEN-1:0]   in_a,
  input  logic [XLEN-1:0]   in_b,
  // unit condition
  input  logic [N_ADD-1:0]  add_defect,
  input  logic [N_MUL-1:0]  mul_defect,
  input  logic [TEMP_W-1:0] temp,          // integer execution unit, deg C
  // result
  output logic              out_valid,
  output logic [XLEN-1:0]   out_result,
  output logic              out_carry,
  output logic              out_via_mbc,
  output logic [2:0]        out_unit,
  output logic [1:0]        os_load_req,   // [OP_ADD], [OP_MUL]
  // to the MBC glue logic
  output logic              mbc_start,
  output mbc_op_e           mbc_op,
  output logic [XLEN-1:0]   mbc_a,
  output logic [XLEN-1:0]   mbc_b,
  input  logic              mbc_ready,
  input  logic              mbc_done,
  input  logic [XLEN-1:0]   mbc_result,
  input  logic              mbc_carry
);

  logic       hot;
  logic       add_ok, mul_ok;
  logic [2:0] add_unit, mul_unit;
  logic       use_mbc;
  logic       issue;
  logic       mbc_wait_q;
  logic       fu_valid_q;
  logic [XLEN-1:0] fu_result_q;
  logic            fu_carry_q;
  logic [XLEN:0]   fu_sum;
  logic [2:0] fu_unit_q;
  logic [1:0] bypassed_q;

  assign hot = temp > TEMP_W'(TEMP_TH);

  // first working unit of each kind
  always_comb begin
    add_ok   = 1'b0;
    add_unit = '0;
    for (int i = N_ADD - 1; i >= 0; i--) begin
      if (!add_defect[i]) begin
        add_ok   = 1'b1;
        add_unit = 3'(i);
      end
    end
    mul_ok   = 1'b0;
    mul_unit = '0;
    for (int i = N_MUL - 1; i >= 0; i--) begin
      if (!mul_defect[i]) begin
        mul_ok   = 1'b1;
        mul_unit = 3'(i);
      end
    end
    if (hot) begin
      add_ok = 1'b0;
      mul_ok = 1'b0;
    end
  end

  assign use_mbc  = (in_op == OP_ADD) ? !add_ok : !mul_ok;
  assign in_ready = !mbc_wait_q && (!use_mbc || mbc_ready);
  assign issue    = in_valid && in_ready;

  assign mbc_start = issue && use_mbc;
  assign fu_sum    = {1'b0, in_a} + {1'b0, in_b};
  assign mbc_op    = in_op;
  assign mbc_a     = in_a;
  assign mbc_b     = in_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mbc_wait_q  <= 1'b0;
      fu_valid_q  <= 1'b0;
      fu_result_q <= '0;
      fu_carry_q  <= 1'b0;
      fu_unit_q   <= '0;
      bypassed_q  <= '0;
      os_load_req <= '0;
    end else begin
      fu_valid_q  <= issue && !use_mbc;
      os_load_req <= '0;
      if (issue && !use_mbc) begin
        // the working conventional units
        fu_result_q <= (in_op == OP_ADD) ? fu_sum[XLEN-1:0] : in_a * in_b;
        fu_carry_q  <= (in_op == OP_ADD) && fu_sum[XLEN];
        fu_unit_q   <= (in_op == OP_ADD) ? add_unit : mul_unit;
      end
      if (mbc_start) begin
        mbc_wait_q <= 1'b1;
        if (!bypassed_q[in_op]) begin
          bypassed_q[in_op]  <= 1'b1;
          os_load_req[in_op] <= 1'b1;
        end
      end else if (mbc_done) begin
        mbc_wait_q <= 1'b0;
      end
    end
  end

  assign out_valid   = fu_valid_q || (mbc_wait_q && mbc_done);
  assign out_result  = fu_valid_q ? fu_result_q : mbc_result;
  assign out_carry   = fu_valid_q ? fu_carry_q : mbc_carry;
  assign out_via_mbc = !fu_valid_q;
  assign out_unit    = fu_unit_q;

  a_one_result: assert property (@(posedge clk) disable iff (!rst_n)
    !(fu_valid_q && mbc_wait_q && mbc_done));

endmodule
