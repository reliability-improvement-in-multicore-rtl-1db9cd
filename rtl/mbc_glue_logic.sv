// mbc_glue_logic: computes a 32-bit integer add or multiply by table lookups.
//
// This is the interface between the issue stage and the MBC memory. It
// replaces the adder or multiplier when that unit may not be used.
//
// ADD (bit-sliced carry-select addition). If either operand is zero, the
// other one is the sum and the result is ready one cycle after `start`,
// without any lookup. Otherwise the 32-bit priority encoder gives the width
// of (a | b) in 8-bit slices, n = 1..4, and the glue logic looks up one
// ADD-table word per slice pair (Xi, Yi). Each word holds the slice sum and
// carry for carry-in 0 and for carry-in 1; as the words return, in order,
// the carry out of slice i-1 selects between them for slice i. The first
// lookup leaves in the cycle of `start` and hits return one cycle later, so
// with every word in the L1 MBC cache the sum is on `result` with `done`
// n cycles after `start` (4 cycles for full-width operands). A carry out of
// the top looked-up slice becomes the next result bit; `carry_out` is the
// carry out of bit 31.
//
// MUL (partial products, low 32 bits). If either operand is zero the
// product is 0 after one cycle. Otherwise the 32-bit comparator puts the
// larger operand first and the priority encoder gives the slice counts of
// both. For every slice pair (i of the larger, j of the smaller) with
// i + j < 4, the 16-bit product is looked up in the MUL table, shifted left
// by 8*(i+j) with the 32-bit shifter and added to the running product with
// the same table-based addition as above (an add with a zero operand costs
// no lookup). `done` then pulses with the product one cycle after the last
// add.
//
// Lookup port: `lreq_valid`/`lreq_ready`/`lreq_va` (virtual LUT address, see
// mbc_pkg), and `lresp_valid`/`lresp_data`, answered in request order and
// never refused. Requests may be held off for any number of cycles.
// `in_ready` is high while idle. The slice width, carry-select structure,
// zero shortcut, commutative ordering, comparator, priority encoder and
// shifter follow the published scheme; the multiply schedule, the choice to
// add partial products through the ADD table, and the cycle accounting are
// this design's.
module mbc_glue_logic
  import mbc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // operation
  input  logic              start,
  input  mbc_op_e           op,
  input  logic [XLEN-1:0]   a,
  input  logic [XLEN-1:0]   b,
  output logic              in_ready,
  output logic              done,
  output logic [XLEN-1:0]   result,
  output logic              carry_out,
  // lookup port
  output logic              lreq_valid,
  input  logic              lreq_ready,
  output logic [VA_W-1:0]   lreq_va,
  input  logic              lresp_valid,
  input  logic [WORD_W-1:0] lresp_data
);

  typedef enum logic [1:0] {G_IDLE, G_ADD, G_MUL_REQ, G_MUL_WAIT} gstate_e;

  gstate_e         state_q;
  mbc_op_e         op_q;
  logic [XLEN-1:0] ax_q, ay_q;       // operands of the running addition
  logic [2:0]      nsl_q;            // slices in the running addition
  logic [2:0]      iss_q;            // next slice to look up
  logic [1:0]      rsp_q;            // next slice to come back
  logic            carry_q;
  logic [XLEN-1:0] sum_q;            // assembled result slices
  logic [XLEN-1:0] big_q, small_q;   // ordered multiply operands
  logic [2:0]      nbig_q, nsmall_q;
  logic [1:0]      pi_q, pj_q;       // current partial product
  logic [XLEN-1:0] acc_q;            // running product
  logic            done_q;
  logic [XLEN-1:0] res_q;

  // ---- operand analysis on the inputs (used at start) ------------------
  logic [XLEN-1:0] in_big, in_small;
  logic            in_swapped;
  logic [2:0]      in_nbig, in_nsmall;
  logic            unused_nz0, unused_nz1, unused_nz2;
  logic [5:0]      unused_w0, unused_w1, unused_w2;

  mbc_operand_align #(.W(XLEN)) u_align (
    .a(a), .b(b), .larger(in_big), .smaller(in_small), .swapped(in_swapped)
  );
  mbc_width_encoder #(.W(XLEN), .SLICE_W(SLICE_W)) u_w_big (
    .value(in_big), .nonzero(unused_nz0), .width(unused_w0), .nslices(in_nbig)
  );
  mbc_width_encoder #(.W(XLEN), .SLICE_W(SLICE_W)) u_w_small (
    .value(in_small), .nonzero(unused_nz1), .width(unused_w1), .nslices(in_nsmall)
  );

  // ---- partial-product path -------------------------------------------
  logic [XLEN-1:0] pp_shifted;
  mbc_shifter #(.W(XLEN)) u_shift (
    .din   ({16'b0, lresp_data[15:0]}),
    .shamt ({pi_q + pj_q, 3'b000}),
    .dout  (pp_shifted)
  );

  // width of the next addition: acc + shifted partial product
  logic [2:0] mul_add_nsl;
  mbc_width_encoder #(.W(XLEN), .SLICE_W(SLICE_W)) u_w_add (
    .value(acc_q | pp_shifted), .nonzero(unused_nz2), .width(unused_w2),
    .nslices(mul_add_nsl)
  );

  // next partial product after (pi_q, pj_q)
  logic       pp_last;
  logic [1:0] pi_nx, pj_nx;
  always_comb begin
    pi_nx   = pi_q;
    pj_nx   = pj_q + 2'd1;
    pp_last = 1'b0;
    if (!((3'(pj_q) + 3'd1 < nsmall_q) && (3'(pi_q) + 3'(pj_q) + 3'd1 < 3'd4))) begin
      pj_nx = 2'd0;
      pi_nx = pi_q + 2'd1;
      if (!(3'(pi_q) + 3'd1 < nbig_q)) pp_last = 1'b1;
    end
  end

  // ---- lookup request ---------------------------------------------------
  logic           idle_add_go;   // non-trivial add starting this cycle
  logic [7:0]     rx, ry;
  mbc_op_e        rtab;
  assign in_ready    = (state_q == G_IDLE);
  assign idle_add_go = (state_q == G_IDLE) && start && (op == OP_ADD) &&
                       (a != '0) && (b != '0);

  always_comb begin
    lreq_valid = 1'b0;
    rtab       = OP_ADD;
    rx         = '0;
    ry         = '0;
    unique case (state_q)
      G_IDLE: begin
        lreq_valid = idle_add_go;
        rx = a[7:0];
        ry = b[7:0];
      end
      G_ADD: begin
        lreq_valid = (iss_q < nsl_q);
        rx = ax_q[8*iss_q[1:0] +: 8];
        ry = ay_q[8*iss_q[1:0] +: 8];
      end
      G_MUL_REQ: begin
        lreq_valid = 1'b1;
        rtab = OP_MUL;
        rx = big_q[8*pi_q +: 8];
        ry = small_q[8*pj_q +: 8];
      end
      default: ;
    endcase
  end

  mbc_lut_addr u_addr (.table_sel(rtab), .x(rx), .y(ry), .va(lreq_va));

  // ---- carry-select combination of a returning ADD word ----------------
  add_entry_t      ent;
  logic [7:0]      sel_sum;
  logic            sel_carry;
  logic            add_last;
  logic [XLEN-1:0] add_final;
  assign ent       = add_entry_t'(lresp_data);
  assign sel_sum   = carry_q ? ent.s1 : ent.s0;
  assign sel_carry = carry_q ? ent.c1 : ent.c0;
  assign add_last  = (state_q == G_ADD) && lresp_valid && (3'(rsp_q) + 3'd1 == nsl_q);

  always_comb begin
    add_final = sum_q;
    add_final[8*rsp_q +: 8] = sel_sum;
    if (nsl_q < 3'd4) add_final[8*nsl_q[1:0]] = sel_carry;
  end

  assign done      = done_q || (add_last && op_q == OP_ADD);
  assign result    = done_q ? res_q : add_final;
  assign carry_out = !done_q && (nsl_q == 3'd4) && sel_carry;

  // ---- state machine ------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= G_IDLE;
      done_q  <= 1'b0;
      op_q    <= OP_ADD;
      res_q   <= '0;
      nsl_q   <= '0;
      iss_q   <= '0;
      rsp_q   <= '0;
      carry_q <= 1'b0;
      sum_q   <= '0;
      ax_q    <= '0;
      ay_q    <= '0;
      big_q   <= '0;
      small_q <= '0;
      nbig_q  <= '0;
      nsmall_q <= '0;
      pi_q    <= '0;
      pj_q    <= '0;
      acc_q   <= '0;
    end else begin
      done_q <= 1'b0;
      if (lreq_valid && lreq_ready && state_q != G_MUL_REQ) iss_q <= iss_q + 3'd1;
      unique case (state_q)
        G_IDLE: begin
          if (start) begin
            op_q <= op;
            if (a == '0 || b == '0) begin
              done_q <= 1'b1;
              res_q  <= (op == OP_ADD) ? (a | b) : '0;
            end else if (op == OP_ADD) begin
              state_q <= G_ADD;
              ax_q    <= a;
              ay_q    <= b;
              nsl_q   <= in_nbig;           // width of max(a,b) = width of a|b
              iss_q   <= lreq_ready ? 3'd1 : 3'd0;
              rsp_q   <= '0;
              carry_q <= 1'b0;
              sum_q   <= '0;
            end else begin
              state_q  <= G_MUL_REQ;
              big_q    <= in_big;
              small_q  <= in_small;
              nbig_q   <= in_nbig;
              nsmall_q <= in_nsmall;
              pi_q     <= '0;
              pj_q     <= '0;
              acc_q    <= '0;
            end
          end
        end
        G_ADD: begin
          if (lresp_valid) begin
            sum_q[8*rsp_q +: 8] <= sel_sum;
            carry_q <= sel_carry;
            rsp_q   <= rsp_q + 2'd1;
            if (add_last) begin
              if (op_q == OP_ADD) begin
                state_q <= G_IDLE;
              end else begin
                acc_q <= add_final;
                pi_q  <= pi_nx;
                pj_q  <= pj_nx;
                if (pp_last) begin
                  state_q <= G_IDLE;
                  done_q  <= 1'b1;
                  res_q   <= add_final;
                end else begin
                  state_q <= G_MUL_REQ;
                end
              end
            end
          end
        end
        G_MUL_REQ: begin
          if (lreq_ready) state_q <= G_MUL_WAIT;
        end
        G_MUL_WAIT: begin
          if (lresp_valid) begin
            if (acc_q == '0 || pp_shifted == '0) begin
              // trivial add: no lookup
              acc_q <= acc_q | pp_shifted;
              pi_q  <= pi_nx;
              pj_q  <= pj_nx;
              if (pp_last) begin
                state_q <= G_IDLE;
                done_q  <= 1'b1;
                res_q   <= acc_q | pp_shifted;
              end else begin
                state_q <= G_MUL_REQ;
              end
            end else begin
              state_q <= G_ADD;
              ax_q    <= acc_q;
              ay_q    <= pp_shifted;
              nsl_q   <= mul_add_nsl;
              iss_q   <= '0;
              rsp_q   <= '0;
              carry_q <= 1'b0;
              sum_q   <= '0;
            end
          end
        end
        default: state_q <= G_IDLE;
      endcase
    end
  end

  // responses only come back for requests that are outstanding
  a_resp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    lresp_valid |-> (state_q == G_ADD || state_q == G_MUL_WAIT));

endmodule
