// mz_coder -- multiplication-free binary arithmetic coding step with
// single-cycle renormalisation and shadow registers for speculation.
//
// State: a 7-bit range R (kept in 64..127 between steps) and an 8-bit low
// register L (7 code bits plus one carry bit).  For a decision with LPS
// probability q (1/128 units, from lps_table), the less probable branch
// gets q and the other branch R - q, with no multiplication (R is taken as
// about 1).  Left is the lower part of the interval.  Coding right adds the
// left size to L.  The new range is then shifted up by its leading-zero
// count k (0..6) in the same cycle, and L with it; the k bits leaving L,
// with the carry out of L, go to the code buffer as one op.  A carry stays
// in L[7] until the next shift, so at most one carry is pending.
//
// COMMIT copies {R, L} into shadow registers, ROLLBACK copies them back:
// decisions sent since the last commit are undone.  FLUSH sends all 7 code
// bits of L and restarts the coder.  Tokens are passed on in order.
//
// Interface: in_valid/in_ready in, out_valid/out_ready out; one event per
// cycle, output registered (one pipeline stage).  The source design gives
// the 7-bit range and subend registers, the 3-bit shift count, the parallel
// renormalisation and the shadow copies; it does not give the arithmetic.
// This coder uses an added carry where the source design's subend register
// works with borrows, and its own split of the range.
module mz_coder
  import ppmh_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  ev_kind_t   in_kind,
  input  logic       in_dec,
  input  logic       in_lps_left,
  input  logic       in_zero,
  input  logic [6:0] in_qe,
  output logic       out_valid,
  output cb_op_t     out_op,
  input  logic       out_ready
);

  logic [R_W-1:0] r_q, rs_q, r1, r2, q, rl;
  logic [7:0]     l_q, ls_q, l1, l2;
  logic [2:0]     k;
  logic           go, send;
  cb_op_t         op;

  assign in_ready = !out_valid || out_ready;
  assign go       = in_valid && in_ready;

  always_comb begin
    q  = in_zero ? '0 : in_qe;
    rl = in_lps_left ? q : r_q - q;
    if (in_dec) begin
      r1 = r_q - rl;
      l1 = l_q + 8'(rl);
    end else begin
      r1 = rl;
      l1 = l_q;
    end
    // leading-zero count of the new range (highest set bit wins)
    k = 3'd7;
    for (int i = 0; i < R_W; i++) begin
      if (r1[i]) k = 3'(R_W - 1 - i);
    end
    r2 = r1 << k;
    l2 = (k == 3'd0) ? l1 : {1'b0, 7'(l1[6:0] << k)};
    send = 1'b0;
    op   = '{kind: in_kind, carry: 1'b0, k: 3'd0, bits: 7'd0};
    unique case (in_kind)
      EV_BIT: begin
        send = (k != 3'd0);
        op   = '{kind: EV_BIT, carry: l1[7], k: k, bits: l1[6:0]};
      end
      EV_FLUSH: begin
        send = 1'b1;
        op   = '{kind: EV_BIT, carry: l_q[7], k: 3'd7, bits: l_q[6:0]};
      end
      default: send = 1'b1;   // COMMIT, ROLLBACK, END pass through
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q       <= R_W'(R_INIT);
      l_q       <= '0;
      rs_q      <= R_W'(R_INIT);
      ls_q      <= '0;
      out_valid <= 1'b0;
      out_op    <= '0;
    end else begin
      if (go) begin
        unique case (in_kind)
          EV_BIT: begin
            r_q <= r2;
            l_q <= l2;
          end
          EV_COMMIT: begin
            rs_q <= r_q;
            ls_q <= l_q;
          end
          EV_ROLLBACK: begin
            r_q <= rs_q;
            l_q <= ls_q;
          end
          EV_FLUSH: begin
            r_q  <= R_W'(R_INIT);
            l_q  <= '0;
            rs_q <= R_W'(R_INIT);
            ls_q <= '0;
          end
          default: ;
        endcase
        out_valid <= send;
        if (send) out_op <= op;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  // The branch being coded never has an empty range.
  a_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    go && in_kind == EV_BIT |-> r1 != '0);

endmodule
