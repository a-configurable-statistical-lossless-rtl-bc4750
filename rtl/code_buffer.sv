// code_buffer -- resolves carries out of the coder register and holds the
// code bits a later carry could still change.
//
// The last code bit that may still change is held as the cache bit cb,
// and after it a run of n one-bits.  A carry turns cb,1...1 into
// cb+1,0...0, which is then final.  For each shift op from mz_coder the
// first digit is the shifted-out bit plus the carry.  Each digit that is 0,
// or carries, makes the held bits final.  Each 1 digit that does not carry
// only lengthens the run.  The final bits of one op leave as one code item:
// the head bit cb+carry, a run of n copies of (not carry), and up to 6
// literal bits from the op itself.  The run count is the zero-run count of
// the source design, with the polarity turned around because this coder
// carries where that one borrows.  END sends the held bits (cb and its run)
// and restarts.
//
// COMMIT copies {cb, valid, n} into shadow registers and ROLLBACK restores
// them; both, and END, are passed on in order.  Interface: in_valid/in_ready
// and out_valid/out_ready, output registered (one pipeline stage).  The
// run counter is RUN_W bits; an assertion flags a run that would overflow
// it.
module code_buffer
  import ppmh_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  cb_op_t     in_op,
  output logic       out_valid,
  output code_item_t out_item,
  input  logic       out_ready
);

  logic             cv_q, cb_q, cvs_q, cbs_q;
  logic [RUN_W-1:0] n_q, ns_q;
  logic             go, send;
  code_item_t       item;
  logic             cv_d, cb_d;
  logic [RUN_W-1:0] n_d;

  assign in_ready = !out_valid || out_ready;
  assign go       = in_valid && in_ready;

  always_comb begin
    logic       emitted, d, c;
    logic [6:0] seq;           // digits since the head, oldest first
    logic [2:0] seq_n, fin_n;  // digits in seq; how many of them are final
    item    = '{kind: in_op.kind, head_v: 1'b0, head: 1'b0, run_bit: 1'b1,
                run_len: '0, lit_n: 3'd0, lits: 7'd0};
    cv_d    = cv_q;
    cb_d    = cb_q;
    n_d     = n_q;
    send    = 1'b0;
    emitted = 1'b0;
    d       = 1'b0;
    c       = 1'b0;
    seq     = '0;
    seq_n   = '0;
    fin_n   = '0;
    unique case (in_op.kind)
      EV_BIT: begin
        for (int i = 0; i < 7; i++) begin
          if (3'(i) < in_op.k) begin
            d = in_op.bits[6 - i];
            c = (i == 0) ? in_op.carry : 1'b0;
            if (!cv_d) begin
              cv_d = 1'b1;
              cb_d = d;
              n_d  = '0;
            end else if (!d || c) begin
              if (!emitted) begin
                emitted      = 1'b1;
                item.head_v  = 1'b1;
                item.head    = cb_d ^ c;
                item.run_bit = !c;
                item.run_len = n_d;
              end else begin
                // the held bits of this same op become literals
                fin_n = seq_n;
              end
              seq   = {seq[5:0], d};
              seq_n = seq_n + 3'd1;
              cb_d  = d;
              n_d   = '0;
            end else begin
              if (emitted) begin
                seq   = {seq[5:0], d};
                seq_n = seq_n + 3'd1;
              end
              n_d = n_d + 1'b1;
            end
          end
        end
        send       = emitted;
        item.lits  = seq >> (seq_n - fin_n);
        item.lit_n = fin_n;
      end
      EV_END: begin
        send         = 1'b1;
        item.head_v  = cv_q;
        item.head    = cb_q;
        item.run_bit = 1'b1;
        item.run_len = cv_q ? n_q : '0;
        cv_d         = 1'b0;
        cb_d         = 1'b0;
        n_d          = '0;
      end
      default: send = 1'b1;   // COMMIT, ROLLBACK
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cv_q <= 1'b0; cb_q <= 1'b0; n_q <= '0;
      cvs_q <= 1'b0; cbs_q <= 1'b0; ns_q <= '0;
      out_valid <= 1'b0;
      out_item  <= '0;
    end else begin
      if (go) begin
        unique case (in_op.kind)
          EV_COMMIT: begin
            cvs_q <= cv_q; cbs_q <= cb_q; ns_q <= n_q;
          end
          EV_ROLLBACK: begin
            cv_q <= cvs_q; cb_q <= cbs_q; n_q <= ns_q;
          end
          EV_END: begin
            cv_q <= 1'b0; cb_q <= 1'b0; n_q <= '0;
            cvs_q <= 1'b0; cbs_q <= 1'b0; ns_q <= '0;
          end
          default: begin
            cv_q <= cv_d; cb_q <= cb_d; n_q <= n_d;
          end
        endcase
        out_valid <= send;
        if (send) out_item <= item;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  // A carry never reaches a held 1 bit, and the run never overflows.
  a_carry_ok: assert property (@(posedge clk) disable iff (!rst_n)
    go && in_op.kind == EV_BIT && in_op.carry && in_op.k != 3'd0 |-> !(cv_q && cb_q));
  a_run_ok: assert property (@(posedge clk) disable iff (!rst_n)
    go |-> n_q < {RUN_W{1'b1}} - RUN_W'(8));

endmodule
