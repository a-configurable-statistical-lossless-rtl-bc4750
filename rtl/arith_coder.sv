// arith_coder -- pipelined binary arithmetic coder of the core: one binary
// decision per clock cycle when nothing stalls.
//
// Pipeline:
//   1. shift & concatenate: normalise {cum0, cum1} into the 9-bit LPS table
//      index (ppmh_pkg::lps_address), registered with the event;
//   2. LPS table: 512 x 7 ROM, registered;
//   3. mz_coder: range/low arithmetic, renormalisation, shadow registers;
//   4. code_buffer: carry resolution and run of pending bits;
//   5. code_packer: code generation and packing into bytes;
//   6. out_buffer: output FIFO with commit/rollback of speculative bytes.
// Events are {kind, cum0, cum1, dec}: BIT codes a decision whose branch
// has non-zero weight; COMMIT and ROLLBACK end a speculative group; FLUSH
// and END close a block, after which done pulses once the last byte is
// committed.  Every stage has valid/ready handshakes, so a stall anywhere
// (a long run in the packer, a full output buffer) holds the stages before
// it.  Compressed bytes leave on out_valid/out_ready.  The six stages follow
// the source design.
module arith_coder
  import ppmh_pkg::*;
#(
  parameter int OUT_DEPTH = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ev_valid,
  input  ac_event_t  ev,
  output logic       ev_ready,
  output logic       out_valid,
  output logic [7:0] out_data,
  input  logic       out_ready,
  output logic       done
);

  // stage 1: index
  logic      a_v, b_v, b_ready, a_ready;
  ev_kind_t  a_kind;
  logic      a_dec;
  lps_addr_t a_ad;
  ev_kind_t  b_kind;
  logic      b_dec, b_lps_left, b_zero;
  logic [6:0] b_q;
  logic       mz_ready;

  assign b_ready  = !b_v || mz_ready;
  assign a_ready  = !a_v || b_ready;
  assign ev_ready = a_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_v  <= 1'b0;
      b_v  <= 1'b0;
      a_kind <= EV_BIT;
      a_dec  <= 1'b0;
      a_ad <= '0;
      b_kind     <= EV_BIT;
      b_dec      <= 1'b0;
      b_lps_left <= 1'b0;
      b_zero     <= 1'b0;
    end else begin
      if (a_ready) begin
        a_v <= ev_valid;
        if (ev_valid) begin
          a_kind <= ev.kind;
          a_dec  <= ev.dec;
          a_ad <= lps_address(ev.cum0, ev.cum1);
        end
      end
      if (b_ready) begin
        b_v <= a_v;
        if (a_v) begin
          b_kind     <= a_kind;
          b_dec      <= a_dec;
          b_lps_left <= a_ad.lps_left;
          b_zero     <= a_ad.zero;
        end
      end
    end
  end

  // stage 2: LPS table
  lps_table u_lps (
    .clk (clk),
    .en  (b_ready && a_v),
    .idx (a_ad.idx),
    .q   (b_q)
  );

  // stage 3: MZ arithmetic
  logic   mz_v, cb_ready;
  cb_op_t mz_op;

  mz_coder u_mz (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (b_v),
    .in_ready    (mz_ready),
    .in_kind     (b_kind),
    .in_dec      (b_dec),
    .in_lps_left (b_lps_left),
    .in_zero     (b_zero),
    .in_qe       (b_q),
    .out_valid   (mz_v),
    .out_op      (mz_op),
    .out_ready   (cb_ready)
  );

  // stage 4: code buffer
  logic       cb_v, pk_ready;
  code_item_t cb_item;

  code_buffer u_cb (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (mz_v),
    .in_ready  (cb_ready),
    .in_op     (mz_op),
    .out_valid (cb_v),
    .out_item  (cb_item),
    .out_ready (pk_ready)
  );

  // stage 5: code generator and packer
  logic       pk_push, pk_push_ready, pk_commit, pk_rollback;
  logic [7:0] pk_data;

  code_packer u_pk (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (cb_v),
    .in_ready   (pk_ready),
    .in_item    (cb_item),
    .push       (pk_push),
    .push_data  (pk_data),
    .push_ready (pk_push_ready),
    .commit     (pk_commit),
    .rollback   (pk_rollback),
    .done       (done)
  );

  // stage 6: output buffer
  out_buffer #(.DEPTH(OUT_DEPTH)) u_ob (
    .clk        (clk),
    .rst_n      (rst_n),
    .push       (pk_push),
    .push_data  (pk_data),
    .push_ready (pk_push_ready),
    .commit     (pk_commit),
    .rollback   (pk_rollback),
    .out_valid  (out_valid),
    .out_data   (out_data),
    .out_ready  (out_ready)
  );

endmodule
