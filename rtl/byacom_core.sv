// byacom_core -- PPMH statistical lossless compression core: variable-order
// Markov modelling over a byte alphabet with binary arithmetic coding.
//
// Bytes enter the input buffer and go to the context modeller, which looks
// up the contexts of orders 0..max_order of each byte in a hashed context
// tree and allocates context areas for new ones.  The context areas of one
// byte pass through a double buffer to the probability estimator, which
// codes the byte from the highest order down, escaping to lower orders and
// to the uniform order -1 when the byte is new, as a sequence of binary
// decisions.  The arithmetic coder turns the decisions into bytes.  An
// end-of-block word (in_eob) codes the termination sequence, flushes the
// coder and resets all context state in one cycle, so blocks compress
// independently.  blk_done pulses when the last byte of a block is in the
// output buffer.
//
// Interface: in_valid/in_ready with in_data and in_eob; out_valid/
// out_ready with out_data; max_order is a run-time setting (0..4) and must
// be held stable during a block.  Defaults are the 1024-context
// configuration of the source design (1312-node context tree, 41-line free
// map, 256 K probability nodes); CONTEXTS must be a power of two and
// LINES*32 at least CONTEXTS.
//
// Timing: a byte found in its highest context takes 10 estimator cycles
// (load overlapped with the previous commit, 9-level walk); each escape
// adds 4 cycles and another walk.  The modeller works on the next byte meanwhile.  The coder
// takes one decision per cycle.
//
// The block split (modeller, double buffer, estimator, coder, in/out
// buffers) follows the source design; the host interface and end-of-block
// signalling are this design's own.  The source design's command register
// file is not included: max_order is its only documented setting.  Lint
// notes rst_n as used both asynchronously and synchronously: the registers
// reset asynchronously, and the protocol assertions use it in their
// "disable iff"; that is intended.
module byacom_core
  import ppmh_pkg::*;
#(
  parameter int CONTEXTS  = 1024,
  parameter int LINES     = 41,
  parameter int IN_DEPTH  = 256,
  parameter int OUT_DEPTH = 256,
  localparam int CA_W     = $clog2(CONTEXTS),
  localparam int N        = MAX_ORDER + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ORD_W-1:0] max_order,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [7:0]       in_data,
  input  logic             in_eob,
  output logic             out_valid,
  output logic [7:0]       out_data,
  input  logic             out_ready,
  output logic             blk_done
);

  // input buffer
  logic             f_valid, f_ready;
  logic [8:0]       f_data;

  sync_fifo #(.DEPTH(IN_DEPTH), .WIDTH(9)) u_in (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .in_data   ({in_eob, in_data}),
    .out_valid (f_valid),
    .out_ready (f_ready),
    .out_data  (f_data)
  );

  // context modeller
  logic             buf_ready, push, push_fresh, fin, fin_term;
  logic [CA_W-1:0]  push_ca;
  logic [SYM_W-1:0] fin_sym;

  context_modeller #(.CONTEXTS(CONTEXTS), .LINES(LINES)) u_cm (
    .clk        (clk),
    .rst_n      (rst_n),
    .max_order  (max_order),
    .in_valid   (f_valid),
    .in_ready   (f_ready),
    .in_data    (f_data[7:0]),
    .in_eob     (f_data[8]),
    .buf_ready  (buf_ready),
    .push_valid (push),
    .push_ca    (push_ca),
    .push_fresh (push_fresh),
    .fin        (fin),
    .fin_sym    (fin_sym),
    .fin_term   (fin_term)
  );

  // double-buffered context areas
  logic             rd_valid, rd_term, rd_done;
  logic [ORD_W-1:0] rd_n;
  logic [CA_W-1:0]  rd_ca [N];
  logic [N-1:0]     rd_fresh;
  logic [SYM_W-1:0] rd_sym;

  ctx_area_dbuf #(.CONTEXTS(CONTEXTS)) u_db (
    .clk        (clk),
    .rst_n      (rst_n),
    .wr_ready   (buf_ready),
    .push       (push),
    .push_ca    (push_ca),
    .push_fresh (push_fresh),
    .fin        (fin),
    .fin_sym    (fin_sym),
    .fin_term   (fin_term),
    .rd_valid   (rd_valid),
    .rd_n       (rd_n),
    .rd_ca      (rd_ca),
    .rd_fresh   (rd_fresh),
    .rd_sym     (rd_sym),
    .rd_term    (rd_term),
    .rd_done    (rd_done)
  );

  // probability estimator
  logic      ev_valid, ev_ready;
  ac_event_t ev;

  prob_estimator #(.CONTEXTS(CONTEXTS)) u_pe (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_valid (rd_valid),
    .rd_n     (rd_n),
    .rd_ca    (rd_ca),
    .rd_fresh (rd_fresh),
    .rd_sym   (rd_sym),
    .rd_term  (rd_term),
    .rd_done  (rd_done),
    .ev_valid (ev_valid),
    .ev       (ev),
    .ev_ready (ev_ready)
  );

  // arithmetic coder with output buffer
  arith_coder #(.OUT_DEPTH(OUT_DEPTH)) u_ac (
    .clk       (clk),
    .rst_n     (rst_n),
    .ev_valid  (ev_valid),
    .ev        (ev),
    .ev_ready  (ev_ready),
    .out_valid (out_valid),
    .out_data  (out_data),
    .out_ready (out_ready),
    .done      (blk_done)
  );

endmodule
