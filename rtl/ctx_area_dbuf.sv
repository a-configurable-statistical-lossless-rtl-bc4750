// ctx_area_dbuf -- double buffer of found context areas between the
// context modeller and the probability estimator.
//
// Two banks each hold the record of one byte: its context areas for orders
// 0..n-1 (with a fresh flag each), the byte and its end-of-block flag.
// The modeller fills one bank while the estimator works from the other;
// when the filling bank is closed (fin) and the estimator releases its
// bank (rd_done) the roles swap, so neither stage waits for the other
// unless it is a whole byte ahead.  Write side: wr_ready says the filling
// bank is free; push appends one entry; fin closes the bank.  Read side:
// rd_valid says a closed bank is available; its content is shown on rd_*
// until rd_done.  The double buffering follows the source design; the
// record layout is this design's own.
module ctx_area_dbuf
  import ppmh_pkg::*;
#(
  parameter int CONTEXTS = 1024,
  localparam int CA_W    = $clog2(CONTEXTS),
  localparam int N       = MAX_ORDER + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             wr_ready,
  input  logic             push,
  input  logic [CA_W-1:0]  push_ca,
  input  logic             push_fresh,
  input  logic             fin,
  input  logic [SYM_W-1:0] fin_sym,
  input  logic             fin_term,
  output logic             rd_valid,
  output logic [ORD_W-1:0] rd_n,          // number of valid orders (1..N)
  output logic [CA_W-1:0]  rd_ca [N],
  output logic [N-1:0]     rd_fresh,
  output logic [SYM_W-1:0] rd_sym,
  output logic             rd_term,
  input  logic             rd_done
);

  logic [CA_W-1:0]  ca    [2][N];
  logic [N-1:0]     fresh [2];
  logic [ORD_W-1:0] cnt   [2];
  logic [SYM_W-1:0] sym   [2];
  logic             term  [2];
  logic [1:0]       full;
  logic             wsel, rsel;

  assign wr_ready = !full[wsel];
  assign rd_valid = full[rsel];
  assign rd_n     = cnt[rsel];
  assign rd_ca    = ca[rsel];
  assign rd_fresh = fresh[rsel];
  assign rd_sym   = sym[rsel];
  assign rd_term  = term[rsel];

  always_ff @(posedge clk) begin
    if (push && wr_ready && cnt[wsel] < ORD_W'(N)) begin
      ca[wsel][cnt[wsel]]    <= push_ca;
      fresh[wsel][cnt[wsel]] <= push_fresh;
    end
    if (fin && wr_ready) begin
      sym[wsel]  <= fin_sym;
      term[wsel] <= fin_term;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0;
      wsel <= 1'b0;
      rsel <= 1'b0;
      cnt  <= '{default: '0};
    end else begin
      if (push && wr_ready && cnt[wsel] < ORD_W'(N)) cnt[wsel] <= cnt[wsel] + 1'b1;
      if (fin && wr_ready) begin
        full[wsel] <= 1'b1;
        wsel       <= !wsel;
      end
      if (rd_done && rd_valid) begin
        full[rsel] <= 1'b0;
        cnt[rsel]  <= '0;
        rsel       <= !rsel;
      end
    end
  end

  // A bank never receives more entries than there are orders.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push && wr_ready |-> cnt[wsel] < ORD_W'(N));

endmodule
