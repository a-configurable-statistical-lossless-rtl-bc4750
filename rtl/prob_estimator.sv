// prob_estimator -- codes each byte as a walk down a binary tree of
// frequency counts, escaping from the highest order found down to order 0
// and then to the uniform order -1, and adapts the counts as it goes.
//
// Every context area owns 256 tree nodes in the probability storage
// (context area << 8 | node) and one word in the total memory.  Node 0 is
// the root: its count is the weight of all symbols seen in the context
// (left) and the rest of the total is the escape weight (right).  Nodes
// 1..255 form the 8-level symbol tree, node i having children 2i and 2i+1;
// symbol bit 7 picks the branch below node 1.  A node's count is the weight
// of its left subtree; its right weight is the weight handed down from the
// parent ("top") minus that count.  For each decision the estimator sends
// {cum0 = left weight, cum1 = top, decision} to the arithmetic coder.
//
// Coding is speculative: decisions go out while the walk goes down, and
// when the branch the symbol needs has weight 0 the estimator stops sending,
// finishes the walk to add the symbol to the context, then sends ROLLBACK
// (the coder forgets the decisions of this attempt), the escape decision at
// the root with the counts from before the update, and COMMIT.  A
// successful walk ends with COMMIT.  After order 0 fails, order -1 sends
// the 8 symbol bits with weights 1:1.
//
// Reset and scaling cost no extra cycles.  A context area the modeller has
// just (re)allocated arrives marked fresh: its root is taken as empty
// (escape weight 1).  Each node stores, besides its 10-bit count, a pending
// reset and a pending halving flag for each child (14 bits); the flags go
// down with the walk and are applied to a node when it is next visited.
// When an update brings a total to SCALE_LIMIT, a flag in the total word
// makes the next visit halve the root (keeping an escape weight of at
// least 1) and mark its subtree for halving.  A halved count is clamped to
// the weight handed down so that left <= top always holds.
//
// End of block: for the record marked term, the estimator codes the escape
// in every order from the highest down to 0 without updating, then the
// termination symbol (the last byte that reached order 0) in order -1,
// then FLUSH and END.
//
// Interface: records from ctx_area_dbuf (rd_*), events to the coder on
// ev_valid/ev_ready, one event per cycle at most; the walk stalls while
// the coder is not ready.  rd_done is raised in the record's last cycle
// of work, so a waiting record is loaded in the next cycle.  After a
// successful walk the COMMIT event and the total-word write are deferred
// into that load cycle (a total read of the same context in that cycle is
// bypassed with the new word).  Timing: 1 cycle to read a context and 9
// for the walk, 10 in all for a byte found in its first context, as in
// the source design; an escape adds 4 cycles (rollback, escape, commit,
// reload), order -1 adds 9.
//
// The tree, its 14-bit node, the single walk with one update per level,
// order-dependent increments, shadowed speculation and the termination
// scheme follow the source design.  The increment values, escape increment,
// scale limit, halving rule and clamp are this design's own.
module prob_estimator
  import ppmh_pkg::*;
#(
  parameter int CONTEXTS = 1024,
  localparam int CA_W    = $clog2(CONTEXTS),
  localparam int N       = MAX_ORDER + 1,
  localparam int PA_W    = CA_W + 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd_valid,
  input  logic [ORD_W-1:0] rd_n,
  input  logic [CA_W-1:0]  rd_ca [N],
  input  logic [N-1:0]     rd_fresh,
  input  logic [SYM_W-1:0] rd_sym,
  input  logic             rd_term,
  output logic             rd_done,
  output logic             ev_valid,
  output ac_event_t        ev,
  input  logic             ev_ready
);

  typedef enum logic [3:0] {
    P_IDLE, P_CTX, P_WALK, P_FIN, P_ESC, P_ESC_CMT, P_TCMT,
    P_M1, P_M1_CMT, P_FLUSH, P_END
  } pstate_t;

  pstate_t          state;
  logic [ORD_W-1:0] ord;
  logic [3:0]       lvl;
  logic [7:0]       nidx;
  logic [CNT_W-1:0] top_q, root_cnt, root_top;
  logic             inv_q, scl_q, failed;
  logic [2:0]       bitpos;
  logic [SYM_W-1:0] term_sym;

  // memories
  logic             t_re, t_we, p_re, p_we;
  logic [CA_W-1:0]  t_addr, t_waddr;
  logic [CNT_W:0]   t_rdata, t_wdata, t_rd;
  logic [PA_W-1:0]  p_raddr, p_waddr;
  pnode_t           p_rdata, p_wdata;

  sync_ram #(.DEPTH(CONTEXTS), .WIDTH(CNT_W + 1)) u_total (
    .clk(clk), .re(t_re), .raddr(t_addr), .rdata(t_rdata),
    .we(t_we), .waddr(t_waddr), .wdata(t_wdata));

  sync_ram #(.DEPTH(CONTEXTS * 256), .WIDTH($bits(pnode_t))) u_prob (
    .clk(clk), .re(p_re), .raddr(p_raddr), .rdata(p_rdata),
    .we(p_we), .waddr(p_waddr), .wdata(p_wdata));

  logic             adv, emit, start;
  ac_event_t        ev_d;
  logic [CA_W-1:0]  ca;
  logic             fresh;
  logic [SYM_W-1:0] csym;
  logic [ORD_W-1:0] cur_ord;
  // commit of a successful byte, deferred into the next record's first
  // cycle: the COMMIT event and the total-word write
  logic             fin_pend, t_byp_q, go, win;
  logic [CA_W-1:0]  fin_ca;
  logic [CNT_W:0]   fin_tot, t_byp_d;

  assign adv   = !ev_valid || ev_ready;
  // a context is loaded (total and root read) in P_CTX, or straight from
  // P_IDLE when the next record is already waiting
  assign go    = rd_valid && (!fin_pend || adv);
  assign start = (state == P_CTX) || (state == P_IDLE && go);
  // In P_IDLE the next record's highest order is read directly.
  assign cur_ord = (state == P_IDLE) ? rd_n - 1'b1 : ord;
  assign ca    = rd_ca[cur_ord];
  assign fresh = rd_fresh[cur_ord];
  assign csym  = rd_term ? term_sym : rd_sym;
  assign t_addr = ca;
  // a total read in the cycle its deferred write happens sees the new word
  assign t_rd   = t_byp_q ? t_byp_d : t_rdata;

  // ---- node arithmetic for the current level -------------------------
  logic             inv, scl, dec, fail_now, is_root;
  logic [CNT_W-1:0] cnt_raw, cnt_h, esc_w, esc_h, top, cnt, cnt_new, inc;
  logic             prl, prr, psl, psr;
  logic [CNT_W-1:0] tn_win;
  assign tn_win = root_top + inc;

  always_comb begin
    is_root = (lvl == 4'd0);
    inc     = order_inc(ord);
    if (is_root) begin
      inv = fresh;
      scl = !fresh && t_rd[CNT_W];
    end else begin
      inv = inv_q;
      scl = scl_q;
    end
    cnt_raw = inv ? '0 : p_rdata.cnt;
    cnt_h   = scl ? (cnt_raw >> 1) : cnt_raw;
    if (is_root) begin
      esc_w = (fresh ? CNT_W'(1) : t_rd[CNT_W-1:0]) - cnt_raw;
      esc_h = ((esc_w >> 1) == '0) ? CNT_W'(1) : (esc_w >> 1);
      top   = scl ? cnt_h + esc_h : cnt_raw + esc_w;
    end else begin
      esc_w = '0;
      esc_h = '0;
      top   = top_q;
    end
    cnt = (cnt_h > top) ? top : cnt_h;
    dec = rd_term ? 1'b1 : (is_root ? 1'b0 : csym[3'(4'd8 - lvl)]);
    fail_now = dec ? (top == cnt) : (cnt == '0);
    cnt_new  = dec ? cnt : cnt + inc;
    prl = inv ? 1'b1 : p_rdata.rst_l;
    prr = inv ? 1'b1 : p_rdata.rst_r;
    psl = inv ? 1'b0 : (p_rdata.scl_l | scl);
    psr = inv ? 1'b0 : (p_rdata.scl_r | scl);
    p_wdata = '{rst_l: dec ? prl : 1'b0,
                rst_r: dec ? 1'b0 : prr,
                scl_l: dec ? psl : 1'b0,
                scl_r: dec ? 1'b0 : psr,
                cnt:   cnt_new};
  end

  // ---- memory control ---------------------------------------------------
  always_comb begin
    t_re    = start;
    t_we    = ((state == P_FIN) || fin_pend) && adv;
    t_waddr = fin_pend ? fin_ca : ca;
    t_wdata = '0;
    begin
      logic [CNT_W-1:0] tn;
      tn = root_top + inc + (failed ? CNT_W'(ESC_INC) : '0);
      t_wdata = fin_pend ? fin_tot : {tn >= CNT_W'(SCALE_LIMIT), tn};
    end
    p_re    = start || ((state == P_WALK) && adv && !rd_term && lvl != 4'd8);
    p_raddr = start ? {ca, 8'd0}
                               : {ca, (lvl == 4'd0) ? 8'd1 : {nidx[6:0], dec}};
    p_we    = (state == P_WALK) && adv && !rd_term;
    p_waddr = {ca, nidx};
  end

  // ---- event selection --------------------------------------------------
  always_comb begin
    emit = 1'b0;
    ev_d = '{kind: EV_BIT, cum0: '0, cum1: '0, dec: 1'b0};
    unique case (state)
      P_IDLE: begin
        emit = fin_pend;
        ev_d.kind = EV_COMMIT;
      end
      P_WALK: begin
        emit = !failed && !fail_now;
        ev_d = '{kind: EV_BIT, cum0: cnt, cum1: top, dec: dec};
      end
      P_FIN: begin
        emit = 1'b1;
        ev_d.kind = failed ? EV_ROLLBACK : EV_COMMIT;
      end
      P_ESC: begin
        emit = 1'b1;
        ev_d = '{kind: EV_BIT, cum0: root_cnt, cum1: root_top, dec: 1'b1};
      end
      P_ESC_CMT, P_TCMT, P_M1_CMT: begin
        emit = 1'b1;
        ev_d.kind = EV_COMMIT;
      end
      P_M1: begin
        emit = 1'b1;
        ev_d = '{kind: EV_BIT, cum0: CNT_W'(1), cum1: CNT_W'(2), dec: csym[bitpos]};
      end
      P_FLUSH: begin
        emit = 1'b1;
        ev_d.kind = EV_FLUSH;
      end
      P_END: begin
        emit = 1'b1;
        ev_d.kind = EV_END;
      end
      default: ;
    endcase
  end

  // the record is released in the cycle of its last event, so the next
  // record is on rd_* in the following cycle
  // a walk that succeeds ends the record at its last level
  assign win     = (state == P_WALK) && (lvl == 4'd8) && !rd_term && !failed && !fail_now;
  assign rd_done = adv && (win || (state == P_FIN && !failed) ||
                           (state == P_M1_CMT && !rd_term) ||
                           (state == P_END));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_valid <= 1'b0;
      ev       <= '0;
    end else if (adv) begin
      ev_valid <= emit;
      if (emit) ev <= ev_d;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= P_IDLE;
      ord      <= '0;
      lvl      <= '0;
      nidx     <= '0;
      top_q    <= '0;
      root_cnt <= '0;
      root_top <= '0;
      inv_q    <= 1'b0;
      scl_q    <= 1'b0;
      failed   <= 1'b0;
      bitpos   <= '0;
      term_sym <= '0;
      fin_pend <= 1'b0;
      fin_ca   <= '0;
      fin_tot  <= '0;
      t_byp_q  <= 1'b0;
      t_byp_d  <= '0;
    end else begin
      if (adv) fin_pend <= 1'b0;
      if (t_re) begin
        t_byp_q <= t_we && (t_waddr == t_addr);
        t_byp_d <= t_wdata;
      end
      unique case (state)
        P_IDLE: if (go) begin
          ord    <= cur_ord;
          lvl    <= '0;
          nidx   <= '0;
          failed <= 1'b0;
          state  <= P_WALK;
        end
        P_CTX: begin
          lvl    <= '0;
          nidx   <= '0;
          failed <= 1'b0;
          state  <= P_WALK;
        end
        P_WALK: if (adv) begin
          if (rd_term) begin
            state <= P_TCMT;
          end else begin
            if (is_root) begin
              root_cnt <= cnt;
              root_top <= top;
            end
            failed <= failed | fail_now;
            top_q  <= dec ? top - cnt : cnt;
            inv_q  <= dec ? prr : prl;
            scl_q  <= dec ? psr : psl;
            nidx   <= is_root ? 8'd1 : {nidx[6:0], dec};
            lvl    <= lvl + 1'b1;
            if (win) begin
              fin_pend <= 1'b1;
              fin_ca   <= ca;
              fin_tot  <= {tn_win >= CNT_W'(SCALE_LIMIT), tn_win};
              if (ord == '0) term_sym <= rd_sym;
              state    <= P_IDLE;
            end else if (lvl == 4'd8) state <= P_FIN;
          end
        end
        P_FIN: if (adv) begin
          if (failed) state <= P_ESC;
          else begin
            if (ord == '0) term_sym <= rd_sym;
            state <= P_IDLE;
          end
        end
        P_ESC: if (adv) state <= P_ESC_CMT;
        P_ESC_CMT, P_TCMT: if (adv) begin
          if (ord == '0) begin
            if (!rd_term) term_sym <= rd_sym;
            bitpos <= 3'd7;
            state  <= P_M1;
          end else begin
            ord   <= ord - 1'b1;
            state <= P_CTX;
          end
        end
        P_M1: if (adv) begin
          bitpos <= bitpos - 1'b1;
          if (bitpos == 3'd0) state <= P_M1_CMT;
        end
        P_M1_CMT: if (adv) state <= rd_term ? P_FLUSH : P_IDLE;
        P_FLUSH:  if (adv) state <= P_END;
        P_END:    if (adv) begin
          term_sym <= '0;
          state    <= P_IDLE;
        end
        default:  state <= P_IDLE;
      endcase
    end
  end

endmodule
