// ppmh_ref_pkg -- behavioural reference models used by the testbenches.
//
// ac_decoder decodes the byte stream of the arithmetic coder: it keeps the
// range R and the distance D of the code value above the interval's low
// end, splits R with the less-probable-symbol probability computed here
// from its definition (round(128*l/t) on the quantised, normalised counts,
// clamped to 1..63) and renormalises bit by bit.  If the hardware coder
// produced a wrong bit anywhere, the decoded decisions diverge.
//
// ppmh_decoder decodes a whole compressed block: it rebuilds the context
// tree with its own copy of the search rules, keeps the probability nodes
// with the same lazy reset/halving rules, decodes each byte from the
// highest order down and stops at the termination sequence.
package ppmh_ref_pkg;

  function automatic int ref_qe(input int cum0, input int cum1, output bit lps_left);
    int t, m, r, l, ti, li, tm, lm, q;
    t = cum1; m = cum0;
    while (t < 512) begin t = t * 2; m = m * 2; end
    r = t - m;
    lps_left = (m < r);
    l = lps_left ? m : r;
    if (l == 0) return 0;
    ti = (t / 32) % 16;
    li = (l / 16) % 32;
    tm = 512 + 32 * ti + 16;
    lm = 16 * li + 8;
    q = (lm * 128 + tm / 2) / tm;
    if (q < 1) q = 1;
    if (q > 63) q = 63;
    return q;
  endfunction

  class ac_decoder;
    byte unsigned bytes[$];
    int pos;
    int R, D;

    function new(byte unsigned b[$]);
      bytes = b;
      pos = 0;
      R = 127;
      D = 0;
      for (int i = 0; i < 7; i++) D = D * 2 + next_bit();
    endfunction

    function int next_bit();
      int b;
      if (pos / 8 < bytes.size()) b = (bytes[pos / 8] >> (7 - pos % 8)) & 1;
      else b = 0;
      pos++;
      return b;
    endfunction

    virtual function int decode(int cum0, int cum1);
      bit ll; int q, rl, b;
      q  = ref_qe(cum0, cum1, ll);
      rl = ll ? q : R - q;
      if (D < rl) begin b = 0; R = rl; end
      else begin b = 1; D = D - rl; R = R - rl; end
      while (R < 64) begin R = R * 2; D = D * 2 + next_bit(); end
      return b;
    endfunction
  endclass

  // ---------------------------------------------------------------------
  // Whole-block decoder
  // ---------------------------------------------------------------------
  class ppmh_decoder;
    int contexts, nodes, max_order;
    // context tree
    int t_ca[], t_pre[], t_sym[];
    bit t_busy[];
    int next_area;
    bit root_used;
    int hist[5];
    int nseen;
    // probability state
    int p_cnt[int];
    bit p_rl[int], p_rr[int], p_sl[int], p_sr[int];
    int tot[int];
    bit tsc[int];
    int term_sym;
    // statistics
    int n_escapes, n_fresh, n_m1, n_scales, n_probe_miss, n_full;

    function new(int contexts_, int lines, int max_order_);
      contexts = contexts_;
      nodes = lines * 32;
      max_order = max_order_;
      t_ca = new[nodes]; t_pre = new[nodes]; t_sym = new[nodes]; t_busy = new[nodes];
      reset_block();
    endfunction

    function void reset_block();
      foreach (t_busy[i]) t_busy[i] = 0;
      next_area = 1; root_used = 0; nseen = 0;
      foreach (hist[i]) hist[i] = 0;
      term_sym = 0;
    endfunction

    function int hsh(int s, int pre);
      return ((s * 4) ^ pre) % contexts % nodes;
    endfunction

    // context areas for the next position, order 0 first; fresh flags
    function void find_contexts(output int cas[$], output bit fr[$]);
      int lim, pre, idx;
      cas = {}; fr = {};
      cas.push_back(0); fr.push_back(!root_used); root_used = 1;
      lim = (max_order < nseen) ? max_order : nseen;
      pre = 0;
      for (int k = 1; k <= lim; k++) begin
        bit found, stop;
        found = 0; stop = 0;
        idx = hsh(hist[k], pre);
        for (int p = 0; p < 10; p++) begin
          if (t_busy[idx] && t_pre[idx] == pre && t_sym[idx] == hist[k]) begin
            found = 1; break;
          end else if (!t_busy[idx]) begin
            if (next_area < contexts) begin
              t_busy[idx] = 1; t_ca[idx] = next_area; t_pre[idx] = pre; t_sym[idx] = hist[k];
              cas.push_back(next_area); fr.push_back(1); next_area++;
            end else n_full++;
            stop = 1; break;
          end
          idx = (idx + 1) % nodes;
          if (p == 9) begin n_probe_miss++; stop = 1; end
        end
        if (stop || !found) break;
        cas.push_back(t_ca[idx]); fr.push_back(0);
        pre = t_ca[idx];
      end
    endfunction

    function void push_hist(int s);
      for (int i = 4; i > 1; i--) hist[i] = hist[i-1];
      hist[1] = s;
      if (nseen < 4) nseen++;
    endfunction

    // view of a node on a walk: inv/scl come from the parent
    function void view(int ca, int n, bit inv, bit scl, int top_in, bit fresh,
                       output int cnt, output int top,
                       output bit prl, output bit prr, output bit psl, output bit psr);
      int key, raw, h, T, esc, eh;
      key = ca * 256 + n;
      if (!p_cnt.exists(key)) begin p_cnt[key] = 0; p_rl[key] = 0; p_rr[key] = 0; p_sl[key] = 0; p_sr[key] = 0; end
      if (n == 0) begin
        inv = fresh;
        scl = !fresh && tsc.exists(ca) && tsc[ca];
        T = fresh ? 1 : tot[ca];
      end
      raw = inv ? 0 : p_cnt[key];
      h = scl ? raw / 2 : raw;
      if (n == 0) begin
        esc = T - raw;
        eh = (esc / 2 == 0) ? 1 : esc / 2;
        top = scl ? h + eh : T;
      end else top = top_in;
      cnt = (h > top) ? top : h;
      prl = inv ? 1 : p_rl[key];
      prr = inv ? 1 : p_rr[key];
      psl = inv ? 0 : (p_sl[key] | scl);
      psr = inv ? 0 : (p_sr[key] | scl);
    endfunction

    // root counts of a context without changing it
    function void root_of(int ca, bit fresh, output int cnt, output int top);
      bit a, b, c, d;
      view(ca, 0, 0, 0, 0, fresh, cnt, top, a, b, c, d);
    endfunction

    // add symbol s to context ca (order ord); failed = the symbol escaped
    function void update(int ca, bit fresh, int ord, int s, bit failed);
      int n, top, cnt, inc, key, rtop;
      bit inv, scl, prl, prr, psl, psr, dec;
      inc = ord + 1;
      n = 0; inv = 0; scl = 0; top = 0;
      for (int lvl = 0; lvl <= 8; lvl++) begin
        view(ca, n, inv, scl, top, fresh, cnt, top, prl, prr, psl, psr);
        if (lvl == 0) begin
          rtop = top;
          if (!fresh && tsc.exists(ca) && tsc[ca]) n_scales++;
        end
        dec = (lvl == 0) ? 0 : ((s >> (8 - lvl)) & 1);
        key = ca * 256 + n;
        p_cnt[key] = dec ? cnt : cnt + inc;
        p_rl[key] = dec ? prl : 0;  p_rr[key] = dec ? 0 : prr;
        p_sl[key] = dec ? psl : 0;  p_sr[key] = dec ? 0 : psr;
        inv = dec ? prr : prl;
        scl = dec ? psr : psl;
        top = dec ? top - cnt : cnt;
        n = (lvl == 0) ? 1 : n * 2 + dec;
      end
      tot[ca] = rtop + inc + (failed ? 1 : 0);
      tsc[ca] = tot[ca] >= 1008;
    endfunction

    // try to decode a symbol in context ca; returns -1 on escape
    function int decode_in(ac_decoder ac, int ca, bit fresh);
      int n, top, cnt, s;
      bit inv, scl, prl, prr, psl, psr, b;
      n = 0; inv = 0; scl = 0; top = 0; s = 0;
      for (int lvl = 0; lvl <= 8; lvl++) begin
        view(ca, n, inv, scl, top, fresh, cnt, top, prl, prr, psl, psr);
        b = ac.decode(cnt, top);
        if (lvl == 0 && b) return -1;
        if (lvl > 0) s = s * 2 + b;
        inv = b ? prr : prl;
        scl = b ? psr : psl;
        top = b ? top - cnt : cnt;
        n = (lvl == 0) ? 1 : n * 2 + b;
      end
      return s;
    endfunction

    // decode one block; returns the symbols
    function void decode_block(byte unsigned code[$], output int syms[$]);
      ac_decoder ac;
      ac = new(code);
      decode_with(ac, syms);
    endfunction

    // decode one block from any source of decisions
    function void decode_with(ac_decoder ac, output int syms[$]);
      int cas[$]; bit fr[$];
      int s, o;
      syms = {};
      forever begin
        find_contexts(cas, fr);
        s = -1;
        for (o = cas.size() - 1; o >= 0; o--) begin
          s = decode_in(ac, cas[o], fr[o]);
          if (s >= 0) break;
          n_escapes++;
          if (fr[o]) n_fresh++;
        end
        if (s < 0) begin
          s = 0;
          for (int i = 0; i < 8; i++) s = s * 2 + ac.decode(1, 2);
          n_m1++;
          if (sym_in_order0(s, fr[0])) break;   // termination sequence
          o = -1;
        end
        // update every order that was visited
        for (int u = cas.size() - 1; u >= 0 && u >= o; u--)
          update(cas[u], fr[u], u, s, u != o);
        if (o <= 0) term_sym = s;
        syms.push_back(s);
        push_hist(s);
        if (syms.size() > 1000000) break;
      end
      reset_block();
    endfunction

    // probability of s in order 0 is non-zero
    function bit sym_in_order0(int s, bit fresh);
      int n, top, cnt;
      bit inv, scl, prl, prr, psl, psr, b;
      if (fresh) return 0;
      n = 0; inv = 0; scl = 0; top = 0;
      for (int lvl = 0; lvl <= 8; lvl++) begin
        view(0, n, inv, scl, top, 0, cnt, top, prl, prr, psl, psr);
        b = (lvl == 0) ? 0 : ((s >> (8 - lvl)) & 1);
        if (b ? (top == cnt) : (cnt == 0)) return 0;
        inv = b ? prr : prl;
        scl = b ? psr : psl;
        top = b ? top - cnt : cnt;
        n = (lvl == 0) ? 1 : n * 2 + b;
      end
      return 1;
    endfunction
  endclass

endpackage
