// tb_prob_estimator -- the probability estimator fed with context records
// from the reference context search, its events checked decision by
// decision against the reference model.
//
// The events of a block are collected; decisions between a ROLLBACK and
// the COMMIT before it are dropped, as the coder would.  The remaining
// decisions are replayed into the reference decoder in place of an
// arithmetic decoder: at every decision the decoder works out the left and
// total weights it expects and the event must carry exactly those, and its
// direction is what the decoder follows.  The block must come out as it
// went in, followed by FLUSH and END.  Blocks cover small and large
// alphabets, maximum orders 0..4, a long two-letter block that drives a
// context over the scaling limit, and a coder that stalls at random.  With
// no stalls, a byte found in its first context must take 10 cycles or
// fewer (1 to load the context while the previous byte commits, 9 for the
// walk).
module tb_prob_estimator;
  import ppmh_pkg::*;
  import ppmh_ref_pkg::*;

  localparam int C = 64;
  localparam int N = MAX_ORDER + 1;

  class ev_replay extends ac_decoder;
    ac_event_t evs[$];
    int bad;
    function new(ac_event_t e[$], byte unsigned none[$]);
      super.new(none);
      evs = e;
      bad = 0;
    endfunction
    virtual function int decode(int cum0, int cum1);
      ac_event_t e;
      if (evs.size() == 0) begin bad++; return 1; end
      e = evs.pop_front();
      if (e.kind != EV_BIT || int'(e.cum0) != cum0 || int'(e.cum1) != cum1) begin
        bad++;
        if (bad < 5) $display("FAIL decision (%0d left): got (%0d,%0d) kind %0d want (%0d,%0d)", evs.size(),
                              e.cum0, e.cum1, e.kind, cum0, cum1);
      end
      return int'(e.dec);
    endfunction
  endclass

  logic clk = 0, rst_n = 0;
  logic rd_valid = 0, rd_term = 0, rd_done, ev_valid, ev_ready = 0;
  logic [ORD_W-1:0] rd_n = 0;
  logic [5:0] rd_ca [N];
  logic [N-1:0] rd_fresh = 0;
  logic [7:0] rd_sym = 0;
  ac_event_t ev;
  int checks = 0, failures = 0;
  int n_rb = 0, n_stall = 0, n_fast = 0, n_scl = 0;
  bit rd_done_seen = 0;

  prob_estimator #(.CONTEXTS(C)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event collector: committed decisions of the current block
  ac_event_t committed[$], group[$];
  bit blk_end = 0, saw_flush = 0, stall_mode = 0;
  int ev_since = 0, bits_since = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      ev_ready <= stall_mode ? ($urandom_range(0, 2) != 0) : 1'b1;
    end
  end

  always @(posedge clk) begin
    if (ev_valid && ev_ready) begin
      ev_since++;
      unique case (ev.kind)
        EV_BIT:      begin group.push_back(ev); bits_since++; end
        EV_COMMIT:   begin foreach (group[i]) committed.push_back(group[i]); group = {}; end
        EV_ROLLBACK: begin group = {}; n_rb++; end
        EV_FLUSH:    saw_flush = 1;
        EV_END:      blk_end = 1;
        default: ;
      endcase
    end
    if (ev_valid && !ev_ready) n_stall++;
  end

  task automatic run_block(int syms[$], int mo);
    ppmh_decoder enc, dec;
    ev_replay rp;
    int cas[$], out[$], cyc;
    byte unsigned no_bytes[$];
    bit fr[$];
    enc = new(C, 3, mo);
    dec = new(C, 3, mo);
    committed = {}; group = {}; blk_end = 0; saw_flush = 0;
    for (int i = 0; i <= syms.size(); i++) begin
      bit eob;
      eob = (i == syms.size());
      enc.find_contexts(cas, fr);
      if (!eob) enc.push_hist(syms[i]);
      rd_valid = 1;
      rd_n = ORD_W'(cas.size());
      for (int j = 0; j < N; j++) begin
        rd_ca[j] = (j < cas.size()) ? 6'(cas[j]) : 6'($urandom);
        rd_fresh[j] = (j < cas.size()) ? fr[j] : 1'($urandom);
      end
      rd_sym = eob ? 8'($urandom) : 8'(syms[i]);
      rd_term = eob;
      ev_since = 0; bits_since = 0; cyc = 0;
      do begin @(negedge clk); cyc++; end while (!rd_done_seen);
      rd_done_seen = 0;
      if (!stall_mode && !eob && ev_since == 10 && bits_since == 9) begin
        n_fast++;
        checks++;
        if (cyc > 10) begin failures++; $display("FAIL %0d cycles for a first-context byte", cyc); end
      end
    end
    rd_valid = 0;
    while (!blk_end) @(negedge clk);
    rp = new(committed, no_bytes);
    dec.decode_with(rp, out);
    n_scl += dec.n_scales;
    checks++;
    if (out.size() != syms.size()) failures++;
    foreach (syms[i]) begin
      checks++;
      if (i >= out.size() || out[i] != syms[i]) begin
        failures++;
        if (failures < 10) $display("FAIL symbol %0d", i);
      end
    end
    checks++;
    if (rp.bad != 0 || !saw_flush || group.size() != 0) begin
      failures++;
      $display("FAIL block end: bad %0d flush %0d", rp.bad, saw_flush);
    end
  endtask

  always @(posedge clk) if (rst_n && rd_done) rd_done_seen <= 1;

  initial begin
    int syms[$];
    int n_esc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int b = 0; b < 12; b++) begin
      int alpha, len, mo;
      stall_mode = (b % 2 == 1);
      mo = b % 5;
      alpha = (b % 3 == 0) ? 5 : (b % 3 == 1 ? 30 : 256);
      len = $urandom_range(50, 400);
      syms = {};
      for (int i = 0; i < len; i++) syms.push_back($urandom_range(0, alpha - 1));
      run_block(syms, mo);
    end
    // long two-letter block: a context crosses the scaling limit
    syms = {};
    for (int i = 0; i < 3000; i++) syms.push_back(($urandom_range(0, 9) == 0) ? 98 : 97);
    stall_mode = 0;
    run_block(syms, 1);
    $display("rollbacks %0d, coder stalls %0d, first-context bytes timed %0d, halvings %0d",
             n_rb, n_stall, n_fast, n_scl);
    checks++;
    if (n_rb == 0 || n_stall == 0 || n_fast == 0 || n_scl == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
