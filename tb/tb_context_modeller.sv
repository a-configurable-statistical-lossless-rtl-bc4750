// tb_context_modeller -- two context modellers.
//
// Instance 0 keeps the full size (1024 context areas, 1312 tree nodes) and
// runs the string "aaacaaaccab" with maximum order 4 and an end of block.
// The context areas pushed for each byte are checked against a worked
// example of the tree growing: areas are handed out in the order contexts
// are first seen, a known context is pushed plain, a new one is pushed
// once, as the highest order, marked fresh.
//
// Instance 1 is small (64 areas, 96 tree nodes) so that probe chains, the
// search limit and running out of areas all happen.  It runs random blocks
// at random maximum orders against the reference context search of
// ppmh_ref_pkg.  The double-buffer ready is toggled at random.  Checks the
// cycle count per byte: 2 for the root, 2 per probe, 1 to close.
module tb_context_modeller;
  import ppmh_pkg::*;
  import ppmh_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [ORD_W-1:0] max_order [2];
  logic in_valid [2], in_ready [2], in_eob [2], buf_ready [2];
  logic [7:0] in_data [2], fin_sym [2];
  logic push_valid [2], push_fresh [2], fin [2], fin_term [2];
  logic [9:0] push_ca [2];
  logic [5:0] ca_small;
  int checks = 0, failures = 0;
  int n_probe = 0, n_limit = 0, n_full = 0, n_alloc = 0, n_wait = 0;

  assign push_ca[1] = 10'(ca_small);

  context_modeller u0 (
    .clk, .rst_n, .max_order(max_order[0]), .in_valid(in_valid[0]), .in_ready(in_ready[0]),
    .in_data(in_data[0]), .in_eob(in_eob[0]), .buf_ready(buf_ready[0]),
    .push_valid(push_valid[0]), .push_ca(push_ca[0]), .push_fresh(push_fresh[0]),
    .fin(fin[0]), .fin_sym(fin_sym[0]), .fin_term(fin_term[0]));

  context_modeller #(.CONTEXTS(64), .LINES(3)) u1 (
    .clk, .rst_n, .max_order(max_order[1]), .in_valid(in_valid[1]), .in_ready(in_ready[1]),
    .in_data(in_data[1]), .in_eob(in_eob[1]), .buf_ready(buf_ready[1]),
    .push_valid(push_valid[1]), .push_ca(ca_small), .push_fresh(push_fresh[1]),
    .fin(fin[1]), .fin_sym(fin_sym[1]), .fin_term(fin_term[1]));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send one byte (or end of block) to instance d and collect its record:
  // the pushed areas with fresh flags, and the cycles from take to close.
  task automatic send(input int d, input int s, input bit eob, input bit rnd_ready,
                      output int cas[$], output bit fr[$], output int cycles);
    bit taken;
    cas = {}; fr = {}; taken = 0; cycles = 0;
    forever begin
      buf_ready[d] = rnd_ready ? ($urandom_range(0, 3) != 0) : 1'b1;
      in_valid[d] = !taken; in_data[d] = 8'(s); in_eob[d] = eob;
      #1;
      if (!taken && in_valid[d] && !in_ready[d]) n_wait++;
      if (in_valid[d] && in_ready[d]) taken = 1;
      if (taken) cycles++;
      if (push_valid[d]) begin cas.push_back(int'(push_ca[d])); fr.push_back(push_fresh[d]); end
      if (fin[d]) begin
        checks++;
        if (fin_sym[d] != 8'(s) && !eob || fin_term[d] != eob) begin
          failures++; $display("FAIL fin sym/term");
        end
        @(negedge clk);
        in_valid[d] = 0;
        break;
      end
      @(negedge clk);
    end
  endtask

  function automatic string show(int cas[$], bit fr[$]);
    string t = "[";
    foreach (cas[i]) begin
      t = {t, $sformatf("%0d", cas[i])};
      if (fr[i]) t = {t, "f"};
      t = {t, " "};
    end
    return {t, "]"};
  endfunction

  initial begin
    int cas[$], ecas[$], cyc, probes;
    bit fr[$], efr[$];
    string str = "aaacaaaccab";
    // expected areas per byte, highest-order entry marked fresh with 'f'
    string exp_s [12] = '{"0f", "0 1f", "0 1 2f", "0 1 2 3f", "0 4f", "0 1 5f",
                          "0 1 2 6f", "0 1 2 3 7f", "0 4 8f", "0 4 9f", "0 1 5 10f", "0 11f"};
    ppmh_decoder m;

    for (int d = 0; d < 2; d++) begin
      in_valid[d] = 0; in_data[d] = 0; in_eob[d] = 0; buf_ready[d] = 0; max_order[d] = 3'd4;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // worked example
    for (int i = 0; i <= str.len(); i++) begin
      string got, want;
      if (i < str.len()) send(0, str[i], 0, 0, cas, fr, cyc);
      else               send(0, 0, 1, 0, cas, fr, cyc);
      got = show(cas, fr);
      want = {"[", exp_s[i], " ]"};
      checks++;
      if (got != want) begin
        failures++;
        $display("FAIL example byte %0d: got %s want %s", i, got, want);
      end
      checks++;
      if (cyc < 2 * (cas.size() - 1) + 2 || cyc > 2 + 2 * SEARCH_LIMIT * 4 || cyc % 2 != 0) begin
        failures++;
        $display("FAIL example byte %0d: %0d cycles", i, cyc);
      end
    end

    // random blocks on the small instance
    m = new(64, 3, 4);
    for (int blk = 0; blk < 40; blk++) begin
      int len, alpha, mo;
      mo = $urandom_range(0, 4);
      max_order[1] = 3'(mo);
      m.max_order = mo;
      len = $urandom_range(1, 120);
      alpha = (blk % 3 == 0) ? 4 : (blk % 3 == 1 ? 16 : 256);
      for (int i = 0; i <= len; i++) begin
        int s;
        bit eob;
        eob = (i == len);
        s = eob ? 0 : $urandom_range(0, alpha - 1);
        probes = m.n_probe_miss; 
        m.find_contexts(ecas, efr);
        if (m.n_probe_miss != probes) n_limit++;
        if (eob) m.reset_block(); else m.push_hist(s);
        send(1, s, eob, 1, cas, fr, cyc);
        checks++;
        if (show(cas, fr) != show(ecas, efr)) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d byte %0d: got %s want %s", blk, i, show(cas, fr), show(ecas, efr));
        end
        foreach (fr[j]) if (j > 0 && fr[j]) n_alloc++;
        // 2 cycles per probe plus the root and the close
        checks++;
        if (cyc < 2 * (cas.size() - 1) + 2 || cyc > 2 + 2 * SEARCH_LIMIT * 4 || cyc % 2 != 0) begin
          failures++;
          $display("FAIL block %0d byte %0d: %0d cycles for %0d areas", blk, i, cyc, cas.size());
        end
        if (cyc > 2 * (cas.size() - 1) + 2 + (fr[fr.size()-1] && cas.size() > 1 ? 0 : 2)) n_probe++;
      end
    end
    n_full = m.n_full;
    $display("allocations %0d, probe chains %0d, search limit hits %0d, area-full %0d, stalls %0d",
             n_alloc, n_probe, n_limit, n_full, n_wait);
    checks++;
    if (n_alloc == 0 || n_probe == 0 || n_limit == 0 || n_full == 0 || n_wait == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
