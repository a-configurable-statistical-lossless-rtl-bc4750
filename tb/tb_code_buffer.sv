// tb_code_buffer -- shift ops from a behavioural range/low coder (random
// decisions, so carries arrive where a real coder makes them), with COMMIT
// and ROLLBACK groups, a FLUSH and END.  The expected bit string is built
// from the ops directly (a carry adds one at the last bit written).  The
// code items are expanded (head bit, run, literals in order) into a second
// string, which a rollback item returns to its last commit item.  At END
// both strings must be equal.  out_ready is toggled at random; the run of
// pending ones must reach lengths beyond what one op can hold.
module tb_code_buffer;
  import ppmh_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  cb_op_t in_op = '0;
  code_item_t out_item;
  int checks = 0, failures = 0, n_carry = 0, n_rb = 0, max_run = 0;
  bit exp_b[$], exp_s[$], got_b[$], got_s[$];
  bit got_end = 0;

  code_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      if (out_item.head_v) got_b.push_back(out_item.head);
      for (int j = 0; j < int'(out_item.run_len); j++) got_b.push_back(out_item.run_bit);
      if (int'(out_item.run_len) > max_run) max_run = int'(out_item.run_len);
      for (int j = int'(out_item.lit_n) - 1; j >= 0; j--) got_b.push_back(out_item.lits[j]);
      unique case (out_item.kind)
        EV_COMMIT:   got_s = got_b;
        EV_ROLLBACK: got_b = got_s;
        EV_END:      got_end = 1;
        default: ;
      endcase
    end
  end
  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  task automatic send(cb_op_t op);
    in_valid = 1; in_op = op;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 0;
  endtask

  function automatic void apply(cb_op_t op);
    if (op.carry) begin
      int i;
      i = exp_b.size() - 1;
      while (i >= 0 && exp_b[i]) begin exp_b[i] = 0; i--; end
      if (i >= 0) exp_b[i] = 1;
    end
    for (int j = 0; j < int'(op.k); j++) exp_b.push_back(op.bits[6 - j]);
  endfunction

  initial begin
    int R, L, Rs, Ls;
    cb_op_t op;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    R = 127; L = 0; Rs = R; Ls = L;
    for (int g = 0; g < 1500; g++) begin
      int n;
      n = $urandom_range(1, 10);
      for (int i = 0; i < n; i++) begin
        int q, rl, k;
        bit d;
        // decisions skewed towards the upper part so that runs of ones and
        // carries are frequent
        q = (g % 200 < 100) ? $urandom_range(1, 8) : $urandom_range(1, 63);
        d = ($urandom_range(0, 127) >= q);
        rl = q;
        if (d) begin L = L + rl; R = R - rl; end
        else R = rl;
        k = 0;
        while (R < 64) begin R = R * 2; k++; end
        op.kind = EV_BIT;
        op.carry = L[7];
        op.k = 3'(k);
        op.bits = 7'(L);
        L = (L & 127) << k & 127;
        if (k != 0) begin
          if (op.carry) n_carry++;
          apply(op);
          send(op);
        end else L = L | (op.carry << 7);
      end
      op = '0;
      if ($urandom_range(0, 4) == 0) begin
        op.kind = EV_ROLLBACK; R = Rs; L = Ls; exp_b = exp_s; n_rb++;
      end else begin
        op.kind = EV_COMMIT; Rs = R; Ls = L; exp_s = exp_b;
      end
      send(op);
    end
    op = '{kind: EV_BIT, carry: L[7], k: 3'd7, bits: 7'(L)};
    apply(op);
    send(op);
    op = '0; op.kind = EV_END;
    send(op);
    while (!got_end) @(negedge clk);
    checks++;
    if (got_b.size() != exp_b.size()) begin
      failures++;
      $display("FAIL length %0d want %0d", got_b.size(), exp_b.size());
    end
    foreach (exp_b[i]) begin
      checks++;
      if (i >= got_b.size() || got_b[i] != exp_b[i]) begin
        failures++;
        if (failures < 5) $display("FAIL bit %0d", i);
      end
    end
    $display("bits %0d, carries %0d, rollbacks %0d, longest run %0d", exp_b.size(), n_carry, n_rb, max_run);
    checks++;
    if (n_carry == 0 || n_rb == 0 || max_run < 7) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
