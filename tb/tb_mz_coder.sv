// tb_mz_coder -- random binary decisions (LPS probability 1..63/128 on
// either side, and certain decisions whose other branch is empty), grouped
// by COMMIT and ROLLBACK, then FLUSH.  The shift ops that come out are
// turned into a bit string here (a carry adds one at the last bit written;
// a rollback returns the string to the last commit), and the string is
// decoded with an interval decoder that knows only the coding rule: the
// committed decisions must come back.  Also checks that with no stalls the coder takes one event per cycle.
module tb_mz_coder;
  import ppmh_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_dec = 0, in_lps_left = 0, in_zero = 0, out_valid, out_ready = 1;
  ev_kind_t in_kind = EV_BIT;
  logic [6:0] in_qe = 0;
  cb_op_t out_op;
  int checks = 0, failures = 0, n_carry = 0, n_rb = 0, n_stall = 0;
  bit bits[$], bits_s[$];
  bit stall_mode = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  typedef struct { bit dec, ll, zero; int q; } dcs_t;
  dcs_t group[$], comm[$];

  mz_coder dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // op collector
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      unique case (out_op.kind)
        EV_BIT: begin
          if (out_op.carry) begin
            int i;
            n_carry++;
            i = bits.size() - 1;
            while (i >= 0 && bits[i]) begin bits[i] = 0; i--; end
            if (i >= 0) bits[i] = 1;
            else begin failures++; $display("FAIL carry out of the code"); end
          end
          for (int j = 0; j < int'(out_op.k); j++) bits.push_back(out_op.bits[6 - j]);
        end
        EV_COMMIT:   bits_s = bits;
        EV_ROLLBACK: bits = bits_s;
        default: ;
      endcase
    end
    if (out_valid && !out_ready) n_stall++;
  end
  always @(negedge clk) out_ready <= stall_mode ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic send(ev_kind_t kd, dcs_t d);
    in_valid = 1; in_kind = kd; in_dec = d.dec; in_lps_left = d.ll; in_zero = d.zero;
    in_qe = 7'(d.q);
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 0;
  endtask

  function automatic dcs_t rnd_dcs();
    dcs_t d;
    d.zero = ($urandom_range(0, 15) == 0);
    d.ll = $urandom_range(0, 1);
    d.q = $urandom_range(1, 63);
    if (d.zero) d.dec = d.ll;           // the empty branch is never taken
    else d.dec = ($urandom_range(0, 127) < d.q) ? d.ll : !d.ll;
    return d;
  endfunction

  initial begin
    dcs_t d;
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // rate: 200 decisions, no stalls
    t0 = cycle;
    for (int i = 0; i < 200; i++) begin
      d = rnd_dcs(); comm.push_back(d); send(EV_BIT, d);
    end
    checks++;
    if (cycle - t0 != 200) begin failures++; $display("FAIL rate: %0d cycles", cycle - t0); end
    d = rnd_dcs();
    send(EV_COMMIT, d);
    stall_mode = 1;
    for (int g = 0; g < 600; g++) begin
      int n;
      n = $urandom_range(1, 12);
      group = {};
      for (int i = 0; i < n; i++) begin d = rnd_dcs(); group.push_back(d); send(EV_BIT, d); end
      if ($urandom_range(0, 3) == 0) begin send(EV_ROLLBACK, d); n_rb++; end
      else begin foreach (group[i]) comm.push_back(group[i]); send(EV_COMMIT, d); end
    end
    send(EV_FLUSH, d);
    send(EV_END, d);
    repeat (5) @(negedge clk);
    // decode
    begin
      int R, D, pos, rl, q, b;
      R = 127; D = 0; pos = 0;
      for (int i = 0; i < 7; i++) begin D = D * 2 + (pos < bits.size() ? bits[pos] : 0); pos++; end
      foreach (comm[i]) begin
        q = comm[i].zero ? 0 : comm[i].q;
        rl = comm[i].ll ? q : R - q;
        if (D < rl) begin b = 0; R = rl; end
        else begin b = 1; D = D - rl; R = R - rl; end
        while (R < 64) begin R = R * 2; D = D * 2 + (pos < bits.size() ? bits[pos] : 0); pos++; end
        checks++;
        if (b != comm[i].dec) begin
          failures++;
          if (failures < 5) $display("FAIL decision %0d", i);
        end
      end
    end
    $display("code bits %0d, carries %0d, rollbacks %0d, stalls %0d", bits.size(), n_carry, n_rb, n_stall);
    checks++;
    if (n_carry == 0 || n_rb == 0 || n_stall == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
