// tb_byacom_core -- end-to-end test of the compression core at its default
// (1024-context) configuration.
//
// Several blocks are compressed one after another: repetitive text-like
// data of 256, 1024 and 4096 bytes at maximum order 3, a 1024-byte block at
// order 0 and one at order 4, random bytes, and a long run of one byte.
// Each block ends with an end-of-block word; the bytes that come out
// before blk_done are decoded by the reference decoder
// (ppmh_ref_pkg::ppmh_decoder), which must return the input exactly and
// stop at the termination sequence.  The output is stalled at random.
// The test counts how often each mechanism of the design happened (escape,
// order -1, fresh context, rollback with bits to discard, lazy halving,
// probe limit, context areas used up, modeller waiting on the double
// buffer, coder back-pressure) and fails if any never did.  It also reports
// cycles per input bit.
module tb_byacom_core;
  import ppmh_pkg::*;
  import ppmh_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [2:0] max_order = 3'd3;
  logic in_valid = 0, in_ready, in_eob = 0;
  logic [7:0] in_data = 0;
  logic out_valid, out_ready = 1, blk_done;
  logic [7:0] out_data;
  int checks = 0, failures = 0;

  byacom_core dut (.*);

  always #5 clk = ~clk;

  byte unsigned code[$];
  always @(posedge clk) if (rst_n && out_valid && out_ready) code.push_back(out_data);

  int n_done = 0;
  always @(posedge clk) if (rst_n && blk_done) n_done++;

  // mechanism counters
  int m_escape = 0, m_m1 = 0, m_fresh = 0, m_rb_bits = 0, m_scale = 0, m_probe = 0,
      m_full = 0, m_dbuf_wait = 0, m_ac_stall = 0, m_out_stall = 0;
  bit spec_bits = 0;
  always @(posedge clk) begin
    if (dut.u_pe.state == dut.u_pe.P_ESC && dut.u_pe.adv) m_escape++;
    if (dut.u_pe.state == dut.u_pe.P_M1_CMT && dut.u_pe.adv) m_m1++;
    if (dut.u_cm.push_valid && dut.u_cm.push_fresh) m_fresh++;
    if (dut.u_ac.u_pk.push) spec_bits <= 1;
    if (dut.u_ac.u_pk.commit) spec_bits <= 0;
    if (dut.u_ac.u_pk.rollback && spec_bits) m_rb_bits++;
    if (dut.u_pe.state == dut.u_pe.P_WALK && dut.u_pe.lvl == 0 && dut.u_pe.adv &&
        !dut.u_pe.rd_term && dut.u_pe.scl) m_scale++;
    if (dut.u_cm.state == dut.u_cm.S_CMP && dut.u_cm.busy && !dut.u_cm.match &&
        32'(dut.u_cm.probe) == SEARCH_LIMIT - 1) m_probe++;
    if (dut.u_cm.state == dut.u_cm.S_CMP && !dut.u_cm.busy && !dut.u_cm.can_alloc) m_full++;
    if (dut.u_cm.state == dut.u_cm.S_IDLE && dut.u_cm.in_valid && !dut.u_cm.buf_ready) m_dbuf_wait++;
    if (dut.u_pe.ev_valid && !dut.u_pe.ev_ready) m_ac_stall++;
    if (out_valid && !out_ready) m_out_stall++;
  end

  ppmh_decoder refdec;
  longint total_in_bits = 0, total_cycles = 0;

  task automatic run_block(int data[$], int order, string name);
    int got[$];
    longint t0, t1;
    byte unsigned blk[$];
    code = {};
    max_order = 3'(order);
    refdec.max_order = order;
    @(negedge clk);
    t0 = $time / 10;
    for (int i = 0; i <= data.size(); i++) begin
      bit r;
      in_valid = 1;
      in_eob   = (i == data.size());
      in_data  = in_eob ? 8'd0 : 8'(data[i]);
      forever begin
        r = in_ready;
        @(posedge clk);
        @(negedge clk);
        if (r) break;
      end
      in_valid = 0;
      in_eob = 0;
    end
    wait (n_done > 0);
    t1 = $time / 10;
    n_done = 0;
    repeat (50) @(negedge clk);
    wait (!out_valid);
    repeat (5) @(negedge clk);
    blk = code;
    refdec.decode_block(blk, got);
    checks++;
    if (got.size() != data.size()) begin
      failures++;
      $display("FAIL %s: decoded %0d bytes, sent %0d", name, got.size(), data.size());
    end
    for (int i = 0; i < data.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != data[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s byte %0d: got %0d want %0d", name, i, got[i], data[i]);
      end
    end
    total_in_bits += 8 * data.size();
    total_cycles  += t1 - t0;
    $display("%-12s order %0d: %5d bytes -> %5d bytes (ratio %0.3f), %0.2f cycles/bit",
             name, order, data.size(), blk.size(), real'(blk.size()) / data.size(),
             real'(t1 - t0) / (8.0 * data.size()));
  endtask

  function automatic void text(int n, output int d[$]);
    string words[12] = '{"the ", "compression ", "of ", "data ", "and ", "context ",
                         "model ", "arithmetic ", "coding ", "tree ", "symbol ", "order "};
    d = {};
    while (d.size() < n) begin
      string w;
      w = words[$urandom_range(0, 11)];
      for (int i = 0; i < w.len() && d.size() < n; i++) d.push_back(int'(w[i]));
    end
  endfunction

  initial begin
    #400000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random output stalls
  initial begin
    forever begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 7) != 0);
    end
  end

  initial begin
    int d[$];
    refdec = new(1024, 41, 3);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    text(256, d);   run_block(d, 3, "text256");
    text(1024, d);  run_block(d, 3, "text1024");
    text(4096, d);  run_block(d, 3, "text4096");
    text(1024, d);  run_block(d, 0, "text1024");
    text(1024, d);  run_block(d, 4, "text1024");
    d = {}; for (int i = 0; i < 3000; i++) d.push_back($urandom_range(0, 255));
    run_block(d, 3, "random3000");
    d = {}; for (int i = 0; i < 2000; i++) d.push_back(65);
    run_block(d, 3, "run2000");
    $display("average %0.2f cycles/bit", real'(total_cycles) / total_in_bits);
    $display("escapes=%0d order-1=%0d fresh=%0d rollback_with_bits=%0d halvings=%0d probe_limit=%0d areas_full=%0d dbuf_wait=%0d coder_stall=%0d out_stall=%0d",
             m_escape, m_m1, m_fresh, m_rb_bits, m_scale, m_probe, m_full, m_dbuf_wait, m_ac_stall, m_out_stall);
    checks++;
    if (m_escape == 0 || m_m1 == 0 || m_fresh == 0 || m_rb_bits == 0 || m_scale == 0 ||
        m_probe == 0 || m_full == 0 || m_dbuf_wait == 0 || m_ac_stall == 0 || m_out_stall == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
