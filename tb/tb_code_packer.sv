// tb_code_packer -- random code items (head bit, runs of 0..40 equal bits,
// up to 6 literals) with COMMIT and ROLLBACK between them, then END.  The
// testbench plays the output buffer: pushed bytes are speculative until a
// commit and dropped by a rollback.  The committed bytes must be the bit
// string of the items, less the rolled-back groups, first bit in the MSB,
// zero-padded to a whole byte.  push_ready is toggled at random.
module tb_code_packer;
  import ppmh_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, push, push_ready = 1, commit, rollback, done;
  code_item_t in_item = '0;
  logic [7:0] push_data;
  int checks = 0, failures = 0, n_stall = 0, n_rb = 0, n_long = 0;
  bit bits[$], bits_s[$];
  byte unsigned spec[$], comm[$];
  bit got_done = 0;

  code_packer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output buffer model
  always @(posedge clk) begin
    if (rst_n) begin
      if (push && push_ready) spec.push_back(push_data);
      if (push && !push_ready) n_stall++;
      if (rollback) begin spec = {}; n_rb++; end
      if (commit) begin foreach (spec[i]) comm.push_back(spec[i]); spec = {}; end
      if (done) got_done = 1;
    end
  end
  always @(negedge clk) push_ready <= ($urandom_range(0, 3) != 0);

  task automatic send(code_item_t it);
    in_valid = 1; in_item = it;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    code_item_t it;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int blk = 0; blk < 4; blk++) begin
      bits = {}; bits_s = {}; comm = {}; got_done = 0;
      for (int i = 0; i < 600; i++) begin
        int r;
        r = $urandom_range(0, 19);
        it = '0;
        if (r == 0) begin
          it.kind = EV_COMMIT; bits_s = bits;
        end else if (r == 1) begin
          it.kind = EV_ROLLBACK; bits = bits_s;
        end else begin
          it.kind    = EV_BIT;
          it.head_v  = $urandom_range(0, 1);
          it.head    = $urandom_range(0, 1);
          it.run_bit = $urandom_range(0, 1);
          it.run_len = ($urandom_range(0, 2) == 0) ? 16'($urandom_range(0, 40)) : 16'd0;
          it.lit_n   = 3'($urandom_range(0, 6));
          it.lits    = 7'($urandom);
          if (it.run_len > 16) n_long++;
          if (it.head_v) bits.push_back(it.head);
          for (int j = 0; j < int'(it.run_len); j++) bits.push_back(it.run_bit);
          for (int j = int'(it.lit_n) - 1; j >= 0; j--) bits.push_back(it.lits[j]);
        end
        send(it);
      end
      it = '0; it.kind = EV_END; it.head_v = 1; it.head = 1; it.run_bit = 0; it.run_len = 16'd3;
      bits.push_back(1); repeat (3) bits.push_back(0);
      send(it);
      while (!got_done) @(negedge clk);
      @(negedge clk);
      while (bits.size() % 8 != 0) bits.push_back(0);
      checks++;
      if (comm.size() != bits.size() / 8) begin
        failures++;
        $display("FAIL block %0d: %0d bytes, want %0d", blk, comm.size(), bits.size() / 8);
      end
      for (int i = 0; i < bits.size() / 8 && i < comm.size(); i++) begin
        byte unsigned e;
        e = 0;
        for (int j = 0; j < 8; j++) e = {e[6:0], bits[8 * i + j]};
        checks++;
        if (comm[i] != e) begin
          failures++;
          if (failures < 5) $display("FAIL block %0d byte %0d: %h want %h", blk, i, comm[i], e);
        end
      end
    end
    $display("rollbacks %0d, stalls %0d, long runs %0d", n_rb, n_stall, n_long);
    checks++;
    if (n_rb == 0 || n_stall == 0 || n_long == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
