// tb_out_buffer -- random pushes, commits, rollbacks and pops of a
// 16-byte commit/rollback FIFO against a model: only committed bytes are
// readable, a rollback drops the uncommitted ones, a commit in the same
// cycle as a push includes it, and push_ready falls at 16 bytes.
module tb_out_buffer;
  logic clk = 0, rst_n = 0;
  logic push = 0, push_ready, commit = 0, rollback = 0, out_valid, out_ready = 0;
  logic [7:0] push_data = 0, out_data;
  int checks = 0, failures = 0, n_rb = 0;
  byte unsigned cq[$], sq[$];   // committed, speculative

  out_buffer #(.DEPTH(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      bit pu, po;
      push      = $urandom_range(0, 1);
      push_data = 8'($urandom);
      commit    = ($urandom_range(0, 3) == 0);
      rollback  = !commit && ($urandom_range(0, 7) == 0);
      out_ready = $urandom_range(0, 2) != 0;
      checks++;
      if (out_valid != (cq.size() > 0) || push_ready != (cq.size() + sq.size() < 16)) begin
        failures++;
        $display("FAIL flags at %0d", i);
      end
      if (out_valid && cq.size() > 0) begin
        checks++;
        if (out_data != cq[0]) begin failures++; $display("FAIL data %h want %h", out_data, cq[0]); end
      end
      pu = push && push_ready && !rollback;
      po = out_valid && out_ready;
      @(negedge clk);
      if (po) void'(cq.pop_front());
      if (rollback) begin sq = {}; n_rb++; end
      if (pu) sq.push_back(push_data);
      if (commit) begin
        foreach (sq[j]) cq.push_back(sq[j]);
        sq = {};
      end
    end
    checks++;
    if (n_rb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
