// tb_sync_fifo -- random pushes and pops of a 16-deep FIFO against a
// queue model: data order, full (in_ready low with 16 entries) and empty
// (out_valid low with none).
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [8:0] in_data = 0, out_data;
  int checks = 0, failures = 0, n_full = 0;
  logic [8:0] q[$];

  sync_fifo #(.DEPTH(16), .WIDTH(9)) dut (.*);
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
    for (int i = 0; i < 3000; i++) begin
      bit push, pop;
      // phases that favour filling, then draining
      in_valid  = $urandom_range(0, 9) < ((i / 300) % 2 ? 3 : 8);
      out_ready = $urandom_range(0, 9) < ((i / 300) % 2 ? 8 : 3);
      in_data   = 9'($urandom);
      checks++;
      if (in_ready != (q.size() < 16) || out_valid != (q.size() > 0)) begin
        failures++;
        $display("FAIL flags: size %0d in_ready %0d out_valid %0d", q.size(), in_ready, out_valid);
      end
      if (q.size() == 16) n_full++;
      if (out_valid && q.size() > 0) begin
        checks++;
        if (out_data != q[0]) begin failures++; $display("FAIL data %h want %h", out_data, q[0]); end
      end
      push = in_valid && in_ready;
      pop  = out_valid && out_ready;
      @(negedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(in_data);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
