// tb_area_free_map -- a 4-line (128-node) free map against a bit-array
// model.  Each step reads a random node, checks the busy bit returned the
// next cycle, and claims the node at random; every few hundred steps the
// whole map is cleared in one cycle and must then read as free.  Nodes are
// drawn from a small window so lines fill up and already-busy nodes are
// read often.
module tb_area_free_map;
  logic clk = 0, rst_n = 0, clear = 0, re = 0, busy, mark = 0;
  logic [6:0] raddr = 0, maddr = 0;
  int checks = 0, failures = 0, n_busy = 0, n_clear = 0;
  bit model [128];

  area_free_map #(.LINES(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] x;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      if (i % 700 == 699) begin
        clear = 1;
        @(negedge clk);
        clear = 0;
        foreach (model[j]) model[j] = 0;
        n_clear++;
      end
      x = (i % 1000 < 500) ? 7'($urandom_range(0, 40)) : 7'($urandom);
      re = 1; raddr = x;
      @(negedge clk);
      re = 0;
      checks++;
      if (busy != model[x]) begin
        failures++;
        if (failures < 5) $display("FAIL node %0d: busy %0d want %0d", x, busy, model[x]);
      end
      if (model[x]) n_busy++;
      if ($urandom_range(0, 2) == 0) begin
        mark = 1; maddr = x; model[x] = 1;
      end
      @(negedge clk);
      mark = 0;
    end
    checks++;
    if (n_busy < 100 || n_clear == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
