// tb_lps_table -- reads all 512 entries of the LPS table and compares them
// with the defining formula evaluated here in real arithmetic:
// round(128 * (16*l5 + 8) / (528 + 32*t4)), clamped to 1..63, where the
// index is {t4, l5}.  Also checks that the output register holds while en
// is low.
module tb_lps_table;
  logic clk = 0, en = 0;
  logic [8:0] idx = 0;
  logic [6:0] q;
  int checks = 0, failures = 0;

  lps_table dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    real x;
    @(negedge clk);
    for (int i = 0; i < 512; i++) begin
      en = 1; idx = 9'(i);
      @(negedge clk);
      x = 128.0 * (16.0 * (i % 32) + 8.0) / (528.0 + 32.0 * (i / 32));
      e = int'($floor(x + 0.5));
      if (e < 1) e = 1;
      if (e > 63) e = 63;
      checks++;
      if (q != 7'(e)) begin
        failures++;
        if (failures < 5) $display("FAIL entry %0d: got %0d want %0d", i, q, e);
      end
    end
    // hold
    en = 1; idx = 9'd0;
    @(negedge clk);
    en = 0; idx = 9'd31;
    @(negedge clk);
    checks++;
    if (q != 7'd2) begin failures++; $display("FAIL hold: %0d", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
