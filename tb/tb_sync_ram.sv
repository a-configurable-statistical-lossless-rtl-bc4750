// tb_sync_ram -- random writes and reads of a 64 x 12 synchronous RAM
// against a behavioural array.  Checks that a read returns the stored word
// one cycle after re, that the output holds while re is low, and that a
// read of the address being written returns the old word.
module tb_sync_ram;
  logic clk = 0, re = 0, we = 0;
  logic [5:0] raddr = 0, waddr = 0;
  logic [11:0] rdata, wdata = 0;
  int checks = 0, failures = 0;
  logic [11:0] model [64];

  sync_ram #(.DEPTH(64), .WIDTH(12)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] exp_q;
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      we = 1; waddr = 6'(i); wdata = 12'($urandom); model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 2000; i++) begin
      re = (i == 0) || ($urandom_range(0, 3) != 0);
      raddr = 6'($urandom);
      we = $urandom_range(0, 1);
      waddr = ($urandom_range(0, 3) == 0) ? raddr : 6'($urandom);
      wdata = 12'($urandom);
      if (re) exp_q = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        if (failures < 5) $display("FAIL read: got %h want %h", rdata, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
