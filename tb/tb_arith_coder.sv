// tb_arith_coder -- round-trip test of the pipelined arithmetic coder.
//
// Random groups of binary decisions with random counts are sent, each
// group ending in COMMIT or (about one time in four) ROLLBACK, then FLUSH
// and END.  The bytes that come out are decoded with the reference decoder
// (ppmh_ref_pkg::ac_decoder), which must give back exactly the committed
// decisions.  The output side is stalled at random in the second half to
// exercise back-pressure.  A first phase checks the rate: 400 decisions
// with skewed probabilities must be accepted in at most 440 cycles.  The
// test also checks that carries, rollbacks and packer stalls all occurred.
module tb_arith_coder;
  import ppmh_pkg::*;
  import ppmh_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic ev_valid = 0, ev_ready, out_valid, out_ready = 1, done;
  ac_event_t ev;
  logic [7:0] out_data;
  int checks = 0, failures = 0;

  arith_coder dut (.*);

  always #5 clk = ~clk;

  byte unsigned code[$];
  always @(posedge clk) if (rst_n && out_valid && out_ready) code.push_back(out_data);

  int n_done = 0;
  always @(posedge clk) if (rst_n && done) n_done++;

  // mechanism counters
  int n_carry = 0, n_rollback = 0, n_pkstall = 0;
  always @(posedge clk) begin
    if (dut.u_cb.in_valid && dut.u_cb.in_ready && dut.u_cb.in_op.kind == EV_BIT && dut.u_cb.in_op.carry) n_carry++;
    if (dut.u_pk.iv && !dut.u_pk.in_ready) n_pkstall++;
  end

  typedef struct { int c0; int c1; int d; } dec_t;
  dec_t expected[$], group[$];

  // Inputs change on the falling edge; ready does not depend on valid, so
  // its value there tells whether the next rising edge takes the event.
  task automatic send(ev_kind_t k, int c0, int c1, int d);
    bit r;
    ev = '{kind: k, cum0: CNT_W'(c0), cum1: CNT_W'(c1), dec: d[0]};
    ev_valid = 1;
    forever begin
      r = ev_ready;
      @(posedge clk);
      @(negedge clk);
      if (r) break;
    end
    ev_valid = 0;
  endtask

  task automatic rand_bit(bit skew);
    int c1, c0, d;
    c1 = 1 + $urandom_range(0, 1022);
    c0 = $urandom_range(0, c1);
    if (skew) begin c1 = 1000; c0 = 990; end
    // choose a branch with non-zero weight, usually the likely one
    if (c0 == 0) d = 1;
    else if (c0 == c1) d = 0;
    else d = ($urandom_range(0, c1 - 1) < c0) ? 0 : 1;
    send(EV_BIT, c0, c1, d);
    group.push_back('{c0, c1, d});
  endtask

  task automatic end_group(bit rb);
    if (rb) begin
      send(EV_ROLLBACK, 0, 0, 0);
      n_rollback++;
    end else begin
      send(EV_COMMIT, 0, 0, 0);
      foreach (group[i]) expected.push_back(group[i]);
    end
    group = {};
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    ac_decoder dec;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    // phase 1: rate, one decision per cycle
    t0 = int'($time / 10);
    for (int i = 0; i < 400; i++) begin
      send(EV_BIT, 990, 1000, 0);
      group.push_back('{990, 1000, 0});
    end
    t1 = int'($time / 10);
    checks++;
    if (t1 - t0 > 440) begin
      failures++;
      $display("FAIL rate: 400 decisions took %0d cycles", t1 - t0);
    end
    end_group(0);
    // phase 2: random groups
    for (int g = 0; g < 1500; g++) begin
      int n;
      n = $urandom_range(1, 9);
      for (int i = 0; i < n; i++) rand_bit(0);
      end_group($urandom_range(0, 3) == 0);
      if (g == 750) fork
        begin
          repeat (20000) begin
            @(posedge clk);
            out_ready <= ($urandom_range(0, 3) != 0);
          end
          out_ready <= 1;
        end
      join_none
    end
    send(EV_FLUSH, 0, 0, 0);
    send(EV_END, 0, 0, 0);
    wait (n_done == 1);
    out_ready <= 1;
    repeat (20) @(posedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL bytes left after done"); end

    dec = new(code);
    foreach (expected[i]) begin
      int b;
      b = dec.decode(expected[i].c0, expected[i].c1);
      checks++;
      if (b != expected[i].d) begin
        failures++;
        if (failures < 10) $display("FAIL decision %0d: got %0d want %0d", i, b, expected[i].d);
      end
    end
    $display("decisions=%0d bytes=%0d carries=%0d rollbacks=%0d packer_stalls=%0d",
             expected.size(), code.size(), n_carry, n_rollback, n_pkstall);
    checks++;
    if (n_carry == 0 || n_rollback == 0 || n_pkstall == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
