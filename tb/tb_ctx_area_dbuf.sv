// tb_ctx_area_dbuf -- a producer writes records of 1..5 context entries
// (the close may come with the last entry or after it; entries past
// the count are don't-care) and a consumer
// takes them after random delays.  Every record read must equal the one
// written, in order.  Also checks that the producer is held off only when
// both banks are full and that it filled one bank while the other was
// being read (the point of double buffering).
module tb_ctx_area_dbuf;
  import ppmh_pkg::*;
  localparam int N = MAX_ORDER + 1;
  logic clk = 0, rst_n = 0;
  logic wr_ready, push = 0, push_fresh = 0, fin = 0, fin_term = 0;
  logic [9:0] push_ca = 0;
  logic [7:0] fin_sym = 0, rd_sym;
  logic rd_valid, rd_term, rd_done = 0;
  logic [ORD_W-1:0] rd_n;
  logic [9:0] rd_ca [N];
  logic [N-1:0] rd_fresh;
  int checks = 0, failures = 0, n_overlap = 0, n_wait = 0;

  typedef struct { int n; logic [9:0] ca[N]; logic [N-1:0] fr; logic [7:0] sym; logic term; } rec_t;
  rec_t q[$];
  localparam int RECS = 500;

  ctx_area_dbuf dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // producer
  initial begin
    rec_t r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < RECS; k++) begin
      r.n = $urandom_range(1, N);
      for (int j = 0; j < N; j++) begin r.ca[j] = 10'($urandom); r.fr[j] = $urandom_range(0, 1); end
      for (int j = r.n; j < N; j++) r.fr[j] = 0;
      r.sym = 8'($urandom); r.term = ($urandom_range(0, 9) == 0);
      for (int j = 0; j < r.n; j++) begin
        bool_wait();
        push = 1; push_ca = r.ca[j]; push_fresh = r.fr[j];
        fin = (j == r.n - 1) && $urandom_range(0, 1);
        fin_sym = r.sym; fin_term = r.term;
        if (fin) q.push_back(r);
        if (rd_valid) n_overlap++;
        @(negedge clk);
        push = 0;
        if (fin) begin fin = 0; r.n = -1; end
      end
      if (r.n != -1) begin
        bool_wait();
        fin = 1; fin_sym = r.sym; fin_term = r.term;
        q.push_back(r);
        @(negedge clk);
        fin = 0;
      end
    end
  end

  task automatic bool_wait();
    while (!wr_ready) begin
      checks++;
      if (!(rd_valid && q.size() >= 2)) begin failures++; $display("FAIL held off with a free bank"); end
      n_wait++;
      @(negedge clk);
    end
  endtask

  // consumer
  initial begin
    int got = 0;
    rec_t e;
    repeat (3) @(negedge clk);
    while (got < RECS) begin
      if (rd_valid && $urandom_range(0, 3) == 0) begin
        e = q.pop_front();
        checks++;
        if (32'(rd_n) != e.n || rd_sym != e.sym || rd_term != e.term) begin
          failures++;
          if (failures < 5) $display("FAIL record %0d: n %0d/%0d sym %h/%h", got, rd_n, e.n, rd_sym, e.sym);
        end
        for (int j = 0; j < e.n; j++) begin
          checks++;
          if (rd_ca[j] != e.ca[j] || rd_fresh[j] != e.fr[j]) begin failures++; $display("FAIL record %0d ca[%0d]", got, j); end
        end
        rd_done = 1;
        got++;
      end
      @(negedge clk);
      rd_done = 0;
    end
    checks++;
    if (n_overlap == 0 || n_wait == 0) begin
      failures++;
      $display("FAIL coverage overlap %0d wait %0d", n_overlap, n_wait);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
