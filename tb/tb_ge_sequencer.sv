// Test of the step sequencer. The expected token stream is written out
// independently from the schedule: for k = 1..M-1 a search pass over rows
// 1..M, an elimination pass over rows M..1 and two idle cycles, then
// N-M+1 drain passes (elimination passes flagged 'drain'), each followed by
// two idle cycles. Every cycle of the run is compared: kind, row, column,
// drain, search_last and busy; then 'done' and the run length
// (M-1)*(2M+2) + (N-M+1)*(M+2). Two sizes are run back to back through
// two instances with their own start inputs, and 'start' during a run
// must be ignored.
module tb_ge_sequencer;
  import ge_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start0 = 1'b0, start1 = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #(1000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { tok_kind_e kind; int row; int col; bit drain; bit last; } exp_t;

  tok_kind_e k0, k1;
  row_t      r0, r1, c0, c1;
  logic      d0, d1, l0, l1, b0, b1, dn0, dn1;

  ge_sequencer #(.M(8), .N(9)) dut0 (.clk, .rst_n, .start(start0), .kind(k0), .row(r0), .col(c0),
                                     .drain(d0), .search_last(l0), .busy(b0), .done(dn0));
  ge_sequencer #(.M(3), .N(6)) dut1 (.clk, .rst_n, .start(start1), .kind(k1), .row(r1), .col(c1),
                                     .drain(d1), .search_last(l1), .busy(b1), .done(dn1));

  function automatic void build(int M, int N, ref exp_t q[$]);
    q.delete();
    for (int k = 1; k <= N; k++) begin
      if (k <= M-1)
        for (int i = 1; i <= M; i++) q.push_back('{TOK_SEARCH, i, k, 0, i == M});
      for (int i = M; i >= 1; i--) q.push_back('{TOK_ELIM, i, k, k >= M, 0});
      repeat (2) q.push_back('{TOK_NONE, -1, k, k >= M, 0});
    end
  endfunction

  task automatic run(int which, int M, int N);
    exp_t q[$];
    int n;
    tok_kind_e kd; row_t rw, cl; logic dr, ls, bs, dn;
    build(M, N, q);
    @(negedge clk);
    if (which == 0) start0 = 1'b1; else start1 = 1'b1;
    @(negedge clk);
    start0 = 1'b0; start1 = 1'b0;
    n = 0;
    forever begin
      if (which == 0) begin kd = k0; rw = r0; cl = c0; dr = d0; ls = l0; bs = b0; dn = dn0; end
      else            begin kd = k1; rw = r1; cl = c1; dr = d1; ls = l1; bs = b1; dn = dn1; end
      if (dn) break;
      if (n == 5) begin if (which == 0) start0 = 1'b1; else start1 = 1'b1; end  // ignored while busy
      if (n == 6) begin start0 = 1'b0; start1 = 1'b0; end
      checks++;
      if (n >= q.size()) begin
        failures++; $display("FAIL: run %0d too long", which); break;
      end
      if (kd != q[n].kind || (q[n].row >= 0 && int'(rw) != q[n].row) ||
          int'(cl) != q[n].col || dr != q[n].drain || ls != q[n].last || !bs) begin
        failures++;
        $display("FAIL: run %0d cycle %0d: kind %0d row %0d col %0d drain %0d last %0d busy %0d",
                 which, n, kd, rw, cl, dr, ls, bs);
      end
      n++;
      @(negedge clk);
    end
    checks++;
    if (n != (M-1)*(2*M+2) + (N-M+1)*(M+2)) begin
      failures++; $display("FAIL: run %0d length %0d", which, n);
    end
    checks++;
    if (n != q.size()) begin failures++; $display("FAIL: run %0d stream length", which); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (b0 || dn0 || k0 != TOK_NONE) begin failures++; $display("FAIL: not idle after reset"); end
    run(0, 8, 9);
    run(1, 3, 6);
    // a second run restarts from done
    run(0, 8, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
