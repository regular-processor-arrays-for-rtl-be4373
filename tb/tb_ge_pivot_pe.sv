// Test of processor 0 on its own. The testbench plays processor 1: for every
// elimination token processor 0 sends right, it returns, two cycles later,
// the same row of a prepared random column with random tags. That column is
// what processor 0 holds in the next sweep, so the whole run is known in
// advance and the expected streams are computed from the algorithm:
//   - the token stream: search rows 1..M with t = untagged and larger than
//     every earlier candidate, then elimination rows M..1 with the pivot row
//     x and rho = a / pivot (0 for tagged rows, the pivot row, or no pivot);
//     drain passes with x = 0 and rho = 0;
//   - the pivot row of every step, and the singular flag;
//   - the output column, a - rho * pivot and c or (i = x), per row;
//   - the run length.
// Counted: steps whose pivot is not the first untagged row, steps where a
// tagged row had the largest magnitude, steps with no pivot, drain passes.
module tb_ge_pivot_pe;
  import ge_pkg::*;

  localparam int M = 4;
  localparam int N = 6;
  localparam int RUN_CYC = (M-1)*(2*M+2) + (N-M+1)*(M+2);

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      start = 1'b0, busy, done;
  logic      load_en = 1'b0;
  row_t      load_row = '0;
  data_t     load_a = '0;
  tok_t      tok_out;
  col_xfer_t col_in = '0, pending = '0;
  logic      pivot_valid, singular, out_valid, out_c;
  row_t      pivot_step, pivot_row, out_col, out_row;
  data_t     out_a;

  int checks = 0, failures = 0;
  int n_late_pivot = 0, n_tag_bigger = 0, n_no_pivot = 0, n_drain = 0;

  ge_pivot_pe #(.M(M), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(2000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fxmul(int x, int y);
    longint p;
    p = longint'(x) * longint'(y);
    return int'(p >>> FRAC_W);
  endfunction
  function automatic int fxdiv(int x, int y);
    longint q;
    q = (longint'(x) <<< FRAC_W) / longint'(y);
    return int'(q);
  endfunction
  function automatic longint mag(int x);
    return (x < 0) ? -longint'(x) : longint'(x);
  endfunction

  // col[k] is the column processor 0 holds in sweep k
  int colA [1:N+1][1:M];
  bit colC [1:N+1][1:M];
  int cur_sweep;

  tok_t      exp_tok [$];
  col_xfer_t exp_out [$];
  int        exp_piv [$];
  bit        exp_sing;

  task automatic build();
    exp_tok.delete(); exp_out.delete(); exp_piv.delete();
    exp_sing = 0;
    for (int k = 1; k <= N; k++) begin
      int r; longint p, tb; bit first_seen; int first;
      tok_t t;
      col_xfer_t o;
      r = 0; p = 0; tb = 0; first = 0;
      if (k <= M-1) begin
        for (int i = 1; i <= M; i++) begin
          t = '0; t.kind = TOK_SEARCH; t.row = row_t'(i);
          if (!colC[k][i] && first == 0) first = i;
          if (colC[k][i]) begin
            if (mag(colA[k][i]) > tb) tb = mag(colA[k][i]);
          end else if (mag(colA[k][i]) > p) begin
            p = mag(colA[k][i]); r = i; t.t = 1'b1;
          end
          exp_tok.push_back(t);
        end
        exp_piv.push_back(r);
        if (r == 0) begin exp_sing = 1; n_no_pivot++; end
        if (r != 0 && r != first) n_late_pivot++;
        if (tb > p) n_tag_bigger++;
      end else n_drain++;
      for (int i = M; i >= 1; i--) begin
        int rho;
        t = '0; t.kind = TOK_ELIM; t.row = row_t'(i); t.x = row_t'(r);
        rho = (k >= M || r == 0 || colC[k][i] || i == r) ? 0 : fxdiv(colA[k][i], colA[k][r]);
        t.rho = data_t'(rho);
        exp_tok.push_back(t);
        o = '0; o.vld = 1'b1; o.full = 1'b1; o.row = row_t'(i);
        o.a = data_t'(colA[k][i] - ((r == 0) ? 0 : fxmul(rho, colA[k][r])));
        o.c = colC[k][i] | (i == r);
        exp_out.push_back(o);
      end
    end
  endtask

  // testbench as processor 1: answer an elimination token two cycles later
  always @(negedge clk) begin
    col_in <= pending;
    pending <= '0;
    if (tok_out.kind == TOK_ELIM) begin
      pending.vld  <= 1'b1;
      pending.full <= (int'(out_col) < N);
      pending.row  <= tok_out.row;
      pending.a    <= data_t'(colA[int'(out_col) + 1][tok_out.row]);
      pending.c    <= colC[int'(out_col) + 1][tok_out.row];
    end
  end

  int busy_cyc;
  bit running = 0;
  int tok_err, out_err, piv_err;
  always @(posedge clk) begin
    if (running && busy) busy_cyc <= busy_cyc + 1;
  end
  // the registered outputs are compared in the middle of the cycle
  always @(negedge clk) begin
    if (running) begin
      if (tok_out.kind != TOK_NONE) begin
        if (exp_tok.size() == 0 || tok_out !== exp_tok[0]) begin
          tok_err++;
          if (tok_err < 5) $display("token mismatch: kind %0d row %0d t %0d x %0d rho %0d",
                                    tok_out.kind, tok_out.row, tok_out.t, tok_out.x, tok_out.rho);
        end
        if (exp_tok.size() != 0) void'(exp_tok.pop_front());
      end
      if (out_valid) begin
        col_xfer_t o;
        o = '{vld: 1'b1, full: 1'b1, row: out_row, a: out_a, c: out_c};
        if (exp_out.size() == 0 || o !== exp_out[0]) begin
          out_err++;
          if (out_err < 5) $display("output mismatch: row %0d a %0d c %0d", out_row, out_a, out_c);
        end
        if (exp_out.size() != 0) void'(exp_out.pop_front());
      end
      if (pivot_valid) begin
        if (exp_piv.size() == 0 || int'(pivot_row) != exp_piv[0]) piv_err++;
        if (exp_piv.size() != 0) void'(exp_piv.pop_front());
      end
    end
  end

  task automatic run(string name);
    for (int i = 1; i <= M; i++) colC[1][i] = 0;
    build();
    for (int i = 1; i <= M; i++) begin
      @(negedge clk);
      load_en = 1'b1; load_row = row_t'(i); load_a = data_t'(colA[1][i]);
    end
    @(negedge clk);
    load_en = 1'b0;
    tok_err = 0; out_err = 0; piv_err = 0; busy_cyc = 0;
    running = 1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    repeat (2) @(negedge clk);
    running = 0;
    checks++; if (tok_err != 0 || exp_tok.size() != 0) begin failures++; $display("FAIL: %s tokens", name); end
    checks++; if (out_err != 0 || exp_out.size() != 0) begin failures++; $display("FAIL: %s outputs", name); end
    checks++; if (piv_err != 0 || exp_piv.size() != 0) begin failures++; $display("FAIL: %s pivots", name); end
    checks++; if (singular != exp_sing) begin failures++; $display("FAIL: %s singular flag", name); end
    checks++; if (busy_cyc != RUN_CYC) begin failures++; $display("FAIL: %s took %0d cycles", name, busy_cyc); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 40; n++) begin
      for (int k = 1; k <= N+1; k++)
        for (int i = 1; i <= M; i++) begin
          colA[k][i] = ($urandom_range(0, 9) == 0) ? 0 : int'($urandom_range(0, 1 << 20)) - (1 << 19);
          colC[k][i] = ($urandom_range(0, 2) == 0);
        end
      if (n == 1) for (int i = 1; i <= M; i++) colA[1][i] = 0;          // no pivot
      if (n == 2) begin colA[1][2] = 5 << FRAC_W; colA[1][4] = -(5 << FRAC_W); end  // tie
      run($sformatf("run %0d", n));
    end
    checks++; if (n_late_pivot == 0) begin failures++; $display("FAIL: pivot never moved past the first row"); end
    checks++; if (n_tag_bigger == 0) begin failures++; $display("FAIL: tag never excluded a larger row"); end
    checks++; if (n_no_pivot == 0)   begin failures++; $display("FAIL: no-pivot step never happened"); end
    checks++; if (n_drain == 0)      begin failures++; $display("FAIL: no drain pass"); end
    $display("late pivots %0d, tagged larger %0d, no pivot %0d, drains %0d", n_late_pivot, n_tag_bigger, n_no_pivot, n_drain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
