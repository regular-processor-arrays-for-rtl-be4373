// End-to-end test of the pivoting Gaussian-elimination array at its default
// size (8 rows, 9 columns: an 8-equation system with its right-hand side).
//
// A sequential reference model, written as the textbook loop with row tags
// and no row swaps, computes for every matrix: the pivot row of each step,
// every column as it leaves the array (rows M..1 with tags), and the
// upper-triangular factor U. The model uses the same fixed-point rules as the
// hardware (quotient truncated toward zero, product rounded toward minus
// infinity), so the comparison is exact. It also checks the run length.
//
// Matrices: random ones, one with a tie for the largest pivot magnitude, one
// whose first column is zero (no pivot at step 1), and one identity-like
// matrix whose pivots lie in order. Counted mechanisms: pivot steps, steps
// where a tagged row was larger than the chosen pivot (so the tag mattered),
// ties, missing pivots, column shifts and drain passes; each must occur.
module tb_ge_pivot_array;
  import ge_pkg::*;

  localparam int M = 8;
  localparam int N = 9;
  localparam int RUN_CYC = (M-1)*(2*M+2) + (N-M+1)*(M+2);

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  load_valid = 1'b0;
  row_t  load_row = '0;
  data_t load_data [N];
  logic  start = 1'b0;
  logic  busy, done, pivot_valid, singular, out_valid, out_c, u_valid;
  row_t  pivot_step, pivot_row, out_col, out_row, u_row, u_col;
  data_t out_a, u_data;

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  // mechanism counters
  int n_pivot_steps = 0, n_tag_mattered = 0, n_ties = 0, n_no_pivot = 0;
  int n_shifts = 0, n_drains = 0;

  ge_pivot_array dut (
    .clk, .rst_n, .load_valid, .load_row, .load_data, .start, .busy, .done,
    .pivot_valid, .pivot_step, .pivot_row, .singular,
    .out_valid, .out_col, .out_row, .out_a, .out_c,
    .u_valid, .u_row, .u_col, .u_data
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  int busy_cyc = 0;
  always @(posedge clk) if (running && busy) busy_cyc <= busy_cyc + 1;

  initial begin
    #(200000 * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- reference model ----------------
  int A   [1:M][1:N];   // working matrix
  bit C   [1:M];
  int piv [1:M];
  int exp_col_a [1:N][1:M];
  bit exp_col_c [1:N][1:M];
  int U   [1:M][1:N];
  bit U_def [1:M][1:N];
  int stim [1:M][1:N];

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

  task automatic model();
    longint p, best_tagged;
    int r, cnt;
    int w [1:N];
    A = stim;
    for (int i = 1; i <= M; i++) C[i] = 0;
    for (int k = 1; k <= M-1; k++) begin
      p = 0; r = 0; best_tagged = 0; cnt = 0;
      for (int i = 1; i <= M; i++) begin
        if (C[i]) begin
          if (mag(A[i][k]) > best_tagged) best_tagged = mag(A[i][k]);
        end else if (mag(A[i][k]) > p) begin
          p = mag(A[i][k]); r = i;
        end
      end
      for (int i = 1; i <= M; i++)
        if (!C[i] && p != 0 && mag(A[i][k]) == p) cnt++;
      if (cnt > 1) n_ties++;
      if (best_tagged > p) n_tag_mattered++;
      if (r == 0) n_no_pivot++;
      n_pivot_steps++;
      piv[k] = r;
      if (r != 0) begin
        for (int j = k; j <= N; j++) w[j] = A[r][j];
        for (int i = 1; i <= M; i++) begin
          if (!C[i] && i != r) begin
            int rho;
            rho = fxdiv(A[i][k], w[k]);
            for (int j = k; j <= N; j++) A[i][j] = A[i][j] - fxmul(rho, w[j]);
          end
        end
        C[r] = 1;
      end
      for (int i = 1; i <= M; i++) begin
        exp_col_a[k][i] = A[i][k];
        exp_col_c[k][i] = C[i];
      end
    end
    for (int j = M; j <= N; j++)
      for (int i = 1; i <= M; i++) begin
        exp_col_a[j][i] = A[i][j];
        exp_col_c[j][i] = C[i];
      end
    // U: row m is the pivot row of step m; row M is the untagged row
    for (int m = 1; m <= M; m++)
      for (int j = 1; j <= N; j++) U_def[m][j] = 0;
    for (int k = 1; k <= M-1; k++)
      if (piv[k] != 0)
        for (int j = k; j <= N; j++) begin
          U[k][j] = (j < M) ? exp_col_a[j][piv[k]] : A[piv[k]][j];
          U_def[k][j] = 1;
        end
    for (int i = 1; i <= M; i++)
      if (!C[i])
        for (int j = M; j <= N; j++) begin
          U[M][j] = A[i][j];
          U_def[M][j] = 1;
        end
  endtask

  // ---------------- one run ----------------
  int got_piv [1:M];
  int n_out, n_u, n_piv;
  int u_seen [1:M][1:N];
  int out_err, u_err;
  bit running = 0;
  bit exp_singular;

  always @(posedge clk) begin
    if (running && pivot_valid) begin
      n_piv++;
      if (pivot_step >= 1 && pivot_step <= M) got_piv[pivot_step] = int'(pivot_row);
    end
    if (running && out_valid) begin
      // expected order: column 1 rows M..1, column 2 rows M..1, ...
      int j, i;
      j = n_out / M + 1;
      i = M - (n_out % M);
      if (int'(out_col) != j || int'(out_row) != i ||
          out_a != data_t'(exp_col_a[j][i]) || out_c != exp_col_c[j][i]) begin
        out_err++;
        if (out_err < 5)
          $display("out mismatch #%0d: got col %0d row %0d a %0d c %0d, want col %0d row %0d a %0d c %0d",
                   n_out, out_col, out_row, out_a, out_c, j, i, exp_col_a[j][i], exp_col_c[j][i]);
      end
      if (i == 1) begin
        n_shifts++;
        if (j >= M) n_drains++;
      end
      n_out++;
    end
    if (running && u_valid) begin
      n_u++;
      if (u_row < 1 || int'(u_row) > M || u_col < 1 || int'(u_col) > N) u_err++;
      else begin
        u_seen[u_row][u_col]++;
        if (!U_def[u_row][u_col] || u_data != data_t'(U[u_row][u_col])) u_err++;
      end
    end
  end

  task automatic run_matrix(input string name);
    int n_u_exp;
    model();
    exp_singular = 0;
    for (int k = 1; k <= M-1; k++) if (piv[k] == 0) exp_singular = 1;
    // load, rows in a shuffled order
    for (int s = 0; s < M; s++) begin
      int i;
      i = ((s * 3) % M) + 1;
      @(negedge clk);
      load_valid = 1'b1;
      load_row = row_t'(i);
      for (int q = 0; q < N; q++) load_data[q] = data_t'(stim[i][q+1]);
    end
    @(negedge clk);
    load_valid = 1'b0;
    n_out = 0; n_u = 0; n_piv = 0; out_err = 0; u_err = 0;
    for (int m = 1; m <= M; m++) begin
      got_piv[m] = -1;
      for (int j = 1; j <= N; j++) u_seen[m][j] = 0;
    end
    running = 1;
    busy_cyc = 0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    repeat (3) @(posedge clk);
    running = 0;
    check(busy_cyc == RUN_CYC,
          $sformatf("%s: run took %0d cycles, expected %0d", name, busy_cyc, RUN_CYC));
    check(n_piv == M-1, $sformatf("%s: %0d pivot reports", name, n_piv));
    for (int k = 1; k <= M-1; k++)
      check(got_piv[k] == piv[k], $sformatf("%s: step %0d pivot row %0d, expected %0d",
                                            name, k, got_piv[k], piv[k]));
    check(n_out == N*M, $sformatf("%s: %0d output elements", name, n_out));
    check(out_err == 0, $sformatf("%s: %0d output mismatches", name, out_err));
    check(singular == exp_singular, $sformatf("%s: singular flag %0d", name, singular));
    if (!exp_singular) begin
      n_u_exp = (M-1)*M/2 + (N-M+1)*M;
      check(n_u == n_u_exp, $sformatf("%s: %0d U elements, expected %0d", name, n_u, n_u_exp));
      check(u_err == 0, $sformatf("%s: %0d U mismatches", name, u_err));
      for (int m = 1; m <= M; m++)
        for (int j = m; j <= N; j++)
          check(u_seen[m][j] == 1, $sformatf("%s: U(%0d,%0d) seen %0d times", name, m, j, u_seen[m][j]));
    end
  endtask

  function automatic int rnd_val();
    // uniform in [-8, 8) in Q15.16
    return int'($urandom_range(0, (1 << 20) - 1)) - (1 << 19);
  endfunction

  initial begin
    for (int q = 0; q < N; q++) load_data[q] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // random matrices
    for (int t = 0; t < 12; t++) begin
      for (int i = 1; i <= M; i++)
        for (int j = 1; j <= N; j++) stim[i][j] = rnd_val();
      run_matrix($sformatf("random %0d", t));
    end

    // tie: rows 3 and 6 share the largest magnitude in column 1
    for (int i = 1; i <= M; i++)
      for (int j = 1; j <= N; j++) stim[i][j] = rnd_val() / 4;
    stim[3][1] = 7 << FRAC_W;
    stim[6][1] = -(7 << FRAC_W);
    run_matrix("tie");

    // zero first column: no pivot at step 1
    for (int i = 1; i <= M; i++)
      for (int j = 1; j <= N; j++) stim[i][j] = (j == 1) ? 0 : rnd_val();
    run_matrix("zero column");

    // diagonally dominant: pivots in row order
    for (int i = 1; i <= M; i++)
      for (int j = 1; j <= N; j++) stim[i][j] = (i == j) ? (6 << FRAC_W) : rnd_val() / 8;
    run_matrix("diagonal");
    for (int k = 1; k <= M-1; k++)
      check(piv[k] == k, "diagonal: model pivots in order");

    check(n_pivot_steps > 0, "pivot search happened");
    check(n_tag_mattered > 0, "a tagged row was excluded from the search");
    check(n_ties > 0, "a tie between pivot candidates happened");
    check(n_no_pivot > 0, "a step without pivot happened");
    check(n_shifts > 0, "columns were shifted left");
    check(n_drains > 0, "drain passes happened");
    $display("mechanisms: pivot steps %0d, tag excluded larger row %0d, ties %0d, no pivot %0d, column shifts %0d, drains %0d",
             n_pivot_steps, n_tag_mattered, n_ties, n_no_pivot, n_shifts, n_drains);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
