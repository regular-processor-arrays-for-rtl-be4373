// Workload test: solving linear systems A x = b with the array.
//
// The array is loaded with the augmented matrix [A | b] (8 equations, 9
// columns, the default size). The upper-triangular factor U that comes out,
// with the transformed right-hand side in its last column, is solved by back
// substitution in the testbench (in real arithmetic), and the result must
// match the known solution x to fixed-point accuracy. Half of the systems
// have A(1,1) = 0 and more zeros on the diagonal, so elimination without
// pivoting would divide by zero; these are counted and must occur.
module tb_ge_linear_solve;
  import ge_pkg::*;

  localparam int M = 8;
  localparam int N = M + 1;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  load_valid = 1'b0, start = 1'b0;
  row_t  load_row = '0;
  data_t load_data [N];
  logic  busy, done, pivot_valid, singular, out_valid, out_c, u_valid;
  row_t  pivot_step, pivot_row, out_col, out_row, u_row, u_col;
  data_t out_a, u_data;

  int checks = 0, failures = 0, n_need_pivot = 0;

  ge_pivot_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(2000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real U [1:M][1:N];
  int  A [1:M][1:N];
  real xs [1:M];
  real xe [1:M];
  bit  running = 0;

  always @(posedge clk)
    if (running && u_valid) U[u_row][u_col] = real'(u_data) / 65536.0;

  initial begin
    for (int q = 0; q < N; q++) load_data[q] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      real err, maxerr;
      // known solution in [-2, 2], matrix entries in [-4, 4] (multiples of 1/16)
      for (int i = 1; i <= M; i++) xs[i] = real'(int'($urandom_range(0, 64)) - 32) / 16.0;
      for (int i = 1; i <= M; i++)
        for (int j = 1; j <= M; j++)
          A[i][j] = (int'($urandom_range(0, 128)) - 64) * 4096;
      if (t % 2 == 1) begin
        for (int i = 1; i <= M; i++) A[i][i] = 0;
        n_need_pivot++;
      end
      for (int i = 1; i <= M; i++) begin
        real b;
        b = 0.0;
        for (int j = 1; j <= M; j++) b += (real'(A[i][j]) / 65536.0) * xs[j];
        A[i][N] = int'(b * 65536.0);
      end
      for (int i = 1; i <= M; i++) begin
        @(negedge clk);
        load_valid = 1'b1; load_row = row_t'(i);
        for (int q = 0; q < N; q++) load_data[q] = data_t'(A[i][q+1]);
      end
      @(negedge clk);
      load_valid = 1'b0;
      for (int m = 1; m <= M; m++) for (int j = 1; j <= N; j++) U[m][j] = 0.0;
      running = 1;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      repeat (2) @(negedge clk);
      running = 0;
      checks++;
      if (singular) begin failures++; $display("FAIL: system %0d reported singular", t); end
      // back substitution on U
      for (int m = M; m >= 1; m--) begin
        real acc;
        acc = U[m][N];
        for (int j = m + 1; j <= M; j++) acc -= U[m][j] * xe[j];
        xe[m] = (U[m][m] != 0.0) ? acc / U[m][m] : 1.0e9;
      end
      maxerr = 0.0;
      for (int i = 1; i <= M; i++) begin
        err = xe[i] - xs[i];
        if (err < 0.0) err = -err;
        if (err > maxerr) maxerr = err;
      end
      checks++;
      if (maxerr > 0.02) begin
        failures++;
        $display("FAIL: system %0d: largest error of the solution %f", t, maxerr);
      end
    end
    checks++;
    if (n_need_pivot == 0) begin failures++; $display("FAIL: no system needed pivoting"); end
    $display("systems needing pivoting: %0d", n_need_pivot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
