// Test of the triangularizer. For a random pivot order it plays the output
// of processor 0: the pivot row of step j, then column j with rows M..1 and
// the tags the array would give (tagged = pivot of a step <= j), then the
// drained columns M..N where only the last pivot row is untagged. Every
// element must come out as U(rank, j) exactly when it belongs to the upper
// triangle, with its data, one cycle later; nothing else may come out.
// 'clear' between runs must forget the old ranks, and rows outside 1..M
// must be ignored.
module tb_ge_triangularize;
  import ge_pkg::*;

  localparam int M = 5;
  localparam int N = 7;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  clear = 1'b0, pivot_valid = 1'b0, in_valid = 1'b0, in_c = 1'b0;
  row_t  pivot_step = '0, pivot_row = '0, in_col = '0, in_row = '0;
  data_t in_a = '0;
  logic  u_valid;
  row_t  u_row, u_col;
  data_t u_data;

  int checks = 0, failures = 0;

  ge_triangularize #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(1000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int perm [1:M];
  int rank [1:M];

  task automatic elem(int j, int i, bit c, int a, bit exp_v, int exp_r);
    @(negedge clk);
    in_valid = 1'b1; in_col = row_t'(j); in_row = row_t'(i); in_c = c; in_a = data_t'(a);
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (u_valid !== exp_v || (exp_v && (int'(u_row) != exp_r || int'(u_col) != j || u_data !== data_t'(a)))) begin
      failures++;
      $display("FAIL: col %0d row %0d c %0d: got v %0d row %0d col %0d, want v %0d row %0d",
               j, i, c, u_valid, u_row, u_col, exp_v, exp_r);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 30; n++) begin
      // random permutation of rows
      for (int i = 1; i <= M; i++) perm[i] = i;
      for (int i = M; i > 1; i--) begin
        int s, tmp;
        s = $urandom_range(1, i);
        tmp = perm[i]; perm[i] = perm[s]; perm[s] = tmp;
      end
      for (int i = 1; i <= M; i++) rank[perm[i]] = i;
      @(negedge clk);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      for (int j = 1; j <= N; j++) begin
        if (j <= M-1) begin
          @(negedge clk);
          pivot_valid = 1'b1; pivot_step = row_t'(j); pivot_row = row_t'(perm[j]);
          @(negedge clk);
          pivot_valid = 1'b0;
        end
        for (int i = M; i >= 1; i--) begin
          bit c;
          c = (rank[i] <= j) && (rank[i] <= M-1);
          if (j < M) elem(j, i, c, $urandom, c, rank[i]);
          else       elem(j, i, c, $urandom, 1'b1, rank[i]);
        end
      end
      // a row outside the matrix produces nothing
      elem(1, M + 1, 1'b1, 1, 1'b0, 0);
      elem(1, 0, 1'b1, 1, 1'b0, 0);
    end
    // after clear no rank is known: a tagged row produces nothing
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    elem(2, 1, 1'b1, 7, 1'b0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
