// Triangularizer: places the array's output in upper-triangular order.
//
// The array never swaps rows. Instead the pivot row of step k is reported,
// and each output column carries every row with its tag. This unit keeps
// a rank table, rank(i) = the step at which row i became the pivot row, and
// turns an output element (column j, row i, a, c) into an element U(m, j)
// of the upper-triangular factor, m = rank(i):
//
//   - a tagged row with a known rank gives U(rank(i), j);
//   - in the drained columns j >= M, the one row never tagged is the pivot
//     row of the last column M and gives U(M, j);
//   - untagged rows of columns j < M lie below the diagonal, hold the
//     eliminated residue, and produce nothing.
//
// So U is produced in one pass over the output with one table lookup per
// element. The use of the pivot row numbers for triangularization follows
// the algorithm; the rank table is this design's way of doing it. A
// singular matrix (a step without a pivot) leaves ranks missing, and then
// the U rows produced are not the full factor.
//
// Interface: 'clear' empties the table at the start of a run. pivot_* and
// in_* are the output ports of processor 0. Timing: u_* are registered, one
// cycle after in_*.
module ge_triangularize
  import ge_pkg::*;
#(
  parameter int M = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  pivot_valid,
  input  row_t  pivot_step,
  input  row_t  pivot_row,
  input  logic  in_valid,
  input  row_t  in_col,
  input  row_t  in_row,
  input  data_t in_a,
  input  logic  in_c,
  output logic  u_valid,
  output row_t  u_row,
  output row_t  u_col,
  output data_t u_data
);

  row_t rank_q [M];
  row_t rk;
  logic in_rng;

  always_comb begin
    in_rng = (in_row >= row_t'(1)) && (int'(in_row) <= M);
    rk     = in_rng ? rank_q[int'(in_row) - 1] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < M; i++) rank_q[i] <= '0;
      u_valid <= 1'b0;
      u_row   <= '0;
      u_col   <= '0;
      u_data  <= '0;
    end else begin
      if (clear) begin
        for (int i = 0; i < M; i++) rank_q[i] <= '0;
      end else if (pivot_valid && pivot_row >= row_t'(1) && int'(pivot_row) <= M) begin
        rank_q[int'(pivot_row) - 1] <= pivot_step;
      end
      u_valid <= 1'b0;
      if (in_valid && in_rng) begin
        if (in_c && rk != '0) begin
          u_valid <= 1'b1;
          u_row   <= rk;
        end else if (!in_c && int'(in_col) >= M) begin
          u_valid <= 1'b1;
          u_row   <= row_t'(M);
        end
        u_col  <= in_col;
        u_data <= in_a;
      end
    end
  end

endmodule
