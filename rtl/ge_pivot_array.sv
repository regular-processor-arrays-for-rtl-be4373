// Linear processor array for Gaussian elimination with partial pivoting.
//
// An M x N matrix (M <= N, for example a system of M equations with its
// right-hand side as column N = M+1) is reduced to upper-triangular form
// without ever swapping rows. Processor q holds column j = k + q at step k,
// so the N processors start with one column each and all columns move one
// processor to the left after every step. Processor 0 (ge_pivot_pe) holds
// the pivot column and does all of the pivot search and the multiplier
// division; processors 1..N-1 (ge_elim_pe) only eliminate.
//
//   links to the right (registered): the token, with t in the search pass
//                                    and x, rho in the elimination pass
//   links to the left  (registered): the updated a, c of the moving column
//   output: what processor 0 sends to the left, i.e. each column in turn
//           after its own step, and the pivot row number of every step;
//           ge_triangularize turns both into elements U(m, j).
//
// The geometry (processor q = j - k, N processors, pivot work in
// processor 0, links t, x, rho to the right and a, c to the left, a column
// input per processor) follows the array derived in the algorithm's
// description. The number format, the cycle-level schedule, the drain at the
// end and the triangularizer's rank table are this design's own.
//
// Use: with busy low, present row i of all N columns on load_data with
// load_row = i and load_valid = 1, for i = 1..M (any order). Pulse start.
// The run takes (M-1)*(2M+2) + (N-M+1)*(M+2) cycles until 'done'. Each step
// reports its pivot row on pivot_*; the raw columns appear on out_*, rows
// M..1 of column 1, then of column 2, and so on; U appears on u_*.
module ge_pivot_array
  import ge_pkg::*;
#(
  parameter int M = 8,   // rows
  parameter int N = 9    // columns = processors
) (
  input  logic  clk,
  input  logic  rst_n,
  // matrix load, one row of all columns per cycle
  input  logic  load_valid,
  input  row_t  load_row,
  input  data_t load_data [N],
  // control
  input  logic  start,
  output logic  busy,
  output logic  done,
  // pivot row of each step
  output logic  pivot_valid,
  output row_t  pivot_step,
  output row_t  pivot_row,
  output logic  singular,
  // raw output of processor 0
  output logic  out_valid,
  output row_t  out_col,
  output row_t  out_row,
  output data_t out_a,
  output logic  out_c,
  // upper-triangular factor U(u_row, u_col)
  output logic  u_valid,
  output row_t  u_row,
  output row_t  u_col,
  output data_t u_data
);

  tok_t      tok  [N];   // tok[q]: from processor q to processor q+1
  col_xfer_t colx [1:N];  // colx[q]: from processor q to processor q-1

  logic load_en;
  assign load_en = load_valid && !busy;

  // nothing to the right of the last processor
  assign colx[N] = '0;

  ge_pivot_pe #(.M(M), .N(N)) u_p0 (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .busy        (busy),
    .done        (done),
    .load_en     (load_en),
    .load_row    (load_row),
    .load_a      (load_data[0]),
    .tok_out     (tok[0]),
    .col_in      (colx[1]),
    .pivot_valid (pivot_valid),
    .pivot_step  (pivot_step),
    .pivot_row   (pivot_row),
    .singular    (singular),
    .out_valid   (out_valid),
    .out_col     (out_col),
    .out_row     (out_row),
    .out_a       (out_a),
    .out_c       (out_c)
  );

  for (genvar q = 1; q < N; q++) begin : g_pe
    data_t rd_a, s_q, w_q;
    logic  rd_c, full_q;
    ge_elim_pe #(.M(M)) u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .load_en  (load_en),
      .load_row (load_row),
      .load_a   (load_data[q]),
      .rd_row   (tok[q-1].row),
      .tok_in   (tok[q-1]),
      .tok_out  (tok[q]),
      .col_in   (colx[q+1]),
      .col_out  (colx[q]),
      .rd_a     (rd_a),
      .rd_c     (rd_c),
      .s_q      (s_q),
      .w_q      (w_q),
      .full_q   (full_q)
    );
  end

  ge_triangularize #(.M(M)) u_tri (
    .clk         (clk),
    .rst_n       (rst_n),
    .clear       (start && !busy),
    .pivot_valid (pivot_valid),
    .pivot_step  (pivot_step),
    .pivot_row   (pivot_row),
    .in_valid    (out_valid),
    .in_col      (out_col),
    .in_row      (out_row),
    .in_a        (out_a),
    .in_c        (out_c),
    .u_valid     (u_valid),
    .u_row       (u_row),
    .u_col       (u_col),
    .u_data      (u_data)
  );

endmodule
