// Shared types and constants of the pivoting Gaussian-elimination array.
//
// Numbers are two's-complement fixed point with FRAC_W fraction bits
// (Q15.16 by default). The number format is a choice of this design; the
// algorithm it implements does not fix one. Rows are numbered 1..M as in
// the algorithm; row number 0 means "no row" (for example, no pivot found).
//
// Two link bundles connect neighbouring processors:
//   tok_t      travels to the right: the pass kind, the row index i, the
//              pivot-candidate flag t, the pivot row x and the multiplier rho.
//   col_xfer_t travels to the left: one updated element a and tag c of the
//              column that moves one processor to the left each step.
package ge_pkg;

  localparam int DATA_W = 32;  // width of a matrix element
  localparam int FRAC_W = 16;  // fraction bits of a matrix element
  localparam int ROW_W  = 8;   // width of a row index, rows 1..255

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic [ROW_W-1:0]         row_t;

  // Kind of the token a processor handles in a cycle.
  typedef enum logic [1:0] {
    TOK_NONE   = 2'd0,  // bubble: nothing to do
    TOK_SEARCH = 2'd1,  // first pass: pivot search over row i
    TOK_ELIM   = 2'd2   // second pass: eliminate row i and move it left
  } tok_kind_e;

  typedef struct packed {
    tok_kind_e kind;
    row_t      row;   // index i of the row handled
    logic      t;     // SEARCH: row i becomes the new pivot candidate
    row_t      x;     // ELIM: pivot row of this step (0 = none)
    data_t     rho;   // ELIM: multiplier of row i
  } tok_t;

  typedef struct packed {
    logic  vld;   // an element of the moving column is on the link
    logic  full;  // the sender holds a column (else the data is void)
    row_t  row;
    data_t a;
    logic  c;
  } col_xfer_t;

  // Fixed-point product rho*w, rounded toward minus infinity.
  function automatic data_t fx_mul(data_t x, data_t y);
    logic signed [2*DATA_W-1:0] p;
    p = x * y;
    return data_t'(p >>> FRAC_W);
  endfunction

  // Magnitude, one bit wider so that the most negative number is exact.
  function automatic logic [DATA_W:0] fx_abs(data_t x);
    logic signed [DATA_W:0] xe;
    xe = {x[DATA_W-1], x};
    return (xe < 0) ? -xe : xe;
  endfunction

endpackage
