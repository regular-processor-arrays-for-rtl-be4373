// Elimination processor of the linear array.
//
// At step k, processor q holds column j = k + q in its column store. It
// handles one token per cycle, the token that its left neighbour passed on
// in the previous cycle, and passes the same token on to the right one
// cycle later (all links are registered).
//
//   SEARCH row i:  s := t ? a(i) : s, with s reset to 0 at row 1. After row
//                  M, s is the pivot row's element of this column, and it is
//                  copied into w, the value the elimination pass uses.
//   ELIM row i:    a' = a(i) - rho * w and c' = c(i) or (i = x) are sent to
//                  the left neighbour, which stores them for the next step.
//                  Rows already tagged and the pivot row arrive with rho = 0
//                  and so leave unchanged.
//
// The column arriving from the right is written into the column store as it
// comes. The elimination pass visits rows M..1, so each write lands on a row
// this processor has already sent away. 'full' says whether the processor
// holds a column: it is cleared when row 1 leaves and set again when row 1
// of a full neighbour's column arrives; the last processor of the array has
// no right neighbour and empties after the first step.
//
// The update equations follow the regular iterative form of the algorithm.
// The pass order, the token format, the one-cycle hop, the in-place storing
// of the arriving column and the 'full' flag are choices of this design.
// rd_row selects the row shown on rd_a/rd_c; in the array it is tok_in.row,
// and processor 0 drives it from its sequencer so that it can form t and rho
// from the same read.
//
// Timing: tok_out and col_out are registered, one cycle after tok_in.
module ge_elim_pe
  import ge_pkg::*;
#(
  parameter int M = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  // column input of this processor (matrix load)
  input  logic      load_en,
  input  row_t      load_row,
  input  data_t     load_a,
  // token from the left, token to the right
  input  row_t      rd_row,
  input  tok_t      tok_in,
  output tok_t      tok_out,
  // column data from the right, column data to the left
  input  col_xfer_t col_in,
  output col_xfer_t col_out,
  // state seen by processor 0
  output data_t     rd_a,
  output logic      rd_c,
  output data_t     s_q,
  output data_t     w_q,
  output logic      full_q
);

  data_t s_next;
  data_t a_new;
  logic  c_new;

  ge_col_mem #(.M(M)) u_mem (
    .clk      (clk),
    .rst_n    (rst_n),
    .load_en  (load_en),
    .load_row (load_row),
    .load_a   (load_a),
    .wr_en    (col_in.vld && col_in.full),
    .wr_row   (col_in.row),
    .wr_a     (col_in.a),
    .wr_c     (col_in.c),
    .rd_row   (rd_row),
    .rd_a     (rd_a),
    .rd_c     (rd_c)
  );

  // s(i) = t ? a(i) : s(i-1), with s(0) = 0
  always_comb begin
    if (tok_in.t)
      s_next = rd_a;
    else if (tok_in.row == row_t'(1))
      s_next = '0;
    else
      s_next = s_q;
  end

  // a(k+1) = a(k) - rho * w ; c(k+1) = c(k) or (i = x)
  always_comb begin
    a_new = rd_a - fx_mul(tok_in.rho, w_q);
    c_new = rd_c || (tok_in.x == tok_in.row);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q     <= '0;
      w_q     <= '0;
      full_q  <= 1'b0;
      tok_out <= '0;
      col_out <= '0;
    end else begin
      tok_out <= tok_in;
      col_out <= '0;
      if (load_en)
        full_q <= 1'b1;
      unique case (tok_in.kind)
        TOK_SEARCH: begin
          s_q <= s_next;
          if (int'(tok_in.row) == M)
            w_q <= s_next;
        end
        TOK_ELIM: begin
          col_out.vld  <= 1'b1;
          col_out.full <= full_q;
          col_out.row  <= tok_in.row;
          col_out.a    <= a_new;
          col_out.c    <= c_new;
          if (tok_in.row == row_t'(1))
            full_q <= 1'b0;
        end
        default: ;
      endcase
      // the neighbour's row 1 comes last and completes the new column
      if (col_in.vld && col_in.full && col_in.row == row_t'(1))
        full_q <= 1'b1;
    end
  end

endmodule
