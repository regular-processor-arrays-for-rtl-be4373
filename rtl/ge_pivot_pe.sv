// Processor 0 of the linear array: pivot search, multipliers and schedule.
//
// At step k processor 0 holds column k, the column of the pivot. Each cycle
// its sequencer names a row i and a pass; processor 0 reads a(i), c(i) of
// its column and forms the token that travels to the right:
//
//   SEARCH row i:  t = (p < |a(i)|) and not c(i), with p the magnitude of
//                  the best candidate of rows 1..i-1 (0 before row 1). The
//                  candidate row r becomes i when t = 1. Rows already used
//                  as pivots are skipped through their tag; on equal
//                  magnitudes the first row wins. After row M, r is the
//                  pivot row x of this step and w (kept by the column cell)
//                  the pivot value.
//   ELIM row i:    rho = a(i) / w, or 0 when row i is tagged, is the pivot
//                  row itself, or no pivot was found. x travels with rho.
//
// The column cell of processor 0 is an ordinary elimination processor, so
// column k itself is eliminated as well and leaves the array to the left:
// that stream (out_*) carries, for every column, the rows M..1 with their
// tags, and the drain passes at the end bring out columns M..N unchanged.
// The pivot row of each step is reported on pivot_valid/pivot_step/
// pivot_row, in the cycle of the last search token. If no untagged row of
// column k is non-zero, pivot_row is 0, no row is tagged, every rho is 0
// and 'singular' is set until the next start.
//
// The equations for t, r, rho and the placement of all pivot work in
// processor 0 follow the algorithm. The fixed-point division
// rho = (a << FRAC_W) / w, truncated toward zero, the handling of a missing
// pivot and the drain are choices of this design. Since the pivot is the
// largest untagged magnitude, |rho| <= 1.
//
// Timing: one token per cycle; tok_out and out_* are registered, one cycle
// after the token is formed. Run length: see ge_sequencer.
module ge_pivot_pe
  import ge_pkg::*;
#(
  parameter int M = 8,
  parameter int N = 9
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  output logic      busy,
  output logic      done,
  // column input (matrix load)
  input  logic      load_en,
  input  row_t      load_row,
  input  data_t     load_a,
  // links to processor 1
  output tok_t      tok_out,
  input  col_xfer_t col_in,
  // pivot row of each step
  output logic      pivot_valid,
  output row_t      pivot_step,
  output row_t      pivot_row,
  output logic      singular,
  // output stream: column out_col, row out_row
  output logic      out_valid,
  output row_t      out_col,
  output row_t      out_row,
  output data_t     out_a,
  output logic      out_c
);

  tok_kind_e seq_kind;
  row_t      seq_row;
  row_t      seq_col;
  logic      seq_drain;
  logic      seq_last;

  data_t     rd_a;
  logic      rd_c;
  data_t     s_q;
  data_t     w_q;
  logic      full_q;
  col_xfer_t col_out;

  logic [DATA_W:0] p_q;    // magnitude of the current pivot candidate
  row_t            r_q;    // row of the current pivot candidate
  row_t            x_q;    // pivot row of the current step
  logic [DATA_W:0] p_prev, a_mag;
  row_t            r_prev, r_next;
  logic            t;
  data_t           rho;
  tok_t            tok;
  logic            rho_zero;

  logic signed [DATA_W+FRAC_W-1:0] num, den, quo;

  ge_sequencer #(.M(M), .N(N)) u_seq (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .kind        (seq_kind),
    .row         (seq_row),
    .col         (seq_col),
    .drain       (seq_drain),
    .search_last (seq_last),
    .busy        (busy),
    .done        (done)
  );

  ge_elim_pe #(.M(M)) u_cell (
    .clk      (clk),
    .rst_n    (rst_n),
    .load_en  (load_en),
    .load_row (load_row),
    .load_a   (load_a),
    .rd_row   (seq_row),
    .tok_in   (tok),
    .tok_out  (tok_out),
    .col_in   (col_in),
    .col_out  (col_out),
    .rd_a     (rd_a),
    .rd_c     (rd_c),
    .s_q      (s_q),
    .w_q      (w_q),
    .full_q   (full_q)
  );

  // pivot search: t = p(i-1) < |a(i) * not c(i)|
  always_comb begin
    p_prev = (seq_row == row_t'(1)) ? '0 : p_q;
    r_prev = (seq_row == row_t'(1)) ? '0 : r_q;
    a_mag  = rd_c ? '0 : fx_abs(rd_a);
    t      = (seq_kind == TOK_SEARCH) && (p_prev < a_mag);
    r_next = t ? seq_row : r_prev;
  end

  // multiplier: rho = a(i) / w unless c(i) or (i = x)
  always_comb begin
    rho_zero = seq_drain || rd_c || (x_q == seq_row) || (x_q == '0) || (w_q == '0);
    num      = {rd_a, {FRAC_W{1'b0}}};
    den      = (w_q == '0) ? {{(DATA_W+FRAC_W-1){1'b0}}, 1'b1}
                           : {{FRAC_W{w_q[DATA_W-1]}}, w_q};
    quo      = num / den;
    rho      = (seq_kind == TOK_ELIM && !rho_zero) ? data_t'(quo) : '0;
  end

  always_comb begin
    tok      = '0;
    tok.kind = seq_kind;
    tok.row  = seq_row;
    tok.t    = t;
    tok.x    = (seq_kind == TOK_ELIM && !seq_drain) ? x_q : '0;
    tok.rho  = rho;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q         <= '0;
      r_q         <= '0;
      x_q         <= '0;
      pivot_valid <= 1'b0;
      pivot_step  <= '0;
      pivot_row   <= '0;
      singular    <= 1'b0;
      out_col     <= '0;
    end else begin
      pivot_valid <= 1'b0;
      if (start && !busy)
        singular <= 1'b0;
      if (seq_kind == TOK_SEARCH) begin
        p_q <= t ? a_mag : p_prev;
        r_q <= r_next;
        if (seq_last) begin
          x_q         <= r_next;
          pivot_valid <= 1'b1;
          pivot_step  <= seq_col;
          pivot_row   <= r_next;
          if (r_next == '0)
            singular <= 1'b1;
        end
      end
      out_col <= seq_col;
    end
  end

  assign out_valid = col_out.vld && col_out.full;
  assign out_row   = col_out.row;
  assign out_a     = col_out.a;
  assign out_c     = col_out.c;

  // the column held by processor 0 never runs out before the last pass
  property p_full_when_elim;
    @(posedge clk) disable iff (!rst_n) (seq_kind == TOK_ELIM) |-> full_q;
  endproperty
  a_full_when_elim: assert property (p_full_when_elim);

endmodule
