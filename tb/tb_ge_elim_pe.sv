// Test of the elimination processor against a cycle-level model written
// from its equations. Every cycle gets a random token (bubble, search row i
// with random t, or elimination row i with random x and |rho| <= 1), a
// random element from the right-hand neighbour and, now and then, a load.
// Compared after every clock edge: the forwarded token (one-cycle hop), the
// element sent left (a - rho*w, c or (i = x), the 'full' flag), and s, w.
// Mechanisms counted and required: a search pass reaching row M (w is
// latched), an element arriving from the right being used later, the
// processor emptying after its row 1 leaves, and refilling.
module tb_ge_elim_pe;
  import ge_pkg::*;

  localparam int M = 5;

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      load_en = 1'b0;
  row_t      load_row = '0;
  data_t     load_a = '0;
  row_t      rd_row;
  tok_t      tok_in = '0, tok_out;
  col_xfer_t col_in = '0, col_out;
  data_t     rd_a, s_q, w_q;
  logic      rd_c, full_q;

  int checks = 0, failures = 0;
  int n_wlatch = 0, n_empty = 0, n_refill = 0, n_elim = 0;

  assign rd_row = tok_in.row;

  ge_elim_pe #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(1000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  int ma [1:M];
  bit mc [1:M];
  int ms, mw;
  bit mfull;

  function automatic int fxmul(int x, int y);
    longint p;
    p = longint'(x) * longint'(y);
    return int'(p >>> FRAC_W);
  endfunction

  tok_t      exp_tok;
  col_xfer_t exp_col;

  initial begin
    for (int i = 1; i <= M; i++) begin ma[i] = 0; mc[i] = 0; end
    ms = 0; mw = 0; mfull = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // load a column first
    for (int i = 1; i <= M; i++) begin
      @(negedge clk);
      load_en = 1'b1; load_row = row_t'(i); load_a = data_t'($urandom_range(0, 1 << 20) - (1 << 19));
      @(posedge clk);
      ma[i] = int'(load_a); mc[i] = 0; mfull = 1;
    end
    @(negedge clk);
    load_en = 1'b0;
    for (int n = 0; n < 20000; n++) begin
      int sel;
      // drive
      sel = $urandom_range(0, 9);
      tok_in = '0;
      if (sel < 4) begin
        tok_in.kind = TOK_SEARCH;
        tok_in.row  = row_t'($urandom_range(1, M));
        tok_in.t    = 1'($urandom);
      end else if (sel < 8) begin
        tok_in.kind = TOK_ELIM;
        tok_in.row  = row_t'($urandom_range(1, M));
        tok_in.x    = row_t'($urandom_range(0, M));
        tok_in.rho  = data_t'(int'($urandom_range(0, 1 << 17)) - (1 << 16));
      end
      col_in = '0;
      if ($urandom_range(0, 2) == 0) begin
        col_in.vld  = 1'b1;
        col_in.full = ($urandom_range(0, 3) != 0);
        col_in.row  = row_t'($urandom_range(1, M));
        col_in.a    = data_t'($urandom_range(0, 1 << 20) - (1 << 19));
        col_in.c    = 1'($urandom);
      end
      load_en = ($urandom_range(0, 40) == 0) && tok_in.kind == TOK_NONE;
      load_row = row_t'($urandom_range(1, M));
      load_a = data_t'($urandom_range(0, 1 << 20) - (1 << 19));
      // expected outputs after the edge
      exp_tok = tok_in;
      exp_col = '0;
      if (tok_in.kind == TOK_ELIM) begin
        exp_col.vld  = 1'b1;
        exp_col.full = mfull;
        exp_col.row  = tok_in.row;
        exp_col.a    = data_t'(ma[tok_in.row] - fxmul(int'(tok_in.rho), mw));
        exp_col.c    = mc[tok_in.row] | (tok_in.x == tok_in.row);
        n_elim++;
      end
      @(posedge clk);
      // update model
      if (tok_in.kind == TOK_SEARCH) begin
        if (tok_in.t) ms = ma[tok_in.row];
        else if (tok_in.row == 1) ms = 0;
        if (int'(tok_in.row) == M) begin mw = ms; n_wlatch++; end
      end
      if (load_en) mfull = 1;
      if (tok_in.kind == TOK_ELIM && tok_in.row == 1) begin
        if (mfull) n_empty++;
        mfull = 0;
      end
      if (col_in.vld && col_in.full && col_in.row == 1) begin
        if (!mfull) n_refill++;
        mfull = 1;
      end
      if (load_en) begin ma[load_row] = int'(load_a); mc[load_row] = 0; end
      else if (col_in.vld && col_in.full) begin ma[col_in.row] = int'(col_in.a); mc[col_in.row] = col_in.c; end
      @(negedge clk);
      checks++;
      if (tok_out !== exp_tok) begin
        failures++; if (failures < 10) $display("FAIL: cycle %0d token not forwarded", n);
      end
      checks++;
      if (col_out !== exp_col) begin
        failures++;
        if (failures < 10)
          $display("FAIL: cycle %0d col_out %0d/%0d/%0d/%0d/%0d, expected %0d/%0d/%0d/%0d/%0d", n,
                   col_out.vld, col_out.full, col_out.row, col_out.a, col_out.c,
                   exp_col.vld, exp_col.full, exp_col.row, exp_col.a, exp_col.c);
      end
      checks++;
      if (s_q !== data_t'(ms) || w_q !== data_t'(mw) || full_q !== mfull) begin
        failures++; if (failures < 10) $display("FAIL: cycle %0d s/w/full", n);
      end
    end
    checks++; if (n_wlatch == 0) begin failures++; $display("FAIL: w never latched"); end
    checks++; if (n_empty == 0)  begin failures++; $display("FAIL: never emptied"); end
    checks++; if (n_refill == 0) begin failures++; $display("FAIL: never refilled"); end
    $display("w latched %0d, emptied %0d, refilled %0d, eliminations %0d", n_wlatch, n_empty, n_refill, n_elim);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
