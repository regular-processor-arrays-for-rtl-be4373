// Test of the column store: random loads, neighbour writes and reads
// against an array model. Checks that a load clears the tag, that a load
// wins over a simultaneous write, that reads are combinational, and that
// rows outside 1..M are ignored on write and read as zero.
module tb_ge_col_mem;
  import ge_pkg::*;

  localparam int M = 8;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  load_en = 1'b0, wr_en = 1'b0, wr_c = 1'b0;
  row_t  load_row = '0, wr_row = '0, rd_row = '0;
  data_t load_a = '0, wr_a = '0;
  data_t rd_a;
  logic  rd_c;

  int checks = 0, failures = 0;
  data_t ma [1:M];
  bit    mc [1:M];
  bit    known [1:M];
  int    n_prio = 0;

  ge_col_mem #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 1; i <= M; i++) begin known[i] = 0; mc[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // tags are cleared by reset
    for (int i = 1; i <= M; i++) begin
      rd_row = row_t'(i);
      #1;
      checks++;
      if (rd_c !== 1'b0) begin failures++; $display("FAIL: tag %0d after reset", i); end
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      load_en  = ($urandom_range(0, 3) == 0);
      load_row = row_t'($urandom_range(0, M + 1));
      load_a   = data_t'($urandom);
      wr_en    = ($urandom_range(0, 1) == 0);
      wr_row   = ($urandom_range(0, 1) == 0) ? load_row : row_t'($urandom_range(0, M + 1));
      wr_a     = data_t'($urandom);
      wr_c     = 1'($urandom);
      rd_row   = row_t'($urandom_range(0, M + 1));
      #1;
      checks++;
      if (rd_row >= 1 && int'(rd_row) <= M) begin
        if (known[rd_row] && (rd_a !== ma[rd_row] || rd_c !== mc[rd_row])) begin
          failures++;
          $display("FAIL: row %0d read %h/%0d, expected %h/%0d", rd_row, rd_a, rd_c, ma[rd_row], mc[rd_row]);
        end
      end else if (rd_a !== '0 || rd_c !== 1'b0) begin
        failures++;
        $display("FAIL: out-of-range row %0d read non-zero", rd_row);
      end
      @(posedge clk);
      if (load_en && load_row >= 1 && int'(load_row) <= M) begin
        ma[load_row] = load_a; mc[load_row] = 0; known[load_row] = 1;
        if (wr_en && wr_row == load_row) n_prio++;
      end else if (wr_en && wr_row >= 1 && int'(wr_row) <= M) begin
        ma[wr_row] = wr_a; mc[wr_row] = wr_c; known[wr_row] = 1;
      end
    end
    checks++;
    if (n_prio == 0) begin failures++; $display("FAIL: load/write collision never tested"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
