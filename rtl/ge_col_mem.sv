// Column store of one processor.
//
// Holds one matrix column: the element a(i) and the one-bit tag c(i) of each
// row i = 1..M. c(i) = 1 marks a row that has already served as a pivot row.
// Each processor of the array keeps exactly one column, so the memory per
// processor grows with the number of rows only.
//
// Ports: a load port (load_en, load_row, load_a) writes an element of the
// input matrix and clears its tag; a write port (wr_en, wr_row, wr_a, wr_c)
// stores an element of the updated column arriving from the right-hand
// neighbour. Load has priority. The read port (rd_row -> rd_a, rd_c) is
// combinational; writes take effect at the next clock edge. Tags are cleared
// by reset; elements are not, since none is read before it is loaded.
// Row indices outside 1..M are ignored on write and read as zero.
//
// One column per processor and the tag meaning follow the array's
// derivation; the ports, the load priority and the reset behaviour are
// this design's choices.
module ge_col_mem
  import ge_pkg::*;
#(
  parameter int M = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load_en,
  input  row_t  load_row,
  input  data_t load_a,
  input  logic  wr_en,
  input  row_t  wr_row,
  input  data_t wr_a,
  input  logic  wr_c,
  input  row_t  rd_row,
  output data_t rd_a,
  output logic  rd_c
);

  data_t    a_mem [M];
  logic [M-1:0] c_mem;

  function automatic logic in_range(row_t r);
    return (r >= row_t'(1)) && (int'(r) <= M);
  endfunction

  always_ff @(posedge clk) begin
    if (load_en && in_range(load_row))
      a_mem[int'(load_row) - 1] <= load_a;
    else if (wr_en && in_range(wr_row))
      a_mem[int'(wr_row) - 1] <= wr_a;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      c_mem <= '0;
    else if (load_en && in_range(load_row))
      c_mem[int'(load_row) - 1] <= 1'b0;
    else if (wr_en && in_range(wr_row))
      c_mem[int'(wr_row) - 1] <= wr_c;
  end

  always_comb begin
    if (in_range(rd_row)) begin
      rd_a = a_mem[int'(rd_row) - 1];
      rd_c = c_mem[int'(rd_row) - 1];
    end else begin
      rd_a = '0;
      rd_c = 1'b0;
    end
  end

endmodule
