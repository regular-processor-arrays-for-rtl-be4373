// Step sequencer of processor 0.
//
// Produces the token stream that processor 0 issues, one token per cycle.
// For each elimination step k = 1..M-1 it issues a search pass over rows
// 1..M, then an elimination pass over rows M..1, then GAP_CYC idle cycles
// in which the last rows of the column moving in from the right are stored.
// The elimination pass runs from row M down to row 1 because w and x are
// propagated along the negative i direction in the algorithm. After step
// M-1 the columns M..N are still in the array; N-M+1 drain passes (an
// elimination pass with rho = 0, flagged by 'drain') shift them out through
// processor 0 one by one.
//
// Interface: 'start' (ignored while busy) begins a run. 'kind' and 'row'
// give the token of the current cycle, 'col' the number of the column that
// processor 0 holds, which is also the step number k during steps.
// 'search_last' marks the last search token of a step. 'done' stays high
// from the end of a run until the next start.
//
// Timing: a run takes (M-1)*(2M+GAP_CYC) + (N-M+1)*(M+GAP_CYC) cycles from
// the clock edge that samples 'start' to the first cycle with 'done' high.
// The two passes per step follow the algorithm; the order of rows, the gap
// and the drain are choices of this design. Requires 2 <= M <= N.
module ge_sequencer
  import ge_pkg::*;
#(
  parameter int M       = 8,
  parameter int N       = 9,
  parameter int GAP_CYC = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  output tok_kind_e kind,
  output row_t      row,
  output row_t      col,
  output logic      drain,
  output logic      search_last,
  output logic      busy,
  output logic      done
);

  typedef enum logic [2:0] {S_IDLE, S_SEARCH, S_ELIM, S_GAP, S_DONE} state_e;

  state_e state;
  row_t   gap_cnt;

  initial begin
    assert (M >= 2 && M <= N && M < (1 << ROW_W) && N < (1 << ROW_W))
      else $error("ge_sequencer: needs 2 <= M <= N < 256");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      row     <= '0;
      col     <= '0;
      gap_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state <= S_SEARCH;
            row   <= row_t'(1);
            col   <= row_t'(1);
          end
        end
        S_SEARCH: begin
          if (int'(row) == M) begin
            state <= S_ELIM;
          end else begin
            row <= row + row_t'(1);
          end
        end
        S_ELIM: begin
          if (row == row_t'(1)) begin
            state   <= S_GAP;
            gap_cnt <= row_t'(1);
            row     <= '0;
          end else begin
            row <= row - row_t'(1);
          end
        end
        S_GAP: begin
          if (int'(gap_cnt) >= GAP_CYC) begin
            if (int'(col) == N) begin
              state <= S_DONE;
            end else begin
              col <= col + row_t'(1);
              if (int'(col) + 1 <= M - 1) begin
                state <= S_SEARCH;
                row   <= row_t'(1);
              end else begin
                state <= S_ELIM;
                row   <= row_t'(M);
              end
            end
          end else begin
            gap_cnt <= gap_cnt + row_t'(1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    unique case (state)
      S_SEARCH: kind = TOK_SEARCH;
      S_ELIM:   kind = TOK_ELIM;
      default:  kind = TOK_NONE;
    endcase
    drain       = (int'(col) >= M);
    search_last = (state == S_SEARCH) && (int'(row) == M);
    busy        = (state == S_SEARCH) || (state == S_ELIM) || (state == S_GAP);
    done        = (state == S_DONE);
  end

endmodule
