// pp_gen: elementary product generator (the NOT-AND stage) of the array multipliers.
//
// Produces every elementary product of an N x N multiplication, grouped by column (weight
// 2^c) and, within a column, ordered by the row of the rearranged product matrix the term
// belongs to. Term x_i*y_j sits in column i+j and in row min(j, N-1-i): rows 0..N-1 are the
// L-shaped rows of the rearranged matrix, so row k holds x_0..x_{N-1-k} times y_k and then
// x_{N-1-k} times y_{k+1}..y_{N-1}.
//
// SIGNED = 1 (two's complement, Baugh-Wooley form as extended by Blankenship): a term with
// exactly one sign bit is taken with the other operand bit inverted (x_{N-1}*~y_j, ~x_i*y_{N-1}),
// and the sign-by-sign term is replaced by (x_{N-1} | y_{N-1}) in both columns 2N-2 and 2N-1. The
// further correction bits x_{N-1} and y_{N-1} of column N-1 are not produced here: the array
// adds them with a half adder of its own. SIGNED = 0: plain AND terms, column 2N-1 empty.
//
// pp[c][p] is the p-th product of column c; positions beyond otf_pkg::raw_pp_count are 0.
// Purely combinational.
module pp_gen #(
  parameter int N      = 5,
  parameter bit SIGNED = 1'b1
) (
  input  logic [N-1:0]              x,
  input  logic [N-1:0]              y,
  output logic [2*N-1:0][N-1:0]     pp
);
  always_comb begin
    pp = '0;
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        automatic int row = (j < N - 1 - i) ? j : N - 1 - i;
        if (!SIGNED) begin
          pp[i+j][row] = x[i] & y[j];
        end else if (i == N - 1 && j == N - 1) begin
          pp[2*N-2][0] = x[N-1] | y[N-1];
          pp[2*N-1][0] = x[N-1] | y[N-1];
        end else if (i == N - 1) begin
          pp[i+j][row] = x[i] & ~y[j];
        end else if (j == N - 1) begin
          pp[i+j][row] = ~x[i] & y[j];
        end else begin
          pp[i+j][row] = x[i] & y[j];
        end
      end
    end
  end
endmodule
