// csa_array: the full adder / half adder array of the on-the-fly-conversion multipliers.
//
// Reduces the elementary products column by column without any carry-propagate adder. Column c
// collects its products (pp[c][*], in row order) followed by the carries of every cell of column
// c-1, and reduces them with a chain of cells: a half adder first when an odd number of
// reductions is needed, otherwise a full adder on three products, then full adders that each
// add one more product and one more carry to the running sum (see otf_pkg::order). Every cell's
// carry moves to column c+1, its sum down the chain.
//   * columns 0..N   end in one bit: zlo[c] is product bit z_c ("carry-assimilated" part);
//   * columns N+1..2N-1 end in a carry-sum pair (a_i, b_i) with i = 2N - c, which the
//     on-the-fly converter turns into z_{N+1}..z_{2N-1}. a_i is the chain's last sum (or the
//     column's only product), b_i the input left over (a carry from column c-1).
// For SIGNED = 1 the sign bits hx = x_{N-1}, hy = y_{N-1} go through a separate half adder whose
// sum is the last product of column N-1 and whose carry is the third carry of column N. At
// N = 5 this gives the drawn two's complement array cell for cell (14 full adders, 7 half
// adders) and the drawn unsigned array's cell count per column (12 full adders, 8 half adders);
// in the unsigned array the half adder of columns N-1 and N is placed first in the chain rather than
// further down as drawn, which changes no function. The longest path through the array is N
// cells (counted for N = 4..64, both arrangements). The chain rule for N other than 5 is this
// design's own; the document draws only N = 5. hx and hy are ignored when SIGNED = 0.
// pp slots beyond a column's product count are not read. Purely combinational.
module csa_array
  import otf_pkg::*;
#(
  parameter int N      = 5,
  parameter bit SIGNED = 1'b1
) (
  input  logic [2*N-1:0][N-1:0] pp,
  input  logic                  hx,
  input  logic                  hy,
  output logic [N:0]            zlo,
  output logic [N-2:0]          a,
  output logic [N-2:0]          b
);
  logic sgn_s, sgn_c;

  if (SIGNED) begin : g_sign_ha
    half_adder u_ha (.a(hx), .b(hy), .s(sgn_s), .c(sgn_c));
  end else begin : g_no_sign_ha
    assign sgn_s = 1'b0;
    assign sgn_c = 1'b0;
  end

  // Column c is generate block g_col[c]; cell k of its chain is g_col[c].g_cell[k], with sum
  // s and carry co. Carries are read by column c+1 through these hierarchical names.
  for (genvar c = 0; c < 2 * N; c++) begin : g_col
    localparam int RP = raw_pp_count(N, SIGNED, c);
    localparam int P  = pp_count(N, SIGNED, c);
    localparam int KP = cells(N, SIGNED, c - 1);  // cells of column c-1
    localparam int C  = KP + ((SIGNED && c == N) ? 1 : 0);
    localparam int E  = P + C;
    localparam int R  = E - out_count(N, E, c);   // reductions needed
    localparam int K  = R / 2 + R % 2;             // cells in this column's chain
    localparam bit H  = (R % 2) == 1;
    localparam int F0 = H ? 2 : 3;

    // Column inputs: products at 0..P-1, carries at P..E-1.
    logic [E-1:0] el;
    for (genvar p = 0; p < E; p++) begin : g_el
      if (p < RP) begin : g_pp
        assign el[p] = pp[c][p];
      end else if (p < P) begin : g_sum
        assign el[p] = sgn_s;
      end else if (SIGNED && c == N && p - P == 2) begin : g_ha
        // Column N: the sign half adder's carry is placed third among the carries.
        assign el[p] = sgn_c;
      end else if (SIGNED && c == N && p - P > 2) begin : g_hi
        assign el[p] = g_col[c-1].g_cell[p-P-1].co;
      end else begin : g_cy
        assign el[p] = g_col[c-1].g_cell[p-P].co;
      end
    end

    for (genvar k = 0; k < K; k++) begin : g_cell
      logic s, co;
      if (k == 0 && H) begin : g_h
        half_adder u_ha (.a(el[order(P, C, F0, 0)]), .b(el[order(P, C, F0, 1)]),
                         .s(s), .c(co));
      end else if (k == 0) begin : g_f
        full_adder u_fa (.a(el[order(P, C, F0, 0)]), .b(el[order(P, C, F0, 1)]),
                         .ci(el[order(P, C, F0, 2)]), .s(s), .co(co));
      end else begin : g_f
        full_adder u_fa (.a(g_cell[k-1].s),
                         .b(el[order(P, C, F0, F0 + 2 * (k - 1))]),
                         .ci(el[order(P, C, F0, F0 + 2 * (k - 1) + 1)]),
                         .s(s), .co(co));
      end
    end

    logic res;  // the single remaining bit, or a_i of the pair
    if (K > 0) begin : g_res_chain
      assign res = g_cell[K-1].s;
    end else if (c <= N || E >= 2) begin : g_res_pass
      assign res = el[0];
    end else begin : g_res_empty
      assign res = 1'b0;
    end

    if (c <= N) begin : g_lo_out
      assign zlo[c] = res;
    end else begin : g_pair_out
      assign a[2*N-c-1] = res;
      assign b[2*N-c-1] = el[order(P, C, F0, E - 1)];
    end
  end
endmodule
