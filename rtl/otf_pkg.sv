// otf_pkg: shared structure functions of the on-the-fly-conversion array multipliers.
//
// The multipliers are purely combinational and fully parameterised by the operand width n.
// Their carry-save array is built column by column: column c (weight 2^c) receives its
// elementary products ("pp", ordered by the row of the rearranged product matrix they come
// from) and the carries of every adder cell of column c-1. Each column is reduced by a chain of
// adder cells: the low n+1 columns down to one bit, the columns n+1..2n-1 down to a carry-sum
// pair that the on-the-fly converter assimilates. The functions below give, for any n, how many
// products and carries a column has, how many cells it needs, and in which order the chain
// consumes its inputs. With n = 5 they reproduce the cell and wire arrangement drawn for the
// two's complement array (14 full adders and 7 half adders); the ordering rule used for other n
// is this design's own generalisation of that drawing.
package otf_pkg;

  // Raw elementary products produced by pp_gen for column c.
  // Two's complement (modified Baugh-Wooley form): column n-1 holds n products (the
  // uncomplemented sign bits x_{n-1}, y_{n-1} go to a separate half adder), columns 2n-2 and
  // 2n-1 hold one (x_{n-1} OR y_{n-1}) each. Unsigned: plain AND products, none in column 2n-1.
  function automatic int raw_pp_count(input int n, input bit sgn, input int c);
    if (c < 0 || c > 2 * n - 1) return 0;
    if (c <= n - 1) return c + 1;
    if (c <= 2 * n - 3) return 2 * n - 1 - c;
    if (c == 2 * n - 2) return 1;
    return sgn ? 1 : 0;
  endfunction

  // Products entering the column's chain: in the signed array the sum of the sign-bit half
  // adder HA(x_{n-1}, y_{n-1}) is the last product of column n-1.
  function automatic int pp_count(input int n, input bit sgn, input int c);
    return raw_pp_count(n, sgn, c) + ((sgn && c == n - 1) ? 1 : 0);
  endfunction

  // Bits a column is reduced to: 1 in columns 0..n, a carry-sum pair above.
  function automatic int out_count(input int n, input int elems, input int c);
    int o;
    o = (c <= n) ? 1 : 2;
    if (elems < o) o = elems;
    return o;
  endfunction

  // Number of adder cells (full plus half) in the chain of column c.
  function automatic int cells(input int n, input bit sgn, input int c);
    int k, e, r;
    k = 0;
    for (int col = 0; col <= c; col++) begin
      e = pp_count(n, sgn, col) + k + ((sgn && col == n) ? 1 : 0);
      r = e - out_count(n, e, col);
      k = r / 2 + r % 2;
    end
    return k;
  endfunction

  // Index, in the column's input vector (products at 0..p_n-1, carries at p_n..p_n+c_n-1), of
  // the q-th input the chain consumes; first is 2 when the chain starts with a half adder, else
  // 3. The first cell takes products first; every later full adder takes the running sum, one
  // more product and one more carry, falling back to whichever list still has entries.
  function automatic int order(input int p_n, input int c_n, input int first, input int q);
    int pi, ci, idx;
    if (q < first) return q;
    pi = (first < p_n) ? first : p_n;
    ci = (first > p_n) ? first - p_n : 0;
    idx = 0;
    for (int s = first; s <= q; s++) begin
      if (((s - first) % 2 == 0 && pi < p_n) || ci >= c_n) begin
        idx = pi;
        pi++;
      end else begin
        idx = p_n + ci;
        ci++;
      end
    end
    return idx;
  endfunction

endpackage
