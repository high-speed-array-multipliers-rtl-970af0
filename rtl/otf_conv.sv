// otf_conv: on-the-fly conversion of the multiplier's carry-sum pairs into product bits.
//
// Input pair i (i = 1..N-1, port bit i-1) is the carry-sum pair (a_i, b_i) of column 2N-i of
// the array; pair 1 is the most significant. A half adder per pair gives s_i = a_i ^ b_i and
// c_i = a_i & b_i. Because s_i and c_i are never both 1, the carry entering column 2N-i is the
// exclusive-or of the terms s_{i+1}..s_{m-1} & c_m (m = i+1..N-1), and
//   z_{2N-i} = s_i ^ c_{i+1} ^ s_{i+1}c_{i+2} ^ ... ^ s_{i+1}..s_{N-2}c_{N-1}.
// It is evaluated with the recurrences
//   k_{i,1} = 1,          k_{i,j} = k_{i,j-1} & s_{i+j-1}       (j = 2..N-1-i)
//   t_{i,0} = s_i,        t_{i,j} = t_{i,j-1} ^ (k_{i,j} & c_{i+j}) (j = 1..N-1-i)
// and z_{2N-i} = t_{i,N-1-i}. Step j of bit i needs only pair i+j, so each AND-XOR step runs as
// soon as the next less significant pair leaves the array; after the last pair (i = N-1)
// arrives, only one AND-XOR level remains, whatever N is. The recurrences and cell layout follow
// the document's conversion logic; carries out of z_{2N-1} are dropped (the product is taken
// modulo 2^{2N}).
// zhi[m] is product bit z_{N+1+m}. Purely combinational.
module otf_conv #(
  parameter int N = 5
) (
  input  logic [N-2:0] a,
  input  logic [N-2:0] b,
  output logic [N-2:0] zhi
);
  // s[i], c[i] for i = 1..N-1. c[1], the carry out of the top column, is not used: the
  // product is exact in 2N bits, so that carry only completes the modulo-2^{2N} wrap.
  logic [N-1:1] s, c;

  for (genvar i = 1; i <= N - 1; i++) begin : g_ha
    half_adder u_ha (.a(a[i-1]), .b(b[i-1]), .s(s[i]), .c(c[i]));
  end

  for (genvar i = 1; i <= N - 1; i++) begin : g_bit
    localparam int L = N - 1 - i;  // conversion steps for z_{2N-i}
    if (L == 0) begin : g_last
      assign zhi[N-1-i] = s[i];    // z_{N+1} = t_{N-1,0} = s_{N-1}
    end else begin : g_conv
      logic [L:0] t;
      logic [L:1] k;
      assign t[0] = s[i];
      for (genvar j = 1; j <= L; j++) begin : g_step
        if (j == 1) begin : g_k1
          assign k[j] = 1'b1;
        end else begin : g_kj
          assign k[j] = k[j-1] & s[i+j-1];
        end
        assign t[j] = t[j-1] ^ (k[j] & c[i+j]);
      end
      assign zhi[N-1-i] = t[L];
    end
  end
endmodule
