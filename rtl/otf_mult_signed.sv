// otf_mult_signed: N x N two's complement array multiplier with on-the-fly conversion.
//
// z = x * y, all three in two's complement, z 2N bits wide (exact, no overflow).
// Structure: pp_gen forms the elementary products in the modified Baugh-Wooley form (sign-bit
// terms inverted, x_{N-1}|y_{N-1} in the two top columns, x_{N-1} and y_{N-1} added in column
// N-1); csa_array reduces them with full and half adders, delivering product bits z_0..z_N
// directly and columns N+1..2N-1 as carry-sum pairs; otf_conv assimilates the pairs into
// z_{N+1}..z_{2N-1} without a carry-propagate adder. Delay: one NOT-AND level, N adder cells
// (checked for N = 4..64 for this arrangement) and one AND-XOR level, about (N+1) full adder
// delays. Purely combinational; register the ports outside if a pipeline stage is wanted.
module otf_mult_signed #(
  parameter int N = 5
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] z
);
  logic [2*N-1:0][N-1:0] pp;
  logic [N:0]            zlo;
  logic [N-2:0]          a, b, zhi;

  pp_gen    #(.N(N), .SIGNED(1'b1)) u_pp  (.x(x), .y(y), .pp(pp));
  csa_array #(.N(N), .SIGNED(1'b1)) u_csa (.pp(pp), .hx(x[N-1]), .hy(y[N-1]),
                                           .zlo(zlo), .a(a), .b(b));
  otf_conv  #(.N(N))                u_otf (.a(a), .b(b), .zhi(zhi));

  assign z = {zhi, zlo};

  initial assert (N >= 3) else $error("otf_mult_signed: N must be at least 3");
endmodule
