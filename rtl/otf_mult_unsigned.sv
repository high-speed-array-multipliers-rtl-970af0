// otf_mult_unsigned: N x N unsigned array multiplier with on-the-fly conversion.
//
// z = x * y for unsigned x, y; z is 2N bits (exact). Same structure as the two's complement
// version without its sign handling: pp_gen gives plain AND products (x_{N-1}y_{N-1} alone in
// column 2N-2, column 2N-1 empty), csa_array reduces them (no sign-bit half adder), and
// otf_conv assimilates columns N+1..2N-1. Column 2N-1 holds only the carry out of column
// 2N-2, so its pair is (a_1, b_1) = (0, carry). Purely combinational.
module otf_mult_unsigned #(
  parameter int N = 5
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] z
);
  logic [2*N-1:0][N-1:0] pp;
  logic [N:0]            zlo;
  logic [N-2:0]          a, b, zhi;

  pp_gen    #(.N(N), .SIGNED(1'b0)) u_pp  (.x(x), .y(y), .pp(pp));
  csa_array #(.N(N), .SIGNED(1'b0)) u_csa (.pp(pp), .hx(1'b0), .hy(1'b0),
                                           .zlo(zlo), .a(a), .b(b));
  otf_conv  #(.N(N))                u_otf (.a(a), .b(b), .zhi(zhi));

  assign z = {zhi, zlo};

  initial assert (N >= 3) else $error("otf_mult_unsigned: N must be at least 3");
endmodule
