// otf_mult_top: the two multipliers side by side, each with its own ports.
//   zs = xs * ys, two's complement (otf_mult_signed)
//   zu = xu * yu, unsigned          (otf_mult_unsigned)
// Both are combinational, N x N -> 2N bits, with no clock or reset. N defaults to 5, the width
// of the worked example the two arrays follow. The two multipliers share no hardware; putting
// them in one top with one width parameter is only a packaging choice of this design.
module otf_mult_top #(
  parameter int N = 5
) (
  input  logic [N-1:0]   xs,
  input  logic [N-1:0]   ys,
  output logic [2*N-1:0] zs,
  input  logic [N-1:0]   xu,
  input  logic [N-1:0]   yu,
  output logic [2*N-1:0] zu
);
  otf_mult_signed   #(.N(N)) u_signed   (.x(xs), .y(ys), .z(zs));
  otf_mult_unsigned #(.N(N)) u_unsigned (.x(xu), .y(yu), .z(zu));
endmodule
