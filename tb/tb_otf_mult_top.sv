// tb_otf_mult_top: end-to-end test of the top at its default size (N = 5), exhaustive over all
// 1024 operand pairs of each multiplier, against the simulator's own 10-bit products. It also
// counts, and requires at least once, each mechanism of the design:
//   neg_operand   a two's complement product with exactly one negative operand
//   both_neg      both operands negative
//   min_times_min (-16) * (-16) = 256, the one product that needs all 10 bits
//   sign_fix      the sign-correction column terms x4|y4 active (pp of columns 8 and 9)
//   full_ripple   a carry made by the lowest pair (c_4) that the on-the-fly converter passes
//                 through every pair up to z_9 (s_2 & s_3 & c_4), signed or unsigned array
//   top_carry     the top pair (a_1, b_1) generates a carry out of z_9 (c_1 = 1), which the
//                 modulo-2^10 product drops
//   max_unsigned  31 * 31 = 961 on the unsigned multiplier
// The multipliers are combinational: results are compared 1 time unit after the operands.
module tb_otf_mult_top;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0] xs, ys, xu, yu;
  logic [9:0] zs, zu;

  otf_mult_top dut (.xs(xs), .ys(ys), .zs(zs), .xu(xu), .yu(yu), .zu(zu));

  // Probe: a second copy of the front end of each multiplier exposes the carry-sum pairs that
  // enter the on-the-fly converter for the same operands, so the test can see which conversion
  // cases occur. ps/pc and us/uc are s_i = a_i ^ b_i and c_i = a_i & b_i, bit i-1 = pair i.
  logic [9:0][4:0] pp_s, pp_u;
  logic [5:0] lo_s, lo_u;
  logic [3:0] pa_s, pb_s, pa_u, pb_u, ps, pc, us, uc;
  pp_gen    #(.N(5), .SIGNED(1'b1)) probe_pps (.x(xs), .y(ys), .pp(pp_s));
  csa_array #(.N(5), .SIGNED(1'b1)) probe_csas (.pp(pp_s), .hx(xs[4]), .hy(ys[4]),
                                                .zlo(lo_s), .a(pa_s), .b(pb_s));
  pp_gen    #(.N(5), .SIGNED(1'b0)) probe_ppu (.x(xu), .y(yu), .pp(pp_u));
  csa_array #(.N(5), .SIGNED(1'b0)) probe_csau (.pp(pp_u), .hx(1'b0), .hy(1'b0),
                                                .zlo(lo_u), .a(pa_u), .b(pb_u));
  assign ps = pa_s ^ pb_s;
  assign pc = pa_s & pb_s;
  assign us = pa_u ^ pb_u;
  assign uc = pa_u & pb_u;

  int n_neg_operand = 0, n_both_neg = 0, n_min_times_min = 0, n_sign_fix = 0;
  int n_full_ripple = 0, n_top_carry = 0, n_max_unsigned = 0;

  task automatic require(input int count, input string name);
    checks++;
    $display("mechanism %-14s seen %0d times", name, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never exercised", name);
    end
  endtask

  initial begin
    for (int v = 0; v < 1024; v++) begin
      logic [9:0] exp_s, exp_u;
      {xs, ys} = 10'(v);
      {yu, xu} = 10'(v) ^ 10'h2b5;  // a different, still exhaustive, order
      #1;
      exp_s = 10'($signed(xs) * $signed(ys));
      exp_u = 10'(xu * yu);
      checks += 2;
      if (zs != exp_s) begin
        failures++;
        if (failures < 20) $display("FAIL signed %0d * %0d = %0d, expected %0d",
                                    $signed(xs), $signed(ys), $signed(zs), $signed(exp_s));
      end
      if (zu != exp_u) begin
        failures++;
        if (failures < 20) $display("FAIL unsigned %0d * %0d = %0d, expected %0d", xu, yu, zu, exp_u);
      end
      if (xs[4] != ys[4]) n_neg_operand++;
      if (xs[4] && ys[4]) n_both_neg++;
      if (xs == 5'b10000 && ys == 5'b10000 && zs == 10'd256) n_min_times_min++;
      if (xs[4] | ys[4]) n_sign_fix++;
      if (ps[1] && ps[2] && pc[3]) n_full_ripple++;
      if (us[1] && us[2] && uc[3]) n_full_ripple++;
      if (pc[0]) n_top_carry++;
      if (xu == 5'd31 && yu == 5'd31 && zu == 10'd961) n_max_unsigned++;
      if (v % 64 == 0) @(posedge clk);
    end
    require(n_neg_operand, "neg_operand");
    require(n_both_neg, "both_neg");
    require(n_min_times_min, "min_times_min");
    require(n_sign_fix, "sign_fix");
    require(n_full_ripple, "full_ripple");
    require(n_top_carry, "top_carry");
    require(n_max_unsigned, "max_unsigned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
