// tb_pp_gen: checks the elementary product generator at N = 5, exhaustively over x and y.
//   * the weighted sum of all products, plus the correction bits x4 and y4 at weight 2^4 in the
//     two's complement case, must equal x*y modulo 2^10 (signed, resp. unsigned product);
//   * individual terms of the rearranged two's complement matrix (top row x4|y4 in columns 9
//     and 8 and x4*~y0 in column 4; ~x3*y4, ~x2*y4, ~x1*y4, ~x0*y4 as the last terms of rows
//     1..4; x3*y2 in row 1 of column 5) and the unsigned top term x4*y4 in column 8;
//   * product slots beyond a column's term count are 0.
module tb_pp_gen;
  import otf_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 5;
  logic [N-1:0] x, y;
  logic [2*N-1:0][N-1:0] pps, ppu;

  pp_gen #(.N(N), .SIGNED(1'b1)) dut_s (.x(x), .y(y), .pp(pps));
  pp_gen #(.N(N), .SIGNED(1'b0)) dut_u (.x(x), .y(y), .pp(ppu));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s x=%b y=%b", what, x, y);
    end
  endtask

  initial begin
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      logic [2*N-1:0] sum_s, sum_u, ps, pu;
      bit zero_ok;
      {x, y} = (2 * N)'(v);
      #1;
      sum_s = (2 * N)'(int'(x[N-1]) + int'(y[N-1])) << (N - 1);
      sum_u = '0;
      zero_ok = 1'b1;
      for (int c = 0; c < 2 * N; c++)
        for (int p = 0; p < N; p++) begin
          sum_s += (2 * N)'(pps[c][p]) << c;
          sum_u += (2 * N)'(ppu[c][p]) << c;
          if (p >= raw_pp_count(N, 1'b1, c) && pps[c][p]) zero_ok = 1'b0;
          if (p >= raw_pp_count(N, 1'b0, c) && ppu[c][p]) zero_ok = 1'b0;
        end
      ps = (2 * N)'($signed(x) * $signed(y));
      pu = (2 * N)'(x * y);
      check(sum_s == ps, "signed weighted sum");
      check(sum_u == pu, "unsigned weighted sum");
      check(zero_ok, "unused slots zero");
      check(pps[9][0] == (x[4] | y[4]) && pps[8][0] == (x[4] | y[4]), "x4+y4 columns 8,9");
      check(pps[4][0] == (x[4] & ~y[0]), "x4~y0");
      check(pps[7][1] == (~x[3] & y[4]) && pps[6][2] == (~x[2] & y[4]) &&
            pps[5][3] == (~x[1] & y[4]) && pps[4][4] == (~x[0] & y[4]), "~xi y4 terms");
      check(pps[5][1] == (x[3] & y[2]), "x3y2 in row 1");
      check(ppu[8][0] == (x[4] & y[4]) && ppu[9] == '0, "unsigned top columns");
      if (v % 64 == 0) @(posedge clk);
    end
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
