// tb_csa_array: checks the carry-save array with random column inputs, for the two's
// complement and the unsigned arrangement at N = 5 and N = 8. Every product slot that the
// column really has (otf_pkg::raw_pp_count), and the sign bits hx, hy of the signed array, get
// random values. The array must preserve the value: sum_c zlo[c]*2^c +
// sum_i (a_i + b_i)*2^(2N-i) == sum of the inputs at their weights (hx, hy at 2^(N-1)),
// modulo 2^(2N). The unsigned array's top pair must have a_1 = 0.
module tb_csa_array;
  import otf_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NA = 5, NB = 8;
  localparam int VECTORS = 20000;

  logic [2*NA-1:0][NA-1:0] ppa;  logic hxa, hya;
  logic [NA:0] zlo_as, zlo_au;  logic [NA-2:0] a_as, b_as, a_au, b_au;
  logic [2*NB-1:0][NB-1:0] ppb;  logic hxb, hyb;
  logic [NB:0] zlo_bs, zlo_bu;  logic [NB-2:0] a_bs, b_bs, a_bu, b_bu;

  csa_array #(.N(NA), .SIGNED(1'b1)) dut_as (.pp(ppa), .hx(hxa), .hy(hya), .zlo(zlo_as), .a(a_as), .b(b_as));
  csa_array #(.N(NA), .SIGNED(1'b0)) dut_au (.pp(ppa), .hx(1'b0), .hy(1'b0), .zlo(zlo_au), .a(a_au), .b(b_au));
  csa_array #(.N(NB), .SIGNED(1'b1)) dut_bs (.pp(ppb), .hx(hxb), .hy(hyb), .zlo(zlo_bs), .a(a_bs), .b(b_bs));
  csa_array #(.N(NB), .SIGNED(1'b0)) dut_bu (.pp(ppb), .hx(1'b0), .hy(1'b0), .zlo(zlo_bu), .a(a_bu), .b(b_bu));

  // Value of the array outputs, modulo 2^(2n).
  function automatic logic [63:0] out_val(input int n, input logic [63:0] zlo,
                                          input logic [63:0] a, input logic [63:0] b);
    logic [63:0] v;
    v = zlo & ((64'd1 << (n + 1)) - 1);
    for (int i = 1; i <= n - 1; i++)
      v += (64'(a[i-1]) + 64'(b[i-1])) << (2 * n - i);
    return v & ((64'd1 << (2 * n)) - 1);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < VECTORS; t++) begin
      logic [63:0] in_as, in_au, in_bs, in_bu;
      ppa = '0;
      ppb = '0;
      in_as = '0; in_au = '0; in_bs = '0; in_bu = '0;
      // The same random slots drive both arrangements; each sums only what its arrangement has.
      for (int c = 0; c < 2 * NA; c++)
        for (int p = 0; p < NA; p++) ppa[c][p] = 1'($urandom);
      for (int c = 0; c < 2 * NB; c++)
        for (int p = 0; p < NB; p++) ppb[c][p] = 1'($urandom);
      hxa = 1'($urandom); hya = 1'($urandom);
      hxb = 1'($urandom); hyb = 1'($urandom);
      for (int c = 0; c < 2 * NA; c++)
        for (int p = 0; p < NA; p++) begin
          if (p < raw_pp_count(NA, 1'b1, c)) in_as += 64'(ppa[c][p]) << c;
          if (p < raw_pp_count(NA, 1'b0, c)) in_au += 64'(ppa[c][p]) << c;
        end
      for (int c = 0; c < 2 * NB; c++)
        for (int p = 0; p < NB; p++) begin
          if (p < raw_pp_count(NB, 1'b1, c)) in_bs += 64'(ppb[c][p]) << c;
          if (p < raw_pp_count(NB, 1'b0, c)) in_bu += 64'(ppb[c][p]) << c;
        end
      in_as += (64'(hxa) + 64'(hya)) << (NA - 1);
      in_bs += (64'(hxb) + 64'(hyb)) << (NB - 1);
      #1;
      check(out_val(NA, 64'(zlo_as), 64'(a_as), 64'(b_as)) == (in_as & ((64'd1 << 2*NA) - 1)), "N=5 signed");
      check(out_val(NA, 64'(zlo_au), 64'(a_au), 64'(b_au)) == (in_au & ((64'd1 << 2*NA) - 1)), "N=5 unsigned");
      check(out_val(NB, 64'(zlo_bs), 64'(a_bs), 64'(b_bs)) == (in_bs & ((64'd1 << 2*NB) - 1)), "N=8 signed");
      check(out_val(NB, 64'(zlo_bu), 64'(a_bu), 64'(b_bu)) == (in_bu & ((64'd1 << 2*NB) - 1)), "N=8 unsigned");
      check(a_au[0] == 1'b0 && a_bu[0] == 1'b0, "unsigned a_1 = 0");
      if (t % 64 == 0) @(posedge clk);
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
