// tb_otf_mult_sizes: runs the top at the operand widths of the area comparison, N = 4, 8, 16,
// 32 and 64, each with both multipliers. Per width: the corner operands (0, 1, -1 / all ones,
// the most negative value, the most positive value) in every combination, then 3000 random
// pairs, against the simulator's own 2N-bit products (signed and unsigned). The multipliers
// are combinational; every product is read 1 time unit after its operands.
module tb_otf_mult_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NSIZES = 4;
  localparam int SIZES [NSIZES] = '{4, 8, 16, 32};
  localparam int RANDOM_VECTORS = 3000;
  logic [NSIZES-1:0] done = '0;

  for (genvar g = 0; g < NSIZES; g++) begin : g_size
    localparam int N = SIZES[g];
    logic [N-1:0]   xs, ys, xu, yu;
    logic [2*N-1:0] zs, zu;

    otf_mult_top #(.N(N)) dut (.xs(xs), .ys(ys), .zs(zs), .xu(xu), .yu(yu), .zu(zu));

    task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y);
      logic [2*N-1:0] exp_s, exp_u;
      xs = x; ys = y; xu = x; yu = y;
      #1;
      exp_s = (2 * N)'($signed(x) * $signed(y));
      exp_u = (2 * N)'(x * y);
      checks += 2;
      if (zs != exp_s) begin
        failures++;
        if (failures < 20) $display("FAIL N=%0d signed x=%h y=%h z=%h exp=%h", N, x, y, zs, exp_s);
      end
      if (zu != exp_u) begin
        failures++;
        if (failures < 20) $display("FAIL N=%0d unsigned x=%h y=%h z=%h exp=%h", N, x, y, zu, exp_u);
      end
    endtask

    initial begin
      logic [N-1:0] corner [5];
      corner[0] = '0;
      corner[1] = N'(1);
      corner[2] = '1;
      corner[3] = {1'b1, {(N - 1){1'b0}}};
      corner[4] = {1'b0, {(N - 1){1'b1}}};
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++) apply(corner[i], corner[j]);
      for (int t = 0; t < RANDOM_VECTORS; t++) begin
        logic [N-1:0] x, y;
        for (int w = 0; w < N; w += 32) begin
          x = (x << 32) | N'($urandom);
          y = (y << 32) | N'($urandom);
        end
        apply(x, y);
        if (t % 100 == 0) @(posedge clk);
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
