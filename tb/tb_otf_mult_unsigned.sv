// tb_otf_mult_unsigned: checks the unsigned multiplier exhaustively at N = 4 and N = 5 (the
// worked example) and over 2^16 vectors at N = 8 (also exhaustive), against the simulator's own
// multiplication (2N-bit result). Combinational: the product is read 1 time unit after the
// operands change, within the same clock cycle, as the multiplier has no registers.
module tb_otf_mult_unsigned;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] x4, y4;  logic [7:0]  z4;
  logic [4:0] x5, y5;  logic [9:0]  z5;
  logic [7:0] x8, y8;  logic [15:0] z8;

  otf_mult_unsigned #(.N(4)) dut4 (.x(x4), .y(y4), .z(z4));
  otf_mult_unsigned #(.N(5)) dut5 (.x(x5), .y(y5), .z(z5));
  otf_mult_unsigned #(.N(8)) dut8 (.x(x8), .y(y8), .z(z8));

  function automatic logic [7:0]  ref4(input logic [3:0] x, input logic [3:0] y);
    return 8'(x * y);
  endfunction
  function automatic logic [9:0]  ref5(input logic [4:0] x, input logic [4:0] y);
    return 10'(x * y);
  endfunction
  function automatic logic [15:0] ref8(input logic [7:0] x, input logic [7:0] y);
    return 16'(x * y);
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) begin
      {x4, y4} = 8'(v);
      #1;
      checks++;
      if (z4 != ref4(x4, y4)) begin
        failures++;
        if (failures < 20) $display("FAIL N=4 x=%0d y=%0d z=%h exp=%h", x4, y4, z4, ref4(x4, y4));
      end
    end
    for (int v = 0; v < 1024; v++) begin
      {x5, y5} = 10'(v);
      #1;
      checks++;
      if (z5 != ref5(x5, y5)) begin
        failures++;
        if (failures < 20) $display("FAIL N=5 x=%0d y=%0d z=%h exp=%h", x5, y5, z5, ref5(x5, y5));
      end
      if (v % 64 == 0) @(posedge clk);
    end
    for (int v = 0; v < 65536; v++) begin
      {x8, y8} = 16'(v);
      #1;
      checks++;
      if (z8 != ref8(x8, y8)) begin
        failures++;
        if (failures < 20) $display("FAIL N=8 x=%0d y=%0d z=%h exp=%h", x8, y8, z8, ref8(x8, y8));
      end
      if (v % 1024 == 0) @(posedge clk);
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
