// tb_otf_conv: checks the on-the-fly converter exhaustively at N = 5 (all 2^8 pair patterns)
// and N = 8 (all 2^14). Reference: the converter's output must equal bits N+1..2N-1 of the
// plain integer sum of the pairs, sum_i (a_i + b_i) * 2^(2N-i), taken modulo 2^(2N). At N = 5
// the top bit is also checked against the expanded formula
// z_9 = s1 ^ c2 ^ s2c3 ^ s2s3c4. Combinational: outputs are read 1 time unit after the inputs
// change, in the same clock cycle.
module tb_otf_conv;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NA = 5, NB = 8;
  logic [NA-2:0] aa, ba, za;
  logic [NB-2:0] ab, bb, zb;

  otf_conv #(.N(NA)) dut_a (.a(aa), .b(ba), .zhi(za));
  otf_conv #(.N(NB)) dut_b (.a(ab), .b(bb), .zhi(zb));

  function automatic logic [63:0] ref_hi(input int n, input logic [63:0] a, input logic [63:0] b);
    logic [127:0] sum;
    sum = '0;
    for (int i = 1; i <= n - 1; i++)
      sum += (128'(a[i-1]) + 128'(b[i-1])) << (2 * n - i);
    sum = sum >> (n + 1);
    return 64'(sum) & ((64'd1 << (n - 1)) - 1);
  endfunction

  initial begin
    for (int v = 0; v < (1 << (2 * (NA - 1))); v++) begin
      logic [NA-1:1] s, c;
      {aa, ba} = (2 * (NA - 1))'(v);
      #1;
      checks++;
      if (64'(za) != ref_hi(NA, 64'(aa), 64'(ba))) begin
        failures++;
        $display("FAIL N=5 a=%b b=%b z=%b exp=%b", aa, ba, za, ref_hi(NA, 64'(aa), 64'(ba)));
      end
      for (int i = 1; i <= NA - 1; i++) begin
        s[i] = aa[i-1] ^ ba[i-1];
        c[i] = aa[i-1] & ba[i-1];
      end
      checks++;
      if (za[NA-2] != (s[1] ^ c[2] ^ (s[2] & c[3]) ^ (s[2] & s[3] & c[4]))) begin
        failures++;
        $display("FAIL N=5 z9 formula a=%b b=%b", aa, ba);
      end
      if (v % 64 == 0) @(posedge clk);
    end
    for (int v = 0; v < (1 << (2 * (NB - 1))); v++) begin
      {ab, bb} = (2 * (NB - 1))'(v);
      #1;
      checks++;
      if (64'(zb) != ref_hi(NB, 64'(ab), 64'(bb))) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 a=%b b=%b z=%b", ab, bb, zb);
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
