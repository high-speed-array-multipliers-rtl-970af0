// half_adder: one-bit half adder, the two-input cell of the carry-save array and of the
// on-the-fly converter's input stage. s = a ^ b, c = a & b. Combinational, no state.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  always_comb begin
    s = a ^ b;
    c = a & b;
  end
endmodule
