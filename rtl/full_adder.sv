// full_adder: one-bit full adder, the three-input cell of the carry-save array.
// sum = a ^ b ^ ci, co = majority(a, b, ci). Combinational, no state.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
