// c6288_fa: full adder cell of the C6288 multiplier array.
// Adds the three one-bit inputs a, b and ci and returns the sum bit s and the
// carry bit co, so that a + b + ci = 2*co + s. Purely combinational.
// The benchmark builds this cell from NOR gates; here it is written at the
// Boolean level, which has the same function.
module c6288_fa (
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
