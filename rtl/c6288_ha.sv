// c6288_ha: half adder cell of the C6288 multiplier array.
// Adds two one-bit inputs: a + b = 2*co + s. Purely combinational.
// The array uses it where a full adder would lack one input: in the top row
// (no carry from a row above) and once in the bottom row. Written at the
// Boolean level rather than as the benchmark's NOR gates.
module c6288_ha (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
