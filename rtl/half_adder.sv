// half_adder: adds two bits of equal weight.
// s = a ^ b has the inputs' weight, c = a & b the next-higher weight.
// It is the plain textbook cell, used where the reduction stages call for a
// half adder. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
