// full_adder: adds three bits of equal weight.
// s = a ^ b ^ ci has the inputs' weight, co (the majority of the three)
// the next-higher weight. It is the plain textbook cell, used where the
// reduction stages call for a full adder and inside the 4-2 compressor.
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
