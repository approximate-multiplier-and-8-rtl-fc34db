// compressor42: exact 4-2 compressor.
//
// Takes four bits x[3:0] of one column plus cin, the cout of the compressor
// one column to the right, and returns
//     x[0] + x[1] + x[2] + x[3] + cin == sum + 2 * (carry + cout).
// sum keeps the column's weight; carry and cout move one column left. cout
// depends only on x[2:0], never on cin, so a row of compressors chained
// cout -> cin settles in constant time instead of rippling.
//
// Inside are two full adders: the first adds x[0], x[1], x[2] and gives cout,
// the second adds that sum, x[3] and cin and gives sum and carry. The exact
// compressor is the one the multipliers here use; the structure from two
// full adders is the usual one, chosen here because no gate-level form was
// specified. Purely combinational.
module compressor42 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  logic s_first;

  full_adder u_fa_first  (.a(x[0]),    .b(x[1]), .ci(x[2]), .s(s_first), .co(cout));
  full_adder u_fa_second (.a(s_first), .b(x[3]), .ci(cin),  .s(sum),     .co(carry));
endmodule
