// approx_mult_top: top level of the multiplier design.
//
// Holds, side by side and independent of each other:
//   - dadda8_mult:   the 8x8 unsigned Dadda tree multiplier, p = a * b
//                    (16-bit product), the main design;
//   - mult4x4_exact: the small 4x4 exact-compressor multiplier, y = x * t.
// Both are purely combinational: outputs follow inputs after the delay of
// the reduction tree and the final adder. There is no clock and no reset.
// Both use exact 4-2 compressors; the approximate compressors the design
// was meant to be evaluated with are not specified and are not included.
module approx_mult_top
  import mult_pkg::*;
(
  input  logic [N8-1:0]  a,
  input  logic [N8-1:0]  b,
  output logic [PW8-1:0] p,
  input  logic [N4-1:0]  x,
  input  logic [N4-1:0]  t,
  output logic [PW4-1:0] y
);
  dadda8_mult   u_dadda8 (.a(a), .b(b), .p(p));
  mult4x4_exact u_mult4  (.x(x), .t(t), .y(y));
endmodule
