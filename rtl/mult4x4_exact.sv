// mult4x4_exact: 4x4 unsigned multiplier built from exact 4-2 compressors,
// y = x * t.
//
// The ports x, t and y are those of the small exact-compressor multiplier
// used to try out the compressors before the 8x8 design. Its parts are
// specified only by name (16 AND gates, a half adder, compressor stages, and
// generate/propagate signals of the final adder); the reduction plan below
// is this design's own:
//
//   partial products (pp_gen, N = 4): column heights 1 2 3 4 3 2 1
//   col 2: half adder on two bits
//   col 3: compressor on four bits, cin = the half adder's carry
//   col 4: compressor on three bits and the carry of column 3,
//          cin = cout of column 3
//   col 5: full adder on two bits and the carry of column 4
//   then at most two bits per column; an 8-bit carry-lookahead adder adds
//   the two rows.
// Purely combinational.
module mult4x4_exact
  import mult_pkg::*;
(
  input  logic [N4-1:0]  x,
  input  logic [N4-1:0]  t,
  output logic [PW4-1:0] y
);
  logic [N4-1:0][N4-1:0] pp;   // pp[i][j] = t[i] & x[j], weight 2^(i+j)
  pp_gen #(.N(N4)) u_pp (.a(x), .b(t), .pp(pp));

  logic s_h2, c_h2;
  half_adder u_ha2 (.a(pp[0][2]), .b(pp[1][1]), .s(s_h2), .c(c_h2));

  logic s3, k3, o3, s4, k4, o4;
  compressor42 u_c3 (.x({pp[3][0], pp[2][1], pp[1][2], pp[0][3]}), .cin(c_h2),
                     .sum(s3), .carry(k3), .cout(o3));
  compressor42 u_c4 (.x({k3, pp[3][1], pp[2][2], pp[1][3]}), .cin(o3),
                     .sum(s4), .carry(k4), .cout(o4));

  logic s5, c5;
  full_adder u_fa5 (.a(pp[2][3]), .b(pp[3][2]), .ci(k4), .s(s5), .co(c5));

  row8_t r0, r1;
  assign r0 = {1'b0, pp[3][3], s5, s4, s3, s_h2,     pp[0][1], pp[0][0]};
  assign r1 = {1'b0, c5,       o4, 1'b0, 1'b0, pp[2][0], pp[1][0], 1'b0};

  logic unused_co;   // 15 * 15 fits 8 bits: always 0
  cla_adder #(.W(PW4)) u_cpa (.a(r0), .b(r1), .s(y), .co(unused_co));
endmodule
