// dadda8_stage1: first reduction stage of the 8x8 Dadda multiplier.
//
// The 8x8 partial-product matrix has 1,2,...,8,...,2,1 bits in columns 0..14.
// This stage brings every column down to at most four bits with 2 half
// adders, 2 full adders and 8 exact 4-2 compressors, the counts the design
// calls for. The placement is this design's own:
//
//   col  4: half adder                        col  9: compressor, full adder
//   col  5: compressor (cin = 0)              col 10: compressor
//   col  6: compressor, half adder            col 11: full adder
//   col  7: two compressors                   cols 0-3, 12-14: pass through
//   col  8: two compressors
//
// The cout of a compressor feeds the cin of a compressor one column to the
// left (5->6->7->8->9->10 and the second row 7->8); carries go one column
// left as ordinary bits. Bits left in column k after the stage are placed in
// row[0][k], row[1][k], ...; unused row positions are 0, so the four output
// rows add up to a*b. Heights after the stage, columns 0..14:
// 1 2 3 4 4 4 4 4 3 4 4 4 4 2 1. Purely combinational.
module dadda8_stage1
  import mult_pkg::*;
(
  input  logic [N8-1:0][N8-1:0] pp,   // pp[i][j] = b[i] & a[j], weight 2^(i+j)
  output row16_t [3:0]          row   // at most four bits per column
);
  // col[k][n]: n-th partial-product bit of column k, in increasing i
  logic [N8-1:0] col [PW8-1];

  always_comb begin
    for (int k = 0; k < PW8 - 1; k++) begin
      col[k] = '0;
      for (int i = 0; i < N8; i++) begin
        if (k - i >= 0 && k - i < N8) col[k][i - ((k >= N8) ? (k - N8 + 1) : 0)] = pp[i][k - i];
      end
    end
  end

  // half adders
  logic s_h4, c_h4, s_h6, c_h6;
  half_adder u_ha4 (.a(col[4][0]), .b(col[4][1]), .s(s_h4), .c(c_h4));
  half_adder u_ha6 (.a(col[6][4]), .b(col[6][5]), .s(s_h6), .c(c_h6));

  // compressors: s = sum, k = carry, o = cout
  logic s5a, k5a, o5a, s6a, k6a, o6a, s7a, k7a, o7a, s7b, k7b, o7b;
  logic s8a, k8a, o8a, s8b, k8b, o8b, s9a, k9a, o9a, s10a, k10a, o10a;

  compressor42 u_c5a  (.x(col[5][3:0]),  .cin(1'b0), .sum(s5a),  .carry(k5a),  .cout(o5a));
  compressor42 u_c6a  (.x(col[6][3:0]),  .cin(o5a),  .sum(s6a),  .carry(k6a),  .cout(o6a));
  compressor42 u_c7a  (.x(col[7][3:0]),  .cin(o6a),  .sum(s7a),  .carry(k7a),  .cout(o7a));
  compressor42 u_c7b  (.x(col[7][7:4]),  .cin(1'b0), .sum(s7b),  .carry(k7b),  .cout(o7b));
  compressor42 u_c8a  (.x(col[8][3:0]),  .cin(o7a),  .sum(s8a),  .carry(k8a),  .cout(o8a));
  compressor42 u_c8b  (.x({k7a, col[8][6:4]}), .cin(o7b), .sum(s8b), .carry(k8b), .cout(o8b));
  compressor42 u_c9a  (.x(col[9][3:0]),  .cin(o8a),  .sum(s9a),  .carry(k9a),  .cout(o9a));
  compressor42 u_c10a (.x(col[10][3:0]), .cin(o9a),  .sum(s10a), .carry(k10a), .cout(o10a));

  // full adders
  logic s_f9, c_f9, s_f11, c_f11;
  full_adder u_fa9  (.a(col[9][4]),  .b(col[9][5]),  .ci(k8a),        .s(s_f9),  .co(c_f9));
  full_adder u_fa11 (.a(col[11][0]), .b(col[11][1]), .ci(col[11][2]), .s(s_f11), .co(c_f11));

  // bits left in each column, distributed over the four rows
  always_comb begin
    row = '0;
    // columns 0..3 pass through
    row[0][0] = col[0][0];
    for (int n = 0; n < 2; n++) row[n][1] = col[1][n];
    for (int n = 0; n < 3; n++) row[n][2] = col[2][n];
    for (int n = 0; n < 4; n++) row[n][3] = col[3][n];
    // column 4
    row[0][4] = col[4][2];  row[1][4] = col[4][3];  row[2][4] = col[4][4];  row[3][4] = s_h4;
    // column 5
    row[0][5] = col[5][4];  row[1][5] = col[5][5];  row[2][5] = c_h4;       row[3][5] = s5a;
    // column 6
    row[0][6] = col[6][6];  row[1][6] = s_h6;       row[2][6] = k5a;        row[3][6] = s6a;
    // column 7
    row[0][7] = s7a;        row[1][7] = s7b;        row[2][7] = k6a;        row[3][7] = c_h6;
    // column 8
    row[0][8] = s8a;        row[1][8] = s8b;        row[2][8] = k7b;
    // column 9
    row[0][9] = s9a;        row[1][9] = s_f9;       row[2][9] = k8b;        row[3][9] = o8b;
    // column 10
    row[0][10] = col[10][4]; row[1][10] = s10a;     row[2][10] = k9a;       row[3][10] = c_f9;
    // column 11
    row[0][11] = col[11][3]; row[1][11] = s_f11;    row[2][11] = k10a;      row[3][11] = o10a;
    // column 12
    for (int n = 0; n < 3; n++) row[n][12] = col[12][n];
    row[3][12] = c_f11;
    // columns 13, 14
    row[0][13] = col[13][0]; row[1][13] = col[13][1];
    row[0][14] = col[14][0];
  end
endmodule
