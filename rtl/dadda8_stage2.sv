// dadda8_stage2: second and last reduction stage of the 8x8 Dadda multiplier.
//
// Takes the four rows left by dadda8_stage1 (column heights, columns 0..14:
// 1 2 3 4 4 4 4 4 3 4 4 4 4 2 1) and leaves two rows for the final adder,
// using 1 half adder, 1 full adder and 10 exact 4-2 compressors, the counts
// the design calls for. Placement (this design's own):
//
//   col  2     : half adder on two of the three bits
//   cols 3..12 : one compressor per column, chained cout -> cin from
//                column 3 (cin = 0) to column 12; in column 8, which has
//                only three bits, the carry of column 7 fills the fourth input
//   col 13     : full adder on the two bits and the cout of column 12
//
// Every column then holds at most two bits, placed in row_out[0] and
// row_out[1]. Input bits above a column's height are ignored: stage 1 leaves
// them at 0. Purely combinational.
module dadda8_stage2
  import mult_pkg::*;
(
  input  row16_t [3:0] row_in,
  output row16_t [1:0] row_out
);
  logic s_h2, c_h2;
  half_adder u_ha2 (.a(row_in[0][2]), .b(row_in[1][2]), .s(s_h2), .c(c_h2));

  // compressor row over columns 3..12: sum, carry, cout per column
  logic [12:3] s, k, o;

  for (genvar c = 3; c <= 12; c++) begin : g_comp
    logic [3:0] cx;    // the compressor's four column inputs
    logic       cin;   // cout of the compressor one column to the right
    if (c == 8) begin : g_short
      assign cx = {k[7], row_in[2][c], row_in[1][c], row_in[0][c]};   // three bits of its own
    end else begin : g_full
      assign cx = {row_in[3][c], row_in[2][c], row_in[1][c], row_in[0][c]};
    end
    if (c == 3) begin : g_first
      assign cin = 1'b0;
    end else begin : g_chain
      assign cin = o[c-1];
    end
    compressor42 u_comp (.x(cx), .cin(cin), .sum(s[c]), .carry(k[c]), .cout(o[c]));
  end

  logic s_f13, c_f13;
  full_adder u_fa13 (.a(row_in[0][13]), .b(row_in[1][13]), .ci(o[12]), .s(s_f13), .co(c_f13));

  always_comb begin
    row_out = '0;
    row_out[0][0] = row_in[0][0];
    row_out[0][1] = row_in[0][1];  row_out[1][1] = row_in[1][1];
    row_out[0][2] = s_h2;          row_out[1][2] = row_in[2][2];
    row_out[0][3] = s[3];          row_out[1][3] = c_h2;
    for (int c = 4; c <= 12; c++) begin
      row_out[0][c] = s[c];
      row_out[1][c] = (c == 8) ? 1'b0 : k[c-1];   // k[7] went into column 8's compressor
    end
    row_out[0][13] = s_f13;        row_out[1][13] = k[12];
    row_out[0][14] = row_in[0][14]; row_out[1][14] = c_f13;
  end
endmodule
