// dadda8_mult: 8x8 unsigned Dadda tree multiplier, p = a * b.
//
// Three parts in sequence, all combinational:
//   1. pp_gen        - 64 AND gates form the partial-product matrix;
//   2. dadda8_stage1 - 2 half adders, 2 full adders and 8 4-2 compressors
//                      reduce it to at most four bits per column;
//      dadda8_stage2 - 1 half adder, 1 full adder and 10 4-2 compressors
//                      reduce that to two rows;
//   3. cla_adder     - an exact 16-bit adder adds the two rows.
// This three-part structure and the adder/compressor counts of each stage
// are as specified. The design was intended for approximate 4-2 compressors,
// whose logic is not specified; the exact compressor is used in their place,
// so the product is exact. The placement of the cells inside each stage is
// this design's own. No clock: p follows a and b after the combinational
// delay of the tree.
module dadda8_mult
  import mult_pkg::*;
#(
  parameter int unsigned N = 8   // operand width; the reduction wiring is for 8 only
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  if (N != N8) begin : g_bad_n
    $error("dadda8_mult: the reduction tree is wired for N = 8 only");
  end

  logic [N8-1:0][N8-1:0] pp;
  row16_t [3:0]          row4;
  row16_t [1:0]          row2;
  logic                  unused_co;

  pp_gen #(.N(N8)) u_pp (.a(a), .b(b), .pp(pp));

  dadda8_stage1 u_stage1 (.pp(pp), .row(row4));
  dadda8_stage2 u_stage2 (.row_in(row4), .row_out(row2));

  // the product of two 8-bit numbers fits 16 bits: the carry out is always 0
  cla_adder #(.W(PW8)) u_cpa (.a(row2[0]), .b(row2[1]), .s(p), .co(unused_co));
endmodule
