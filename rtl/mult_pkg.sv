// mult_pkg: sizes and types shared by the multiplier modules.
//
// The main design is an 8x8 unsigned multiplier whose partial products are
// reduced column by column. Between the reduction stages the bits travel as
// "rows": 16-bit words where bit k of every row has weight 2^k, so the value
// carried by a set of rows is simply their sum. A column that holds fewer bits
// than there are rows leaves the upper rows' bit at 0 there.
package mult_pkg;

  localparam int unsigned N8  = 8;       // operand width of the main multiplier
  localparam int unsigned PW8 = 2 * N8;  // its product width
  localparam int unsigned N4  = 4;       // operand width of the small multiplier
  localparam int unsigned PW4 = 2 * N4;  // its product width

  typedef logic [PW8-1:0] row16_t;       // one row of the 8x8 reduction tree
  typedef logic [PW4-1:0] row8_t;        // one row of the 4x4 reduction

endpackage
