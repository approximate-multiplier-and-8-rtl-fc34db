// cla_adder: exact W-bit carry-lookahead adder, the final carry-propagate
// adder of the multipliers.
//
// Every bit forms generate g = a & b and propagate p = a ^ b. The carry into
// bit i is then written out directly as
//     c[i] = OR over j < i of ( g[j] & p[j+1] & ... & p[i-1] )
// (carry-in is 0), so no carry has to pass through the adder bit by bit,
// and s[i] = p[i] ^ c[i]. co is the carry out of the top bit.
// Adding the last two rows exactly is as specified; the lookahead structure
// is this design's choice, matching the generate/propagate signals of the
// small multiplier. Purely combinational. W defaults to 16, the width of
// the 8x8 product.
module cla_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W-1:0] g, p;
  logic [W:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    for (int i = 0; i <= W; i++) begin
      c[i] = 1'b0;
      for (int j = 0; j < i; j++) begin
        logic term;
        term = g[j];
        for (int k = j + 1; k < i; k++) term = term & p[k];
        c[i] = c[i] | term;
      end
    end
  end

  assign s  = p ^ c[W-1:0];
  assign co = c[W];
endmodule
