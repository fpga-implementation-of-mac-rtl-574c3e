// carry_save_adder -- W-bit 3:2 carry-save compressor.
//
// Reduces three operands to two without propagating carries: a row of
// independent full adders, bit i giving s[i] = x^y^z and the majority
// c[i] = xy | xz | yz. x + y + z equals s + 2*c, so c[i] carries weight
// 2^(i+1). A carry-propagate adder (kogge_stone_adder in this design)
// turns the pair into one number. Combinational, constant delay in W.
module carry_save_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  assign s = x ^ y ^ z;
  assign c = (x & y) | (x & z) | (y & z);
endmodule
