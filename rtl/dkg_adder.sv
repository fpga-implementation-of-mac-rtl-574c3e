// dkg_adder -- W-bit parallel (ripple-carry) adder made of DKG reversible gates.
//
// Bit i uses one dkg_gate as a full adder: input a = 0, b = x[i], c = y[i],
// d = carry into bit i. Its r output is the carry into bit i+1 and its s
// output is sum bit i; the p and q outputs are the gate's garbage outputs
// and are left unused by design (a reversible gate always has them). The
// chain runs from bit 0 (carry in cin) to bit W-1 (carry out cout).
// Purely combinational; delay grows linearly with W.
// The default width of 128 bits is the width of the MAC's adder stage.
module dkg_adder #(
  parameter int unsigned W = 128
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0]   carry;
  logic [W-1:0] unused_g1, unused_g2;

  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    dkg_gate u_fa (
      .a(1'b0),
      .b(x[i]),
      .c(y[i]),
      .d(carry[i]),
      .p(unused_g1[i]),
      .q(unused_g2[i]),
      .r(carry[i+1]),
      .s(s[i])
    );
  end

  assign cout = carry[W];
endmodule
