// dkg_gate -- 4-input, 4-output reversible DKG gate.
//
// Every input pattern maps to a distinct output pattern, so no information
// is lost. With input a tied to 0 the gate is a full adder:
//   p = b (garbage), q = c (garbage), r = b(c^d) ^ cd = carry, s = b^c^d = sum.
// That full-adder use is how the MAC's accumulate adder employs it. For
// a = 1 this module follows the standard DKG definition
//   q = a'c + ad',  r = (a^b)(c^d) ^ cd,
// which the full-adder equations above are the a = 0 case of; the a = 1
// behaviour (a full subtractor) is not used anywhere in this design.
// Purely combinational.
module dkg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = b;
  assign q = (~a & c) | (a & ~d);
  assign r = ((a ^ b) & (c ^ d)) ^ (c & d);
  assign s = b ^ c ^ d;
endmodule
