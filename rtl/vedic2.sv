// vedic2 -- 2x2-bit multiplier by the Urdhva Tiryagbhyam ("vertically and
// crosswise") rule, the leaf of the recursive Vedic multiplier.
//
// Four AND gates form the partial products. The vertical product a0b0 is
// sum[0]. The two crosswise products a1b0 and a0b1 are added by half adder
// HA1, giving sum[1] and a carry. Half adder HA2 adds that carry to the
// vertical product a1b1, giving sum[2] and sum[3]. Combinational.
module vedic2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] sum
);
  logic pp00, pp10, pp01, pp11;
  logic c1;

  assign pp00 = a[0] & b[0];
  assign pp10 = a[1] & b[0];
  assign pp01 = a[0] & b[1];
  assign pp11 = a[1] & b[1];

  assign sum[0] = pp00;

  half_adder ha1 (.a(pp10), .b(pp01), .s(sum[1]), .c(c1));
  half_adder ha2 (.a(pp11), .b(c1),   .s(sum[2]), .c(sum[3]));
endmodule
