// vedic_combine -- one level of the Vedic multiplier tree: joins the four
// half-size products of an N x N multiplication into the 2N-bit product.
//
// With the operands split into halves of H = N/2 bits,
//   q0 = aL*bL (vertical, low)   q1 = aH*bL, q2 = aL*bH (crosswise)
//   q3 = aH*bH (vertical, high)
// and a*b = q3*2^N + (q1 + q2)*2^H + q0. The three terms that overlap at
// weight 2^H -- q1, q2 and the upper half of q0 -- are reduced by a
// carry-save adder and resolved by a Kogge-Stone adder into the (N+1)-bit
// middle term m (it is below 2^(N+1)). Then
//   sum[H-1:0]  = q0[H-1:0]
//   sum[N-1:H]  = m[H-1:0]
//   sum[2N-1:N] = q3 + m[N:H]       (final Kogge-Stone adder)
// The carry-save stage followed by a Kogge-Stone final adder follows the
// published structure; the exact split into bit ranges is this design's
// own. Both adders' carry outputs are always 0, because the true results
// fit their widths, and are left unused. Purely combinational.
// N must be even and at least 4 (it is a power of two in vedic_mul).
module vedic_combine #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   q0,
  input  logic [N-1:0]   q1,
  input  logic [N-1:0]   q2,
  input  logic [N-1:0]   q3,
  output logic [2*N-1:0] sum
);
  localparam int unsigned H = N / 2;

  logic [N-1:0] cs_s, cs_c;
  logic [N:0]   mid;
  logic [N-1:0] hi;
  logic         unused_mid_cout, unused_hi_cout;

  carry_save_adder #(.W(N)) u_csa (
    .x(q1), .y(q2), .z({{H{1'b0}}, q0[N-1:H]}),
    .s(cs_s), .c(cs_c)
  );

  kogge_stone_adder #(.W(N + 1)) u_mid_add (
    .x({1'b0, cs_s}), .y({cs_c, 1'b0}), .cin(1'b0),
    .s(mid), .cout(unused_mid_cout)
  );

  kogge_stone_adder #(.W(N)) u_hi_add (
    .x(q3), .y({{(H-1){1'b0}}, mid[N:H]}), .cin(1'b0),
    .s(hi), .cout(unused_hi_cout)
  );

  assign sum = {hi, mid[H-1:0], q0[H-1:0]};
endmodule
