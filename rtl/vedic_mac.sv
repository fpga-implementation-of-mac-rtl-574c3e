// vedic_mac -- multiply-accumulate unit with a Vedic multiplier and a
// reversible-logic (DKG gate) accumulate adder.
//
// Datapath, as published: an N x N Vedic multiplier (vedic_mul) forms a*b;
// a 2N-bit ripple adder of DKG gates (dkg_adder) adds it to the value held
// in the 2N-bit accumulator register (accumulator), whose output is fed
// back to the adder and is brought out as mac_output. Defaults: N = 64, so a
// 64 x 64 multiplier with a 128-bit adder and accumulator.
//
// Timing: one product is accumulated per clock. With a and b held, each
// rising edge adds a*b: after reset, k edges give mac_output = k*a*b. The
// multiplier and adder are combinational, so a and b must be stable a
// full multiply-plus-add delay before the edge. reset is synchronous and
// active high and clears the sum (this design's choice). The sum wraps
// modulo 2^(2N); the adder's carry out is not used, as in the published
// datapath, which has no overflow output.
module vedic_mac #(
  parameter int unsigned N = 64
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic [2*N-1:0]   mac_output
);
  logic [2*N-1:0] product;
  logic [2*N-1:0] acc_next;
  logic           unused_carry;

  vedic_mul #(.N(N)) u_mul (
    .a(a), .b(b), .sum(product)
  );

  dkg_adder #(.W(2 * N)) u_add (
    .x(product), .y(mac_output), .cin(1'b0),
    .s(acc_next), .cout(unused_carry)
  );

  accumulator #(.W(2 * N)) u_acc (
    .clk(clk), .reset(reset), .d(acc_next), .q(mac_output)
  );
endmodule
