// kogge_stone_adder -- W-bit parallel-prefix adder (Kogge-Stone).
//
// Bit generate g = x&y and propagate p = x^y are combined over
// ceil(log2 W) prefix levels; at level l every bit i >= 2^l merges with bit
// i - 2^l: G = G_hi | P_hi & G_lo, P = P_hi & P_lo. The carry in is folded
// into bit 0's generate term, so after the last level G[i] is the carry out
// of bit i. Sum bit i is p[i] ^ carry into i. Delay grows with log2 W.
// Combinational. Used as the final adder stage of each Vedic multiplier level.
module kogge_stone_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned L = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] p;
  logic [W:0]   carry;   // carry[i]: carry into bit i; carry[W] = carry out

  assign p = x ^ y;

  always_comb begin
    logic [W-1:0] g, pp, g_nx, pp_nx;
    g     = x & y;
    g[0]  = (x[0] & y[0]) | (p[0] & cin);
    pp    = p;
    for (int unsigned l = 0; l < L; l++) begin
      for (int unsigned i = 0; i < W; i++) begin
        if (i >= (1 << l)) begin
          g_nx[i]  = g[i] | (pp[i] & g[i - (1 << l)]);
          pp_nx[i] = pp[i] & pp[i - (1 << l)];
        end else begin
          g_nx[i]  = g[i];
          pp_nx[i] = pp[i];
        end
      end
      g  = g_nx;
      pp = pp_nx;
    end
    // After the last level g[i] is the group generate of bits i..0.
    carry = {g, cin};
  end

  assign s    = p ^ carry[W-1:0];
  assign cout = carry[W];
endmodule
