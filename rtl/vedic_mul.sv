// vedic_mul -- N x N unsigned multiplier built as a tree by the Urdhva
// Tiryagbhyam ("vertically and crosswise") rule.
//
// An N x N product is formed from four N/2 x N/2 products -- two vertical
// (low x low, high x high) and two crosswise (high x low, low x high) --
// which are themselves formed the same way, down to 2 x 2 multipliers
// (vedic2). So the 64 x 64 multiplier holds four 32 x 32 ones, each of
// those four 16 x 16 ones, and so on: (N/2)^2 vedic2 leaves in all.
// This module builds that tree one level at a time rather than by a module
// instantiating itself: level k (block size S = 2^k) holds the (N/S)^2
// products p[i][j] = a[S*i +: S] * b[S*j +: S]. Level 1 is made of vedic2
// leaves; every higher level combines four products of the level below,
//   q0 = p[2i][2j], q1 = p[2i+1][2j], q2 = p[2i][2j+1], q3 = p[2i+1][2j+1],
// in a vedic_combine (carry-save adder plus Kogge-Stone final adders).
// The top level's single product is the result. This gives exactly the
// instances of the published recursive structure.
//
// N must be a power of two, at least 2; the default, 64, is the MAC's
// 64 x 64 multiplier. Operands are unsigned. Purely combinational: sum is
// valid one multiplier delay after a and b change; nothing is pipelined.
module vedic_mul #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] sum
);
  localparam int unsigned L = $clog2(N);

  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("vedic_mul: N must be a power of two, at least 2");
  end

  for (genvar k = 1; k <= L; k++) begin : g_lvl
    localparam int unsigned S = 1 << k;   // operand block size at this level
    localparam int unsigned M = N / S;    // blocks per operand

    logic [2*S-1:0] p [M][M];

    for (genvar i = 0; i < M; i++) begin : g_i
      for (genvar j = 0; j < M; j++) begin : g_j
        if (k == 1) begin : g_leaf
          vedic2 u_vm (
            .a(a[S*i +: S]), .b(b[S*j +: S]), .sum(p[i][j])
          );
        end else begin : g_node
          vedic_combine #(.N(S)) u_add (
            .q0(g_lvl[k-1].p[2*i][2*j]),
            .q1(g_lvl[k-1].p[2*i+1][2*j]),
            .q2(g_lvl[k-1].p[2*i][2*j+1]),
            .q3(g_lvl[k-1].p[2*i+1][2*j+1]),
            .sum(p[i][j])
          );
        end
      end
    end
  end

  assign sum = g_lvl[L].p[0][0];
endmodule
