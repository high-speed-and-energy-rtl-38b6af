// ks_ppa: M-bit parallel-prefix adder with a Kogge-Stone prefix network,
// used as the central stage of the hybrid CI-CSKA.
//
// Bit i forms (g, p) = (a & b, a ^ b). The carry input is folded into bit 0
// as g0 | p0 & cin, so the prefix network yields the true carries directly.
// The network has ceil(log2 M) levels; at level l, node i combines with node
// i - 2^l:  G = G_i | P_i & G_{i-2^l},  P = P_i & P_{i-2^l}; nodes below
// 2^l pass through. After the last level G[i] is the carry out of bit i, so
// s[i] = p[i] ^ G[i-1] (s[0] = p[0] ^ cin) and cout = G[M-1].
//
// Ports: a, b (M bits), cin -> s (M bits), cout. Purely combinational.
// A Kogge-Stone adder at the central stage follows the design; taking the
// stage carry input into the prefix network, so that this stage needs no
// skip logic or incrementation block, is this design's choice.
module ks_ppa #(
  parameter int unsigned M = cska_pkg::STAGE_WIDTH
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         cin,
  output logic [M-1:0] s,
  output logic         cout
);
  localparam int unsigned LEVELS = (M > 1) ? $clog2(M) : 0;

  logic [M-1:0] p;
  logic [M-1:0] gl [LEVELS+1];  // group generate after each level
  logic [M-1:0] pl [LEVELS+1];  // group propagate after each level

  assign p = a ^ b;

  always_comb begin
    gl[0] = a & b;
    pl[0] = p;
    gl[0][0] = (a[0] & b[0]) | (p[0] & cin);
    for (int unsigned l = 0; l < LEVELS; l++) begin
      for (int unsigned i = 0; i < M; i++) begin
        if (i >= (1 << l)) begin
          gl[l+1][i] = gl[l][i] | (pl[l][i] & gl[l][i - (1 << l)]);
          pl[l+1][i] = pl[l][i] & pl[l][i - (1 << l)];
        end else begin
          gl[l+1][i] = gl[l][i];
          pl[l+1][i] = pl[l][i];
        end
      end
    end
  end

  always_comb begin
    s[0] = p[0] ^ cin;
    for (int unsigned i = 1; i < M; i++) s[i] = p[i] ^ gl[LEVELS][i-1];
  end

  assign cout = gl[LEVELS][M-1];
endmodule
