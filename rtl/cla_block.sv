// cla_block: M-bit carry-lookahead adder block, the adder block of every
// ordinary stage of the CI-CSKA.
//
// Each bit forms a propagate p = a ^ b and a generate g = a & b. Every
// internal carry is computed directly from the g/p signals and the block
// carry input, in sum-of-products lookahead form
//   c[i+1] = g[i] | p[i]g[i-1] | ... | p[i]..p[1]g[0] | p[i]..p[0]cin,
// so no carry ripples from bit to bit. The sum bit is s[i] = p[i] ^ c[i].
// The block also outputs its group propagate bp = &p, the select signal that
// the stage's skip logic uses.
//
// In the adder every block except the first gets cin = 0 (concatenation), so
// its sum is a partial sum and cout is the block's own generate.
//
// Ports: a, b (M bits), cin -> s (M bits), cout, bp. Purely combinational.
// Using lookahead blocks in place of ripple blocks follows the design; the
// flat sum-of-products form of the lookahead is this design's choice.
module cla_block #(
  parameter int unsigned M = cska_pkg::STAGE_WIDTH
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         cin,
  output logic [M-1:0] s,
  output logic         cout,
  output logic         bp
);
  logic [M-1:0] p, g;
  logic [M:0]   c;

  assign p = a ^ b;
  assign g = a & b;

  always_comb begin
    logic term;
    c[0] = cin;
    for (int unsigned i = 0; i < M; i++) begin
      // carry into bit i+1: all generate terms, each gated by the
      // propagates above it, plus the carry input gated by all propagates
      term = cin;
      for (int unsigned j = 0; j <= i; j++) term = term & p[j];
      c[i+1] = term;
      for (int unsigned k = 0; k <= i; k++) begin
        term = g[k];
        for (int unsigned j = k + 1; j <= i; j++) term = term & p[j];
        c[i+1] = c[i+1] | term;
      end
    end
  end

  assign s    = p ^ c[M-1:0];
  assign cout = c[M];
  assign bp   = &p;
endmodule
