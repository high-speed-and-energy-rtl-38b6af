// ci_cska_hybrid: N-bit hybrid concatenation-and-incrementation carry-skip
// adder with fixed stage size M and a Kogge-Stone stage in the centre
// (default 32 bits as 8 stages of 4 bits, Kogge-Stone at stage 4).
//
// How it works. The operands are cut into N/M stages of M bits.
//  * Stage 0 is a CLA block that receives the adder carry input ci; its
//    sum is final and its carry output is the carry into stage 1.
//  * Every other ordinary stage has a CLA block whose carry input is tied to
//    0 (concatenation), so all blocks add in parallel without waiting for
//    the carry chain. Its skip logic forms the stage carry output
//    c[k+1] = cout_blk | (bp & c[k]); only these AND-OR gates lie on the
//    carry chain. Its incrementation block then adds c[k] to the partial sum.
//  * Stage CENTER is a Kogge-Stone prefix adder that takes c[k] as its
//    carry input and produces its sum and carry output directly.
// The adder carry output co is the carry out of the last stage.
//
// Ports: a, b (N bits), ci -> s (N bits), co. Purely combinational, no
// clock or reset; s and co are valid one adder delay after the inputs.
//
// The structure (zero-carry-in CLA blocks except the first, skip logic,
// incrementation blocks, fixed stage size, Kogge-Stone at the central stage,
// 32 bits) follows the design. The stage size of 4 bits, the choice of
// stage N/(2M) as the centre, driving stage 0's carry output straight to
// stage 1 without skip logic, and feeding the stage carry into the
// Kogge-Stone network are this design's own choices.
module ci_cska_hybrid #(
  parameter int unsigned N      = cska_pkg::ADDER_WIDTH,
  parameter int unsigned M      = cska_pkg::STAGE_WIDTH,
  parameter int unsigned CENTER = (N / M) / 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         ci,
  output logic [N-1:0] s,
  output logic         co
);
  localparam int unsigned NS = N / M;  // number of stages

  if (N % M != 0) begin : g_bad_width
    $error("ci_cska_hybrid: N must be a multiple of M");
  end
  if (CENTER >= NS) begin : g_bad_center
    $error("ci_cska_hybrid: CENTER must name one of the N/M stages");
  end

  logic [NS:0] c;  // c[k] = carry into stage k
  assign c[0] = ci;

  for (genvar k = 0; k < NS; k++) begin : g_stage
    if (k == CENTER) begin : g_ks
      ks_ppa #(.M(M)) u_ks (
        .a   (a[k*M +: M]),
        .b   (b[k*M +: M]),
        .cin (c[k]),
        .s   (s[k*M +: M]),
        .cout(c[k+1])
      );
    end else if (k == 0) begin : g_first
      logic bp_unused;
      cla_block #(.M(M)) u_cla (
        .a   (a[M-1:0]),
        .b   (b[M-1:0]),
        .cin (c[0]),
        .s   (s[M-1:0]),
        .cout(c[1]),
        .bp  (bp_unused)
      );
    end else begin : g_ci
      logic [M-1:0] ps;
      logic         cout_blk, bp;
      cla_block #(.M(M)) u_cla (
        .a   (a[k*M +: M]),
        .b   (b[k*M +: M]),
        .cin (1'b0),
        .s   (ps),
        .cout(cout_blk),
        .bp  (bp)
      );
      skip_logic u_skip (
        .co_blk(cout_blk),
        .bp    (bp),
        .ci    (c[k]),
        .co    (c[k+1])
      );
      ci_incrementer #(.M(M)) u_inc (
        .ps(ps),
        .ci(c[k]),
        .s (s[k*M +: M])
      );
    end
  end

  assign co = c[NS];
endmodule
