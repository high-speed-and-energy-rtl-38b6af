// ci_incrementer: incrementation block of one CI-CSKA stage.
//
// The stage's CLA block adds its operands with a zero carry input, giving a
// partial sum ps. Once the stage carry input ci arrives from the skip chain,
// this block adds it to ps:  s = ps + ci (mod 2^M).
// Bit j toggles when ci is 1 and all lower partial-sum bits are 1:
//   s[j] = ps[j] ^ (ci & ps[j-1] & ... & ps[0]).
// The AND chain is built as a prefix of ps, independent of ci, so ci
// reaches every output bit through one AND and one XOR.
//
// Ports: ps (M bits), ci -> s (M bits). Purely combinational.
// The block's function follows the design; the prefix-AND form is this
// design's choice.
module ci_incrementer #(
  parameter int unsigned M = cska_pkg::STAGE_WIDTH
) (
  input  logic [M-1:0] ps,
  input  logic         ci,
  output logic [M-1:0] s
);
  logic [M-1:0] ones_below;  // ones_below[j] = &ps[j-1:0], 1 for j = 0

  always_comb begin
    logic run;
    run = 1'b1;
    for (int unsigned j = 0; j < M; j++) begin
      ones_below[j] = run;
      run = run & ps[j];
    end
  end

  assign s = ps ^ ({M{ci}} & ones_below);
endmodule
