// cska_pkg: shared sizes of the hybrid concatenation-and-incrementation
// carry-skip adder (CI-CSKA).
//
// ADDER_WIDTH is the 32-bit operand width that the adder is evaluated at.
// STAGE_WIDTH is the fixed stage size (every stage has the same number of
// bits); 4 bits per stage is this design's choice, since a 4-bit group is the
// customary carry-lookahead block. With these numbers the adder
// has 8 stages.
package cska_pkg;
  localparam int unsigned ADDER_WIDTH = 32;
  localparam int unsigned STAGE_WIDTH = 4;
endpackage
