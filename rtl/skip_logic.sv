// skip_logic: carry-skip logic of one CI-CSKA stage.
//
// The stage carry output is the block carry output, or the stage carry input
// when every bit of the block propagates:
//   co = co_blk | (bp & ci).
// Because the block was added with a zero carry input, co_blk is the block's
// generate and the two terms never conflict, so the skip is an AND-OR gate
// rather than the multiplexer of a conventional carry-skip adder. The inputs
// (block carry output, stage carry input, product of propagates as select)
// follow the design; writing it as one AND-OR expression is this design's
// choice (a transistor implementation would alternate AOI and OAI gates).
//
// Ports: co_blk, bp, ci -> co. Purely combinational.
module skip_logic (
  input  logic co_blk,
  input  logic bp,
  input  logic ci,
  output logic co
);
  assign co = co_blk | (bp & ci);
endmodule
