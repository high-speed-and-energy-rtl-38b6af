// tb_skip_logic: exhaustive self-check of the carry-skip logic.
//
// Applies all eight combinations of block carry, block propagate and stage
// carry input and compares the stage carry output with a truth table: the
// carry is 1 when the block generates, or when it propagates and the carry
// input is 1. A watchdog ends the run with a failure if it hangs.
module tb_skip_logic;
  logic co_blk, bp, ci, co;
  int checks = 0;
  int failures = 0;

  // expected carry output, indexed by {co_blk, bp, ci}
  localparam logic [7:0] TRUTH = 8'b1111_1000;

  skip_logic dut (.co_blk(co_blk), .bp(bp), .ci(ci), .co(co));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {co_blk, bp, ci} = 3'(v);
      #1;
      checks++;
      if (co !== TRUTH[v]) begin
        failures++;
        $display("co_blk=%0d bp=%0d ci=%0d: got %0d want %0d", co_blk, bp, ci, co, TRUTH[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
