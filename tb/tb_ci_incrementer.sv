// tb_ci_incrementer: exhaustive self-check of the incrementation block.
//
// For 4-bit (default) and 8-bit instances it applies every partial sum with
// both values of the stage carry and compares the output with
// (ps + ci) mod 2^M. A watchdog ends the run with a failure if it hangs.
module tb_ci_incrementer;
  logic [3:0] ps4, s4;
  logic [7:0] ps8, s8;
  logic       ci4, ci8;
  int checks = 0;
  int failures = 0;

  ci_incrementer dut4 (.ps(ps4), .ci(ci4), .s(s4));
  ci_incrementer #(.M(8)) dut8 (.ps(ps8), .ci(ci8), .s(s8));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++)
      for (int c = 0; c < 2; c++) begin
        ps4 = 4'(v); ci4 = c[0];
        ps8 = 8'(v); ci8 = c[0];
        #1;
        checks += 2;
        if (s4 !== 4'(v + c)) begin
          failures++;
          $display("M=4 ps=%h ci=%0d: got %h want %h", ps4, ci4, s4, 4'(v + c));
        end
        if (s8 !== 8'(v + c)) begin
          failures++;
          $display("M=8 ps=%h ci=%0d: got %h want %h", ps8, ci8, s8, 8'(v + c));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
