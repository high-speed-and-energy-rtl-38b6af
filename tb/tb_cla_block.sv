// tb_cla_block: exhaustive self-check of the carry-lookahead block.
//
// For a 4-bit block (the default) and a 6-bit block it applies every
// combination of a, b and cin and compares s and cout with the integer sum
// a + b + cin, and bp with the reduction AND of a ^ b. A watchdog ends the
// run with a failure if it has not finished after a fixed simulated time.
module tb_cla_block;
  localparam int unsigned M4 = 4;
  localparam int unsigned M6 = 6;

  logic [M4-1:0] a4, b4, s4;
  logic          c4, co4, bp4;
  logic [M6-1:0] a6, b6, s6;
  logic          c6, co6, bp6;

  int checks = 0;
  int failures = 0;

  cla_block dut4 (.a(a4), .b(b4), .cin(c4), .s(s4), .cout(co4), .bp(bp4));
  cla_block #(.M(M6)) dut6 (.a(a6), .b(b6), .cin(c6), .s(s6), .cout(co6), .bp(bp6));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M6:0] ref6;
    logic [M4:0] ref4;
    for (int x = 0; x < (1 << M4); x++)
      for (int y = 0; y < (1 << M4); y++)
        for (int c = 0; c < 2; c++) begin
          a4 = M4'(x); b4 = M4'(y); c4 = c[0];
          #1;
          ref4 = (M4+1)'(x + y + c);
          checks++;
          if ({co4, s4} !== ref4 || bp4 !== &(a4 ^ b4)) begin
            failures++;
            if (failures < 10)
              $display("M=4 a=%h b=%h cin=%0d: got co=%0d s=%h bp=%0d, want %h",
                       a4, b4, c4, co4, s4, bp4, ref4);
          end
        end
    for (int x = 0; x < (1 << M6); x++)
      for (int y = 0; y < (1 << M6); y++)
        for (int c = 0; c < 2; c++) begin
          a6 = M6'(x); b6 = M6'(y); c6 = c[0];
          #1;
          ref6 = (M6+1)'(x + y + c);
          checks++;
          if ({co6, s6} !== ref6 || bp6 !== &(a6 ^ b6)) begin
            failures++;
            if (failures < 10)
              $display("M=6 a=%h b=%h cin=%0d: got co=%0d s=%h bp=%0d, want %h",
                       a6, b6, c6, co6, s6, bp6, ref6);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
