// tb_ks_ppa: self-check of the Kogge-Stone prefix adder.
//
// The 4-bit default instance and a 5-bit instance (a width that is not a
// power of two) are checked exhaustively; a 16-bit instance is checked with
// random operands and the all-propagate corner cases. Every result is
// compared with the integer sum a + b + cin. A watchdog ends the run with a
// failure if it hangs.
module tb_ks_ppa;
  logic [3:0]  a4, b4, s4;
  logic [4:0]  a5, b5, s5;
  logic [15:0] a16, b16, s16;
  logic        c4, c5, c16, co4, co5, co16;
  int checks = 0;
  int failures = 0;

  ks_ppa dut4 (.a(a4), .b(b4), .cin(c4), .s(s4), .cout(co4));
  ks_ppa #(.M(5))  dut5 (.a(a5), .b(b5), .cin(c5), .s(s5), .cout(co5));
  ks_ppa #(.M(16)) dut16 (.a(a16), .b(b16), .cin(c16), .s(s16), .cout(co16));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [16:0] want;
    a16 = x; b16 = y; c16 = c;
    #1;
    want = {1'b0, x} + {1'b0, y} + 17'(c);
    checks++;
    if ({co16, s16} !== want) begin
      failures++;
      $display("M=16 a=%h b=%h cin=%0d: got %h want %h", x, y, c, {co16, s16}, want);
    end
  endtask

  initial begin
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++)
        for (int c = 0; c < 2; c++) begin
          a4 = 4'(x); b4 = 4'(y); c4 = c[0];
          a5 = 5'(x); b5 = 5'(y); c5 = c[0];
          #1;
          if (x < 16 && y < 16) begin
            checks++;
            if ({co4, s4} !== 5'(x + y + c)) begin
              failures++;
              $display("M=4 a=%h b=%h cin=%0d: got %h want %h", a4, b4, c4, {co4, s4}, 5'(x + y + c));
            end
          end
          checks++;
          if ({co5, s5} !== 6'(x + y + c)) begin
            failures++;
            $display("M=5 a=%h b=%h cin=%0d: got %h want %h", a5, b5, c5, {co5, s5}, 6'(x + y + c));
          end
        end
    check16(16'hffff, 16'h0000, 1'b1);
    check16(16'haaaa, 16'h5555, 1'b1);
    check16(16'haaaa, 16'h5555, 1'b0);
    check16(16'hffff, 16'hffff, 1'b1);
    for (int i = 0; i < 2000; i++) check16(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
