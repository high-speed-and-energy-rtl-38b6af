// tb_ci_cska_hybrid_variants: self-check of the hybrid CI-CSKA at other
// sizes than the default, to show that its parameters generalise.
//
// Instances: 16 bits as 4 stages of 4 (Kogge-Stone at stage 2), 24 bits as
// 8 stages of 3 with the Kogge-Stone stage first (stage 0), 64 bits as 8
// stages of 8 with the Kogge-Stone stage last (stage 7), all with random
// operands biased toward long propagate runs; and 12 bits as 3 stages of 4,
// swept over every a, each with near-complement and random b.
// Every result is compared with the integer sum a + b + ci. A watchdog ends
// the run with a failure if it hangs.
module tb_ci_cska_hybrid_variants;
  logic [15:0] a16, b16, s16;
  logic [23:0] a24, b24, s24;
  logic [63:0] a64, b64, s64;
  logic [11:0] a12, b12, s12;
  logic        c16, c24, c64, c12, co16, co24, co64, co12;

  int checks = 0;
  int failures = 0;

  ci_cska_hybrid #(.N(16), .M(4))                dut16 (.a(a16), .b(b16), .ci(c16), .s(s16), .co(co16));
  ci_cska_hybrid #(.N(24), .M(3), .CENTER(0))    dut24 (.a(a24), .b(b24), .ci(c24), .s(s24), .co(co24));
  ci_cska_hybrid #(.N(64), .M(8), .CENTER(7))    dut64 (.a(a64), .b(b64), .ci(c64), .s(s64), .co(co64));
  ci_cska_hybrid #(.N(12), .M(4))                dut12 (.a(a12), .b(b12), .ci(c12), .s(s12), .co(co12));

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_sum(input string name, input logic [64:0] got, input logic [64:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("%s: got %h want %h", name, got, want);
    end
  endtask

  initial begin
    logic [63:0] x, y;
    logic        c;
    for (int i = 0; i < 50000; i++) begin
      x = {$urandom, $urandom};
      y = {$urandom, $urandom};
      if (i % 2 == 1) y = (~x & ({$urandom, $urandom} | {$urandom, $urandom})) | (y & {$urandom, $urandom});
      if (i == 0) begin x = '1; y = '0; end
      c = 1'($urandom);
      if (i == 0) c = 1'b1;
      a16 = x[15:0]; b16 = y[15:0]; c16 = c;
      a24 = x[23:0]; b24 = y[23:0]; c24 = c;
      a64 = x;       b64 = y;       c64 = c;
      #1;
      expect_sum("N=16", 65'({co16, s16}), 65'(x[15:0]) + 65'(y[15:0]) + 65'(c));
      expect_sum("N=24", 65'({co24, s24}), 65'(x[23:0]) + 65'(y[23:0]) + 65'(c));
      expect_sum("N=64", 65'({co64, s64}), 65'(x) + 65'(y) + 65'(c));
    end
    for (int xa = 0; xa < 4096; xa++)
      for (int j = 0; j < 16; j++) begin
        a12 = 12'(xa);
        b12 = (j < 8) ? 12'(~xa) ^ 12'(1 << j) : 12'($urandom);
        c12 = j[0];
        #1;
        expect_sum("N=12", 65'({co12, s12}), 65'(a12) + 65'(b12) + 65'(c12));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
