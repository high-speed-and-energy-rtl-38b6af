// tb_ci_cska_hybrid: end-to-end self-check of the 32-bit hybrid CI-CSKA at
// its default parameters (8 stages of 4 bits, Kogge-Stone at stage 4).
//
// Operands come from directed corner cases (full carry propagation from ci
// to co, all-ones plus one, alternating bits, a carry generated in one stage
// and skipped across all later ones) and from random patterns biased toward
// long propagate runs. Every sum and carry output is compared with the
// 33-bit integer sum a + b + ci.
//
// From the reference sum alone, the bench also works out what each stage of
// the adder had to do and counts how often each mechanism occurred: a carry
// skipped across an ordinary stage, an incrementation of a partial sum, a
// carry generated inside a zero-carry-in block, a carry entering the
// Kogge-Stone stage, a carry travelling from ci through every stage to co.
// A mechanism that never occurred counts as a failure. A watchdog ends the
// run with a failure if it hangs.
module tb_ci_cska_hybrid;
  localparam int unsigned N  = cska_pkg::ADDER_WIDTH;
  localparam int unsigned M  = cska_pkg::STAGE_WIDTH;
  localparam int unsigned NS = N / M;
  localparam int unsigned CENTER = NS / 2;

  logic [N-1:0] a, b, s;
  logic         ci, co;

  int checks = 0;
  int failures = 0;
  int n_skip = 0, n_incr = 0, n_gen = 0, n_ks_carry = 0, n_full_chain = 0, n_cout = 0;

  ci_cska_hybrid dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // carry into bit position pos of a + b + cin, from integer arithmetic
  function automatic logic carry_into(input logic [N-1:0] x, input logic [N-1:0] y,
                                      input logic cin, input int unsigned pos);
    logic [N:0] mask, lo;
    mask = ((N+1)'(1) << pos) - 1;
    lo = ({1'b0, x} & mask) + ({1'b0, y} & mask) + (N+1)'(cin);
    return lo[pos];
  endfunction

  task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y, input logic cin);
    logic [N:0] want;
    logic       c_in, blk_gen, blk_prop;
    logic [M-1:0] xs, ys;
    a = x; b = y; ci = cin;
    #1;
    want = {1'b0, x} + {1'b0, y} + (N+1)'(cin);
    checks++;
    if ({co, s} !== want) begin
      failures++;
      if (failures < 10) $display("a=%h b=%h ci=%0d: got co=%0d s=%h want %h", x, y, cin, co, s, want);
    end
    // mechanisms, from the reference arithmetic
    for (int unsigned k = 1; k < NS; k++) begin
      c_in     = carry_into(x, y, cin, k * M);
      xs       = x[k*M +: M];
      ys       = y[k*M +: M];
      blk_prop = &(xs ^ ys);
      blk_gen  = (({1'b0, xs} + {1'b0, ys}) >> M) != 0;
      if (k == CENTER) begin
        if (c_in) n_ks_carry++;
      end else begin
        if (c_in && blk_prop) n_skip++;
        if (c_in) n_incr++;
        if (blk_gen) n_gen++;
      end
    end
    if (cin && &(x ^ y)) n_full_chain++;
    if (want[N]) n_cout++;
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);                         // ci ripples through every stage to co
    apply('1, (N)'(1), 1'b0);                    // all-ones plus one
    apply({(N/2){2'b10}}, {(N/2){2'b01}}, 1'b1); // alternating bits, full propagate
    apply({(N/2){2'b10}}, {(N/2){2'b01}}, 1'b0);
    apply('1, '1, 1'b1);
    for (int unsigned k = 0; k < NS; k++)       // carry generated in stage k, skipped above it
      apply(~((N)'(0)) ^ ((N)'(1) << (k * M)), (N)'(1) << (k * M), 1'b0);
    for (int i = 0; i < 200000; i++) begin
      logic [N-1:0] x, y, pmask;
      x = N'($urandom);
      y = N'($urandom);
      if (i % 2 == 1) begin
        // make most bits propagate so that long carry chains appear
        pmask = N'($urandom) | N'($urandom) | N'($urandom);
        y = (~x & pmask) | (y & ~pmask);
      end
      apply(x, y, 1'($urandom));
    end

    $display("mechanisms: skip=%0d increment=%0d block_generate=%0d ks_carry_in=%0d full_chain=%0d carry_out=%0d",
             n_skip, n_incr, n_gen, n_ks_carry, n_full_chain, n_cout);
    if (n_skip == 0)       begin failures++; $display("no carry skip occurred"); end
    if (n_incr == 0)       begin failures++; $display("no incrementation occurred"); end
    if (n_gen == 0)        begin failures++; $display("no block generate occurred"); end
    if (n_ks_carry == 0)   begin failures++; $display("no carry entered the Kogge-Stone stage"); end
    if (n_full_chain == 0) begin failures++; $display("no full-length carry chain occurred"); end
    if (n_cout == 0)       begin failures++; $display("no carry output occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
