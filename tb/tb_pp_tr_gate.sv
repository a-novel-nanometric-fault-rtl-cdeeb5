// tb_pp_tr_gate: exhaustive self-check of the parity-preserving TR gate.
//
// For all eight (A, B, C) it compares P, Q, R with the TR equations
// P = A, Q = A^B, R = AB'^C, checks the garbage lines (AB' and A), that the
// three useful outputs are a permutation of the input patterns, and that the
// parity of the complete output vector equals the parity of the inputs.
// With C = 0 it also checks the gate's use as a half subtractor, B - A.
// It also checks gate count, constants, garbage and quantum cost (3, 2, 2, 9).
module tb_pp_tr_gate;

  logic       a, b, c, p, q, r;
  logic [1:0] garbage;
  logic [7:0] seen;
  int         checks = 0, failures = 0;

  pp_tr_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r), .garbage(garbage));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL a=%0b b=%0b c=%0b: %s", a, b, c, what);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      check(p == a, "P != A");
      check(q == (a ^ b), "Q != A^B");
      check(r == ((a & ~b) ^ c), "R != AB'^C");
      check(garbage[0] == (a & ~b), "garbage[0] is not AB'");
      check(garbage[1] == a, "garbage[1] is not A");
      check((a ^ b ^ c) == (p ^ q ^ r ^ garbage[0] ^ garbage[1]), "parity not preserved");
      // With C = 0 the TR function is a half subtractor for B - A.
      if (!c) check(int'(b) - int'(a) == int'(q) - 2 * int'(r), "C = 0: B - A != Q - 2*R");
      seen[{p, q, r}] = 1'b1;
    end
    check(seen == 8'hFF, "P,Q,R is not a permutation of the inputs");
    check(dut.GATE_COUNT == 3, "gate count");
    check(dut.CONST_INPUTS == 2, "constant inputs");
    check(dut.GARBAGE_OUTPUTS == 2, "garbage outputs");
    check(dut.QUANTUM_COST == 9, "quantum cost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
