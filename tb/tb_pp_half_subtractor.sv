// tb_pp_half_subtractor: exhaustive self-check of the parity-preserving half
// subtractor.
//
// For all four (A, B) it checks that A - B equals diff - 2*borrow as an
// integer, the garbage lines (B and AB), and that the parity of the complete
// output vector equals the parity of the inputs (the constant zeros add
// nothing). It also checks the gate count, constant inputs, garbage outputs
// and quantum cost the module derives (2, 2, 2, 7).
module tb_pp_half_subtractor;

  logic       a, b, diff, borrow;
  logic [1:0] garbage;
  int         checks = 0, failures = 0;
  int         borrows = 0;

  pp_half_subtractor dut (.a(a), .b(b), .diff(diff), .borrow(borrow), .garbage(garbage));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL a=%0b b=%0b: %s", a, b, what);
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
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      check(int'(a) - int'(b) == int'(diff) - 2 * int'(borrow), "A - B != diff - 2*borrow");
      check(garbage[0] == b, "garbage[0] is not B");
      check(garbage[1] == (a & b), "garbage[1] is not AB");
      check((a ^ b) == (diff ^ borrow ^ garbage[0] ^ garbage[1]), "parity not preserved");
      if (borrow) borrows++;
    end
    check(borrows == 1, "borrow raised on other than one input pattern");
    check(dut.GATE_COUNT == 2, "gate count");
    check(dut.CONST_INPUTS == 2, "constant inputs");
    check(dut.GARBAGE_OUTPUTS == 2, "garbage outputs");
    check(dut.QUANTUM_COST == 7, "quantum cost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
