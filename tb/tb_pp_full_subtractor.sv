// tb_pp_full_subtractor: exhaustive self-check of the parity-preserving full
// subtractor.
//
// For all eight (A, B, C) it checks that A - B - C equals diff - 2*borrow as
// an integer, the five garbage lines, and that the parity of the complete
// output vector equals the parity of the inputs. It also checks the gate
// count, constant inputs, garbage outputs and quantum cost (4, 4, 5, 11).
module tb_pp_full_subtractor;

  logic       a, b, c, diff, borrow;
  logic [4:0] garbage;
  int         checks = 0, failures = 0;

  pp_full_subtractor dut (
    .a(a), .b(b), .c(c), .diff(diff), .borrow(borrow), .garbage(garbage)
  );

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
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      check(int'(a) - int'(b) - int'(c) == int'(diff) - 2 * int'(borrow),
            "A - B - C != diff - 2*borrow");
      check(garbage[0] == b, "garbage[0] is not B");
      check(garbage[1] == c, "garbage[1] is not C");
      // Fredkin R output: B when A == B, C when they differ.
      check(garbage[2] == ((a ^ b) ? c : b), "garbage[2] is not (A^B)'B ^ (A^B)C");
      check(garbage[3] == (a ^ b), "garbage[3] is not A^B");
      check(garbage[4] == (a ^ b), "garbage[4] is not A^B");
      check((a ^ b ^ c) == (diff ^ borrow ^ (^garbage)), "parity not preserved");
    end
    check(dut.GATE_COUNT == 4, "gate count");
    check(dut.CONST_INPUTS == 4, "constant inputs");
    check(dut.GARBAGE_OUTPUTS == 5, "garbage outputs");
    check(dut.QUANTUM_COST == 11, "quantum cost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
