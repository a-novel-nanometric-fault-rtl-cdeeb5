// tb_f2g_gate: exhaustive self-check of the Feynman double gate.
//
// The eight rows of the published F2G truth table are held as constants
// ({A,B,C,P,Q,R} per row) and compared with the gate's outputs. The test also
// checks that the gate preserves parity on every row and that the eight
// output patterns are all different, i.e. the mapping is reversible.
module tb_f2g_gate;

  localparam logic [5:0] TRUTH [8] = '{
    6'b000_000, 6'b001_001, 6'b010_010, 6'b011_011,
    6'b100_111, 6'b101_110, 6'b110_101, 6'b111_100
  };

  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  logic [7:0] seen;

  f2g_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
      {a, b, c} = TRUTH[i][5:3];
      #1;
      checks++;
      if ({p, q, r} !== TRUTH[i][2:0]) begin
        failures++;
        $display("row %b: got %b expected %b", TRUTH[i][5:3], {p, q, r}, TRUTH[i][2:0]);
      end
      checks++;
      if ((a ^ b ^ c) != (p ^ q ^ r)) begin
        failures++;
        $display("row %b: parity not preserved", TRUTH[i][5:3]);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("mapping is not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
