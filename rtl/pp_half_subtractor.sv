// pp_half_subtractor: parity-preserving reversible half subtractor (A - B).
//
// Two parity-preserving gates in cascade:
//   F2G (A=b, B=a, C=0)      -> P = B, Q = A^B, R = B (garbage g[0])
//   FRG (A=A^B, B=B, C=0)    -> P = A^B = diff,
//                               Q = (A^B)'B = AB (garbage g[1]),
//                               R = (A^B)B  = A'B = borrow
// The F2G produces the difference and a copy of B (reversible circuits allow
// no fan-out, so copies are made by gates). The Fredkin gate, controlled by
// the difference, steers B onto the borrow line only when A and B differ,
// which gives the borrow A'B.
//
// Reversible bookkeeping: 2 gates, 2 constant-0 inputs (tied inside), 2
// garbage outputs, quantum cost 2 + 5 = 7. The garbage lines are brought out
// so that the parity of the complete output vector {diff, borrow, garbage}
// can be compared with the parity of {a, b} (the constants add nothing): in a
// fault-free circuit they are equal, and a single faulty line makes them
// differ. The structure, the counts and the cost are those of the published
// circuit; the port names and the garbage ordering are this design's choice.
// Purely combinational, no clock.
module pp_half_subtractor
  import rev_pkg::*;
(
  input  logic       a,        // minuend
  input  logic       b,        // subtrahend
  output logic       diff,     // A xor B
  output logic       borrow,   // A'B
  output logic [1:0] garbage   // [0] copy of B from the F2G, [1] AB from the FRG
);

  localparam int unsigned GATE_COUNT      = 2;
  localparam int unsigned CONST_INPUTS    = 2;
  localparam int unsigned GARBAGE_OUTPUTS = 2;
  localparam int unsigned QUANTUM_COST    = F2G_QUANTUM_COST + FRG_QUANTUM_COST;

  logic b_copy;   // F2G P: B routed on to the FRG
  logic a_xor_b;  // F2G Q: A xor B, the FRG control

  f2g_gate u_f2g (
    .a (b),
    .b (a),
    .c (1'b0),
    .p (b_copy),
    .q (a_xor_b),
    .r (garbage[0])
  );

  frg_gate u_frg (
    .a (a_xor_b),
    .b (b_copy),
    .c (1'b0),
    .p (diff),
    .q (garbage[1]),
    .r (borrow)
  );

endmodule
