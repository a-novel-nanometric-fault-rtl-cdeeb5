// pp_tr_gate: parity-preserving realisation of the TR gate.
//
// The TR function is P = A, Q = A^B, R = AB' ^ C (with C = 0 it is a half
// subtractor for B - A). It is realised with three parity-preserving gates:
//   FRG       (B, A, 0)      -> P = B, Q = AB', R = AB
//   F2G upper (AB', C, AB)   -> P = AB' (garbage g[0]), Q = AB'^C = R,
//                               R = AB' ^ AB = A
//   F2G lower (A, B, 0)      -> P = A = P, Q = A^B = Q, R = A (garbage g[1])
// The Fredkin gate, controlled by B, splits A into AB' and AB; the upper F2G
// forms AB'^C and rebuilds A; the lower F2G forms A^B from A and the copy of
// B left by the Fredkin gate.
//
// Bookkeeping: 3 gates, 2 constant-0 inputs (tied inside), 2 garbage outputs,
// quantum cost 5 + 2*2 = 9, as published. Port names and garbage ordering are
// this design's choice. Purely combinational, no clock.
module pp_tr_gate
  import rev_pkg::*;
(
  input  logic       a,
  input  logic       b,
  input  logic       c,
  output logic       p,        // A
  output logic       q,        // A xor B
  output logic       r,        // AB' xor C
  output logic [1:0] garbage   // [0] AB', [1] copy of A
);

  localparam int unsigned GATE_COUNT      = 3;
  localparam int unsigned CONST_INPUTS    = 2;
  localparam int unsigned GARBAGE_OUTPUTS = 2;
  localparam int unsigned QUANTUM_COST    = FRG_QUANTUM_COST + 2 * F2G_QUANTUM_COST;

  logic b_copy;     // FRG P
  logic a_and_nb;   // FRG Q = AB'
  logic a_and_b;    // FRG R = AB
  logic a_rebuilt;  // upper F2G R = A

  frg_gate u_frg (
    .a (b),
    .b (a),
    .c (1'b0),
    .p (b_copy),
    .q (a_and_nb),
    .r (a_and_b)
  );

  f2g_gate u_f2g_upper (
    .a (a_and_nb),
    .b (c),
    .c (a_and_b),
    .p (garbage[0]),
    .q (r),
    .r (a_rebuilt)
  );

  f2g_gate u_f2g_lower (
    .a (a_rebuilt),
    .b (b_copy),
    .c (1'b0),
    .p (p),
    .q (q),
    .r (garbage[1])
  );

endmodule
