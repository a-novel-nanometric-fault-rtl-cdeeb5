// pp_peres_gate: parity-preserving realisation of the Peres gate.
//
// The Peres function is P = A, Q = A^B, R = AB ^ C. It is not parity
// preserving itself; this circuit realises it with three parity-preserving
// gates, so the complete output vector (with garbage) keeps the input parity:
//   FRG       (A, B, 0)      -> P = A, Q = A'B, R = AB
//   F2G upper (AB, C, A'B)   -> P = AB (garbage g[0]), Q = AB^C = R,
//                               R = AB ^ A'B = B
//   F2G lower (A, B, 0)      -> P = A = P, Q = A^B = Q, R = A (garbage g[1])
// The Fredkin gate splits B into A'B and AB; the upper F2G both forms AB^C
// and recombines A'B and AB into B, which the lower F2G uses with A to form
// A^B and a copy of A.
//
// Bookkeeping: 3 gates, 2 constant-0 inputs (tied inside), 2 garbage outputs,
// quantum cost 5 + 2*2 = 9, as published. Port names and garbage ordering are
// this design's choice. Purely combinational, no clock.
module pp_peres_gate
  import rev_pkg::*;
(
  input  logic       a,
  input  logic       b,
  input  logic       c,
  output logic       p,        // A
  output logic       q,        // A xor B
  output logic       r,        // AB xor C
  output logic [1:0] garbage   // [0] AB, [1] copy of A
);

  localparam int unsigned GATE_COUNT      = 3;
  localparam int unsigned CONST_INPUTS    = 2;
  localparam int unsigned GARBAGE_OUTPUTS = 2;
  localparam int unsigned QUANTUM_COST    = FRG_QUANTUM_COST + 2 * F2G_QUANTUM_COST;

  logic a_copy;    // FRG P
  logic na_b;      // FRG Q = A'B
  logic a_and_b;   // FRG R = AB
  logic b_rebuilt; // upper F2G R = B

  frg_gate u_frg (
    .a (a),
    .b (b),
    .c (1'b0),
    .p (a_copy),
    .q (na_b),
    .r (a_and_b)
  );

  f2g_gate u_f2g_upper (
    .a (a_and_b),
    .b (c),
    .c (na_b),
    .p (garbage[0]),
    .q (r),
    .r (b_rebuilt)
  );

  f2g_gate u_f2g_lower (
    .a (a_copy),
    .b (b_rebuilt),
    .c (1'b0),
    .p (p),
    .q (q),
    .r (garbage[1])
  );

endmodule
