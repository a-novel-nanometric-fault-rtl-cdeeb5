// pp_full_subtractor: parity-preserving reversible full subtractor (A - B - C).
//
// Four parity-preserving gates:
//   F2G #1 (B, A, 0)          -> P = B, Q = A^B, R = B        (garbage g[0])
//   F2G #2 (C, 0, 0)          -> P = C, Q = C,   R = C        (garbage g[1])
//   FRG    (A^B, C, B)        -> P = A^B,
//                                Q = (A^B)'C ^ (A^B)B = borrow,
//                                R = (A^B)'B ^ (A^B)C         (garbage g[2])
//   F2G #3 (A^B, C, 0)        -> P = A^B                      (garbage g[3]),
//                                Q = A^B^C = diff,
//                                R = A^B                      (garbage g[4])
// F2G #1 forms A^B and a copy of B; F2G #2 makes two copies of the borrow-in
// C. The Fredkin gate, controlled by A^B, selects the borrow: when A and B
// are equal the borrow-in C passes on, when they differ the borrow is B
// (i.e. A'B). That equals A'B + A'C + BC. F2G #3 adds C to A^B for the
// difference.
//
// Reversible bookkeeping, as drawn in the published circuit: 4 gates, 4
// constant-0 inputs (tied inside), 5 garbage outputs, quantum cost
// 3*2 + 5 = 11. The gate count and cost match the published text; its
// prose counts (one constant input, four garbage outputs) cannot both hold
// for a 3-input, 2-output function built from these gates, so the counts of
// the drawn circuit are used. All garbage lines are brought out so that the
// output parity can be compared with the parity of {a, b, c}.
// Purely combinational, no clock.
module pp_full_subtractor
  import rev_pkg::*;
(
  input  logic       a,        // minuend
  input  logic       b,        // subtrahend
  input  logic       c,        // borrow in
  output logic       diff,     // A xor B xor C
  output logic       borrow,   // A'B + A'C + BC
  output logic [4:0] garbage   // [0] B, [1] C, [2] FRG R, [3] A^B, [4] A^B
);

  localparam int unsigned GATE_COUNT      = 4;
  localparam int unsigned CONST_INPUTS    = 4;
  localparam int unsigned GARBAGE_OUTPUTS = 5;
  localparam int unsigned QUANTUM_COST    = 3 * F2G_QUANTUM_COST + FRG_QUANTUM_COST;

  logic b_copy;      // F2G #1 P
  logic a_xor_b;     // F2G #1 Q
  logic c_copy0;     // F2G #2 P, to the FRG
  logic c_copy1;     // F2G #2 Q, to F2G #3
  logic a_xor_b_fw;  // FRG P, the control passed on to F2G #3

  f2g_gate u_f2g_ab (
    .a (b),
    .b (a),
    .c (1'b0),
    .p (b_copy),
    .q (a_xor_b),
    .r (garbage[0])
  );

  f2g_gate u_f2g_c (
    .a (c),
    .b (1'b0),
    .c (1'b0),
    .p (c_copy0),
    .q (c_copy1),
    .r (garbage[1])
  );

  frg_gate u_frg (
    .a (a_xor_b),
    .b (c_copy0),
    .c (b_copy),
    .p (a_xor_b_fw),
    .q (borrow),
    .r (garbage[2])
  );

  f2g_gate u_f2g_diff (
    .a (a_xor_b_fw),
    .b (c_copy1),
    .c (1'b0),
    .p (garbage[3]),
    .q (diff),
    .r (garbage[4])
  );

endmodule
