// f2g_gate: Feynman double gate (F2G), a 3x3 reversible gate.
//
// The control input A is copied to P and drives two controlled-NOTs, one on
// B and one on C:  P = A,  Q = A ^ B,  R = A ^ C.
// The mapping is a permutation of the eight input patterns (it is its own
// inverse) and it preserves parity: A^B^C == P^Q^R, because A appears three
// times on the output side. Quantum cost 2. Purely combinational, no clock.
//
// The equations and the truth table are the standard F2G definition; only
// the port names are this design's choice.
module f2g_gate (
  input  logic a,  // control input A
  input  logic b,  // target input B
  input  logic c,  // target input C
  output logic p,  // P = A
  output logic q,  // Q = A xor B
  output logic r   // R = A xor C
);

  assign p = a;
  assign q = a ^ b;
  assign r = a ^ c;

endmodule
