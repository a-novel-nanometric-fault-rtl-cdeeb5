// frg_gate: Fredkin gate (FRG), a 3x3 reversible controlled swap.
//
// With the control input A at 0 the inputs B and C pass straight through;
// with A at 1 they are swapped:
//   P = A,  Q = A'B ^ AC,  R = A'C ^ AB.
// Because the outputs are a rearrangement of the inputs, the number of ones
// and therefore the parity is preserved (A^B^C == P^Q^R), and the gate is its
// own inverse. Quantum cost 5. Purely combinational, no clock.
//
// The equations follow the standard Fredkin definition and its truth table;
// the port names are this design's choice.
module frg_gate (
  input  logic a,  // control input A
  input  logic b,  // data input B
  input  logic c,  // data input C
  output logic p,  // P = A
  output logic q,  // Q = B when A = 0, C when A = 1
  output logic r   // R = C when A = 0, B when A = 1
);

  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);

endmodule
