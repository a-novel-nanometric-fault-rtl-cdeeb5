// rev_pkg: constants shared by the parity-preserving reversible circuits.
//
// The quantum cost of a reversible gate is the number of 1x1 and 2x2
// quantum primitives needed to realise it (a 2x2 primitive costs 1, a NOT
// costs 0). The two gate costs below are the published figures for the
// Feynman double gate (F2G) and the Fredkin gate (FRG); each circuit module
// derives its own cost from them so that the figure stays tied to the
// structure that is actually instantiated. Nothing here is synthesised into
// logic: the values only document and self-check the netlists.
package rev_pkg;

  // Quantum cost of one Feynman double gate (3x3, parity preserving).
  localparam int unsigned F2G_QUANTUM_COST = 2;
  // Quantum cost of one Fredkin (controlled-swap) gate (3x3, parity preserving).
  localparam int unsigned FRG_QUANTUM_COST = 5;

endpackage
