// parity_checker: fault detector for a parity-preserving reversible circuit.
//
// A circuit built only from parity-preserving gates keeps the exclusive-OR
// of its complete input vector (data inputs and constant inputs) equal to
// the exclusive-OR of its complete output vector (useful and garbage
// outputs). A single line that flips anywhere in the cascade breaks that
// equality. This checker XORs both vectors and raises `error` when the two
// parities differ. Comparing input and output parity is the detection rule
// the parity-preserving approach rests on; packaging it as a separate
// module, its widths and its port names are this design's choice.
// Purely combinational, no clock.
module parity_checker #(
  parameter int unsigned IN_WIDTH  = 3,  // width of the complete input vector
  parameter int unsigned OUT_WIDTH = 3   // width of the complete output vector
) (
  input  logic [IN_WIDTH-1:0]  in_vec,   // every input line, constants included
  input  logic [OUT_WIDTH-1:0] out_vec,  // every output line, garbage included
  output logic                 error     // 1: input and output parity differ
);

  assign error = (^in_vec) ^ (^out_vec);

endmodule
