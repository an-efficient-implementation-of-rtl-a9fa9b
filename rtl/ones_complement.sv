// ones_complement: one's complement generator for the multiplicand.
//
// Every bit of the multiplicand is inverted, giving -A-1. The partial product
// generators choose between A and this word with their neg select; the missing
// +1 of the two's complement is added later as the Booth correction bit (cor).
// Purely combinational. Follows the source's one's complement block.
module ones_complement #(
  parameter int N = 8  // multiplicand width
) (
  input  logic [N-1:0] a,    // multiplicand
  output logic [N-1:0] a_n   // ~a
);
  assign a_n = ~a;
endmodule
