// half_adder: adds two bits, s = a ^ b, c = a & b. Purely combinational.
// The Wallace tree uses it where a column has two bits left over after its
// groups of three, as the Wallace reduction rule prescribes; only the full
// adders of that rule are replaced by 3:2 compressors.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,   // sum, weight 1
  output logic c    // carry, weight 2
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
