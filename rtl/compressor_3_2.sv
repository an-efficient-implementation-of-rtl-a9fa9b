// compressor_3_2: 3:2 compressor made of an XOR/XNOR stage and two muxes.
//
// The XOR/XNOR stage forms x = P1 ^ P2 and its inverse. The sum mux, steered
// by P3, picks x (P3 = 0) or x' (P3 = 1):  S = x*P3' + x'*P3.
// The carry mux, steered by x, picks P3 (x = 1) or P1 (x = 0):
// C = x*P3 + x'*P1. So S + 2C = P1 + P2 + P3, as for a full adder, with a
// delay of one XOR plus one mux. Purely combinational; structure and
// equations are the source's.
module compressor_3_2 (
  input  logic p1,
  input  logic p2,
  input  logic p3,
  output logic s,   // sum, weight 1
  output logic c    // carry, weight 2
);
  logic x, xn;
  assign x  = p1 ^ p2;
  assign xn = ~(p1 ^ p2);
  assign s  = p3 ? xn : x;
  assign c  = x ? p3 : p1;
endmodule
