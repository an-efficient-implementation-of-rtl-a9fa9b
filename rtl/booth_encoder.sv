// booth_encoder: radix-4 modified Booth encoder for one multiplier triplet.
//
// Input d = {D2, D1, D0} = {x[2i+1], x[2i], x[2i-1]} (x[-1] = 0) selects the
// row's digit M_i = -2*D2 + D1 + D0 in {-2,-1,0,+1,+2}. The outputs follow the
// source's encoding table:
//   neg  = D2                      (row negative, including the digit -0)
//   two  = digit is +2 or -2       (011, 100)
//   one  = D1 xor D0               (digit is +1 or -1)
//   zero = D2 = D1 = D0            (000, 111)
//   cor  = D2 and not (D1 and D0)  (negative non-zero row: +1 completes the
//                                   one's complement taken by the row)
// Exactly one of two/one/zero is high. Purely combinational.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [2:0]  d,    // {D2, D1, D0}
  output booth_sel_t  sel   // {neg, two, one, zero, cor}
);
  logic d2, d1, d0;
  assign {d2, d1, d0} = d;

  always_comb begin
    sel.neg  = d2;
    sel.two  = (d1 & d0 & ~d2) | (~d1 & ~d0 & d2);
    sel.one  = d1 ^ d0;
    sel.zero = (d2 & d1 & d0) | (~d2 & ~d1 & ~d0);
    sel.cor  = d2 & ~(d1 & d0);
  end
endmodule
