// pp_gen_cell: one bit of a partial product row, built from two multiplexers.
//
// The first mux picks the multiplicand bit a_j (neg = 0) or its complement
// a_j' (neg = 1); its output na_j also feeds the next cell up. The second mux
// is steered by the one-hot {two, one, zero}: zero gives 0, one gives na_j,
// two gives na_(j-1), the first mux output of the cell one place to the
// right, which shifts the row left by one. A select that is not one-hot
// gives 0. Purely combinational. The structure
// is the source's partial product generator cell.
module pp_gen_cell (
  input  logic       a_j,     // multiplicand bit j
  input  logic       a_n_j,   // complemented multiplicand bit j
  input  logic       na_jm1,  // first-mux output of bit j-1
  input  logic       neg,     // first-mux select
  input  logic [2:0] toz,     // second-mux select {two, one, zero}, one-hot
  output logic       na_j,    // first-mux output of this bit
  output logic       p_ij     // partial product bit
);
  always_comb begin
    na_j = neg ? a_n_j : a_j;
    unique case (toz)
      3'b100:  p_ij = na_jm1;  // two
      3'b010:  p_ij = na_j;    // one
      default: p_ij = 1'b0;    // zero
    endcase
  end
endmodule
