// partial_product_gen: one Booth partial product row from N+1 mux cells.
//
// Cell j (j = 0 .. N) selects bit j of 0, +A, +2A, or their one's complements,
// so the N+1 bit result is M*A for a positive digit M and M*A - 1 for a
// negative one; the Booth encoder's cor bit, added in the tree, makes up the
// difference. Bit N of the multiplicand is its sign bit repeated, so the row is
// a correct N+1 bit two's complement number. Below bit 0 the chain is fed with
// neg, so a -2A row shifts in a 1 (the complement of the 0 that 2A shifts in).
// Purely combinational. The per-bit cell is the source's; the row width, the
// sign bit copy and the neg fed below bit 0 are this design's choices.
module partial_product_gen
  import booth_pkg::*;
#(
  parameter int N = 8  // multiplicand width
) (
  input  logic [N-1:0] a,    // multiplicand
  input  logic [N-1:0] a_n,  // one's complement of the multiplicand
  input  booth_sel_t   sel,  // Booth selection for this row
  output logic [N:0]   pp    // partial product row (signed, N+1 bits)
);
  logic [N:0] a_ext, a_n_ext;
  logic [N:0] na;        // first-mux outputs (na[N] feeds no cell)
  logic [N:0] na_below;  // first-mux output of the next lower bit

  assign a_ext   = {a[N-1], a};
  assign a_n_ext = {a_n[N-1], a_n};
  assign na_below = {na[N-1:0], sel.neg};

  for (genvar j = 0; j <= N; j++) begin : g_cell
    pp_gen_cell u_cell (
      .a_j   (a_ext[j]),
      .a_n_j (a_n_ext[j]),
      .na_jm1(na_below[j]),
      .neg   (sel.neg),
      .toz   ({sel.two, sel.one, sel.zero}),
      .na_j  (na[j]),
      .p_ij  (pp[j])
    );
  end
endmodule
