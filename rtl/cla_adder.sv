// cla_adder: carry look-ahead adder for the final two rows.
//
// Bits form generate g = a & b and propagate p = a ^ b. Within each 4-bit
// group every carry is computed directly from the group's g, p and carry-in
// (two-level look-ahead sum of products); each group also forms its own
// group generate and propagate, from which the carry into the next group is
// formed. The carry out of the top bit is dropped, so sum = (a + b) mod 2^W.
// Purely combinational. The source names a carry look-ahead adder as the final
// adder; its group size and the group-to-group carry chain are this design's
// choices.
module cla_adder #(
  parameter int W = 16  // width of the two addends
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);
  localparam int GS = 4;                 // look-ahead group size
  localparam int NG = (W + GS - 1) / GS; // number of groups

  logic [NG*GS-1:0] g, p, c;
  logic [NG-1:0]    gg, gp;  // group generate / propagate
  logic [NG:0]      gc;      // carry into each group

  always_comb begin
    g = '0;
    p = '0;
    g[W-1:0] = a & b;
    p[W-1:0] = a ^ b;
  end

  // Group generate and propagate.
  always_comb begin
    for (int grp = 0; grp < NG; grp++) begin
      logic term;
      gg[grp] = 1'b0;
      for (int j = 0; j < GS; j++) begin
        term = g[grp*GS+j];
        for (int k = j + 1; k < GS; k++) term = term & p[grp*GS+k];
        gg[grp] = gg[grp] | term;
      end
      gp[grp] = &p[grp*GS +: GS];
    end
  end

  // Carry from group to group.
  assign gc[0] = 1'b0;
  for (genvar grp = 0; grp < NG; grp++) begin : g_gc
    assign gc[grp+1] = gg[grp] | (gp[grp] & gc[grp]);
  end

  // Bit carries inside each group, straight from the group's carry-in:
  // c[i] = g[i-1] | p[i-1]g[i-2] | ... | p[i-1]..p[0]cin.
  always_comb begin
    for (int grp = 0; grp < NG; grp++) begin
      for (int i = 0; i < GS; i++) begin
        logic term, acc;
        acc = 1'b0;
        for (int j = 0; j < i; j++) begin
          term = g[grp*GS+j];
          for (int k = j + 1; k < i; k++) term = term & p[grp*GS+k];
          acc = acc | term;
        end
        term = gc[grp];
        for (int k = 0; k < i; k++) term = term & p[grp*GS+k];
        c[grp*GS+i] = acc | term;
      end
    end
  end

  assign sum = p[W-1:0] ^ c[W-1:0];
endmodule
