// wallace_tree: reduces the Booth partial product rows to two rows.
//
// The N/2 partial product rows, their correction bits and a sign-extension
// constant are laid out as a bit matrix of 2N columns (see booth_pkg for the
// exact layout). Each reduction stage then works column by column, Wallace
// style: every full group of three bits goes into a 3:2 compressor, two
// left-over bits into a half adder, and a single left-over bit passes straight
// down; sums stay in the column and carries move one column to the left.
// Stages repeat until no column holds more than two bits (3 stages for N = 8),
// and those two rows leave on row0/row1. Carries out of column 2N-1 are
// dropped, so row0 + row1 equals the product modulo 2^(2N).
// Purely combinational.
//
// Reducing the rows with a Wallace tree of 3:2 compressors, with half adders
// left where a column has two spare bits, follows the source. The matrix
// layout, the sign handling and the order of bits inside a column are this
// design's choices.
module wallace_tree
  import booth_pkg::*;
#(
  parameter int N = 8  // operand width, even
) (
  input  logic [N:0]     pp [N/2],  // partial product rows (row i has weight 4^i)
  input  logic [N/2-1:0] cor,       // correction bit of each row (weight 4^i)
  output logic [2*N-1:0] row0,      // first of the two remaining rows
  output logic [2*N-1:0] row1       // second of the two remaining rows
);
  localparam int W = 2 * N;
  localparam int S = wt_num_stages(N);
  localparam int H = wt_max_height(N, 0);

  // Bits of every stage; g_st[s].col[c][k] is bit k of column c at stage s.
  for (genvar s = 0; s <= S; s++) begin : g_st
    logic [H-1:0] col [W];
  end

  // Stage 0: the partial product matrix.
  for (genvar c = 0; c < W; c++) begin : g_m0
    localparam int NR = wt_rows_in_col(N, c);
    localparam bit HC = wt_has_cor(N, c);
    localparam bit KB = wt_k_bit(N, c);
    for (genvar r = 0; r < N / 2; r++) begin : g_row
      if (c - 2 * r >= 0 && c - 2 * r <= N) begin : g_bit
        localparam int J = c - 2 * r;
        if (J == N) begin : g_sign
          assign g_st[0].col[c][wt_row_index(N, r, c)] = ~pp[r][J];
        end else begin : g_body
          assign g_st[0].col[c][wt_row_index(N, r, c)] = pp[r][J];
        end
      end
    end
    if (HC) begin : g_cor
      assign g_st[0].col[c][NR] = cor[c/2];
    end
    if (KB) begin : g_k
      assign g_st[0].col[c][NR + int'(HC)] = 1'b1;
    end
    for (genvar k = NR + int'(HC) + int'(KB); k < H; k++) begin : g_unused
      assign g_st[0].col[c][k] = 1'b0;
    end
  end

  // Reduction stages.
  for (genvar s = 0; s < S; s++) begin : g_stage
    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int HT   = wt_height(N, s, c);
      localparam int NFA  = wt_nfa(HT);
      localparam int NHA  = wt_nha(HT);
      localparam int NPS  = wt_npass(HT);
      localparam int HN   = wt_height(N, s + 1, c);
      // Where the carries of this column land in column c+1 of stage s+1.
      localparam int HT1  = (c + 1 < W) ? wt_height(N, s, c + 1) : 0;
      localparam int COFF = wt_nfa(HT1) + wt_nha(HT1) + wt_npass(HT1);

      logic [NFA+NHA:0] carry;  // carries leaving this column (top bit spare)
      assign carry[NFA+NHA] = 1'b0;

      for (genvar k = 0; k < NFA; k++) begin : g_fa
        compressor_3_2 u_cmp (
          .p1(g_st[s].col[c][3*k]),
          .p2(g_st[s].col[c][3*k+1]),
          .p3(g_st[s].col[c][3*k+2]),
          .s (g_st[s+1].col[c][k]),
          .c (carry[k])
        );
      end
      if (NHA == 1) begin : g_ha
        half_adder u_ha (
          .a(g_st[s].col[c][3*NFA]),
          .b(g_st[s].col[c][3*NFA+1]),
          .s(g_st[s+1].col[c][NFA]),
          .c(carry[NFA])
        );
      end
      if (NPS == 1) begin : g_pass
        assign g_st[s+1].col[c][NFA] = g_st[s].col[c][3*NFA];
      end
      if (c + 1 < W) begin : g_cout
        for (genvar k = 0; k < NFA + NHA; k++) begin : g_c
          assign g_st[s+1].col[c+1][COFF + k] = carry[k];
        end
      end
      for (genvar k = HN; k < H; k++) begin : g_unused
        assign g_st[s+1].col[c][k] = 1'b0;
      end
    end
  end

  // The two remaining rows.
  for (genvar c = 0; c < W; c++) begin : g_out
    localparam int HF = wt_height(N, S, c);
    assign row0[c] = (HF >= 1) ? g_st[S].col[c][0] : 1'b0;
    assign row1[c] = (HF >= 2) ? g_st[S].col[c][(HF >= 2) ? 1 : 0] : 1'b0;
  end
endmodule
