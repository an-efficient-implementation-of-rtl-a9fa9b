// booth_pkg: types and elaboration-time helpers shared by the radix-4 Booth /
// Wallace tree multiplier.
//
// booth_sel_t is the five-signal selection word that one Booth encoder hands to
// one partial product row (neg, two, one, zero, cor). The wt_* functions
// describe the bit matrix that the Wallace tree reduces, so that the tree's
// generate loops know at elaboration time how many bits each column holds at
// each reduction stage and where every sum and carry lands:
//
//   * Stage 0 matrix (W = 2N columns). Row i (i = 0 .. N/2-1) holds the N+1 bit
//     partial product i at columns 2i .. 2i+N, with its sign bit inverted. The
//     correction bit cor_i sits at column 2i. A constant row K holds the
//     sign-extension constant K = -(sum_i 2^(2i+N)) mod 2^(2N), which together
//     with the inverted sign bits replaces full sign extension of every row.
//   * Reduction (Wallace): in every column, each full group of three bits goes
//     to a 3:2 compressor, two left-over bits go to a half adder and a single
//     left-over bit passes down. Stages repeat until no column holds more
//     than two bits.
//   * Bit order inside a column of the next stage: compressor sums, the half
//     adder sum, the passed bit, then the compressor carries and the half adder
//     carry coming from the column to the right.
//
// The row layout, inverted sign bits and constant K are this design's choice;
// the source only says that the rows are reduced by a Wallace tree of 3:2
// compressors to two rows.
package booth_pkg;

  // Booth selection for one partial product row (Table I of the encoding).
  typedef struct packed {
    logic neg;   // row is negative: use the complemented multiplicand
    logic two;   // row is +/-2A: take the bit one place to the right
    logic one;   // row is +/-A: take the bit in place
    logic zero;  // row is +/-0
    logic cor;   // +1 at the row's LSB completes the one's complement
  } booth_sel_t;

  localparam int WT_MAX_N = 128;  // the helpers below support N up to this

  // Sign-extension constant bit c of the stage-0 matrix for an n x n multiply.
  function automatic logic wt_k_bit(int n, int c);
    logic [2*WT_MAX_N-1:0] k;
    k = '0;
    for (int i = 0; i < n / 2; i++) k = k - ((2*WT_MAX_N)'(1) << (2 * i + n));
    return k[c];
  endfunction

  // Number of partial product rows that have a bit in column c.
  function automatic int wt_rows_in_col(int n, int c);
    int cnt = 0;
    for (int i = 0; i < n / 2; i++)
      if (c - 2 * i >= 0 && c - 2 * i <= n) cnt++;
    return cnt;
  endfunction

  // Index, inside column c of stage 0, of the bit of row r.
  function automatic int wt_row_index(int n, int r, int c);
    int cnt = 0;
    for (int i = 0; i < r; i++)
      if (c - 2 * i >= 0 && c - 2 * i <= n) cnt++;
    return cnt;
  endfunction

  function automatic bit wt_has_cor(int n, int c);
    return (c % 2 == 0) && (c / 2 < n / 2);
  endfunction

  function automatic int wt_height0(int n, int c);
    return wt_rows_in_col(n, c) + int'(wt_has_cor(n, c)) + int'(wt_k_bit(n, c));
  endfunction

  function automatic int wt_nfa(int h);
    return h / 3;
  endfunction

  function automatic int wt_nha(int h);
    return (h % 3 == 2) ? 1 : 0;
  endfunction

  function automatic int wt_npass(int h);
    return (h % 3 == 1) ? 1 : 0;
  endfunction

  // Height of column c at stage s (stage 0 is the partial product matrix).
  function automatic int wt_height(int n, int s, int c);
    int h [2*WT_MAX_N];
    int hn [2*WT_MAX_N];
    for (int j = 0; j < 2 * n; j++) h[j] = wt_height0(n, j);
    for (int t = 0; t < s; t++) begin
      for (int j = 0; j < 2 * n; j++) begin
        hn[j] = wt_nfa(h[j]) + wt_nha(h[j]) + wt_npass(h[j]);
        if (j > 0) hn[j] += wt_nfa(h[j-1]) + wt_nha(h[j-1]);
      end
      for (int j = 0; j < 2 * n; j++) h[j] = hn[j];
    end
    return h[c];
  endfunction

  function automatic int wt_max_height(int n, int s);
    int m = 0;
    for (int j = 0; j < 2 * n; j++)
      if (wt_height(n, s, j) > m) m = wt_height(n, s, j);
    return m;
  endfunction

  // Number of reduction stages until every column holds at most two bits.
  function automatic int wt_num_stages(int n);
    int s = 0;
    while (wt_max_height(n, s) > 2) s++;
    return s;
  endfunction

endpackage
