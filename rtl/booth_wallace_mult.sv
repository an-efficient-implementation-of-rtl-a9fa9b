// booth_wallace_mult: signed N x N multiplier, radix-4 Booth encoding with a
// Wallace tree of 3:2 compressors.
//
// Dataflow (all combinational, one product per evaluation, no clock):
//   1. ones_complement inverts the multiplicand a.
//   2. N/2 booth_encoders each scan one overlapping triplet of the multiplier
//      x: {x[2i+1], x[2i], x[2i-1]}, with x[-1] = 0, and produce the row's
//      neg/two/one/zero/cor selection.
//   3. N/2 partial_product_gen rows pick 0, +-A or +-2A (negative ones as one's
//      complement) with two levels of multiplexers per bit.
//   4. wallace_tree places the rows, the cor bits (the +1 that turns each
//      one's complement into a two's complement) and a sign-extension
//      constant in a 2N-column bit matrix and reduces it to two rows.
//   5. cla_adder adds the two rows into the 2N-bit product z = a * x.
// Both operands and the product are two's complement. N must be even.
//
// The four blocks and the signals between them follow the source's
// architecture; the handling of sign extension, the final adder's internals
// and the purely combinational interface are this design's choices.
module booth_wallace_mult
  import booth_pkg::*;
#(
  parameter int N = 8  // operand width (even)
) (
  input  logic [N-1:0]   a,  // multiplicand
  input  logic [N-1:0]   x,  // multiplier
  output logic [2*N-1:0] z   // product a * x
);
  localparam int R = N / 2;  // partial product rows

  logic [N-1:0]   a_n;
  logic [N:0]     x_ext;     // {x, x[-1] = 0}
  booth_sel_t     sel [R];
  logic [N:0]     pp  [R];
  logic [R-1:0]   cor;
  logic [2*N-1:0] row0, row1;

  assign x_ext = {x, 1'b0};

  ones_complement #(.N(N)) u_ones (.a(a), .a_n(a_n));

  for (genvar i = 0; i < R; i++) begin : g_row
    booth_encoder u_enc (
      .d  (x_ext[2*i +: 3]),
      .sel(sel[i])
    );
    partial_product_gen #(.N(N)) u_ppg (
      .a  (a),
      .a_n(a_n),
      .sel(sel[i]),
      .pp (pp[i])
    );
    assign cor[i] = sel[i].cor;
  end

  wallace_tree #(.N(N)) u_tree (
    .pp  (pp),
    .cor (cor),
    .row0(row0),
    .row1(row1)
  );

  cla_adder #(.W(2*N)) u_add (
    .a  (row0),
    .b  (row1),
    .sum(z)
  );
endmodule
