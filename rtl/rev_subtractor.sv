// rev_subtractor: N-bit reversible subtractor, diff = a - b.
//
// Each bit of b passes through a Feynman gate whose second input is tied to 1,
// which inverts it; the inverted b and a then go through the TSG ripple-carry
// adder with carry-in 1, giving a + ~b + 1 = a - b (mod 2**N). The adder's
// carry-out is 1 exactly when a >= b; a last Feynman gate with a constant 1
// turns it into the borrow flag (1 when a < b). Two's-complement subtraction
// by inversion and carry-in is this design's choice: the subtractor is only
// named as a "4-bit reversible subtractor". Purely combinational.
module rev_subtractor #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] diff,
  output logic         borrow
);
  logic [N-1:0] b_inv, garbage_b;
  logic         no_borrow, garbage_c;

  for (genvar i = 0; i < N; i++) begin : g_inv
    feynman_gate u_inv (.a(b[i]), .b(1'b1), .p(garbage_b[i]), .q(b_inv[i]));
  end

  rev_adder #(.N(N)) u_add (
    .a    (a),
    .b    (b_inv),
    .cin  (1'b1),
    .sum  (diff),
    .cout (no_borrow)
  );

  feynman_gate u_borrow (.a(no_borrow), .b(1'b1), .p(garbage_c), .q(borrow));
endmodule
