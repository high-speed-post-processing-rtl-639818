// residue_subtractor: N-bit modular subtractor, s = (a - b) mod m.
//
// It follows the two-stage flow of the reversible residue subtractor:
//   1. a reversible subtractor forms the difference D = a - b (mod 2**N)
//      and a borrow flag;
//   2. if there was no borrow (a >= b), D is the residue;
//   3. otherwise a reversible adder adds the modulus m to D, which wraps the
//      negative difference back into 0 .. m-1.
// The decision is taken on the borrow. The flow chart prints the test as
// "S > M", with the unchanged difference on its "Yes" branch; taken literally
// that would add m to every non-negative difference, so the borrow, which
// gives the residue the arithmetic asks for, is used instead.
// Operands must be valid residues (a, b < m) and 1 <= m < 2**N.
// The default width, 16 bits, is that of the synthesised and simulated
// subtractor; the RNS channels use it at 4 bits. Purely combinational.
module residue_subtractor #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] m,
  output logic [N-1:0] s
);
  logic [N-1:0] diff, wrapped;
  logic         borrow, garbage_c;

  rev_subtractor #(.N(N)) u_sub (
    .a      (a),
    .b      (b),
    .diff   (diff),
    .borrow (borrow)
  );

  rev_adder #(.N(N)) u_wrap (
    .a    (diff),
    .b    (m),
    .cin  (1'b0),
    .sum  (wrapped),
    .cout (garbage_c)
  );

  always_comb s = borrow ? wrapped : diff;
endmodule
