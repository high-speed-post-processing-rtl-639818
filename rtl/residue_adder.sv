// residue_adder: N-bit modular adder, s = (a + b) mod m.
//
// It follows the two-adder flow of the 4-bit reversible residue adder:
//   1. a first reversible adder forms the raw sum S = a + b (N+1 bits, the
//      carry-out being the top bit);
//   2. S is compared with the modulus: S >= m;
//   3. if it is, a second reversible adder adds the two's complement of m
//      (~m + 1, the +1 entering as its carry-in) to S and that is the residue;
//      otherwise S itself is the residue.
// The comparison is read from the carries: S >= m exactly when the first
// adder carried out, or when the second adder (S mod 2**N plus ~m plus 1)
// carried out. Complementing m through Feynman gates and the final 2-to-1
// selection are this design's choices; the flow chart gives only the decision.
// Operands must be valid residues (a, b < m) and 1 <= m < 2**N.
// Purely combinational.
module residue_adder #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] m,
  output logic [N-1:0] s
);
  logic [N-1:0] raw_sum, m_inv, garbage_m, corrected;
  logic         raw_carry, corr_carry, sum_ge_m;

  rev_adder #(.N(N)) u_add (
    .a    (a),
    .b    (b),
    .cin  (1'b0),
    .sum  (raw_sum),
    .cout (raw_carry)
  );

  for (genvar i = 0; i < N; i++) begin : g_inv
    feynman_gate u_inv (.a(m[i]), .b(1'b1), .p(garbage_m[i]), .q(m_inv[i]));
  end

  rev_adder #(.N(N)) u_corr (
    .a    (raw_sum),
    .b    (m_inv),
    .cin  (1'b1),
    .sum  (corrected),
    .cout (corr_carry)
  );

  always_comb begin
    sum_ge_m = raw_carry | corr_carry;
    s        = sum_ge_m ? corrected : raw_sum;
  end
endmodule
