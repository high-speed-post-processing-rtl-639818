// tsg_gate: the 4x4 reversible TSG gate, the cell the residue adder and
// subtractor are built from.
//
// Inputs a, b, c, d map one-to-one onto outputs p, q, r, s:
//   p = a
//   q = (~a & ~c) ^ ~b
//   r = q ^ d
//   s = (q & d) ^ ((a & b) ^ c)
// With c held at 0 the gate is a full adder: q = a ^ b (propagate), r is the
// sum of a, b and carry-in d, s is the carry-out. p and q are then garbage
// outputs. The pin names follow the schematic of the 16-bit residue
// subtractor; the gate equations are the standard published TSG definition,
// which the schematic does not print. Purely combinational.
module tsg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  always_comb begin
    p = a;
    q = (~a & ~c) ^ ~b;
    r = q ^ d;
    s = (q & d) ^ ((a & b) ^ c);
  end
endmodule
