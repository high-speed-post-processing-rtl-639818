// feynman_gate: the 2x2 reversible Feynman (controlled-NOT) gate.
//
//   p = a
//   q = a ^ b
// With b tied to 1 the q output is the inverse of a, which is how the
// subtractor complements its subtrahend without an irreversible inverter;
// with b tied to 0 it copies a, the reversible substitute for fan-out.
// Purely combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule
