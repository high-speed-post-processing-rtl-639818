// rev_adder: N-bit reversible ripple-carry adder built from TSG gates.
//
// Stage i is one tsg_gate with a = a[i], b = b[i], the constant input c tied
// to 0, and d = carry into the stage; its r output is sum[i] and its s output
// is the carry into stage i+1. The carry into stage 0 is cin, the carry out of
// stage N-1 is cout. The p and q outputs of every gate are garbage outputs and
// are not used. This is the arrangement of the subtractor schematic (inputs A
// and B, C grounded, R to the sum bus, S carried on to D); the width is a
// parameter, 4 by default like the "4-bit reversible adder" of the residue
// adder and subtractor. Purely combinational: {cout, sum} = a + b + cin.
module rev_adder #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0]   carry;
  logic [N-1:0] garbage_p, garbage_q;

  assign carry[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_stage
    tsg_gate u_tsg (
      .a (a[i]),
      .b (b[i]),
      .c (1'b0),
      .d (carry[i]),
      .p (garbage_p[i]),
      .q (garbage_q[i]),
      .r (sum[i]),
      .s (carry[i+1])
    );
  end

  assign cout = carry[N];
endmodule
