// rns_top: residue number system adder/subtractor, plus the stand-alone
// 16-bit reversible residue subtractor.
//
// RNS datapath (binary in, binary out):
//   forward conversion  x, y -> residues modulo 5, 3 and 2 (x_rns, y_rns)
//   modular arithmetic  per channel, in parallel and with no carry between
//                       channels: sum_rns = x_rns + y_rns, diff_rns =
//                       x_rns - y_rns, each modulo its channel's modulus
//   reverse conversion  z_sum = (x + y) mod 30, z_diff = (x - y) mod 30
// Each channel is a 4-bit residue adder and a 4-bit residue subtractor whose
// modulus input is tied to the channel's modulus. Outputs equal x + y and
// x - y exactly while the true result lies in 0 .. 29. Computing the sum and
// the difference side by side from shared forward converters is this
// design's choice; the block diagram shows the adder path only.
//
// Stand-alone subtractor: s16 = (a16 - b16) mod m16 at 16 bits, the
// synthesised and simulated configuration, with its own ports.
// Everything is combinational; there is no clock or reset.
module rns_top
  import rns_pkg::*;
(
  input  bin_t        x,
  input  bin_t        y,
  output rns_vec_t    x_rns,
  output rns_vec_t    y_rns,
  output rns_vec_t    sum_rns,
  output rns_vec_t    diff_rns,
  output bin_t        z_sum,
  output bin_t        z_diff,

  input  logic [15:0] a16,
  input  logic [15:0] b16,
  input  logic [15:0] m16,
  output logic [15:0] s16
);
  forward_converter u_fwd_x (.x(x), .r(x_rns));
  forward_converter u_fwd_y (.x(y), .r(y_rns));

  for (genvar ch = 0; ch < NUM_CH; ch++) begin : g_ch
    residue_adder #(.N(RES_W)) u_add (
      .a (x_rns[ch]),
      .b (y_rns[ch]),
      .m (residue_t'(MODULI[ch])),
      .s (sum_rns[ch])
    );
    residue_subtractor #(.N(RES_W)) u_sub (
      .a (x_rns[ch]),
      .b (y_rns[ch]),
      .m (residue_t'(MODULI[ch])),
      .s (diff_rns[ch])
    );
  end

  reverse_converter u_rev_sum  (.r(sum_rns),  .z(z_sum));
  reverse_converter u_rev_diff (.r(diff_rns), .z(z_diff));

  residue_subtractor u_sub16 (
    .a (a16),
    .b (b16),
    .m (m16),
    .s (s16)
  );
endmodule
