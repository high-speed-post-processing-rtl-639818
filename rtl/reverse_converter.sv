// reverse_converter: residue to binary conversion by the Chinese remainder
// theorem, z = sum(r_i * W_i) mod D, with D the dynamic range and
// W_i = (D/m_i) * ((D/m_i)^-1 mod m_i) mod D. For the set {5, 3, 2} the
// weights are 6, 10 and 15.
//
// No multiplier is used. Each product r_i * W_i is split into the bits of
// r_i, so z = sum over channels i and bits j of r_i[j] * (W_i * 2**j mod D),
// all modulo D. The constants are computed at elaboration; the NUM_CH*RES_W
// terms are summed by a chain of residue adders of width BIN_W working modulo
// D. The residues must be valid (r_i < m_i). Building the converter from
// modular additions only is this design's choice; the converter is described
// by its function. Purely combinational.
module reverse_converter
  import rns_pkg::*;
(
  input  rns_vec_t r,
  output bin_t     z
);
  localparam int unsigned NTERM = NUM_CH * RES_W;

  bin_t term [NTERM];
  bin_t acc  [NTERM];

  for (genvar ch = 0; ch < NUM_CH; ch++) begin : g_ch
    for (genvar j = 0; j < RES_W; j++) begin : g_bit
      localparam int unsigned K = ch * RES_W + j;
      localparam int unsigned C = (crt_weight(MODULI[ch]) * pow2_mod(j, DYN_RANGE)) % DYN_RANGE;
      always_comb term[K] = r[ch][j] ? bin_t'(C) : '0;
    end
  end

  assign acc[0] = term[0];
  for (genvar k = 1; k < NTERM; k++) begin : g_add
    residue_adder #(.N(BIN_W)) u_add (
      .a (acc[k-1]),
      .b (term[k]),
      .m (bin_t'(DYN_RANGE)),
      .s (acc[k])
    );
  end

  assign z = acc[NTERM-1];
endmodule
