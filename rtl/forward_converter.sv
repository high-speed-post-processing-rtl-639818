// forward_converter: binary to residue conversion, x -> (x mod m_i) for every
// modulus m_i of the set in rns_pkg.
//
// No divider is used. A binary number is x = sum(x[k] * 2**k), so
//   x mod m = sum(x[k] * (2**k mod m)) mod m.
// The constants 2**k mod m are computed at elaboration; each channel then
// adds, bit by bit, the constant of every set bit of x through a chain of
// BIN_W-1 residue adders working modulo m. Every term is already below m, so
// each adder's operands are valid residues. Any BIN_W-bit input converts
// correctly, including values at or above the dynamic range.
// Building the converter from modular additions only is this design's choice;
// the converter is described by its function. Purely combinational.
module forward_converter
  import rns_pkg::*;
(
  input  bin_t     x,
  output rns_vec_t r
);
  for (genvar ch = 0; ch < NUM_CH; ch++) begin : g_ch
    localparam int unsigned MOD = MODULI[ch];

    residue_t term [BIN_W];
    residue_t acc  [BIN_W];

    for (genvar k = 0; k < BIN_W; k++) begin : g_term
      always_comb term[k] = x[k] ? residue_t'(pow2_mod(k, MOD)) : '0;
    end

    assign acc[0] = term[0];
    for (genvar k = 1; k < BIN_W; k++) begin : g_add
      residue_adder #(.N(RES_W)) u_add (
        .a (acc[k-1]),
        .b (term[k]),
        .m (residue_t'(MOD)),
        .s (acc[k])
      );
    end

    assign r[ch] = acc[BIN_W-1];
  end
endmodule
