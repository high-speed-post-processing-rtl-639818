// rns_pkg: constants, types and elaboration-time helper functions shared by
// the residue number system (RNS) datapath.
//
// The moduli set is {5, 3, 2}, the set of the worked example in which the
// decimal number 29 becomes the residues (4, 2, 1), modulo 5, 3 and 2.
// Their product, the dynamic range, is 30, so a binary
// operand needs 5 bits. Every residue channel is 4 bits wide, the width of the
// 4-bit reversible residue adder and subtractor the channels are built from.
// The helper functions compute, at elaboration time, the constants that let
// the forward and reverse converters work with additions only (powers of two
// reduced modulo m, and the Chinese-remainder weights).
package rns_pkg;

  // Number of residue channels and the moduli, channel 0 first.
  localparam int unsigned NUM_CH = 3;
  localparam int unsigned MODULI [NUM_CH] = '{5, 3, 2};

  // Width of one residue channel (the 4-bit residue adder/subtractor).
  localparam int unsigned RES_W = 4;

  // Dynamic range M = 5 * 3 * 2 and the binary width that holds 0 .. M-1.
  localparam int unsigned DYN_RANGE = 30;
  localparam int unsigned BIN_W = 5;

  typedef logic [RES_W-1:0] residue_t;
  // One residue per channel: element i is the residue modulo MODULI[i].
  typedef residue_t [NUM_CH-1:0] rns_vec_t;
  typedef logic [BIN_W-1:0] bin_t;

  // (2**k) mod m, computed without overflow for any k.
  function automatic int unsigned pow2_mod(input int unsigned k, input int unsigned m);
    int unsigned r;
    r = 1 % m;
    for (int unsigned i = 0; i < k; i++) r = (2 * r) % m;
    return r;
  endfunction

  // Multiplicative inverse of a modulo m (m > 1, gcd(a, m) = 1); 0 if none.
  function automatic int unsigned mod_inv(input int unsigned a, input int unsigned m);
    for (int unsigned t = 1; t < m; t++)
      if (((a % m) * t) % m == 1) return t;
    return 0;
  endfunction

  // Chinese-remainder weight of the channel with modulus mi:
  // (D/mi) * ((D/mi)^-1 mod mi), reduced modulo D, so that
  // X = sum(r_i * crt_weight(m_i)) mod D.
  function automatic int unsigned crt_weight(input int unsigned mi);
    int unsigned mhat;
    mhat = DYN_RANGE / mi;
    if (mi == 1) return 0;
    return (mhat * mod_inv(mhat, mi)) % DYN_RANGE;
  endfunction

endpackage
