// rns_pkg: types and constant functions shared by the fault-tolerant residue
// number system (RNS) processor.
//
// A residue travelling between blocks is carried as an rns_word_t: the B-bit
// residue value, its content parity bit (even parity over the value bits, the
// bit every cell looks up next to the value) and the pipelined fault flag that
// accompanies each sample down the systolic arrays. RNS_W is the width of the
// residue channels of the example system (5-bit moduli, base extension to 32).
// The moduli 23, 25, 27 and the redundant modulus 31 are this design's choice:
// five-bit, odd, pairwise coprime, the redundant one the largest.
package rns_pkg;

  localparam int unsigned RNS_W = 5;
  // Power of two used for the base extension in the decoder (2**RNS_W).
  localparam int unsigned BASE2 = 32;
  // Output width of the decoder: three RNS_W-bit slices.
  localparam int unsigned BIN_W = 3 * RNS_W;

  localparam int unsigned M1 = 23;
  localparam int unsigned M2 = 25;
  localparam int unsigned M3 = 27;
  localparam int unsigned MR = 31;

  typedef struct packed {
    logic [RNS_W-1:0] v;  // residue value
    logic             p;  // content parity of v
    logic             f;  // fault flag travelling with the sample
  } rns_word_t;

  // Even parity (XOR of all bits) of the low w bits of a.
  function automatic logic parity_of(input int unsigned a, input int unsigned w);
    logic r;
    r = 1'b0;
    for (int unsigned i = 0; i < w; i++) r ^= a[i];
    return r;
  endfunction

  // Multiplicative inverse of a modulo m (m > 1, gcd(a, m) = 1), by search.
  function automatic int unsigned mod_inv(input int unsigned a, input int unsigned m);
    int unsigned r;
    r = 0;
    for (int unsigned k = 1; k < m; k++)
      if (((a % m) * k) % m == 1) r = k;
    return r;
  endfunction

  // Additive inverse of a modulo m.
  function automatic int unsigned mod_neg(input int unsigned a, input int unsigned m);
    return (m - (a % m)) % m;
  endfunction

endpackage
