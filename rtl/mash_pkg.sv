// mash_pkg: types shared by the MASH 1-2 modulator and the multi-modulus divider.
//
// The modulator output is a modulus offset with four levels, -1, 0, +1 and +2,
// carried as a 3-bit two's-complement number (dn_t). The fractional word width is
// derived from the accumulator modulus MOD: K runs from 0 to MOD-1.
package mash_pkg;

  // Modulus offset from the modulator to the divider: -1 .. +2.
  typedef logic signed [2:0] dn_t;

  localparam dn_t DN_MIN = -3'sd1;
  localparam dn_t DN_MAX = 3'sd2;

  // Width of the fractional word for a given accumulator modulus.
  function automatic int unsigned k_width(input int unsigned modulus);
    return (modulus < 2) ? 1 : $clog2(modulus);
  endfunction

endpackage
