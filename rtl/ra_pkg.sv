// ra_pkg: types and constants shared by the reconfigurable binary/BCD
// adder-subtractor.
//
// The unit works on sign-magnitude words of N_BITS_DEFAULT bits: the top bit
// is the sign, the rest the magnitude. In BCD mode the magnitude holds as many
// whole 4-bit 8421 digits as fit (7 digits for a 32-bit word); the spare
// high magnitude bits are unused. The 32-bit word follows the adder and
// multiplexer widths of the reference design; the digit packing is this
// design's choice.
package ra_pkg;

  // Default word width, sign bit included.
  parameter int unsigned N_BITS_DEFAULT = 32;

  // One 8421 BCD digit.
  typedef logic [3:0] bcd_digit_t;

  // Number of whole BCD digits in the magnitude of an n-bit word.
  function automatic int unsigned bcd_digits(int unsigned n_bits);
    return (n_bits - 1) / 4;
  endfunction

endpackage
