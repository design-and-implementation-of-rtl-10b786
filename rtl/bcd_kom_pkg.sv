// bcd_kom_pkg: constants and helper functions shared by the Karatsuba-Ofman
// multiplier and the binary-to-BCD converter.
//
// bcd_digits(bits) returns how many decimal digits the largest unsigned value
// of the given width (2**bits - 1) has: floor(bits * log10(2)) + 1. The log is
// approximated by 30103/100000, exact for any width below several thousand
// bits. It sizes the converter so that no product is ever truncated inside the
// datapath.
package bcd_kom_pkg;

  function automatic int unsigned bcd_digits(input int unsigned bits);
    return (bits * 30103) / 100000 + 1;
  endfunction

endpackage
