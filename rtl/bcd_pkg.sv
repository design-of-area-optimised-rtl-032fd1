// bcd_pkg: sizes shared by the BCD arithmetic blocks.
//
// A D-digit BCD word is 4*D bits wide. Its largest value, 10**D - 1, needs
// bin_width(D) = clog2(10**D) bits in binary. The vertical-crosswise
// multiplier splits its operands into two halves, so it works on a power-of-two
// width, mult_width(D), the smallest power of two that holds bin_width(D).
// For the two-digit (8-bit BCD) configuration these are 7 and 8 bits, and the
// product of two 7-bit values needs 14 bits and four BCD digits.
package bcd_pkg;

  // Binary bits needed to hold any D-digit decimal number (D <= 9).
  function automatic int unsigned bin_width(input int unsigned digits);
    int unsigned maxval;
    maxval = 1;
    for (int unsigned i = 0; i < digits; i++) maxval = maxval * 10;
    return $clog2(maxval);
  endfunction

  // Smallest power of two that is at least bin_width(D).
  function automatic int unsigned mult_width(input int unsigned digits);
    return 1 << $clog2(bin_width(digits));
  endfunction

endpackage
