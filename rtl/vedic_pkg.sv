// vedic_pkg: constants and helper functions shared by the Vedic multiplier
// blocks.
//
// The unsigned Vedic core is built by recursive halving (2x2 -> 4x4 -> 8x8 ...),
// so it only exists for power-of-two widths. vedic_core_width() returns the
// smallest such width that holds an n-bit magnitude; a signed multiplier with
// operands of any width uses it to pick its core and zero-pads the magnitudes.
package vedic_pkg;

  // Smallest power of two that is >= n and >= 2 (the width of the 2x2 leaf).
  function automatic int unsigned vedic_core_width(int unsigned n);
    int unsigned w;
    w = 2;
    while (w < n) w = w * 2;
    return w;
  endfunction

endpackage
