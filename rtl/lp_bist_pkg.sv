// Shared types and constants of the low power BIST datapath.
// The multiplier and adder architectures selectable in the datapath, and the
// slice geometry the test pattern generator uses for each multiplier: 4-bit X
// and Y slices for the carry-save array, 3-bit X and 5-bit Y slices for the
// Booth encoded Wallace tree. Both geometries use an 8-bit Gray counter.
package lp_bist_pkg;

  typedef enum logic [0:0] {
    MULT_CSA = 1'b0,   // carry-save array multiplier
    MULT_BWM = 1'b1    // radix-4 Booth encoded Wallace tree multiplier
  } mult_arch_e;

  typedef enum logic [0:0] {
    ADD_CLA = 1'b0,    // carry lookahead adder
    ADD_BKA = 1'b1     // Brent-Kung parallel prefix adder
  } add_arch_e;

  // Width of the repeated pattern loaded into the X operand slices.
  function automatic int unsigned x_slice_width(mult_arch_e arch);
    return (arch == MULT_BWM) ? 3 : 4;
  endfunction

  // Width of the repeated pattern loaded into the Y operand slices.
  function automatic int unsigned y_slice_width(mult_arch_e arch);
    return (arch == MULT_BWM) ? 5 : 4;
  endfunction

  function automatic int unsigned ceil_div(int unsigned a, int unsigned b);
    return (a + b - 1) / b;
  endfunction

endpackage
