// sor_pkg: constants and elaboration-time helpers shared by the sum of residues
// modular multipliers.
//
// The multipliers reduce modulo M by adding precomputed residues of the form
// (q * 2^s) mod M instead of subtracting multiples of M. Those residues are
// constants once M is fixed, so they are computed here at elaboration time and
// the hardware only holds them as ROM contents. The arithmetic uses 128-bit
// words, which bounds the operand width N at well over 100 bits.
package sor_pkg;

  localparam int unsigned WIDE = 128;
  typedef logic [WIDE-1:0] wide_t;

  // (q * 2^shift) mod m, by repeated modular doubling so no intermediate value
  // grows past 2m.
  function automatic wide_t pow2_residue(wide_t q, int unsigned shift, wide_t m);
    wide_t r;
    r = q % m;
    for (int unsigned i = 0; i < shift; i++) begin
      r = r << 1;
      if (r >= m) r = r - m;
    end
    return r;
  endfunction

  // Largest value the final adder can produce for an n-bit modulus m:
  // two (n-1)-bit halves plus one residue below m.
  function automatic wide_t final_max(int unsigned n, wide_t m);
    return ((wide_t'(1) << n) - 2) + (m - 1);
  endfunction

  // Number of conditional subtractions of m that bring any value up to
  // final_max(n, m) below m.
  function automatic int unsigned final_subs(int unsigned n, wide_t m);
    return int'(final_max(n, m) / m);
  endfunction

endpackage
