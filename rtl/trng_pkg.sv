// trng_pkg -- constants shared by the combined ring-oscillator TRNG.
//
// Feedback polynomials for Galois/Fibonacci ring oscillators are stored as
// 32-bit coefficient vectors: bit i is the coefficient of x^i, so bit 0 (the
// constant term) and bit DEG are always set. The six polynomials are the ones
// examined as candidates for the auxiliary source of randomness (ASR); the
// degree-31 polynomial POLY6 is the one the generator uses. The default sizes
// (K = 20 source oscillators, 6-input LUT groups, 100 MHz sampling clock,
// 20000 bits per restart) follow the reference implementation; the oscillator
// timing constants are this design's own choice, since the source gives no
// gate delays.
package trng_pkg;

  typedef logic [31:0] poly_t;

  // f(x) = x^7 + x^5 + x + 1
  localparam poly_t POLY1 = 32'h0000_00A3;
  // f(x) = x^7 + x^6 + x^2 + 1
  localparam poly_t POLY2 = 32'h0000_00C5;
  // f(x) = x^15 + x^14 + x^7 + x^6 + x^5 + x^4 + x^2 + 1
  localparam poly_t POLY3 = 32'h0000_C0F5;
  // f(x) = x^20 + x^18 + x^16 + x^15 + x^13 + x^12 + x^5 + x^4 + x^2 + 1
  localparam poly_t POLY4 = 32'h0015_B035;
  // f(x) = x^21 + x^19 + x^17 + x^16 + x^7 + x^3 + x^2 + 1
  localparam poly_t POLY5 = 32'h002B_008D;
  // f(x) = x^31 + x^27 + x^23 + x^21 + x^20 + x^17 + x^16 + x^15 + x^13
  //      + x^10 + x^9 + x^8 + x^6 + x^5 + x^4 + x^3 + x + 1
  localparam poly_t POLY6 = 32'h88B3_A77B;

  localparam int unsigned POLY6_DEG = 31;

  // Number of source ring oscillators of the main configuration.
  localparam int unsigned DEFAULT_K = 20;
  // Inputs combined by one XOR group (one 6-input LUT).
  localparam int unsigned DEFAULT_GROUP = 6;
  // Samples taken during one restart.
  localparam int unsigned DEFAULT_BITS_PER_RESTART = 20000;

  // Number of registered XOR levels needed to reduce n bits to one with
  // groups of g inputs: ceil(log_g(n)), 0 for n = 1.
  function automatic int unsigned xor_levels(int unsigned n, int unsigned g);
    int unsigned w;
    int unsigned l;
    w = n;
    l = 0;
    while (w > 1) begin
      w = (w + g - 1) / g;
      l++;
    end
    return l;
  endfunction

  // Width of level l of that reduction (level 0 is n).
  function automatic int unsigned xor_width(int unsigned n, int unsigned g, int unsigned l);
    int unsigned w;
    w = n;
    for (int unsigned i = 0; i < l; i++) w = (w + g - 1) / g;
    return w;
  endfunction

endpackage
