// dwt_pkg: constants and helper functions shared by the CORDIC lattice DWT datapath.
//
// The word length follows the design's budget for an 8-bit image pixel passed through a
// three-octave DWT: 8 pixel bits, 3 bits of growth for the energy compaction of three
// octaves, 1 bit for the 45-degree rotation, and 4 fractional bits against finite word
// length effects, 16 bits in all. The carry-path length DWT_B (how many bit positions a
// carry ripples through before it is registered) is not fixed by the design method; 4 is
// this implementation's default.
package dwt_pkg;

  localparam int unsigned DWT_W    = 16;  // data word length
  localparam int unsigned DWT_FRAC = 4;   // fractional bits of the data word
  localparam int unsigned DWT_B    = 4;   // carry path length in bits

  // ceil(a / b) for positive b
  function automatic int unsigned cdiv(input int unsigned a, input int unsigned b);
    return (a + b - 1) / b;
  endfunction

  function automatic int unsigned umax(input int unsigned a, input int unsigned b);
    return (a > b) ? a : b;
  endfunction

  // Number of canonical signed digits of the scaling factor K for a word length w,
  // following the adder budget of the filter pair: 2 digits up to 8 bits, 3 digits up
  // to 16 bits, 4 digits above (digits 2^-1, 2^-3, 2^-5, 2^-7 in that order).
  function automatic int unsigned k_digits(input int unsigned w);
    return (w <= 8) ? 2 : (w <= 16) ? 3 : 4;
  endfunction

  // latency of cordic_scale with its default digits 2^-1, 2^-3, 2^-5, 2^-7
  function automatic int unsigned k_latency(input int unsigned b, input int unsigned ndig);
    int unsigned l;
    l = umax(cdiv(1, b), cdiv(3, b)) + 1;
    if (ndig >= 3) l += cdiv(5, b) + 1;
    if (ndig >= 4) l += cdiv(7, b) + 1;
    return l;
  endfunction

  function automatic int unsigned umin(input int unsigned a, input int unsigned b);
    return (a < b) ? a : b;
  endfunction

endpackage
