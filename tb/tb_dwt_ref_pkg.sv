// tb_dwt_ref_pkg: word-level reference model of the CORDIC lattice filter pair, used by
// the testbenches. It works on whole 16-bit words with the same truncating shifts, in
// the same order, as the hardware, so results must match bit for bit:
//   u = K(x(2m)), l = K(x(2m+1)),  K(v) = ((v >>> 1) + (v >>> 3)) + (v >>> 5)
//   rotation -45 deg:  u1 = u + l,          l1 = l - u
//   rotation -14 deg:  u2 = u1 + (l1 >>> 2), l2 = l1 - (u1 >>> 2)
//   z^-1 on the lower line:  ld = l2 of the previous pair (0 after reset)
//   rotation +14 deg:  h = u2 - (ld >>> 2),  g = ld + (u2 >>> 2)
// It also holds the Daubechies-4 taps for approximate checks of the filter function,
// and lattice_ref, the same model for any word length WW with NDIG digits of K
// (2^-1 + 2^-3 [+ 2^-5 [+ 2^-7]]).
package tb_dwt_ref_pkg;
  typedef logic signed [15:0] word_t;

  // Daubechies-4 analysis taps as seen at the outputs: coefficient of x(2m), x(2m+1),
  // x(2m-2), x(2m-1) in h(m) and g(m)
  localparam real D4_H [4] = '{0.4830, 0.8365, 0.2241, -0.1294};
  localparam real D4_G [4] = '{0.1294, 0.2241, -0.8365, 0.4830};

  function automatic word_t k_scale(word_t v);
    word_t t;
    t = (v >>> 1) + (v >>> 3);
    return t + (v >>> 5);
  endfunction

  // one pair through the lattice; lstate is the z^-1 register before the pair,
  // lnext its content after it
  function automatic void lattice_step(input word_t e, input word_t o, input word_t lstate,
                                       output word_t lnext, output word_t h, output word_t g);
    word_t u, l, u1, l1, u2, l2;
    u  = k_scale(e);
    l  = k_scale(o);
    u1 = u + l;
    l1 = l - u;
    u2 = u1 + (l1 >>> 2);
    l2 = l1 - (u1 >>> 2);
    h  = u2 - (lstate >>> 2);
    g  = lstate + (u2 >>> 2);
    lnext = l2;
  endfunction

  class lattice_ref #(int WW = 16, int NDIG = 3);
    typedef logic signed [WW-1:0] w_t;

    static function w_t k_scale(w_t v);
      w_t t;
      t = (v >>> 1) + (v >>> 3);
      if (NDIG >= 3) t = t + (v >>> 5);
      if (NDIG >= 4) t = t + (v >>> 7);
      return t;
    endfunction

    static function void step(input w_t e, input w_t o, input w_t lstate,
                              output w_t lnext, output w_t h, output w_t g);
      w_t u, l, u1, l1, u2;
      u  = k_scale(e);
      l  = k_scale(o);
      u1 = u + l;
      l1 = l - u;
      u2 = u1 + (l1 >>> 2);
      lnext = l1 - (u1 >>> 2);
      h  = u2 - (lstate >>> 2);
      g  = lstate + (u2 >>> 2);
    endfunction
  endclass
endpackage
