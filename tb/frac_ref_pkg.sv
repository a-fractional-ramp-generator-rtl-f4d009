// Reference model of the fractional logic signal path for the testbenches.
//
// FracRef follows the block diagram of the fractional core literally (four
// integrators, a separate z^-1 register in the main path, feedback through
// z^-1 with weights K1, K2, 1, 1, rounding quantiser) in 64-bit integers,
// and computes the input FIR taps from the loop polynomial
//   V(z) = K2 D^3 + (1 - 2 K2 + K1) D^2 + (K2 - 2 K1) D + K1,  D = 1 - z^-1
// by binomial expansion, instead of using fixed taps. Values are scaled by
// 2^CF (CF = core fraction bits). step_core() mimics one clock edge of the
// core alone, step() one clock edge of FIR plus core; both return what the
// registered outputs hold after that edge.
package frac_ref_pkg;

  class FracRef;
    int     cf;            // core fraction bits
    int     k1_16, k2_16;  // K1, K2 in sixteenths
    longint h16 [4];       // FIR taps in sixteenths
    longint a, b, c, d, e; // integrator and delay states
    longint fb;            // Nf delayed
    longint nf_reg, n_reg; // output registers
    longint y_reg;         // FIR output register (core fraction bits)
    longint hist [3];      // past FIR inputs (input fraction bits)

    function new(int core_frac, int k1_sixteenths, int k2_sixteenths);
      longint cpoly [4];
      cf    = core_frac;
      k1_16 = k1_sixteenths;
      k2_16 = k2_sixteenths;
      // V(z) coefficients of D^0..D^3, in sixteenths
      cpoly[0] = k1_16;
      cpoly[1] = k2_16 - 2 * k1_16;
      cpoly[2] = 16 - 2 * k2_16 + k1_16;
      cpoly[3] = k2_16;
      // D^k = sum_j C(k,j) (-1)^j z^-j
      for (int j = 0; j < 4; j++) h16[j] = 0;
      for (int k = 0; k < 4; k++)
        for (int j = 0; j <= k; j++)
          h16[j] += cpoly[k] * binom(k, j) * ((j % 2 == 1) ? -1 : 1);
      reset();
    endfunction

    static function longint binom(int n, int k);
      longint r = 1;
      for (int i = 0; i < k; i++) r = r * (n - i) / (i + 1);
      return r;
    endfunction

    function void reset();
      a = 0; b = 0; c = 0; d = 0; e = 0; fb = 0;
      nf_reg = 0; n_reg = 0; y_reg = 0;
      hist[0] = 0; hist[1] = 0; hist[2] = 0;
    endfunction

    // One clock of the core with input x (cf fraction bits) and offset p
    function longint step_core(longint x, longint p);
      longint one, a_n, b_n, c_n, d_n, e_n, q;
      one = longint'(1) <<< cf;
      a_n = a + x - (k1_16 * fb * one) / 16;
      b_n = b + a_n - (k2_16 * fb * one) / 16;
      c_n = b_n;                       // z^-1 register of the main path
      d_n = d + c - fb * one;
      e_n = e + d_n - fb * one;
      q   = (e_n + one / 2) >>> cf;    // round to nearest
      a = a_n; b = b_n; c = c_n; d = d_n; e = e_n;
      fb     = q;
      nf_reg = q;
      n_reg  = q + p;
      return n_reg;
    endfunction

    // One clock of FIR + core; f has cf-4 fraction bits
    function longint step(longint f, longint p);
      longint y_new;
      void'(step_core(y_reg, p));
      y_new   = h16[0] * f + h16[1] * hist[0] + h16[2] * hist[1] + h16[3] * hist[2];
      hist[2] = hist[1];
      hist[1] = hist[0];
      hist[0] = f;
      y_reg   = y_new;
      return n_reg;
    endfunction
  endclass

endpackage
