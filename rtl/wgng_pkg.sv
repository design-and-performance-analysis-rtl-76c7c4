// wgng_pkg: constants and ROM-content functions shared by the white Gaussian
// noise generator (WGNG).
//
// The generator draws one quantised Box-Muller sample per clock:
//   n = f(x1) * g(x2),  f(x1) = sqrt(-ln x1),  g(x2) = sqrt(2) cos(2 pi x2)
// with x1 quantised non-uniformly (K ROMs f_r, each covering a segment 2^q
// times shorter than the previous one) and x2 quantised uniformly over a
// quarter period (one ROM g). A random sign completes the distribution and A
// successive samples are summed to smooth it (central limit theorem).
//
// The defaults are the configuration the generator was synthesised in:
// q = 4, K = 5, q' = 8, m = 7, m' = 6, b = 6, A = 4, and LFSR lengths
// 22, 21, 20, 17, 13, 7, 15. The relative positions delta = 0.467 (inside a
// segment of x1) and delta' = 0.5 (inside a segment of x2) are the values
// given for b = 6. The functions below compute the ROM words at elaboration
// time, so that every parameter set gets its own exact tables.
package wgng_pkg;

  // ---- default generator parameters ------------------------------------
  localparam int  Q_DEF       = 4;      // q  : bits per address of ROM f_r
  localparam int  K_DEF       = 5;      // K  : number of ROMs f_r
  localparam int  QG_DEF      = 8;      // q' : address bits of ROM g
  localparam int  M_DEF       = 7;      // m  : fraction bits of f_r words (3+m bits)
  localparam int  MG_DEF      = 6;      // m' : fraction bits of g words (1+m' bits)
  localparam int  B_DEF       = 6;      // b  : fraction bits of a sample
  localparam int  A_DEF       = 4;      // A  : samples summed per output
  localparam real DELTA_DEF   = 0.467;  // delta  : position inside an x1 segment
  localparam real DELTAG_DEF  = 0.5;    // delta' : position inside an x2 segment

  localparam real PI = 3.14159265358979323846;

  // ---- LFSR bank --------------------------------------------------------
  localparam int NLFSR      = 7;
  localparam int LFSR_LMAX  = 22;
  typedef int unsigned lfsr_int_arr_t [NLFSR];
  typedef logic [LFSR_LMAX-1:0] lfsr_poly_arr_t [NLFSR];

  // Lengths 22, 21 feed ROM g; 20, 17, 13, 7 and 15 feed s_1..s_5; the
  // 15-bit register steps 5 times per clock and also gives the sign bit.
  localparam lfsr_int_arr_t LFSR_LEN  = '{22, 21, 20, 17, 13, 7, 15};
  localparam lfsr_int_arr_t LFSR_STEP = '{4, 4, 4, 4, 4, 4, 5};
  // Feedback polynomials P[X] without the X^l term (bit i = coefficient of
  // X^i). All are primitive trinomials or pentanomials:
  //   X^22+X^21+1, X^21+X^19+1, X^20+X^17+1, X^17+X^14+1,
  //   X^13+X^4+X^3+X+1, X^7+X^6+1, X^15+X^14+1
  localparam lfsr_poly_arr_t LFSR_POLY = '{
    22'h200001,  // X^21 + 1
    22'h080001,  // X^19 + 1
    22'h020001,  // X^17 + 1
    22'h004001,  // X^14 + 1
    22'h00001B,  // X^4 + X^3 + X + 1
    22'h000041,  // X^6 + 1
    22'h004001   // X^14 + 1
  };

  // ---- ROM contents -----------------------------------------------------
  // Word of ROM f_r (rank r = 1..K) at address s, an unsigned integer with
  // m fraction bits:  floor(2^m * sqrt(-ln(2^(-r q) (s + delta)))).
  function automatic int unsigned f_word(int r, int s, int q, int m, real delta);
    real x;
    x = (real'(s) + delta) * (2.0 ** (-(r * q)));
    return int'($floor((2.0 ** m) * $sqrt(-$ln(x))));
  endfunction

  // Word of ROM g at address s', an unsigned integer with m' fraction bits:
  // floor(2^m' * sqrt(2) * cos(pi * 2^-q' * (s' + delta') / 2)).
  function automatic int unsigned g_word(int s, int qg, int mg, real deltag);
    real a;
    a = PI * (2.0 ** (-qg)) * (real'(s) + deltag) / 2.0;
    return int'($floor((2.0 ** mg) * $sqrt(2.0) * $cos(a)));
  endfunction

endpackage
