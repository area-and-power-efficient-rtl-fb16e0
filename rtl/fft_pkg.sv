// fft_pkg: types, constants and constant functions shared by the 64-point
// four-parallel radix-2^2 feedforward FFT for QPSK-OFDM.
//
// Number formats
//   * Data words are 16 bits per real component (the word width of the
//     design), two's complement with FRAC = 8 fraction bits (range +-128).
//     A QPSK input has magnitude 1, so no value in a 64-point transform can
//     exceed 64 in either component: the format never overflows and the
//     butterflies need no scaling. The choice of 8 fraction bits is this
//     design's own.
//   * Twiddle factors are 16-bit two's complement with TW_FRAC = 14 fraction
//     bits (1.0 = 16384).
//   * A QPSK symbol enters the FFT as a 2-bit code: a component equal to
//     +KMOD is coded 0, a component equal to -KMOD is coded 1.
//   * Between the multiplexer-based first stage and its rotators a value is
//     carried as a "level": a small signed integer m in -2..2 per component,
//     standing for m * 2 * KMOD (0, +-1.414, +-2.828).
//
// Twiddles follow the forward DFT, W_N^e = cos(2*pi*e/N) - j*sin(2*pi*e/N).
// The tables are computed at elaboration time by the constant functions below.
package fft_pkg;

  localparam int N       = 64;        // FFT size
  localparam int P       = 4;         // samples processed in parallel
  localparam int FRAME   = N / P;     // cycles per transform (16)
  localparam int TBITS   = $clog2(FRAME);
  localparam int DW      = 16;        // bits per real component
  localparam int FRAC    = 8;         // fraction bits of a data word
  localparam int TW      = 16;        // twiddle word width
  localparam int TW_FRAC = 14;        // twiddle fraction bits
  localparam real KMOD   = 0.707;     // QPSK normalisation factor
  localparam real PI     = 3.14159265358979323846;

  typedef logic signed [DW-1:0] data_t;
  typedef logic signed [TW-1:0] tw_t;

  typedef struct packed {
    data_t re;
    data_t im;
  } cplx_t;

  typedef struct packed {
    tw_t re;
    tw_t im;
  } twc_t;

  // QPSK symbol code: bit = 0 means +KMOD, bit = 1 means -KMOD.
  typedef struct packed {
    logic re;
    logic im;
  } qpsk_code_t;

  // Level of a component after the first stage, in units of 2*KMOD.
  typedef logic signed [2:0] level_t;

  typedef struct packed {
    level_t re;
    level_t im;
  } level_c_t;

  // Round a real number to the nearest integer (halves away from zero).
  function automatic int round_real(real v);
    return $rtoi(v + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction

  // scale * W_n^e in TW_FRAC fixed point.
  function automatic twc_t twiddle(int e, int n, real scale);
    twc_t w;
    real  a;
    a    = 2.0 * PI * real'(e) / real'(n);
    w.re = tw_t'(round_real(scale * $cos(a) * real'(1 << TW_FRAC)));
    w.im = tw_t'(round_real(-scale * $sin(a) * real'(1 << TW_FRAC)));
    return w;
  endfunction

  // A data constant in FRAC fixed point.
  function automatic data_t to_data(real v);
    return data_t'(round_real(v * real'(1 << FRAC)));
  endfunction

  // Multiply a complex value by -j: (a + jb)(-j) = b - ja. Only a swap and
  // a negation.
  function automatic cplx_t mul_mj(cplx_t x);
    cplx_t y;
    y.re = x.im;
    y.im = -x.re;
    return y;
  endfunction

endpackage
