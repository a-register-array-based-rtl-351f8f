// fft_pkg: constants, types and helper functions shared by the register-array
// FFT processor.
//
// The defaults follow the processor's main configuration: a 256-point
// radix-2 decimation-in-frequency FFT/IFFT on 16-bit fixed-point samples.
// The twiddle format (signed Q2.14, so that cos(0) = 1.0 is exact) is this
// design's own choice.
package fft_pkg;

  // Transform size and data width of the main configuration.
  localparam int unsigned FFT_N_DEF   = 256;
  localparam int unsigned DATA_W_DEF  = 16;
  // Twiddle coefficients: signed, COEF_FRAC fractional bits.
  localparam int unsigned COEF_W_DEF    = 16;
  localparam int unsigned COEF_FRAC_DEF = 14;
  // Stall cycles inserted after every stage (read-after-write hazard
  // between the register array and the selector).
  localparam int unsigned STALLS_PER_STAGE = 2;

  // Operating mode carried through the pipeline. The selector latches it
  // once per frame; the butterfly uses it to choose the sign of sin.
  typedef enum logic {
    MODE_FFT  = 1'b0,
    MODE_IFFT = 1'b1
  } fft_mode_e;

  // Cycles from the first butterfly issue to the last register-array write
  // of the last stage: every stage issues N/2 butterflies and then stalls.
  function automatic int unsigned exec_cycles(int unsigned n);
    return (n / 2) * $clog2(n) + STALLS_PER_STAGE * $clog2(n);
  endfunction

endpackage
