// fir_pkg: constants, types and the coefficient formula shared by the FIR
// low-pass filter system.
//
// The system is a 50 MHz design that synthesises a test sinusoid with a
// direct digital frequency synthesiser (DDFS), samples it at 2 MHz and passes
// it through a 201-tap low-pass FIR filter with a 100 kHz cut-off.
//
// Numbers taken from the design description: the 50 MHz clock, the 2 MHz
// sampling rate, the 100 kHz cut-off, 201 taps, 8-bit samples and 8-bit
// coefficients, the 24-bit phase accumulator, the 8192 x 8 sine ROM and the
// four frequency codes (671089 for the sampling strobe, and 419430, 838861
// and 855638 for 50, 100 and 102 kHz input tones).
//
// Coefficients: the ideal low-pass impulse response
//   h(k) = 2*fc/fs                      for k = 0
//   h(k) = sin(2*pi*k*fc/fs) / (pi*k)   for k != 0,   -100 <= k <= 100
// is normalised to its maximum h(0) = 0.1 and scaled to integers,
//   h_int(k) = round(127 * h(k) / h(0)),
// with a rectangular window (no tapering). Tap n of the filter uses k = n-100.
// Rounding is to the nearest integer, halves away from zero.
package fir_pkg;

  // ---- clocking and signal sizes ---------------------------------------
  localparam int unsigned PHASE_W  = 24;    // DDFS accumulator width
  localparam int unsigned ROM_AW   = 13;    // 8192-entry sine ROM
  localparam int unsigned DATA_W   = 8;     // sample width (0..255)
  localparam int unsigned COEF_W   = 8;     // coefficient width (-127..127)
  localparam int unsigned FIR_TAPS    = 201;   // filter length (order 200)

  // ---- frequency codes: code = f * 2^PHASE_W / f_ref ---------------------
  // Sampling strobe, referred to the 50 MHz clock: 2e6 * 2^24 / 50e6.
  localparam logic [PHASE_W-1:0] CODE_FSAM = 24'd671089;
  // Input tones, referred to the 2 MHz sampling rate: f * 2^24 / 2e6.
  localparam logic [PHASE_W-1:0] CODE_50K  = 24'd419430;
  localparam logic [PHASE_W-1:0] CODE_100K = 24'd838861;
  localparam logic [PHASE_W-1:0] CODE_102K = 24'd855638;

  // Tone selection of the input DDFS.
  typedef enum logic [1:0] {
    TONE_50K  = 2'd0,
    TONE_100K = 2'd1,
    TONE_102K = 2'd2,
    TONE_EXT  = 2'd3    // frequency code taken from an input port
  } tone_sel_e;

  // ---- coefficient formula ---------------------------------------------
  localparam real PI = 3.14159265358979323846;

  // Ideal low-pass impulse response at offset k from the centre tap.
  function automatic real lpf_ideal(int k, real fc_over_fs);
    if (k == 0) return 2.0 * fc_over_fs;
    return $sin(2.0 * PI * k * fc_over_fs) / (PI * k);
  endfunction

  // Integer coefficient of tap n (0 .. ntaps-1), scaled so that the centre
  // tap equals `scale` (127 for 8-bit coefficients).
  function automatic int lpf_coeff(int n, int ntaps, real fc_over_fs, int scale);
    real v;
    v = real'(scale) * lpf_ideal(n - (ntaps - 1) / 2, fc_over_fs)
        / lpf_ideal(0, fc_over_fs);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(0.5 - v);
  endfunction

endpackage
