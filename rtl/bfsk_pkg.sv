// Shared constants and table formulas of the coherent BFSK modem.
//
// All frequency words are phase increments of 24-bit accumulators: a word
// L makes an accumulator clocked at F wrap at L*F/2^24.  The sampling
// accumulator runs at the 50 MHz system clock (13422 -> 40000.4 Hz); the
// carrier and data accumulators advance once per sample, so their words are
// referred to the 40 kHz sample rate (503316 -> 1200 Hz, 880804 -> 2100 Hz,
// 41943 -> 100 Hz).  These numbers are the published design's own.
//
// Two functions give the contents of the design's two tables:
//   cos_rom_value : one cosine period in offset binary,
//                   round(128 + 127*cos(2*pi*k/2^AW)), values 1..255.
//   fir_coef      : a windowed-sinc low-pass (Hamming window, passband
//                   scaled to unity DC gain, as MATLAB fir1 does), quantised
//                   to signed integers with COEF_FRAC fraction bits.
// The 127 amplitude and 12 fraction bits are this implementation's choices.
package bfsk_pkg;

  localparam int unsigned ACC_W     = 24;      // phase accumulator width
  localparam int unsigned SAMPLE_W  = 8;       // sample / ROM word width
  localparam int unsigned ROM_AW    = 13;      // 8192-entry cosine ROM
  localparam int unsigned FIR_TAPS  = 251;     // order 250
  localparam int unsigned FIR_OW    = 24;      // filter accumulator width

  localparam logic [ACC_W-1:0] CODE_FSAM = 24'd13422;   // per 50 MHz clock
  localparam logic [ACC_W-1:0] CODE_CAR0 = 24'd503316;  // per sample
  localparam logic [ACC_W-1:0] CODE_CAR1 = 24'd880804;  // per sample
  localparam logic [ACC_W-1:0] CODE_DATA = 24'd41943;   // per sample

  localparam real PI = 3.14159265358979323846;

  // Offset-binary cosine sample k of a table with 2^aw entries.
  function automatic logic [7:0] cos_rom_value(int unsigned k, int unsigned aw);
    real v;
    v = 128.0 + 127.0 * $cos(2.0 * PI * real'(k) / real'(2 ** aw));
    return 8'($rtoi($floor(v + 0.5)));
  endfunction

  // Unquantised, unnormalised Hamming-windowed sinc tap n of a low-pass
  // with taps coefficients and cut-off fc_hz at sample rate fs_hz.
  function automatic real fir_tap_raw(int n, int taps, real fc_hz, real fs_hz);
    real wc, m, x, ideal, win;
    wc  = 2.0 * fc_hz / fs_hz;                // cut-off relative to Nyquist
    m   = real'(taps - 1) / 2.0;
    x   = real'(n) - m;
    ideal = (x == 0.0) ? wc : $sin(PI * wc * x) / (PI * x);
    win = 0.54 - 0.46 * $cos(2.0 * PI * real'(n) / real'(taps - 1));
    return ideal * win;
  endfunction

  // Sum of all raw taps: the DC gain that fir_coef divides out.
  function automatic real fir_raw_sum(int taps, real fc_hz, real fs_hz);
    real sum;
    sum = 0.0;
    for (int i = 0; i < taps; i++) sum += fir_tap_raw(i, taps, fc_hz, fs_hz);
    return sum;
  endfunction

  // Quantised tap n: raw tap / sum, times 2^frac, rounded to nearest.
  function automatic int fir_coef(int n, int taps, real fc_hz, real fs_hz, int frac, real sum);
    return $rtoi($floor(fir_tap_raw(n, taps, fc_hz, fs_hz) / sum * real'(2 ** frac) + 0.5));
  endfunction

endpackage
